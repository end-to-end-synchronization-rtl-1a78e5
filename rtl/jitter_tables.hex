079
07f
081
083
085
086
087
088
089
08a
08a
08b
08c
08c
08d
08d
08e
08e
08f
08f
08f
090
090
091
091
091
092
092
092
093
093
093
093
094
094
094
094
095
095
095
095
096
096
096
096
097
097
097
097
098
098
098
098
098
099
099
099
099
099
09a
09a
09a
09a
09a
09a
09b
09b
09b
09b
09b
09c
09c
09c
09c
09c
09c
09d
09d
09d
09d
09d
09d
09e
09e
09e
09e
09e
09e
09f
09f
09f
09f
09f
09f
09f
0a0
0a0
0a0
0a0
0a0
0a0
0a1
0a1
0a1
0a1
0a1
0a1
0a1
0a2
0a2
0a2
0a2
0a2
0a2
0a3
0a3
0a3
0a3
0a3
0a3
0a3
0a4
0a4
0a4
0a4
0a4
0a4
0a4
0a5
0a5
0a5
0a5
0a5
0a5
0a5
0a6
0a6
0a6
0a6
0a6
0a6
0a6
0a7
0a7
0a7
0a7
0a7
0a7
0a8
0a8
0a8
0a8
0a8
0a8
0a8
0a9
0a9
0a9
0a9
0a9
0a9
0aa
0aa
0aa
0aa
0aa
0aa
0aa
0ab
0ab
0ab
0ab
0ab
0ab
0ac
0ac
0ac
0ac
0ac
0ac
0ad
0ad
0ad
0ad
0ad
0ad
0ae
0ae
0ae
0ae
0ae
0af
0af
0af
0af
0af
0af
0b0
0b0
0b0
0b0
0b0
0b1
0b1
0b1
0b1
0b1
0b2
0b2
0b2
0b2
0b3
0b3
0b3
0b3
0b4
0b4
0b4
0b4
0b5
0b5
0b5
0b5
0b6
0b6
0b6
0b6
0b7
0b7
0b7
0b8
0b8
0b8
0b9
0b9
0ba
0ba
0ba
0bb
0bb
0bc
0bc
0bd
0bd
0be
0bf
0bf
0c0
0c1
0c2
0c3
0c4
0c6
0c8
0ca
0d0
08b
08b
08b
08b
08b
08c
08c
08c
08c
08c
08d
08d
08d
08d
08d
08e
08e
08e
08e
08e
08f
08f
08f
08f
08f
090
090
090
090
091
091
091
091
091
092
092
092
092
092
093
093
093
093
093
094
094
094
094
094
095
095
095
095
095
096
096
096
096
096
097
097
097
097
097
098
098
098
098
098
099
099
099
099
099
09a
09a
09a
09a
09a
09b
09b
09b
09b
09b
09c
09c
09c
09c
09c
09d
09d
09d
09d
09d
09e
09e
09e
09e
09f
09f
09f
09f
09f
0a0
0a0
0a0
0a0
0a0
0a1
0a1
0a1
0a1
0a1
0a2
0a2
0a2
0a2
0a2
0a3
0a3
0a3
0a3
0a3
0a4
0a4
0a4
0a4
0a4
0a5
0a5
0a5
0a5
0a5
0a6
0a6
0a6
0a6
0a6
0a7
0a7
0a7
0a7
0a7
0a8
0a8
0a8
0a8
0a8
0a9
0a9
0a9
0a9
0a9
0aa
0aa
0aa
0aa
0aa
0ab
0ab
0ab
0ab
0ac
0ac
0ac
0ac
0ac
0ad
0ad
0ad
0ad
0ad
0ae
0ae
0ae
0ae
0ae
0af
0af
0af
0af
0af
0b0
0b0
0b0
0b0
0b0
0b1
0b1
0b1
0b1
0b1
0b2
0b2
0b2
0b2
0b2
0b3
0b3
0b3
0b3
0b3
0b4
0b4
0b4
0b4
0b4
0b5
0b5
0b5
0b5
0b5
0b6
0b6
0b6
0b6
0b6
0b7
0b7
0b7
0b7
0b7
0b8
0b8
0b8
0b8
0b8
0b9
0b9
0b9
0b9
0ba
0ba
0ba
0ba
0ba
0bb
0bb
0bb
0bb
0bb
0bc
0bc
0bc
0bc
0bc
0bd
0bd
0bd
0bd
0bd
0be
0be
0be
0be
0be
