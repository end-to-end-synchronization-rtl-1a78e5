// jitter_eprom: the EPROM of the transfer control unit. It holds the inverse
// of the distribution function of the wanted delay jitter, so a uniformly
// distributed address yields an intercell gap td (in Tbyte) with that
// distribution. Changing the contents changes the jitter statistics.
// The supplied table has two halves of 256 words, selected by the top address
// bit: Gaussian (addr[8]=0) and Uniform (addr[8]=1), both with mean 164.5
// and standard deviation 15 Tbyte. Entry i of a half is
// round(164.5 + 15*Q((i+0.5)/256)), Q being the inverse distribution function
// of the zero-mean, unit-variance law. Widths and the two-table layout are
// this design's choice. Synchronous read: data follows addr by one cycle.
module jitter_eprom #(
  parameter int unsigned ADDR_W    = 9,
  parameter int unsigned DATA_W    = 12,
  parameter string       INIT_FILE = "rtl/jitter_tables.hex"
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);
  logic [DATA_W-1:0] rom [2**ADDR_W];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) data <= rom[addr];
endmodule
