// sync_fifo: byte buffer used both as the transmit FIFO (between the sending
// user interface and the cell bus) and as the receive elastic buffer that
// absorbs the cell delay jitter (32 Kbytes in the reference configuration).
// A circular memory with write and read pointers one bit wider than the
// address distinguishes full from empty. The read is registered: rd_data and
// rd_valid appear the cycle after an accepted rd_en. A write while full or a
// read while empty is refused and reported for one cycle on overflow /
// underflow. flush empties the buffer (used when the receiver re-centres
// after a fault); it has priority over a same-cycle write or read.
// The FIFO itself is what the system description calls for; the registered
// read, the flags and the flush are choices of this design.
module sync_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic             underflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign do_wr = wr_en && !full && !flush;
  assign do_rd = rd_en && !empty && !flush;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
    if (do_rd) rd_data <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      rd_valid  <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      rd_valid  <= do_rd;
      overflow  <= wr_en && full && !flush;
      underflow <= rd_en && empty && !flush;
      if (flush) begin
        wptr <= '0;
        rptr <= '0;
      end else begin
        if (do_wr) wptr <= wptr + 1'b1;
        if (do_rd) rptr <= rptr + 1'b1;
      end
    end
  end

  initial begin
    assert (DEPTH == (1 << AW)) else $error("sync_fifo: DEPTH must be a power of two");
  end
endmodule
