// e2e_sync_top: end-to-end synchronization test system with adaptive
// (FIFO-level) clock recovery using the hybrid control algorithm.
//
// Transmitter: bytes from the sending user interface (src_wr/src_data, at the
// source's service rate) enter the transmit FIFO. The Programmable Transfer
// Control unit (ptc) reads them out in 47-byte cells, one byte per network
// byte clock, separated by pseudo-random gaps drawn from the EPROM's jitter
// distribution (dist_sel: 0 Gaussian, 1 Uniform), and stalls the reads while
// the FIFO is empty (Hold). The cells travel on the parallel bus (bus: byte,
// strobe, start-of-cell).
// Receiver: the bytes enter the receive FIFO (32 Kbytes). hybrid_dpll tracks
// its level and steers a counter; the counter word goes through the D/A
// converter, low-pass filter and VCO (behavioural models), whose ticks read
// the FIFO, delivering the recovered byte stream (rx_valid/rx_data) at the
// recovered service rate. After reset, and after any underflow or overflow,
// the receive FIFO is flushed and refilled to half before reading resumes.
//
// Everything is clocked by clk, the network byte clock (Tbyte = 1/F_SYS_HZ);
// rd_clk is the recovered service byte clock as seen in that domain. The user
// interfaces and the pattern insertion/extraction stage are not part of this
// design: the source stream enters and the recovered stream leaves on ports.
// The single clock domain, the flush-and-refill fault handling and all sizes
// not stated in the system description (transmit FIFO, thresholds, sampling
// interval, D/A width, filter cutoff) are this design's choices.
module e2e_sync_top
  import e2e_pkg::*;
#(
  parameter int unsigned RX_DEPTH        = 32768,
  parameter int unsigned TX_DEPTH        = 1024,
  parameter int unsigned CELL_BYTES      = e2e_pkg::CELL_PAYLOAD,
  parameter int unsigned SCR_BITS        = 8,
  parameter int unsigned DELAY_W         = 12,
  parameter string       EPROM_FILE      = "rtl/jitter_tables.hex",
  parameter int unsigned TH_LOW          = RX_DEPTH / 8,
  parameter int unsigned TH_HIGH         = RX_DEPTH - RX_DEPTH / 8,
  parameter int unsigned SAMPLE_INTERVAL = 1 << 20,
  parameter int unsigned N_AVG           = 8,
  parameter int unsigned SLOPE_TH        = 2,
  parameter int unsigned CTRL_W          = 12,
  parameter real         FC_HZ           = 100.0,
  parameter real         F_SYS_HZ        = 19.44e6,
  parameter real         F_SERVICE_HZ    = 4.296e6,
  parameter real         PPM_RANGE       = 20.0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      dist_sel,
  input  logic                      src_wr,
  input  logic [7:0]                src_data,
  output cell_bus_t                 bus,
  output logic                      rx_valid,
  output logic [7:0]                rx_data,
  output logic                      rd_clk,
  output logic [$clog2(TX_DEPTH):0] tx_level,
  output logic [$clog2(RX_DEPTH):0] rx_level,
  output logic                      hold,
  output logic                      tx_overflow,
  output logic [DELAY_W-1:0]        gap,
  output logic [CTRL_W-1:0]         ctrl_word,
  output rec_state_e                rx_state,
  output logic                      up,
  output logic                      down,
  output logic                      resync,
  output logic                      rx_fault,
  output real                       vco_freq
);
  // transmitter
  logic       tx_rd, tx_rd_valid, tx_empty, tx_full, tx_under;
  logic [7:0] tx_q;

  sync_fifo #(.DEPTH(TX_DEPTH), .WIDTH(8)) u_tx_fifo (
    .clk, .rst_n, .flush(1'b0),
    .wr_en(src_wr), .wr_data(src_data),
    .rd_en(tx_rd), .rd_data(tx_q), .rd_valid(tx_rd_valid),
    .empty(tx_empty), .full(tx_full), .overflow(tx_overflow), .underflow(tx_under)
  );

  ptc #(
    .TX_DEPTH(TX_DEPTH), .CELL_BYTES(CELL_BYTES), .SCR_BITS(SCR_BITS),
    .DELAY_W(DELAY_W), .EPROM_FILE(EPROM_FILE)
  ) u_ptc (
    .clk, .rst_n, .dist_sel, .src_wr, .fifo_rd(tx_rd),
    .bus_wr(bus.wr), .bus_sop(bus.sop), .hold, .tx_level, .gap
  );

  assign bus.data = tx_q;

  // receiver
  logic rx_rd, rx_empty, rx_full, rx_over, rx_under, vco_tick;
  real  v_dac, v_lpf;

  sync_fifo #(.DEPTH(RX_DEPTH), .WIDTH(8)) u_rx_fifo (
    .clk, .rst_n, .flush(resync),
    .wr_en(bus.wr), .wr_data(bus.data),
    .rd_en(rx_rd), .rd_data(rx_data), .rd_valid(rx_valid),
    .empty(rx_empty), .full(rx_full), .overflow(rx_over), .underflow(rx_under)
  );

  hybrid_dpll #(
    .DEPTH(RX_DEPTH), .TH_LOW(TH_LOW), .TH_HIGH(TH_HIGH),
    .SAMPLE_INTERVAL(SAMPLE_INTERVAL), .N_AVG(N_AVG), .SLOPE_TH(SLOPE_TH),
    .CTRL_W(CTRL_W)
  ) u_dpll (
    .clk, .rst_n, .wr_pulse(bus.wr), .rd_tick(vco_tick), .fifo_rd(rx_rd),
    .resync, .ctrl_word, .level(rx_level), .state(rx_state), .up, .down,
    .fault(rx_fault)
  );

  dac_model #(.W(CTRL_W), .VREF(1.0)) u_dac (.word(ctrl_word), .vout(v_dac));

  lpf_model #(.FC_HZ(FC_HZ), .F_SAMPLE_HZ(F_SYS_HZ), .V_INIT(0.5)) u_lpf (
    .clk, .rst_n, .vin(v_dac), .vout(v_lpf)
  );

  vco_model #(
    .F_CENTER_HZ(F_SERVICE_HZ), .PPM_RANGE(PPM_RANGE), .VREF(1.0), .F_SYS_HZ(F_SYS_HZ)
  ) u_vco (
    .clk, .rst_n, .vctrl(v_lpf), .clk_out(rd_clk), .tick(vco_tick), .freq_hz(vco_freq)
  );

  // The PTC never reads an empty transmit FIFO (Hold) and the receive FIFO's
  // own flags agree with the level tracked by the recovery loop.
  a_no_tx_underflow: assert property (@(posedge clk) disable iff (!rst_n) !tx_under);
  a_hold_is_empty:   assert property (@(posedge clk) disable iff (!rst_n) hold == tx_empty);
  a_bus_has_data:    assert property (@(posedge clk) disable iff (!rst_n) bus.wr == tx_rd_valid);
  a_tx_full_flag:    assert property (@(posedge clk) disable iff (!rst_n)
    tx_full == (tx_level == ($clog2(TX_DEPTH)+1)'(TX_DEPTH)));
  a_rx_over_seen:    assert property (@(posedge clk) disable iff (!rst_n) rx_over |-> $past(rx_fault));
  a_rx_under_seen:   assert property (@(posedge clk) disable iff (!rst_n) rx_under |-> $past(rx_fault));
  a_rx_flags_agree:  assert property (@(posedge clk) disable iff (!rst_n)
    rx_empty == (rx_level == '0) && rx_full == (rx_level == ($clog2(RX_DEPTH)+1)'(RX_DEPTH)));
endmodule
