// hs_rx_port -- receive side of a source-synchronous high-speed I/O port,
// with trigger-timed transfer into the core clock domain for deterministic
// at-speed test.
//
// Data path: the tester (or the link partner) drives LANE_W lanes on both
// edges of rx_clk.  rx_ddr_deserializer packs BEATS beats into one packet,
// which is written into elasticity_buffer with rx_clk.  trigger_read_ctrl
// reads the buffer with core_clk: at once in normal mode, or exactly
// TRIG_DELAY core cycles after a trigger on shared_pin in test mode, which
// makes the core cycle in which a packet arrives independent of the Rx
// clock's phase.  The packet read is registered and presented to the core
// logic on pkt_valid / pkt_data for one core cycle.
//
// Timing in test mode: shared_pin high in core cycle n gives pkt_valid high
// in cycle n+TRIG_DELAY+1, provided the packet reached the buffer's read side
// by then.  In normal mode pkt_valid follows the Rx edge that wrote the
// packet by SYNC_STAGES+1 or SYNC_STAGES+2 core edges, depending on phase.
//
// The core clock normally comes from an on-chip PLL locked to the tester's
// reference clock, and the Rx signals from LVDS receivers; both are outside
// this module and enter as plain ports.  eb_overflow is in the rx_clk
// domain, trig_miss and pin_func in the core_clk domain.  Assert both
// resets together.
module hs_rx_port #(
  parameter int unsigned LANE_W     = rx_pkg::LANE_W,
  parameter int unsigned BEATS      = rx_pkg::BEATS,
  parameter int unsigned EB_DEPTH   = rx_pkg::EB_DEPTH,
  parameter int unsigned TRIG_DELAY = rx_pkg::TRIG_DELAY
) (
  // Rx link, rx_clk domain
  input  logic                    rx_clk,
  input  logic                    rx_rst_n,
  input  logic [LANE_W-1:0]       rx_data,
  input  logic                    rx_frame,
  output logic                    eb_overflow,
  // core side, core_clk domain
  input  logic                    core_clk,
  input  logic                    core_rst_n,
  input  logic                    test_mode,
  input  logic                    shared_pin,
  output logic                    pin_func,
  output logic                    pkt_valid,
  output logic [LANE_W*BEATS-1:0] pkt_data,
  output logic                    trig_miss
);

  localparam int unsigned PKT_W = LANE_W * BEATS;

  logic             wr_en;
  logic [PKT_W-1:0] wr_data;
  logic             eb_full;
  logic             eb_ready;
  logic             rd_en;
  logic [PKT_W-1:0] rd_data;
  logic             trig_busy;

  rx_ddr_deserializer #(.LANE_W(LANE_W), .BEATS(BEATS)) u_deser (
    .rx_clk   (rx_clk),
    .rx_rst_n (rx_rst_n),
    .rx_data  (rx_data),
    .rx_frame (rx_frame),
    .wr_en    (wr_en),
    .wr_data  (wr_data)
  );

  elasticity_buffer #(.DATA_W(PKT_W), .DEPTH(EB_DEPTH),
                      .SYNC_STAGES(rx_pkg::SYNC_STAGES)) u_ebuf (
    .wr_clk    (rx_clk),
    .wr_rst_n  (rx_rst_n),
    .wr_en     (wr_en),
    .wr_data   (wr_data),
    .wr_full   (eb_full),
    .overflow  (eb_overflow),
    .rd_clk    (core_clk),
    .rd_rst_n  (core_rst_n),
    .rd_en     (rd_en),
    .rd_data   (rd_data),
    .pkt_ready (eb_ready)
  );

  trigger_read_ctrl #(.TRIG_DELAY(TRIG_DELAY)) u_trig (
    .clk        (core_clk),
    .rst_n      (core_rst_n),
    .test_mode  (test_mode),
    .shared_pin (shared_pin),
    .pin_func   (pin_func),
    .pkt_ready  (eb_ready),
    .rd_en      (rd_en),
    .trig_busy  (trig_busy),
    .trig_miss  (trig_miss)
  );

  // registered hand-over to the core logic
  always_ff @(posedge core_clk or negedge core_rst_n) begin
    if (!core_rst_n) begin
      pkt_valid <= 1'b0;
      pkt_data  <= '0;
    end else begin
      pkt_valid <= rd_en;
      if (rd_en) pkt_data <= rd_data;
    end
  end

endmodule
