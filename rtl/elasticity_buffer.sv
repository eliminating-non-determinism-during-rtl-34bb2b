// elasticity_buffer -- dual-clock packet FIFO between the Rx and core clocks.
//
// Packets assembled in the Rx clock domain are written here and held until
// the core clock domain reads them; this is where the receive path crosses
// the asynchronous boundary.  It is the usual dual-clock FIFO: binary
// pointers address the storage, their Gray-coded copies cross to the other
// domain through SYNC_STAGES-flop synchronizers, and full/empty are found by
// comparing a local Gray pointer with the synchronized remote one.
//
// Read side (rd_clk = core clock): pkt_ready is high while at least one
// packet is stored; rd_data always shows the oldest packet (first-word fall
// through) and rd_en pops it on the next rising edge.  A write is seen by
// the reader SYNC_STAGES or SYNC_STAGES+1 core edges after the Rx edge that
// wrote it -- which of the two depends on the phase of the Rx clock, and is
// exactly the cycle uncertainty that the trigger read controller removes.
//
// Write side (wr_clk = Rx clock): wr_en stores wr_data unless the buffer is
// full; a write while full is dropped and reported by a one-cycle overflow
// pulse (this design's choice).  DEPTH must be a power of two.  Both resets
// are asynchronous, active low, and should be applied together.
module elasticity_buffer #(
  parameter int unsigned DATA_W      = rx_pkg::PKT_W,
  parameter int unsigned DEPTH       = rx_pkg::EB_DEPTH,
  parameter int unsigned SYNC_STAGES = rx_pkg::SYNC_STAGES
) (
  // write side, Rx clock domain
  input  logic              wr_clk,
  input  logic              wr_rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_full,
  output logic              overflow,
  // read side, core clock domain
  input  logic              rd_clk,
  input  logic              rd_rst_n,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              pkt_ready
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w, wgray_r;   // synchronized remote pointers

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_nxt;
  assign wr_full  = (wgray == {~rgray_w[AW:AW-1], rgray_w[AW-2:0]});
  assign wbin_nxt = wbin + (AW+1)'(1);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && wr_full;
      if (wr_en && !wr_full) begin
        wbin  <= wbin_nxt;
        wgray <= bin2gray(wbin_nxt);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  cdc_sync #(.WIDTH(AW+1), .STAGES(SYNC_STAGES)) u_sync_r2w (
    .clk(wr_clk), .rst_n(wr_rst_n), .d(rgray), .q(rgray_w)
  );

  // ---------------- read side ----------------
  logic [AW:0] rbin_nxt;
  assign pkt_ready = (rgray != wgray_r);
  assign rd_data   = mem[rbin[AW-1:0]];
  assign rbin_nxt  = rbin + (AW+1)'(1);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (rd_en && pkt_ready) begin
      rbin  <= rbin_nxt;
      rgray <= bin2gray(rbin_nxt);
    end
  end

  cdc_sync #(.WIDTH(AW+1), .STAGES(SYNC_STAGES)) u_sync_w2r (
    .clk(rd_clk), .rst_n(rd_rst_n), .d(wgray), .q(wgray_r)
  );

  // The reader must only pop a packet that is there.
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n)
                                   rd_en |-> pkt_ready)
    else $error("elasticity_buffer: read while empty");

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("elasticity_buffer: DEPTH must be a power of two, at least 4");

endmodule
