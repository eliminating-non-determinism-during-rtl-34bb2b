// rx_ddr_deserializer -- DDR capture and packet assembly, Rx clock domain.
//
// The tester sends the stimulus stream source-synchronously: LANE_W data
// lanes are valid on both the rising and the falling edge of rx_clk.  A
// rising-edge flop and a falling-edge flop capture the two beats of each
// Rx clock cycle; at the next rising edge the pair is one 2-beat unit, and
// BEATS/2 units are shifted into a packet word (first beat in the low bits).
//
// Framing is this design's choice: rx_frame is sampled with the rising-edge
// beat and marks the first beat of a packet.  A packet therefore starts on a
// rising edge (BEATS must be even).  Beats outside a packet are idle symbols
// and are not stored.
//
// Interface and timing: wr_en is a one-cycle pulse (rx_clk domain) with the
// assembled packet on wr_data.  For a packet whose first beat is on rising
// edge s, wr_en is high in the cycle after rising edge s + BEATS/2, so the
// elasticity buffer writes the packet on rising edge s + BEATS/2 + 1.
// Reset (rx_rst_n, asynchronous, active low) returns to idle.
module rx_ddr_deserializer #(
  parameter int unsigned LANE_W = rx_pkg::LANE_W,
  parameter int unsigned BEATS  = rx_pkg::BEATS
) (
  input  logic                    rx_clk,
  input  logic                    rx_rst_n,
  input  logic [LANE_W-1:0]       rx_data,
  input  logic                    rx_frame,
  output logic                    wr_en,
  output logic [LANE_W*BEATS-1:0] wr_data
);

  localparam int unsigned UNITS = BEATS / 2;          // rising+falling pairs per packet
  localparam int unsigned CW    = (UNITS > 1) ? $clog2(UNITS) : 1;

  // DDR capture
  logic [LANE_W-1:0] rise_q, fall_q;
  logic              rise_frame_q;

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      rise_q       <= '0;
      rise_frame_q <= 1'b0;
    end else begin
      rise_q       <= rx_data;
      rise_frame_q <= rx_frame;
    end
  end

  always_ff @(negedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) fall_q <= '0;
    else           fall_q <= rx_data;
  end

  // One complete rising/falling unit is available at every rising edge.
  logic [2*LANE_W-1:0] unit;
  assign unit = {fall_q, rise_q};

  // Packet assembly
  logic                    in_pkt;     // collecting units 1..UNITS-1
  logic [CW-1:0]           idx;        // index of the next unit to store
  logic [LANE_W*BEATS-1:0] shreg;

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      in_pkt  <= 1'b0;
      idx     <= '0;
      shreg   <= '0;
      wr_en   <= 1'b0;
      wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (!in_pkt) begin
        if (rise_frame_q) begin
          if (UNITS == 1) begin
            wr_en   <= 1'b1;
            wr_data <= (LANE_W*BEATS)'(unit);
          end else begin
            shreg[2*LANE_W-1:0] <= unit;
            idx    <= CW'(1);
            in_pkt <= 1'b1;
          end
        end
      end else begin
        shreg[idx*2*LANE_W +: 2*LANE_W] <= unit;
        if (32'(idx) == UNITS - 1) begin
          wr_en   <= 1'b1;
          wr_data <= shreg;
          wr_data[idx*2*LANE_W +: 2*LANE_W] <= unit;
          in_pkt  <= 1'b0;
          idx     <= '0;
        end else begin
          idx <= idx + CW'(1);
        end
      end
    end
  end

  initial assert (BEATS >= 2 && BEATS % 2 == 0)
    else $error("rx_ddr_deserializer: BEATS must be even and at least 2");

endmodule
