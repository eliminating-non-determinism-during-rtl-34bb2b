// tb_rx_ddr_deserializer -- self-checking test of DDR capture and packing.
//
// Drives a random stream of idle beats and framed packets on both edges of
// the Rx clock (data centred between edges, as a source-synchronous
// transmitter does) and checks every packet that comes out: its contents,
// beat order, that idle beats are never stored, and that wr_en rises in the
// cycle after rising edge s+BEATS/2 for a packet starting at rising edge s.
// Runs with BEATS=4 and, in a second instance, BEATS=2.
module tb_rx_ddr_deserializer;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned LW = 8;
  localparam int T = 1000;          // Rx clock period

  logic rx_clk = 1'b0, rx_rst_n;
  logic [LW-1:0] rx_data;
  logic rx_frame;
  logic wr_en4, wr_en2;
  logic [LW*4-1:0] wr_data4;
  logic [LW*2-1:0] wr_data2;

  rx_ddr_deserializer #(.LANE_W(LW), .BEATS(4)) dut4 (
    .rx_clk, .rx_rst_n, .rx_data, .rx_frame, .wr_en(wr_en4), .wr_data(wr_data4));
  rx_ddr_deserializer #(.LANE_W(LW), .BEATS(2)) dut2 (
    .rx_clk, .rx_rst_n, .rx_data, .rx_frame, .wr_en(wr_en2), .wr_data(wr_data2));

  int checks = 0, failures = 0;
  int rise_cnt = 0;                     // number of rising edges so far
  // expected packets: data and the rising-edge count at which wr_en must be seen
  logic [LW*4-1:0] exp4_q[$]; int due4_q[$];
  logic [LW*2-1:0] exp2_q[$]; int due2_q[$];
  int got4 = 0, got2 = 0;

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge rx_clk) rise_cnt <= rise_cnt + 1;

  // check outputs in the middle of each cycle (just before the falling edge)
  always @(negedge rx_clk) if (rx_rst_n) begin
    if (wr_en4) begin
      checks++; got4++;
      if (exp4_q.size() == 0) begin failures++; $display("FAIL unexpected 4-beat packet"); end
      else begin
        logic [LW*4-1:0] e; int due;
        e = exp4_q.pop_front(); due = due4_q.pop_front();
        if (wr_data4 !== e || rise_cnt != due) begin
          failures++;
          $display("FAIL 4-beat: got %h at edge %0d, expected %h at %0d", wr_data4, rise_cnt, e, due);
        end
      end
    end
    if (wr_en2) begin
      checks++; got2++;
      if (exp2_q.size() == 0) begin failures++; $display("FAIL unexpected 2-beat packet"); end
      else begin
        logic [LW*2-1:0] e; int due;
        e = exp2_q.pop_front(); due = due2_q.pop_front();
        if (wr_data2 !== e || rise_cnt != due) begin
          failures++;
          $display("FAIL 2-beat: got %h at edge %0d, expected %h at %0d", wr_data2, rise_cnt, e, due);
        end
      end
    end
  end

  // drive one Rx clock cycle: rising-edge beat, falling-edge beat
  task automatic cycle(input logic [LW-1:0] d_rise, input logic f, input logic [LW-1:0] d_fall);
    rx_data = d_rise; rx_frame = f;
    #(T/4) rx_clk = 1'b1;
    #(T/4) rx_data = d_fall; rx_frame = 1'b0;
    #(T/4) rx_clk = 1'b0;
    #(T/4);
  endtask

  initial begin
    rx_rst_n = 1'b0; rx_data = '0; rx_frame = 1'b0;
    repeat (3) cycle('0, 1'b0, '0);
    rx_rst_n = 1'b1;
    repeat (2) cycle('0, 1'b0, '0);
    for (int p = 0; p < 400; p++) begin
      logic [LW-1:0] b[4];
      int idle;
      foreach (b[i]) b[i] = LW'($urandom);
      idle = (p % 3 == 0) ? 0 : $urandom_range(0, 3);
      // idle beats with random data, frame low
      repeat (idle) cycle(LW'($urandom), 1'b0, LW'($urandom));
      // 4-beat packet starts at the next rising edge (index rise_cnt),
      // rise_cnt counts completed edges, so this edge is number rise_cnt+1
      exp4_q.push_back({b[3], b[2], b[1], b[0]});
      due4_q.push_back(rise_cnt + 1 + 2);
      // the 2-beat instance sees two packets: {b1,b0} and, framed again, {b3,b2}
      exp2_q.push_back({b[1], b[0]});
      due2_q.push_back(rise_cnt + 1 + 1);
      cycle(b[0], 1'b1, b[1]);
      // second half: frame high again only in even packets, so the 4-beat
      // instance must ignore a frame mark inside a packet
      if (p % 2 == 0) begin
        exp2_q.push_back({b[3], b[2]});
        due2_q.push_back(rise_cnt + 1 + 1);
      end
      cycle(b[2], (p % 2 == 0), b[3]);
    end
    repeat (4) cycle('0, 1'b0, '0);
    checks++;
    if (got4 != 400 || got2 != 600 || exp4_q.size() != 0 || exp2_q.size() != 0) begin
      failures++;
      $display("FAIL counts: 4-beat %0d, 2-beat %0d", got4, got2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
