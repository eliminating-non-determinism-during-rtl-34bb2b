// tb_elasticity_buffer -- self-checking test of the dual-clock packet FIFO.
//
// Writes random packets with one clock and reads them with an unrelated,
// slower clock, at random rates on both sides.  A queue scoreboard checks
// that every packet accepted comes out once, in order, and that writes made
// while full are dropped and flagged.  Also checks that pkt_ready rises
// within SYNC_STAGES+1 read-clock edges of a write into an empty buffer, and
// that the buffer fills (wr_full) and overflows at least once.
module tb_elasticity_buffer;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W = 32, DEPTH = 8, SYNC = 2;

  logic wr_clk = 1'b0, rd_clk = 1'b0;
  logic wr_rst_n, rd_rst_n;
  logic wr_en, rd_en;
  logic [W-1:0] wr_data, rd_data;
  logic wr_full, overflow, pkt_ready;

  elasticity_buffer #(.DATA_W(W), .DEPTH(DEPTH), .SYNC_STAGES(SYNC)) dut (.*);

  always #1000 wr_clk = ~wr_clk;   // 2000 per write cycle
  always #3100 rd_clk = ~rd_clk;   // 6200 per read cycle

  int checks = 0, failures = 0;
  logic [W-1:0] sb[$];
  int n_full = 0, n_overflow_exp = 0, n_overflow_seen = 0, n_read = 0;
  bit exp_ovf_next = 1'b0;
  bit writing_done = 1'b0;
  int occupancy_w;   // packets stored, as the write side knows

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_rst_n = 1'b0; rd_rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    #20000;
    wr_rst_n = 1'b1; rd_rst_n = 1'b1;
  end

  // ---------------- writer ----------------
  initial begin
    @(posedge wr_rst_n);
    for (int i = 0; i < 3000; i++) begin
      @(negedge wr_clk);
      // write bursts alternate with quiet stretches; writes while full are allowed
      wr_en   = (i % 400 < 250) ? ($urandom_range(0, 2) != 0) : ($urandom_range(0, 20) == 0);
      wr_data = $urandom;
      @(posedge wr_clk);
      // outputs sampled before the edge took effect
      if (wr_en) begin
        if (wr_full) n_overflow_exp++;
        else sb.push_back(wr_data);
      end
      if (wr_full) n_full++;
    end
    @(negedge wr_clk) wr_en = 1'b0;
    writing_done = 1'b1;
  end

  always @(posedge wr_clk) begin
    if (wr_rst_n && overflow) n_overflow_seen++;
  end

  // ---------------- reader ----------------
  initial begin
    @(posedge rd_rst_n);
    forever begin
      @(negedge rd_clk);
      rd_en = pkt_ready && ($urandom_range(0, 3) != 0);
      if (rd_en) begin
        checks++;
        n_read++;
        if (sb.size() == 0) begin
          failures++;
          $display("FAIL read with empty scoreboard");
        end else begin
          logic [W-1:0] e;
          e = sb.pop_front();
          if (rd_data !== e) begin
            failures++;
            $display("FAIL read %0d: got %h expected %h", n_read, rd_data, e);
          end
        end
      end
      if (writing_done && !pkt_ready && sb.size() == 0) break;
    end
    rd_en = 1'b0;
    // latency check: one write into the empty buffer
    repeat (4) @(negedge wr_clk);
    wr_data = 32'hCAFE_F00D;
    wr_en = 1'b1;
    @(posedge wr_clk);
    sb.push_back(wr_data);
    @(negedge wr_clk) wr_en = 1'b0;
    begin
      int edges;
      edges = 0;
      while (!pkt_ready && edges < 10) begin
        @(posedge rd_clk); #1; edges++;
      end
      checks++;
      if (!pkt_ready || edges > int'(SYNC) + 1 || edges < int'(SYNC)) begin
        failures++;
        $display("FAIL pkt_ready after %0d read edges", edges);
      end
      checks++;
      if (rd_data !== 32'hCAFE_F00D) begin
        failures++;
        $display("FAIL latency packet data %h", rd_data);
      end
    end
    repeat (3) @(negedge wr_clk);
    checks++;
    if (n_overflow_seen != n_overflow_exp || n_overflow_exp == 0 || n_full == 0 || n_read < 500) begin
      failures++;
      $display("FAIL overflow seen %0d expected %0d, full cycles %0d, reads %0d",
               n_overflow_seen, n_overflow_exp, n_full, n_read);
    end
    $display("reads %0d, full cycles %0d, overflows %0d", n_read, n_full, n_overflow_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
