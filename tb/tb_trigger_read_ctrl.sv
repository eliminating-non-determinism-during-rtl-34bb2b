// tb_trigger_read_ctrl -- self-checking test of the trigger read controller.
//
// Drives random packet-ready, trigger and mode sequences and compares every
// cycle's rd_en, pin_func and trig_miss with a cycle-level reference model:
// a trigger seen in cycle n schedules a read in cycle n+TRIG_DELAY (if no
// earlier trigger is still pending past cycle n), normal mode reads whenever
// a packet is ready.  Also checks explicitly that each timed read lands
// exactly TRIG_DELAY cycles after its trigger.
module tb_trigger_read_ctrl;

  localparam int unsigned D = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic test_mode = 1'b0, shared_pin = 1'b0, pkt_ready = 1'b0;
  logic pin_func, rd_en, trig_busy, trig_miss;

  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_cycle = -1;      // cycle in which the model's counter expires
  int trig_cycle = -1;     // cycle of the accepted trigger
  int timed_reads = 0, misses = 0, ignored = 0;

  trigger_read_ctrl #(.TRIG_DELAY(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %b expected %b", cyc, what, got, exp);
    end
  endtask

  // Reference model, evaluated in the middle of each cycle (negedge).
  task automatic model_cycle();
    logic exp_rd, exp_miss, exp_pin;
    logic expire;
    expire   = test_mode && (exp_cycle == cyc);
    exp_rd   = test_mode ? (expire && pkt_ready) : pkt_ready;
    exp_miss = expire && !pkt_ready;
    exp_pin  = shared_pin && !test_mode;
    check(rd_en, exp_rd, "rd_en");
    check(trig_miss, exp_miss, "trig_miss");
    check(pin_func, exp_pin, "pin_func");
    check(trig_busy, exp_cycle > cyc, "trig_busy");
    if (expire && pkt_ready) begin
      timed_reads++;
      checks++;
      if (cyc - trig_cycle != int'(D)) begin
        failures++;
        $display("FAIL read %0d cycles after trigger, expected %0d", cyc - trig_cycle, D);
      end
    end
    if (exp_miss) misses++;
    // state update for the edge that ends this cycle
    if (!test_mode) exp_cycle = -1;
    else if (shared_pin && (exp_cycle <= cyc)) begin
      exp_cycle  = cyc + int'(D);
      trig_cycle = cyc;
    end else if (shared_pin) ignored++;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 6; phase++) begin
      test_mode = (phase % 2 == 1) || (phase == 4);
      for (int i = 0; i < 400; i++) begin
        // drive this cycle's inputs just after the rising edge
        @(posedge clk); #1;
        cyc++;
        pkt_ready  = ($urandom_range(0, 3) != 0);
        if (phase == 5) pkt_ready = ($urandom_range(0, 3) == 0);   // many misses
        shared_pin = ($urandom_range(0, 4) == 0);
        if (i == 0 && phase == 4) test_mode = 1'b0;               // mode switch
        if (i == 3 && phase == 4) test_mode = 1'b1;
        @(negedge clk);
        model_cycle();
      end
    end
    checks++;
    if (timed_reads == 0 || misses == 0 || ignored == 0) begin
      failures++;
      $display("FAIL coverage: timed_reads=%0d misses=%0d ignored=%0d", timed_reads, misses, ignored);
    end
    $display("timed reads %0d, misses %0d, ignored triggers %0d", timed_reads, misses, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
