// tb_hs_rx_port -- end-to-end test of the receive port at its default sizes.
//
// A behavioural tester sends the same packet stream several times.  Each run
// shifts the whole Rx clock by a random phase of up to +/-EPA against the
// core clock, the way limited edge placement accuracy does on real test
// equipment.  Every packet is sent so that, nominally, the Rx edge that
// writes it into the elasticity buffer coincides with core clock edge W:
// the worst case, where the phase decides the core cycle it is seen in.
//
//  * Normal mode: the packet reaches the core in cycle W+SYNC_STAGES or
//    W+SYNC_STAGES+1 depending on the phase.  The test checks that range
//    and counts the packets whose arrival cycle changed between runs (the
//    non-determinism the trigger removes); it must happen.
//  * Test mode: the tester raises the shared pin in cycle W+1; every packet
//    must reach the core in cycle W+1+TRIG_DELAY+1 in every run.
//    Packets that arrived early and waited, and packets that arrived late,
//    are both counted; both must occur.
//  * A trigger with no packet sent must give trig_miss and no packet.
//  * With no triggers, EB_DEPTH+2 packets must overflow the buffer twice,
//    and the EB_DEPTH stored ones must drain in order in normal mode.
//  * In normal mode the shared pin must reach pin_func; in test mode not.
// Packet contents and order are checked in every run.
module tb_hs_rx_port;
  timeunit 1ps; timeprecision 1ps;

  import rx_pkg::*;

  localparam int TC   = 8000;   // core clock period (125 MHz)
  localparam int TRX  = 1000;   // Rx clock period (1 GHz, 2 Gb/s per lane)
  localparam int EPA  = 400;    // phase uncertainty of the Rx clock, +/-
  localparam int NPKT = 6;      // packets per run
  localparam int NRUN = 8;      // runs per mode
  localparam int GAP  = 4;      // core cycles between packets
  localparam int RX_PER_CORE = TC / TRX;
  localparam longint TRX_L = 64'(TRX), TRX_H = 64'(TRX / 2), TRX_Q = 64'(TRX / 4);

  logic rx_clk = 1'b0, core_clk = 1'b0;
  logic rx_rst_n, core_rst_n;
  logic [LANE_W-1:0] rx_data;
  logic rx_frame, test_mode, shared_pin;
  logic pin_func, pkt_valid, eb_overflow, trig_miss;
  logic [PKT_W-1:0] pkt_data;

  hs_rx_port dut (.*);

  always #(TC/2) core_clk = ~core_clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge core_clk) cyc <= cyc + 1;

  // arrivals observed by the monitor
  int arr_cyc[$];
  logic [PKT_W-1:0] arr_dat[$];
  int n_miss = 0, n_ovf = 0;
  always @(negedge core_clk) begin
    if (pkt_valid) begin arr_cyc.push_back(cyc); arr_dat.push_back(pkt_data); end
    if (trig_miss) n_miss++;
  end
  always @(posedge rx_clk) if (eb_overflow) n_ovf++;

  // mechanism counters
  int m_nondet = 0, m_trig_read = 0, m_held_early = 0, m_late = 0;
  int m_normal_read = 0, m_overflow = 0, m_miss = 0, m_pin = 0;

  initial begin : watchdog
    #400_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wait_cycle(input int c);   // to the middle of core cycle c
    while (cyc < c) @(negedge core_clk);
  endtask

  // Tester, Rx side: rx clock edges at t0 + phi + h*TRX/2 (h = half-cycle),
  // data changed a quarter period before each edge.  Packet p starts at rising
  // edge s_p and fills edges s_p .. s_p+BEATS/2-1.
  task automatic send_stream(input longint t0, input int phi, input int starts[$],
                             input logic [PKT_W-1:0] pkts[$]);
    int last_edge;
    int pi;
    last_edge = starts[starts.size()-1] + BEATS/2 + 6;
    pi = 0;
    for (int k = 1; k <= last_edge; k++) begin
      for (int half = 0; half < 2; half++) begin
        longint te, dly;
        int beat;
        te = t0 + longint'(phi) + longint'(k) * TRX_L + longint'(half) * TRX_H;
        dly = te - TRX_Q - longint'($time);
        #(dly);
        rx_frame = 1'b0;
        rx_data  = LANE_W'($urandom);            // idle symbol
        if (pi < starts.size() && k >= starts[pi] && k < starts[pi] + int'(BEATS/2)) begin
          beat = 2 * (k - starts[pi]) + half;
          rx_data  = pkts[pi][beat*LANE_W +: LANE_W];
          rx_frame = (beat == 0);
          if (beat == int'(BEATS) - 1) pi++;
        end
        #(TRX/4);
        rx_clk = (half == 0);
      end
    end
    rx_clk = 1'b0;
  endtask

  task automatic reset_port();
    @(negedge core_clk);
    rx_rst_n = 1'b0; core_rst_n = 1'b0;
    repeat (2) @(negedge core_clk);
    rx_rst_n = 1'b1; core_rst_n = 1'b1;
    repeat (2) @(negedge core_clk);
  endtask

  // One run: NPKT packets, packet p nominally written at core edge c0+W_OFF+GAP*p.
  // Returns the arrival cycles relative to each packet's W.
  task automatic run(input bit tmode, input bit trig_en, input int npkt, input int gap,
                     input logic [PKT_W-1:0] pkts[$], output int rel[$], output int phi);
    int c0;
    longint t0;
    int starts[$], wcyc[$];
    reset_port();
    test_mode = tmode;
    arr_cyc.delete(); arr_dat.delete();
    // phase: nonzero, up to +/-EPA, never equal to a core edge
    phi = $urandom_range(50, EPA);
    if ($urandom_range(0, 1) == 1) phi = -phi;
    @(posedge core_clk);
    c0 = cyc + 1;          // cyc updates after this edge: this edge starts cycle c0
    t0 = $time;
    for (int p = 0; p < npkt; p++) begin
      int w;
      w = 3 + gap * p;                               // core edges after t0
      // write edge = start + BEATS/2 + 1 rising edges; align it with core edge w
      starts.push_back(w * RX_PER_CORE - int'(BEATS/2) - 1);
      wcyc.push_back(c0 + w);
    end
    fork
      send_stream(t0, phi, starts, pkts);
      if (trig_en) begin
        for (int p = 0; p < npkt; p++) begin
          wait_cycle(wcyc[p] + 1);
          shared_pin = 1'b1;
          check(pin_func == 1'b0, "pin_func active in test mode");
          @(negedge core_clk);
          shared_pin = 1'b0;
        end
      end
    join
    wait_cycle(wcyc[npkt-1] + 12);
    rel.delete();
    for (int i = 0; i < arr_cyc.size() && i < npkt; i++) rel.push_back(arr_cyc[i] - wcyc[i]);
    check(arr_dat.size() == npkt || !trig_en && tmode,
          $sformatf("run got %0d packets, sent %0d", arr_dat.size(), npkt));
    for (int i = 0; i < arr_dat.size() && i < npkt; i++)
      check(arr_dat[i] == pkts[i], $sformatf("packet %0d data %h expected %h", i, arr_dat[i], pkts[i]));
  endtask

  initial begin
    logic [PKT_W-1:0] pkts[$];
    int rel[$], first[$];
    int test_lat, phi_n;
    // resets start high so that asserting them is an edge even while the
    // Rx clock is stopped
    rx_rst_n = 1'b1; core_rst_n = 1'b1; rx_data = '0; rx_frame = 1'b0;
    #1 rx_rst_n = 1'b0; core_rst_n = 1'b0;
    test_mode = 1'b0; shared_pin = 1'b0;
    for (int p = 0; p < NPKT; p++) pkts.push_back(PKT_W'($urandom));
    test_lat = 1 + int'(TRIG_DELAY) + 1;

    // ---- normal mode: arrival cycle depends on the Rx phase ----
    for (int r = 0; r < NRUN; r++) begin
      run(1'b0, 1'b0, NPKT, GAP, pkts, rel, phi_n);
      for (int i = 0; i < rel.size(); i++) begin
        m_normal_read++;
        check(rel[i] == int'(SYNC_STAGES) || rel[i] == int'(SYNC_STAGES) + 1,
              $sformatf("normal mode packet %0d at W+%0d", i, rel[i]));
        if (r == 0) first.push_back(rel[i]);
        else if (rel[i] != first[i]) m_nondet++;
      end
    end

    // ---- test mode: trigger in cycle W+1, arrival fixed ----
    for (int r = 0; r < NRUN; r++) begin
      int phi;
      run(1'b1, 1'b1, NPKT, GAP, pkts, rel, phi);
      for (int i = 0; i < rel.size(); i++) begin
        m_trig_read++;
        check(rel[i] == test_lat,
              $sformatf("test mode packet %0d at W+%0d, expected W+%0d", i, rel[i], test_lat));
      end
      // a negative phase means the packets were written before core edge W
      // (early: they wait in the buffer), a positive one after it (late)
      if (phi < 0) m_held_early++;
      else         m_late++;
    end

    // ---- trigger with nothing sent ----
    reset_port();
    test_mode = 1'b1;
    begin
      int m0, a0;
      m0 = n_miss; arr_cyc.delete();
      @(negedge core_clk) shared_pin = 1'b1;
      @(negedge core_clk) shared_pin = 1'b0;
      repeat (int'(TRIG_DELAY) + 3) @(negedge core_clk);
      check(n_miss - m0 == 1, $sformatf("trig_miss pulses %0d, expected 1", n_miss - m0));
      check(arr_cyc.size() == 0, "packet delivered without data");
      if (n_miss - m0 == 1) m_miss++;
    end

    // ---- overflow: EB_DEPTH+2 packets with no trigger ----
    begin
      logic [PKT_W-1:0] many[$];
      int o0, phi_o;
      for (int p = 0; p < int'(EB_DEPTH) + 2; p++) many.push_back(PKT_W'($urandom));
      o0 = n_ovf;
      run(1'b1, 1'b0, int'(EB_DEPTH) + 2, 1, many, rel, phi_o);
      check(arr_dat.size() == 0, "packet delivered in test mode without trigger");
      check(n_ovf - o0 == 2, $sformatf("overflow pulses %0d, expected 2", n_ovf - o0));
      if (n_ovf - o0 == 2) m_overflow++;
      // drain in normal mode, without reset
      test_mode = 1'b0;
      repeat (int'(EB_DEPTH) + 6) @(negedge core_clk);
      check(arr_dat.size() == int'(EB_DEPTH), $sformatf("drained %0d", arr_dat.size()));
      for (int i = 0; i < arr_dat.size(); i++)
        check(arr_dat[i] == many[i], $sformatf("drained packet %0d", i));
    end

    // ---- shared pin in normal mode ----
    test_mode = 1'b0;
    @(negedge core_clk) shared_pin = 1'b1;
    #1 check(pin_func == 1'b1, "pin_func not following the pin in normal mode");
    if (pin_func) m_pin++;
    @(negedge core_clk) shared_pin = 1'b0;
    #1 check(pin_func == 1'b0, "pin_func stuck");

    $display("normal reads %0d, runs-to-run differences %0d, timed reads %0d",
             m_normal_read, m_nondet, m_trig_read);
    $display("test runs with early packets %0d, with late packets %0d, misses %0d, overflows %0d, pin %0d",
             m_held_early, m_late, m_miss, m_overflow, m_pin);
    check(m_nondet > 0,      "normal mode never showed cycle uncertainty");
    check(m_trig_read > 0,   "no trigger-timed read");
    check(m_held_early > 0,  "no early packet held in the buffer");
    check(m_late > 0,        "no late packet");
    check(m_normal_read > 0, "no normal-mode read");
    check(m_overflow > 0,    "no overflow");
    check(m_miss > 0,        "no trigger miss");
    check(m_pin > 0,         "shared pin never used functionally");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
