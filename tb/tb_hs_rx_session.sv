// tb_hs_rx_session -- test sessions of 100 critical-edge packets across the
// Rx clock frequencies and tester edge-placement accuracies (EPA) of the
// analysis: Rx clock 1, 2, 5, 7, 10 and 15 GHz; EPA 25, 50, 100, 150 and
// 200 ps on both the Rx clock and the core clock.
//
// Model of the tester.  Each packet is sent so that the Rx edge that writes
// it into the elasticity buffer lies, nominally, DELTA = half an Rx period
// before a core clock edge W (a "critical edge").  Each clock edge of the
// tester is displaced by a Gaussian error with sigma = EPA/3; only the
// difference of the two displacements matters, so every packet gets one
// draw phi ~ N(0, sqrt(sigma_rx^2 + sigma_core^2)) applied to the Rx clock,
// which drifts smoothly from one packet's phase to the next across the idle
// gap between packets.  The Gaussian is approximated by the sum of twelve
// uniform numbers.  The core clock runs at 1/8 of the Rx clock.
//
// Normal mode: the testbench predicts each packet's core arrival cycle from
// its own phi (W+SYNC_STAGES if the write came before edge W, one later
// otherwise) and checks it, and counts the sessions in which any packet came
// a cycle late -- a session whose response would not match simulation.
// Test mode: the tester raises the shared pin in cycle W+1 and every packet
// of every session must arrive in cycle W+TRIG_DELAY+2.  Contents are checked
// everywhere.  The printed table gives, per configuration, the fraction of
// normal-mode sessions that were non-deterministic; with the trigger it is 0.
module tb_hs_rx_session;
  timeunit 1ps; timeprecision 1ps;

  import rx_pkg::*;

  localparam int M         = 100;  // packets on critical edges per session
  localparam int RX_PER_CORE = 8;
  localparam int GAP       = 8;    // core cycles between packets
  localparam int RUNS_N    = 40;   // normal-mode sessions per configuration
  localparam int RUNS_T    = 4;    // test-mode sessions per configuration
  localparam int NF = 6, NE = 5;
  localparam int TRX_PS [NF] = '{1000, 500, 200, 142, 100, 66};   // 1..15 GHz
  localparam int EPA_PS [NE] = '{25, 50, 100, 150, 200};

  logic rx_clk = 1'b0, core_clk = 1'b0;
  logic rx_rst_n, core_rst_n;
  logic [LANE_W-1:0] rx_data;
  logic rx_frame, test_mode, shared_pin;
  logic pin_func, pkt_valid, eb_overflow, trig_miss;
  logic [PKT_W-1:0] pkt_data;

  hs_rx_port dut (.*);

  int tc = 8000;                 // core period of the current configuration
  bit core_run = 1'b0;
  initial forever begin
    if (core_run) begin core_clk = 1'b1; #(tc/2); core_clk = 1'b0; #(tc/2); end
    else #100;
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge core_clk) cyc <= cyc + 1;

  int arr_cyc[$];
  logic [PKT_W-1:0] arr_dat[$];
  int n_bad_flags = 0;
  always @(negedge core_clk) begin
    if (pkt_valid) begin arr_cyc.push_back(cyc); arr_dat.push_back(pkt_data); end
    if (trig_miss) n_bad_flags++;
  end
  always @(posedge rx_clk) if (eb_overflow) n_bad_flags++;

  initial begin : watchdog
    #(64'd20_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int gauss(input int sigma);   // ~N(0, sigma^2), integer ps
    int s;
    s = 0;
    for (int i = 0; i < 12; i++) s += int'($urandom_range(0, 9999));
    return ((s - 60000) * sigma) / 10000;
  endfunction

  function automatic int isqrt(input int v);
    int r;
    r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic wait_cycle(input int c);
    while (cyc < c) @(negedge core_clk);
  endtask

  // Rx side of the tester for one session.
  task automatic send_session(input longint t0, input int trx, input int starts[$],
                              input int phis[$], input logic [PKT_W-1:0] pkts[$]);
    int last_edge, pi;
    longint trx_l, trx_h, trx_q;
    trx_l = longint'(trx); trx_h = trx_l / 2; trx_q = trx_l / 4;
    last_edge = starts[M-1] + int'(BEATS/2) + 4;
    pi = 0;
    for (int k = 1; k <= last_edge; k++) begin
      int phi;
      // phase: held from a packet's start to its write edge, then ramps
      // linearly to the next packet's phase
      if (pi >= M) phi = phis[M-1];
      else if (k >= starts[pi] - 2) phi = phis[pi];
      else if (pi == 0) phi = (phis[0] * (k - 1)) / (starts[0] - 3);
      else begin
        int a, b;
        a = starts[pi-1] + int'(BEATS/2) + 2;
        b = starts[pi] - 2;
        phi = (k <= a) ? phis[pi-1]
                       : phis[pi-1] + ((phis[pi] - phis[pi-1]) * (k - a)) / (b - a);
      end
      for (int half = 0; half < 2; half++) begin
        longint te, dly;
        int beat;
        te  = t0 + longint'(phi) + longint'(k) * trx_l + longint'(half) * trx_h;
        dly = te - trx_q - longint'($time);
        #(dly);
        rx_frame = 1'b0;
        rx_data  = LANE_W'($urandom);
        if (pi < M && k >= starts[pi] && k < starts[pi] + int'(BEATS/2)) begin
          beat = 2 * (k - starts[pi]) + half;
          rx_data  = pkts[pi][beat*LANE_W +: LANE_W];
          rx_frame = (beat == 0);
          if (beat == int'(BEATS) - 1) pi++;
        end
        #(trx / 4);
        rx_clk = (half == 0);
      end
    end
    rx_clk = 1'b0;
  endtask

  // One session; returns 1 if any packet arrived off the noise-free cycle.
  task automatic session(input bit tmode, input int trx, input int sig, output bit nondet);
    int c0, delta;
    longint t0, lead;
    int starts[$], wcyc[$], phis[$];
    logic [PKT_W-1:0] pkts[$];
    nondet = 1'b0;
    delta = trx / 2;
    @(negedge core_clk);
    rx_rst_n = 1'b0; core_rst_n = 1'b0;
    repeat (2) @(negedge core_clk);
    rx_rst_n = 1'b1; core_rst_n = 1'b1;
    test_mode = tmode;
    repeat (2) @(negedge core_clk);
    arr_cyc.delete(); arr_dat.delete();
    @(posedge core_clk);
    c0 = cyc + 1;
    t0 = $time;
    lead = longint'(trx) - longint'(delta);
    for (int p = 0; p < M; p++) begin
      int w, phi;
      w = GAP + GAP * p;
      // write edge (start + BEATS/2 + 1) nominally DELTA before core edge w:
      // w*tc - delta = (start + BEATS/2 + 1) * trx
      starts.push_back(w * RX_PER_CORE - int'(BEATS/2) - 1 - 1);
      wcyc.push_back(c0 + w);
      do phi = gauss(sig); while (phi == delta || phi > tc / 2 || phi < -tc / 2);
      phis.push_back(phi);
      pkts.push_back(PKT_W'({$urandom, $urandom}));
    end
    fork
      send_session(t0 + lead, trx, starts, phis, pkts);
      if (tmode) begin
        for (int p = 0; p < M; p++) begin
          wait_cycle(wcyc[p] + 1);
          shared_pin = 1'b1;
          @(negedge core_clk);
          shared_pin = 1'b0;
        end
      end
    join
    wait_cycle(wcyc[M-1] + 8);
    check(arr_dat.size() == M, $sformatf("session got %0d packets", arr_dat.size()));
    for (int i = 0; i < arr_dat.size() && i < M; i++) begin
      int rel, expv;
      rel = arr_cyc[i] - wcyc[i];
      if (tmode) expv = 1 + int'(TRIG_DELAY) + 1;
      else       expv = (phis[i] < delta) ? int'(SYNC_STAGES) : int'(SYNC_STAGES) + 1;
      check(rel == expv && arr_dat[i] == pkts[i],
            $sformatf("trx %0d mode %0d packet %0d: W+%0d data %h, expected W+%0d data %h",
                      trx, tmode, i, rel, arr_dat[i], expv, pkts[i]));
      if (rel != int'(tmode ? 1 + int'(TRIG_DELAY) + 1 : int'(SYNC_STAGES))) nondet = 1'b1;
    end
  endtask

  initial begin
    int nd_total, tm_total;
    // resets start high so that asserting them is an edge even while the
    // Rx clock is stopped
    rx_rst_n = 1'b1; core_rst_n = 1'b1; rx_data = '0; rx_frame = 1'b0;
    #1 rx_rst_n = 1'b0; core_rst_n = 1'b0;
    test_mode = 1'b0; shared_pin = 1'b0;
    nd_total = 0; tm_total = 0;
    $display("non-deterministic sessions out of %0d (normal mode) / %0d (test mode), m = %0d",
             RUNS_N, RUNS_T, M);
    $display("  Rx clock | EPA 25      50      100     150     200 ps");
    for (int f = 0; f < NF; f++) begin
      string line;
      tc = TRX_PS[f] * RX_PER_CORE;
      core_run = 1'b1;
      line = $sformatf("  %5.1f GHz|", 1000.0 / real'(TRX_PS[f]));
      for (int e = 0; e < NE; e++) begin
        int sig, nd, ndt;
        bit b;
        sig = isqrt(2 * EPA_PS[e] * EPA_PS[e] / 9);
        nd = 0; ndt = 0;
        for (int r = 0; r < RUNS_N; r++) begin session(1'b0, TRX_PS[f], sig, b); nd += int'(b); end
        for (int r = 0; r < RUNS_T; r++) begin session(1'b1, TRX_PS[f], sig, b); ndt += int'(b); end
        nd_total += nd; tm_total += ndt;
        line = {line, $sformatf(" %2d / %0d  ", nd, ndt)};
      end
      $display("%s", line);
    end
    check(nd_total > 0, "no non-deterministic normal-mode session at any configuration");
    check(tm_total == 0, "non-deterministic session in test mode");
    check(n_bad_flags == 0, $sformatf("%0d overflow/miss pulses", n_bad_flags));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
