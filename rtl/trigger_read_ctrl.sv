// trigger_read_ctrl -- trigger-timed reads of the elasticity buffer (DFT).
//
// Without help, a packet that the tester sends near a core clock edge can be
// taken into the core one cycle earlier or later from run to run, depending
// on where the tester's Rx clock edges happen to fall.  In test mode this
// block removes that uncertainty: the tester raises a trigger a fixed number
// of core cycles before the cycle in which the packet must enter the core; a
// counter started by the trigger gates the buffer's packet-ready signal so
// the read takes place exactly TRIG_DELAY core cycles after the trigger was
// sampled.  The tester times the trigger so the packet is in the buffer even
// at its latest arrival; an early packet simply waits.  In normal mode the
// buffer is read as soon as a packet is ready.
//
// The trigger needs no pin of its own: shared_pin is an ordinary primary
// input, synchronous to the core clock.  In normal mode it goes to its
// functional destination on pin_func; in test mode it is the trigger and
// pin_func is held at 0.
//
// Timing: shared_pin high in core cycle n (sampled at rising edge n+1)
// gives rd_en high in cycle n+TRIG_DELAY, so the packet is popped at edge
// n+TRIG_DELAY+1.  Triggers closer together than TRIG_DELAY cycles are
// ignored while the counter runs (one counter, as described for the
// technique).  If the counter expires while no packet is ready, nothing is
// read and trig_miss pulses for that cycle: the trigger was placed too
// early.  Leaving test mode clears the counter.  Reset: rst_n, asynchronous,
// active low.
module trigger_read_ctrl #(
  parameter int unsigned TRIG_DELAY = rx_pkg::TRIG_DELAY
) (
  input  logic clk,
  input  logic rst_n,
  input  logic test_mode,
  input  logic shared_pin,
  output logic pin_func,
  input  logic pkt_ready,
  output logic rd_en,
  output logic trig_busy,
  output logic trig_miss
);

  localparam int unsigned CW = $clog2(TRIG_DELAY + 1);

  logic          trigger;
  logic [CW-1:0] cnt;
  logic          expire;

  // shared primary input: functional use or trigger
  assign pin_func = shared_pin & ~test_mode;
  assign trigger  = shared_pin &  test_mode;

  // The counter may be reloaded in its last cycle, so triggers exactly
  // TRIG_DELAY cycles apart give back-to-back timed reads.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            cnt <= '0;
    else if (!test_mode)                   cnt <= '0;
    else if (trigger && cnt <= CW'(1))     cnt <= CW'(TRIG_DELAY);
    else if (cnt != '0)                    cnt <= cnt - CW'(1);
  end

  assign expire    = test_mode && (cnt == CW'(1));
  assign trig_busy = (cnt > CW'(1));

  // packet-ready gated by the counter in test mode
  always_comb begin
    if (test_mode) rd_en = expire & pkt_ready;
    else           rd_en = pkt_ready;
  end

  assign trig_miss = expire & ~pkt_ready;

  initial assert (TRIG_DELAY >= 1)
    else $error("trigger_read_ctrl: TRIG_DELAY must be at least 1");

endmodule
