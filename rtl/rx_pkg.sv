// rx_pkg -- shared sizes of the high-speed receive port.
//
// A packet on the source-synchronous Rx link is BEATS consecutive DDR beats
// of LANE_W bits each; the deserializer packs them into one PKT_W-bit word,
// first beat in the least significant bits.  The elasticity buffer stores
// one such word per entry, and the core domain reads one word per read.
// None of these sizes is fixed by the technique itself: 8 lanes match an
// 8-bit parallel LVDS port, and 4 beats (32 bits) match a common control
// symbol size.  Change them here or through the module parameters.
package rx_pkg;

  parameter int unsigned LANE_W     = 8;   // data lanes of the Rx link
  parameter int unsigned BEATS      = 4;   // DDR beats per packet (even)
  parameter int unsigned PKT_W      = LANE_W * BEATS;
  parameter int unsigned EB_DEPTH   = 8;   // elasticity buffer entries (power of 2)
  parameter int unsigned SYNC_STAGES = 2;  // flops per clock-crossing synchronizer
  parameter int unsigned TRIG_DELAY = 2;   // core cycles from sampled trigger to read

endpackage
