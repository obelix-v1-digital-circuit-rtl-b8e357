// tb_obelix_top: end-to-end test of the whole periphery with 8 trigger
// groups (32 double columns) instead of 112; tb_obelix_top_full runs the same
// test on the chip at its default size. Driven only through the chip's
// pins: the 160 Mb/s command line, the double-column hit interfaces and the
// chip ID; observed through the 320 Mb/s serial output and status pins.
//
// The command line carries PLL-lock words, Syncs (one at least every 32
// frames), NOOPs and commands addressed to chip 3. The serial output is
// sampled at every clock edge, aligned to symbol boundaries and decoded as
// 8b/10b packages at the end. A model follows the accepted hits and the
// triggers seen on the trigger pin: a hit belongs to a trigger present when
// BCID - latency equals its extended leading edge, and the hits must come
// out trigger by trigger, in trigger order, each exactly once.
//
// Phases: lock; register writes (latency 40, a spare register, a write to
// another chip that must be ignored) and readbacks; random hits and
// triggers; an overload of one trigger group (double-column stall and S1
// expiry); a cluster on every column read out by one trigger (TX FIFO
// stall, hit chaining) with a burst of empty triggers behind it (trigger-ID
// queue overflow); hit and trigger disable via the control register; Clear,
// GlobalPulse, Cal, a bad symbol; loss of lock without Syncs and relock.
// Every mechanism is counted; one that never happens counts as a failure.
`include "tb_macros.svh"
`define OBELIX_TOP_INST obelix_top #(.N_TRG(NT)) dut (.*);
module tb_obelix_top;
  import obelix_pkg::*;
  import tb_ref_pkg::*;
  localparam int NT = 8;
`include "tb_obelix_top_body.svh"
endmodule
`undef OBELIX_TOP_INST
