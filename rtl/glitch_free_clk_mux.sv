// glitch_free_clk_mux: glitch-free switch between two unrelated clocks.
//
// A plain multiplexer that switches between two clocks can cut a high or
// low phase short and send a runt pulse (a glitch) to everything the clock
// drives, which is a direct source of timing errors. This switch avoids
// that by never letting both clocks through at once and by starting and
// stopping each clock only while it is low:
//
//   * one clk_sync_branch per clock; select drives the CLK1 half and its
//     inverse the CLK0 half;
//   * each half may start only when the other half's off flag (the QN of
//     its second flip-flop) is high, so the running clock is stopped first
//     (break before make);
//   * each half starts and stops its clock on a falling edge of that
//     clock, so the output OR sees only whole pulses.
//
// Interface: clk0, clk1 (any frequencies and phases), rst_n (asynchronous,
// active low), select (0 = CLK0, 1 = CLK1; may change at any time, see
// below); out_clk, plus clk0_active / clk1_active that show which half is
// forwarding its clock.
//
// Timing of a switch from clock A to clock B after select changes:
// A stops at the first falling edge of A after the next rising edge of A
// (1/2 to 3/2 periods of A); then B starts at the first falling edge of B
// after the next rising edge of B that sees A stopped (a further 1/2 to
// 3/2 periods of B), so the whole switch takes (PA + PB)/2 to
// 3 (PA + PB)/2, where PA and PB are the two clock periods. While the
// switch is in progress out_clk stays low. After reset out_clk stays low
// until the selected clock has been started the same way.
//
// Usage rule: after a change, select must be held until the new clock has
// started (the active flag of the new clock is high). Reversing select
// while the first flip-flops of both halves can see the other half off lets
// both halves start together; the assertions below report that.
//
// The structure (two halves of AND, rising-edge flip-flop, falling-edge
// flip-flop, AND with the clock, QN cross-coupling, inverter on select and
// OR at the output) follows the logic diagram of the design. The reset,
// the active flags, the usage rule and the assertions are this design's
// own additions.
//
// Circuit note: out_clk is a clock built from gated clocks and an OR gate;
// that is the function of the block.
`timescale 1ns / 1ps

module glitch_free_clk_mux (
  input  logic clk0,         // CLK0, chosen when select is low
  input  logic clk1,         // CLK1, chosen when select is high
  input  logic rst_n,        // asynchronous reset, active low
  input  logic select,       // 0: CLK0, 1: CLK1
  output logic out_clk,      // switched clock
  output logic clk0_active,  // CLK0 is being forwarded
  output logic clk1_active   // CLK1 is being forwarded
);

  logic off0_qn, off1_qn;
  logic gated0, gated1;

  // CLK1 half: select itself
  clk_sync_branch u_branch1 (
    .clk       (clk1),
    .rst_n     (rst_n),
    .sel_this  (select),
    .other_off (off0_qn),
    .en_q      (clk1_active),
    .off_qn    (off1_qn),
    .clk_gated (gated1)
  );

  // CLK0 half: inverted select
  clk_sync_branch u_branch0 (
    .clk       (clk0),
    .rst_n     (rst_n),
    .sel_this  (~select),
    .other_off (off1_qn),
    .en_q      (clk0_active),
    .off_qn    (off0_qn),
    .clk_gated (gated0)
  );

  assign out_clk = gated0 | gated1;

  // Break before make: both clocks must never be forwarded together.
  a_exclusive_0 : assert property (@(posedge clk0) disable iff (!rst_n)
                                   !(clk0_active && clk1_active))
    else $error("glitch_free_clk_mux: both clocks enabled (select reversed mid-switch?)");
  a_exclusive_1 : assert property (@(posedge clk1) disable iff (!rst_n)
                                   !(clk0_active && clk1_active))
    else $error("glitch_free_clk_mux: both clocks enabled (select reversed mid-switch?)");

endmodule
