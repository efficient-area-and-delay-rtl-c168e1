// clk_sync_branch: one half of the two-clock glitch-free switch.
//
// Each of the two clocks that the switch chooses between has one of these
// halves. The half asks for its clock when its select term is high AND the
// other half reports that it has stopped forwarding its own clock
// (other_off). That request is taken into this half's clock domain by two
// flip-flops in series: the first samples on the rising edge of clk, the
// second on the falling edge. The second flip-flop's Q (en_q) gates the
// clock through an AND gate, and its inverted output (off_qn) goes to the
// other half. Because en_q only ever changes on a falling edge of clk, i.e.
// while clk is already low, the AND gate can never cut a high phase short
// or produce a runt pulse: the forwarded clock always starts and stops with
// a complete low phase.
//
// Interface: clk (the clock this half forwards), rst_n (asynchronous,
// active low), sel_this, other_off in; en_q, off_qn, clk_gated out.
// Timing: a change of (sel_this & other_off) reaches en_q at the first
// falling edge of clk that follows the next rising edge, i.e. after 1/2 to
// 3/2 clock periods. other_off is normally generated in the other clock
// domain; the first flip-flop is the stage that resolves that crossing.
//
// The AND gates, the rising-edge / falling-edge flip-flop pair, the use of
// Q to gate the clock and of QN for the cross-coupling follow the logic
// diagram of the switch. The reset is this design's addition: it clears
// both flip-flops so that after reset neither clock is forwarded and the
// selected one is started cleanly.
//
// Circuit note: clk_gated is a gated clock (clk AND a register). That is
// the purpose of the block; on an FPGA or in an ASIC flow the AND gate is
// normally replaced by a dedicated clock-gating or clock-mux cell.
`timescale 1ns / 1ps

module clk_sync_branch (
  input  logic clk,        // clock forwarded by this half
  input  logic rst_n,      // asynchronous reset, active low
  input  logic sel_this,   // select term asking for this clock
  input  logic other_off,  // the other half has stopped its clock
  output logic en_q,       // this clock is being forwarded
  output logic off_qn,     // inverse of en_q, to the other half
  output logic clk_gated   // clk AND en_q
);

  logic req;      // AND of the select term and the other half's flag
  logic sync_q;   // first (rising-edge) flip-flop

  assign req = sel_this & other_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= 1'b0;
    else        sync_q <= req;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= sync_q;
  end

  assign off_qn    = ~en_q;
  assign clk_gated = clk & en_q;

endmodule
