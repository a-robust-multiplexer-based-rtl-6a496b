// mt_chain_check: built-in test of an element's serial configuration chain.
//
// Before the real configuration, every element receives the same test stream
// in parallel: a 1, then zeros, then 1 1, so that after CHAIN_W+1 clocks the
// chain holds 1 0 ... 0 1 with a further 1 waiting at its input. A stuck-at
// fault in a shift-register stage fills every later stage with its stuck
// value. Two terms are watched:
//   tail = chain_in & first     the "1 1" has reached the tail (input and
//                               first stage, the majority of the three F)
//   head = ~head_m1 & head_q    the two last stages hold the expected "0 1"
// In a fault-free chain that started cleared both terms rise in the same
// clock and never otherwise, so their exclusive-or is the fault indication.
// A stuck stage makes the head read "00" or "11" when the tail sees "11",
// or makes a term rise alone. fault_now is that exclusive-or; fault is its
// sticky copy, collected while en is high and cleared by reset.
// The two terms and their comparison are the ones the document draws; the
// sticky flag and the enable are choices of this design.
module mt_chain_check (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic chain_in,
  input  logic first,
  input  logic head_m1,
  input  logic head_q,
  output logic fault_now,
  output logic fault
);

  logic tail_t, head_t;

  assign tail_t    = chain_in & first;
  assign head_t    = ~head_m1 & head_q;
  assign fault_now = tail_t ^ head_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                fault <= 1'b0;
    else if (en && fault_now)  fault <= 1'b1;
  end

endmodule
