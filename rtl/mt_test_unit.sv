// mt_test_unit: the TEST block of a self-testing MUXTREE element.
//
// The functional part of the element exists twice (M1, M2). This unit
//  - compares the two copies: fault is high whenever their NOUT outputs or
//    their FF_IN signals (the D inputs of their flip-flops) differ. Comparing
//    FF_IN as well catches a fault that has not yet reached NOUT and keeps a
//    wrong value from being stored in the third flip-flop;
//  - holds the third copy D3 of flip-flop F, loaded like F (shift_in when
//    shifting, P on init, M1's FF_IN when ce is high);
//  - outputs maj, the majority of F in M1, F in M2 and D3. With a single
//    faulty flip-flop, maj is still the correct state; it is the value passed
//    on along the configuration chain, so a repair keeps the circuit state.
// fault is combinational; the element decides when it is acted upon.
// Comparing NOUT and FF_IN, D3 and the majority are the document's; D3's
// reset value and load priority are choices of this design. The comparator
// is also drawn fed from the FF_IN lines of both copies, and the majority is
// taken over the flip-flop outputs as the text describes.
module mt_test_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic nout1,
  input  logic nout2,
  input  logic ffin1,
  input  logic ffin2,
  input  logic ff1,
  input  logic ff2,
  input  logic ce,
  input  logic init,
  input  logic preset,
  input  logic shift_en,
  input  logic shift_in,
  output logic fault,
  output logic d3,
  output logic maj
);

  assign fault = (nout1 ^ nout2) | (ffin1 ^ ffin2);
  assign maj   = (ff1 & ff2) | (ff1 & d3) | (ff2 & d3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        d3 <= 1'b0;
    else if (shift_en) d3 <= shift_in;
    else if (init)     d3 <= preset;
    else if (ce)       d3 <= ffin1;
  end

endmodule
