// mt_func: functional part of a MUXTREE element (one of the copies M1/M2).
//
// The element is a configurable 2-to-1 multiplexer, the node of a binary
// decision tree. Two 8-to-1 selectors pick its data inputs; LEFT=CREG[18:16]
// and RIGHT=CREG[14:12] choose among
//   0 constant 0   1 constant 1   2 SIN    3 EIN
//   4 WIN          5 FF_OUT       6 SIBUS  7 SOBUS
// The decision multiplexer passes the LEFT selection when its control is 1
// and the RIGHT selection when it is 0; its control is EIBUS when EB=CREG[0]
// is 1 and EOBUS when EB is 0. Its output is FF_IN, the D input of flip-flop
// F. NOUT is F's output when R=CREG[1] is 1 and FF_IN when R is 0.
// This follows the element schematic of the document.
//
// Flip-flop F, clocked by clk (CK), has three ways to load, by priority:
//   shift_en : F takes shift_in. F is the first stage of the element's
//              serial configuration chain, so the last bit of a stream sets
//              its initial state.
//   init     : F takes the preset value P=CREG[2] (INIT/PRESET).
//   ce       : F takes FF_IN (normal operation).
// Otherwise F holds, which is how the array freezes while it is off-line.
// Making INIT synchronous, the load priorities and the clock enable are
// choices of this design; the document draws INIT and PRESET as gating
// signals into F without saying whether they act on the clock.
//
// The input WIN/EIN/SIN/bus wiring can form a combinational loop through
// neighbouring elements when a configuration chooses one (for example EB=0
// with the east bus routed back from NOUT); that is a property of any
// programmable fabric and is left to the configuration to avoid.
module mt_func
  import mt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  creg_t creg,
  input  logic  sin,
  input  logic  ein,
  input  logic  win,
  input  logic  sibus,
  input  logic  sobus,
  input  logic  eibus,
  input  logic  eobus,
  input  logic  ce,
  input  logic  init,
  input  logic  shift_en,
  input  logic  shift_in,
  output logic  nout,
  output logic  ff_in,
  output logic  ff_out
);

  logic [7:0] sel_src;
  logic       left_v, right_v, ctrl;

  assign sel_src = {sobus, sibus, ff_out, win, ein, sin, 1'b1, 1'b0};
  assign left_v  = sel_src[creg[LEFT_LSB +: 3]];
  assign right_v = sel_src[creg[RIGHT_LSB +: 3]];
  assign ctrl    = creg[EB_BIT] ? eibus : eobus;
  assign ff_in   = ctrl ? left_v : right_v;
  assign nout    = creg[R_BIT] ? ff_out : ff_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ff_out <= 1'b0;
    else if (shift_en) ff_out <= shift_in;
    else if (init)     ff_out <= creg[P_BIT];
    else if (ce)       ff_out <= ff_in;
  end

endmodule
