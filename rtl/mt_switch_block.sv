// mt_switch_block: the switch block (SB) of a MUXTREE element.
//
// Four independent 4-to-1 multiplexers drive the outgoing buses. Each output
// may take any incoming bus except the one arriving on its own side, or the
// element output NOUT. Selects come from the configuration register:
//   NOBUS: N = CREG[11:10]  0 SIBUS 1 EIBUS 2 WIBUS 3 NOUT
//   SOBUS: S = CREG[9:8]    0 NIBUS 1 EIBUS 2 WIBUS 3 NOUT
//   EOBUS: E = CREG[7:6]    0 WIBUS 1 NIBUS 2 SIBUS 3 NOUT
//   WOBUS: W = CREG[5:4]    0 EIBUS 1 NIBUS 2 SIBUS 3 NOUT
// The input order of every multiplexer is the one drawn in the switch block
// schematic of the element. Purely combinational, no clock. Because NOUT
// enters and the buses leave towards the element's own functional part and
// its neighbours, a simulator reports combinational cycles through this
// block in an array; a cycle is closed only by configurations that select
// it, as in any programmable interconnect.
module mt_switch_block (
  input  logic       nibus,
  input  logic       sibus,
  input  logic       eibus,
  input  logic       wibus,
  input  logic       nout,
  input  logic [1:0] sel_n,
  input  logic [1:0] sel_s,
  input  logic [1:0] sel_e,
  input  logic [1:0] sel_w,
  output logic       nobus,
  output logic       sobus,
  output logic       eobus,
  output logic       wobus
);

  always_comb begin
    unique case (sel_n)
      2'd0: nobus = sibus;
      2'd1: nobus = eibus;
      2'd2: nobus = wibus;
      default: nobus = nout;
    endcase
    unique case (sel_s)
      2'd0: sobus = nibus;
      2'd1: sobus = eibus;
      2'd2: sobus = wibus;
      default: sobus = nout;
    endcase
    unique case (sel_e)
      2'd0: eobus = wibus;
      2'd1: eobus = nibus;
      2'd2: eobus = sibus;
      default: eobus = nout;
    endcase
    unique case (sel_w)
      2'd0: wobus = eibus;
      2'd1: wobus = nibus;
      2'd2: wobus = sibus;
      default: wobus = nout;
    endcase
  end

endmodule
