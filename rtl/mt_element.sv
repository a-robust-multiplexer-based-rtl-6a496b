// mt_element: one self-testing MUXTREE element (space redundancy).
//
// The element holds a switch block, two identical copies M1 and M2 of the
// functional part, the TEST unit, the configuration register and the chain
// test logic. Both copies see the same inputs and the same configuration;
// only M1 drives NOUT. The TEST unit compares the copies on-line and keeps
// the third flip-flop D3.
//
// Neighbour connections (one bit each): SIN/WIN/EIN carry decision-tree
// values, NOUT goes north, EOUT and WOUT repeat SIN to the east and west
// neighbours (so a node sees its south-west and south-east children through
// WIN and EIN), and the four bus pairs NIBUS/NOBUS .. WIBUS/WOBUS are routed
// by the switch block.
//
// Serial configuration chain (shift_en high, one bit per clock):
//   chain_in -> F in M1, F in M2, D3 -> majority -> CREG[19] ... CREG[0]
//   -> chain_out
// so a stream of CHAIN_W=21 bits loads CREG[0] first and F last, and
// shifting an element's contents into its neighbour carries the majority
// (the correct) flip-flop state along. The same path is used to configure
// the array and to move a configuration during a repair.
//
// Outputs for the repair logic:
//   func_fault  combinational mismatch of M1 and M2 (NOUT or FF_IN)
//   creg_fault  sticky result of the chain test, collected while test_en
// While shift_en is high NOUT and the four bus outputs are held at 0 (and
// NOUT reaches the switch block as 0), so a partly shifted configuration
// cannot close an oscillating loop through this element; the functional
// copies then see these quiet buses. This gating is a choice of this design.
// Every other loop the switch block and the functional part can form (NOUT
// into the switch block, SOBUS/EOBUS back into the functional part) exists
// only for configurations that select it, as in the document's schematic.
//
// D3 and the instant chain-check result are internal signals left unread on
// purpose: D3 acts only through the majority, and only the sticky flag is
// reported.
// The partition into SB, M1, M2, TEST and CREG and the chain order
// FF -> CREG are the document's; the clock enable, the bit order inside CREG
// and the sticky chain-test flag are choices of this design.
module mt_element
  import mt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic init,
  input  logic shift_en,
  input  logic test_en,
  input  logic chain_in,
  output logic chain_out,
  input  logic sin,
  input  logic win,
  input  logic ein,
  output logic nout,
  output logic eout,
  output logic wout,
  input  logic nibus,
  input  logic sibus,
  input  logic eibus,
  input  logic wibus,
  output logic nobus,
  output logic sobus,
  output logic eobus,
  output logic wobus,
  output logic func_fault,
  output logic creg_fault,
  output creg_t creg_q
);

  logic nout1, nout2, ffin1, ffin2, ff1, ff2, d3, maj;
  logic creg_so, chk_now;
  logic sb_n, sb_s, sb_e, sb_w;

  mt_switch_block u_sb (
    .nibus (nibus), .sibus (sibus), .eibus (eibus), .wibus (wibus), .nout (nout1 & ~shift_en),
    .sel_n (creg_q[N_LSB +: 2]), .sel_s (creg_q[S_LSB +: 2]),
    .sel_e (creg_q[E_LSB +: 2]), .sel_w (creg_q[W_LSB +: 2]),
    .nobus (sb_n), .sobus (sb_s), .eobus (sb_e), .wobus (sb_w)
  );

  // While the element shifts, its configuration is partial: its bus outputs
  // and NOUT are held at 0 so that no half-loaded configuration can close a
  // combinational loop.
  assign nobus = sb_n & ~shift_en;
  assign sobus = sb_s & ~shift_en;
  assign eobus = sb_e & ~shift_en;
  assign wobus = sb_w & ~shift_en;

  mt_func u_m1 (
    .clk (clk), .rst_n (rst_n), .creg (creg_q),
    .sin (sin), .ein (ein), .win (win),
    .sibus (sibus), .sobus (sobus), .eibus (eibus), .eobus (eobus),
    .ce (ce), .init (init), .shift_en (shift_en), .shift_in (chain_in),
    .nout (nout1), .ff_in (ffin1), .ff_out (ff1)
  );

  mt_func u_m2 (
    .clk (clk), .rst_n (rst_n), .creg (creg_q),
    .sin (sin), .ein (ein), .win (win),
    .sibus (sibus), .sobus (sobus), .eibus (eibus), .eobus (eobus),
    .ce (ce), .init (init), .shift_en (shift_en), .shift_in (chain_in),
    .nout (nout2), .ff_in (ffin2), .ff_out (ff2)
  );

  mt_test_unit u_test (
    .clk (clk), .rst_n (rst_n),
    .nout1 (nout1), .nout2 (nout2), .ffin1 (ffin1), .ffin2 (ffin2),
    .ff1 (ff1), .ff2 (ff2),
    .ce (ce), .init (init), .preset (creg_q[P_BIT]),
    .shift_en (shift_en), .shift_in (chain_in),
    .fault (func_fault), .d3 (d3), .maj (maj)
  );

  mt_creg #(.W(CREG_W)) u_creg (
    .clk (clk), .rst_n (rst_n), .shift_en (shift_en), .si (maj),
    .q (creg_q), .so (creg_so)
  );

  mt_chain_check u_chk (
    .clk (clk), .rst_n (rst_n), .en (test_en),
    .chain_in (chain_in), .first (maj), .head_m1 (creg_q[1]), .head_q (creg_q[0]),
    .fault_now (chk_now), .fault (creg_fault)
  );

  assign chain_out = creg_so;
  assign nout      = nout1 & ~shift_en;
  assign eout      = sin;
  assign wout      = sin;

endmodule
