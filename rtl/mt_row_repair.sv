// mt_row_repair: self-repair controller of one row of elements.
//
// A row holds PCOLS physical elements. Some columns are spare columns
// (spare[k], programmed by the colonization automaton); they are left
// unconfigured until needed. An element is active when it is not spare (or is
// a spare already taken into use) and has not been declared dead. The active
// elements, read from left to right, are the row's logical columns.
//
// When an active element k reports a fault, the controller
//  1. finds s, the first spare column to the right of k;
//  2. if there is one and it is still unused, takes the row off-line (busy)
//     and shifts the configuration chains of elements k..s, connected left
//     to right, for CHAIN_W clocks, so that every element k..s-1 hands its
//     complete configuration, flip-flop state included, to its right-hand
//     neighbour;
//  3. marks k dead and s used. The logical columns from k on now sit one
//     physical column further right; the array routes around the dead
//     element (see muxtree_array).
// If no unused spare is left between k and the next spare column, the row
// raises kill (sticky) and stops repairing: a fault the array cannot absorb
// is handed to the next level. At most one repair fits between two spare
// columns.
//
// Requests: a functional fault (M1/M2 mismatch) counts while run is high;
// a configuration-register fault (chain test) counts once the test phase
// (testing) is over. Faults of inactive elements are ignored. The lowest
// faulty column is served first; a repair takes CHAIN_W+1 clocks from the
// request to busy falling.
// Replacing an element by its right-hand neighbour, shifting configurations up
// to a spare, going off-line during the shift and the kill signal are the
// document's. Doing it with one small controller per row instead of logic
// spread over the elements, and serving faults one at a time, are choices of
// this design.
// An assertion checks that every shift ends on a spare column; its reset
// disable samples rst_n on the clock, which lint reports as a reset net used
// both synchronously and asynchronously.
module mt_row_repair
  import mt_pkg::*;
#(
  parameter int unsigned PCOLS = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             testing,
  input  logic [PCOLS-1:0] spare,
  input  logic [PCOLS-1:0] func_fault,
  input  logic [PCOLS-1:0] creg_fault,
  output logic [PCOLS-1:0] active,
  output logic [PCOLS-1:0] dead,
  output logic [PCOLS-1:0] claimed,
  output logic [PCOLS-1:0] shift_en,
  output logic             busy,
  output logic             kill
);

  localparam int unsigned CW = $clog2(PCOLS);
  localparam int unsigned NW = $clog2(CHAIN_W + 1);

  logic [PCOLS-1:0] req;
  logic [CW-1:0]    lo_q, hi_q;
  logic [NW-1:0]    cnt_q;
  logic             found, spare_ok;
  logic [CW-1:0]    k_sel, s_sel;

  assign active = (~spare | claimed) & ~dead;
  assign req    = active & ((run ? func_fault : '0) | (testing ? '0 : creg_fault));

  // Lowest faulty column and the first spare column to its right.
  always_comb begin
    found    = 1'b0;
    spare_ok = 1'b0;
    k_sel    = '0;
    s_sel    = '0;
    for (int unsigned k = 0; k < PCOLS; k++) begin
      if (req[k] && !found) begin
        found = 1'b1;
        k_sel = CW'(k);
      end
    end
    for (int unsigned k = PCOLS; k > 0; k--) begin
      if (spare[k-1] && (k-1) > int'(k_sel)) begin
        s_sel    = CW'(k-1);
        spare_ok = !claimed[k-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      kill    <= 1'b0;
      dead    <= '0;
      claimed <= '0;
      lo_q    <= '0;
      hi_q    <= '0;
      cnt_q   <= '0;
    end else if (busy) begin
      cnt_q <= cnt_q - 1'b1;
      if (cnt_q == NW'(1)) begin
        busy          <= 1'b0;
        dead[lo_q]    <= 1'b1;
        claimed[hi_q] <= 1'b1;
      end
    end else if (found && !kill) begin
      if (spare_ok) begin
        busy  <= 1'b1;
        lo_q  <= k_sel;
        hi_q  <= s_sel;
        cnt_q <= NW'(CHAIN_W);
      end else begin
        kill <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int unsigned k = 0; k < PCOLS; k++)
      shift_en[k] = busy && (CW'(k) >= lo_q) && (CW'(k) <= hi_q);
  end

  // A repair only ever moves a configuration into a spare column.
  a_hi_is_spare: assert property (@(posedge clk) disable iff (!rst_n) busy |-> spare[hi_q]);

endmodule
