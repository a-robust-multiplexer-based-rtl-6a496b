// mt_colonizer: cellular automaton that divides the array into cells and
// programs the spare columns.
//
// One automaton element sits at every element position (x = column,
// y = row, (0,0) in the lower-left corner). A stream of symbols (sym_t), one
// per clock while en is high, enters at (0,0). Each automaton element owns a
// column symbol and a row symbol:
//   - the first symbol reaching an element of the bottom row becomes its
//     column symbol; later symbols are passed one element to the right;
//   - the first symbol reaching an element of the left column becomes its row
//     symbol; later symbols are passed one element up;
//   - (0,0) takes the first symbol of the stream as both;
//   - column symbols then travel up their column, row symbols along their
//     row, one element per clock.
// So column x carries stream symbol x and row y carries stream symbol y: a
// pattern repeated in the stream (for example BOUNDARY INTERIOR INTERIOR
// SPARE ...) tiles the whole array with identical cells, and the positions
// of the spare columns come from the stream, not from the silicon.
// Outputs per element: valid (both symbols known), spare (column symbol is
// SPARE), bnd_w / bnd_s (column / row symbol is BOUNDARY: the element is on
// the west / south edge of a cell). done rises when every element is valid,
// which is the only place where the array size matters.
// Growth from the lower-left corner, squares and stream-programmed spare
// columns are the document's; the rule set above is this design's, as the
// document does not give the automaton's transition rules.
module mt_colonizer
  import mt_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned PCOLS = 5
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  sym_t                        sym_in,
  output logic [ROWS-1:0][PCOLS-1:0]  valid,
  output logic [ROWS-1:0][PCOLS-1:0]  spare,
  output logic [ROWS-1:0][PCOLS-1:0]  bnd_w,
  output logic [ROWS-1:0][PCOLS-1:0]  bnd_s,
  output logic                        done
);

  sym_t csym [ROWS][PCOLS];
  sym_t rsym [ROWS][PCOLS];
  sym_t fwd_h [PCOLS];   // symbols travelling right along the bottom row
  sym_t fwd_v [ROWS];    // symbols travelling up the left column

  for (genvar y = 0; y < ROWS; y++) begin : g_y
    for (genvar x = 0; x < PCOLS; x++) begin : g_x
      sym_t tok_c, tok_r;   // candidate column / row symbol this clock
      always_comb begin
        if (y == 0 && x == 0) begin
          tok_c = sym_in;
          tok_r = sym_in;
        end else if (y == 0) begin
          tok_c = fwd_h[x-1];
          tok_r = rsym[y][x-1];
        end else if (x == 0) begin
          tok_c = csym[y-1][x];
          tok_r = fwd_v[y-1];
        end else begin
          tok_c = csym[y-1][x];
          tok_r = rsym[y][x-1];
        end
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          csym[y][x] <= SYM_NONE;
          rsym[y][x] <= SYM_NONE;
        end else if (en) begin
          if (csym[y][x] == SYM_NONE) csym[y][x] <= tok_c;
          if (rsym[y][x] == SYM_NONE) rsym[y][x] <= tok_r;
        end
      end

      assign valid[y][x] = (csym[y][x] != SYM_NONE) && (rsym[y][x] != SYM_NONE);
      assign spare[y][x] = (csym[y][x] == SYM_SPARE);
      assign bnd_w[y][x] = (csym[y][x] == SYM_BOUNDARY);
      assign bnd_s[y][x] = (rsym[y][x] == SYM_BOUNDARY);
    end
  end

  // Forwarding registers: a symbol passes an element that already holds one.
  for (genvar x = 0; x < PCOLS; x++) begin : g_fh
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  fwd_h[x] <= SYM_NONE;
      else if (en) begin
        if (x == 0) fwd_h[x] <= (csym[0][0] != SYM_NONE) ? sym_in : SYM_NONE;
        else        fwd_h[x] <= (csym[0][x] != SYM_NONE) ? fwd_h[x-1] : SYM_NONE;
      end
    end
  end

  for (genvar y = 0; y < ROWS; y++) begin : g_fv
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  fwd_v[y] <= SYM_NONE;
      else if (en) begin
        if (y == 0) fwd_v[y] <= (rsym[0][0] != SYM_NONE) ? sym_in : SYM_NONE;
        else        fwd_v[y] <= (rsym[y][0] != SYM_NONE) ? fwd_v[y-1] : SYM_NONE;
      end
    end
  end

  assign done = &valid;

endmodule
