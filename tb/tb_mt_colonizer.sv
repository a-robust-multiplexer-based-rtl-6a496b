// tb_mt_colonizer: colonization of a 4 x 5 automaton by a repeated pattern
// BOUNDARY INTERIOR INTERIOR SPARE. Checks that column x and row y take
// stream symbols x and y (spare column 3, cell edges at column 0 and 4 and
// at row 0), that done rises exactly after the expected number of clocks,
// max(2x+y, 2y+x)+1 over the far corner, and that nothing moves while en is
// low.
module tb_mt_colonizer;
  import mt_pkg::*;
  localparam int ROWS = 4, PCOLS = 5;
  logic clk = 0, rst_n = 0, en = 0;
  sym_t sym_in;
  logic [ROWS-1:0][PCOLS-1:0] valid, spare, bnd_w, bnd_s;
  logic done;
  int checks = 0, failures = 0;
  sym_t pat [4] = '{SYM_BOUNDARY, SYM_INTERIOR, SYM_INTERIOR, SYM_SPARE};

  mt_colonizer #(.ROWS(ROWS), .PCOLS(PCOLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int maxi(input int a, input int b); return (a > b) ? a : b; endfunction

  initial begin
    int k, expect_clks, xc, yc;
    sym_in = SYM_NONE;
    #12 rst_n = 1;
    // en low: nothing happens
    @(negedge clk); sym_in = SYM_BOUNDARY;
    repeat (3) @(posedge clk);
    #1 checks++; if (valid != '0) failures++;
    xc = PCOLS - 1; yc = ROWS - 1;
    expect_clks = maxi(2*xc + yc, 2*yc + xc) + 1;
    k = 0;
    while (!done && k < 100) begin
      @(negedge clk);
      en = 1; sym_in = pat[k % 4];
      @(posedge clk); #1;
      k++;
    end
    checks++;
    if (k != expect_clks) begin
      failures++; $display("done after %0d clocks, expected %0d", k, expect_clks);
    end
    @(negedge clk); en = 0;
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < PCOLS; x++) begin
        checks++;
        if (spare[y][x] !== (pat[x % 4] == SYM_SPARE) || bnd_w[y][x] !== (pat[x % 4] == SYM_BOUNDARY) ||
            bnd_s[y][x] !== (pat[y % 4] == SYM_BOUNDARY) || !valid[y][x]) begin
          failures++;
          $display("x=%0d y=%0d spare=%b bw=%b bs=%b", x, y, spare[y][x], bnd_w[y][x], bnd_s[y][x]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
