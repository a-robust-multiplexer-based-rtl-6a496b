// tb_muxtree_array_cfg: the configuration path of the 4 x 5 array with two
// bands of cells and a repaired row.
//  1. Colonization with the repeated stream BOUNDARY INTERIOR SPARE: column 2
//     is spare, cells begin at logical columns 0 and 2 (physical 0 and 3),
//     and the rows form two bands, rows 0-2 and row 3.
//  2. Chain test with a stuck CREG bit in element (row 1, column 0): row 1
//     is repaired before configuration, so its logical columns sit in
//     physical columns 1, 2, 3 and 4.
//  3. Configuration: cfg_in[0] feeds the cells of the lower band (six path
//     positions each), cfg_in[3] those of the upper band (two positions).
//     Every active element must then hold the word of its path position,
//     k = (logical column - first column of its cell) * band height
//         + (row - bottom row of its band),
//     in CREG and in all three flip-flops; unused spares and the dead
//     element must keep what they held before.
// Words use registered outputs and route NOUT on every bus, so no
// configuration can close a combinational loop.
module tb_muxtree_array_cfg;
  import mt_pkg::*;
  localparam int ROWS = 4, PCOLS = 5, NWORD = 6;
  logic clk = 0, rst_n = 0;
  mode_t mode;
  sym_t sym_in;
  logic test_in, init;
  logic [ROWS-1:0] cfg_in, w_in, w_ibus, w_out, w_obus, e_in, e_ibus, e_out, e_obus;
  logic [PCOLS-1:0] s_in, s_ibus, s_obus, n_ibus, n_out, n_obus;
  logic colonized, online;
  logic [ROWS-1:0] kill;
  logic [ROWS-1:0][PCOLS-1:0] spare_map, cell_w_map, cell_s_map, active_map, dead_map, claimed_map,
                              func_fault_map, creg_fault_map;
  int checks = 0, failures = 0;

  muxtree_array dut (.*);

  // Contents of every element, copied out of the hierarchy.
  creg_t q_of [ROWS][PCOLS];
  logic  f1_of [ROWS][PCOLS], f2_of [ROWS][PCOLS], d3_of [ROWS][PCOLS];
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar p = 0; p < PCOLS; p++) begin : g_p
      assign q_of[r][p]  = dut.g_row[r].g_col[p].u_el.u_creg.q;
      assign f1_of[r][p] = dut.g_row[r].g_col[p].u_el.u_m1.ff_out;
      assign f2_of[r][p] = dut.g_row[r].g_col[p].u_el.u_m2.ff_out;
      assign d3_of[r][p] = dut.g_row[r].g_col[p].u_el.u_test.d3;
    end
  end

  bit stuck_creg = 0;
  always @(negedge clk)
    if (stuck_creg) dut.g_row[1].g_col[0].u_el.u_creg.q[5] = 1'b0;

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    static sym_t pat [3] = '{SYM_BOUNDARY, SYM_INTERIOR, SYM_SPARE};
    logic [CHAIN_W-1:0] word [2][NWORD];        // [band][path position]
    logic [CHAIN_W*NWORD-1:0] stream [2];
    creg_t before_q [ROWS][PCOLS];
    logic  before_f [ROWS][PCOLS];
    int k, phys, cs, band, pos, n_checked;

    mode = MODE_COLONIZE; sym_in = SYM_NONE; test_in = 0; init = 0; cfg_in = '0;
    w_in = '0; w_ibus = '0; e_in = '0; e_ibus = '0; s_in = '0; s_ibus = '0; n_ibus = '0;
    #12 rst_n = 1;

    // 1. colonization
    k = 0;
    while (!colonized && k < 100) begin
      @(negedge clk); sym_in = pat[k % 3];
      @(posedge clk); #1; k++;
    end
    @(negedge clk); sym_in = SYM_NONE;
    chk(colonized, "colonized");
    for (int r = 0; r < ROWS; r++) begin
      chk(spare_map[r] == 5'b00100, $sformatf("spare column, row %0d: %b", r, spare_map[r]));
      chk(cell_w_map[r] == 5'b01001, $sformatf("cell west edges, row %0d: %b", r, cell_w_map[r]));
      chk(cell_s_map[r] == ((r == 0 || r == 3) ? 5'b11111 : 5'b00000),
          $sformatf("cell south edges, row %0d", r));
    end

    // 2. chain test with a stuck-at-0 CREG bit in element (1, 0)
    stuck_creg = 1;
    for (int t = 0; t <= CHAIN_W; t++) begin
      @(negedge clk); mode = MODE_TEST;
      test_in = (t == 0 || t == CHAIN_W-1 || t == CHAIN_W);
    end
    @(negedge clk); mode = MODE_COLONIZE; test_in = 0;
    #1;
    for (int r = 0; r < ROWS; r++)
      chk(creg_fault_map[r] == ((r == 1) ? 5'b00001 : 5'b00000),
          $sformatf("chain test row %0d: %b", r, creg_fault_map[r]));
    k = 0;
    do begin @(posedge clk); #1; k++; end while (!online && k < 100);
    repeat (2) @(posedge clk);
    #1;
    chk(active_map[1] == 5'b11110 && dead_map[1] == 5'b00001, "row 1 repaired");
    for (int r = 0; r < ROWS; r++)
      if (r != 1) chk(active_map[r] == 5'b11011, $sformatf("row %0d untouched", r));

    // 3. configuration
    for (int b = 0; b < 2; b++) begin
      stream[b] = '0;
      for (int j = 0; j < NWORD; j++) begin
        // LEFT, RIGHT, P and EB random; every bus carries NOUT; R = 1
        word[b][j] = {1'($urandom),
                      creg_pack(3'($urandom), 3'($urandom), 2'd3, 2'd3, 2'd3, 2'd3,
                                1'($urandom), 1'b1, 1'($urandom))};
        stream[b][(NWORD-1-j)*CHAIN_W +: CHAIN_W] = word[b][j];
      end
    end
    for (int r = 0; r < ROWS; r++)
      for (int p = 0; p < PCOLS; p++) begin
        before_q[r][p] = q_of[r][p];
        before_f[r][p] = f1_of[r][p];
      end
    for (int t = 0; t < CHAIN_W*NWORD; t++) begin
      @(negedge clk); mode = MODE_CONFIG;
      cfg_in = '0;
      cfg_in[0] = stream[0][t];
      cfg_in[3] = stream[1][t];
    end
    @(negedge clk); mode = MODE_COLONIZE; cfg_in = '0;
    #1;

    n_checked = 0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < 4; c++) begin
        // physical column of logical column c in this row
        phys = (r == 1) ? c + 1 : ((c < 2) ? c : c + 1);
        cs   = (c < 2) ? 0 : 2;
        band = (r == 3) ? 1 : 0;
        pos  = (band == 1) ? (c - cs) : (c - cs) * 3 + r;
        chk(q_of[r][phys] == word[band][pos][CREG_W-1:0],
            $sformatf("CREG of (%0d,%0d): %h, expected %h", r, phys, q_of[r][phys],
                      word[band][pos][CREG_W-1:0]));
        chk(f1_of[r][phys] == word[band][pos][CREG_W] && f2_of[r][phys] == word[band][pos][CREG_W]
            && d3_of[r][phys] == word[band][pos][CREG_W],
            $sformatf("flip-flops of (%0d,%0d)", r, phys));
        n_checked++;
      end
    end
    chk(n_checked == 16, "every logical element checked");
    for (int r = 0; r < ROWS; r++)
      if (r != 1)
        chk(q_of[r][2] == before_q[r][2] && f1_of[r][2] == before_f[r][2],
            $sformatf("unused spare (%0d,2) not configured", r));
    chk(f1_of[1][0] == before_f[1][0], "dead element not shifted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
