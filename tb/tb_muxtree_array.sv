// tb_muxtree_array: end-to-end run of the 4 x 5 array at its default size.
//  1. Colonization with the repeated stream BOUNDARY INTERIOR INTERIOR SPARE:
//     column 3 becomes the spare column of every row.
//  2. Chain test of all elements with one CREG bit of element (row 2,
//     column 0) held stuck: only that element fails, and the repair makes
//     column 0 of row 2 dead and takes the spare into use.
//  3. Configuration along the cells' paths: the stream BOUNDARY INTERIOR
//     INTERIOR SPARE makes two cells side by side, logical columns 0-2 and
//     logical column 3, both four rows high and both fed from cfg_in[0].
//     The stream enters each cell at its lower-left element and climbs one
//     logical column after the other, so path position k of a cell is row
//     k % 4 of its (k / 4)-th column; the narrow cell receives the first
//     four words of the wide one. Each word makes the 4 x 4 logical array
//     a two-way shift array:
//     each element's flip-flop takes the element below (SIN) when its row's
//     east bus input is 1 and its west neighbour (through WIBUS -> SOBUS)
//     when it is 0.
//  4. Operation with random inputs against a model of that logical array,
//     with INIT, one on-line repair (a flip-flop of copy M2 in row 1,
//     column 1 stuck at 1: the array must go off-line for exactly CHAIN_W
//     clocks and carry on with its state intact) and a second fault in the
//     same row segment, which must raise kill for that row.
// Faults are modelled by writing the stuck value into one element's storage
// bit at every falling edge.
// Every mechanism is counted and one that never happened is a failure.
module tb_muxtree_array;
  import mt_pkg::*;
  localparam int ROWS = 4, PCOLS = 5, L = 4;
  localparam int NW = 12;   // words on the longest configuration path
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

  // mechanism counters
  int n_colonize = 0, n_test_fault = 0, n_test_repair = 0, n_config = 0, n_online_repair = 0;
  int n_kill = 0, n_init = 0, n_vshift = 0, n_hshift = 0, n_offline = 0;

  logic st [ROWS][L];      // model: flip-flop of logical element (r, c)
  logic pre [ROWS][L];     // preset value P of each element

  muxtree_array dut (.*);

  // Stuck-at faults: the stuck value is written back into the chosen storage
  // bit at every falling edge, so it is what the rest of the circuit reads
  // and what the next stage captures on the rising edge.
  bit stuck_creg = 0, fault1_on = 0, fault2_on = 0;
  always @(negedge clk) begin
    if (stuck_creg) dut.g_row[2].g_col[0].u_el.u_creg.q[9] = 1'b1;
    if (fault1_on)  dut.g_row[1].g_col[1].u_el.u_m2.ff_out = 1'b1;
    if (fault2_on)  dut.g_row[1].g_col[2].u_el.u_m2.ff_out = 1'b1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic outputs_check(input int cyc);
    for (int r = 0; r < ROWS; r++) begin
      chk(e_obus[r] == st[r][L-1], $sformatf("c%0d e_obus[%0d]", cyc, r));
      chk(w_obus[r] == e_ibus[r], $sformatf("c%0d w_obus[%0d]", cyc, r));
      chk(w_out[r] == ((r == 0) ? s_in[0] : st[r-1][0]), $sformatf("c%0d w_out[%0d]", cyc, r));
      chk(e_out[r] == ((r == 0) ? s_in[L-1] : st[r-1][L-1]), $sformatf("c%0d e_out[%0d]", cyc, r));
    end
    for (int c = 0; c < L; c++) begin
      chk(n_out[c] == st[ROWS-1][c] && n_obus[c] == st[ROWS-1][c], $sformatf("c%0d n_out[%0d]", cyc, c));
      chk(s_obus[c] == ((c == 0) ? w_ibus[0] : st[0][c-1]), $sformatf("c%0d s_obus[%0d]", cyc, c));
    end
  endtask

  initial begin
    static sym_t pat [4] = '{SYM_BOUNDARY, SYM_INTERIOR, SYM_INTERIOR, SYM_SPARE};
    logic [CHAIN_W*NW-1:0] stream;
    logic pre_k [NW], ff0_k [NW];
    logic ff0 [ROWS][L];
    logic nxt [ROWS][L];
    creg_t w;
    int k, off_len, pk;
    bit was_online, do_init;

    mode = MODE_COLONIZE; sym_in = SYM_NONE; test_in = 0; init = 0; cfg_in = '0;
    w_in = '0; w_ibus = '0; e_in = '0; e_ibus = '0; s_in = '0; s_ibus = '0; n_ibus = '0;
    #12 rst_n = 1;

    // 1. colonization
    k = 0;
    while (!colonized && k < 100) begin
      @(negedge clk); sym_in = pat[k % 4];
      @(posedge clk); #1; k++;
    end
    @(negedge clk); sym_in = SYM_NONE;
    chk(colonized, "colonized");
    if (colonized) n_colonize++;
    for (int r = 0; r < ROWS; r++) begin
      chk(spare_map[r] == 5'b01000, $sformatf("spare column, row %0d", r));
      chk(cell_w_map[r] == 5'b10001, $sformatf("cell west edges, row %0d", r));
      chk(cell_s_map[r] == ((r == 0) ? 5'b11111 : 5'b00000), $sformatf("cell south edges, row %0d", r));
      chk(active_map[r] == 5'b10111, $sformatf("active before test, row %0d", r));
    end

    // 2. chain test with a stuck CREG bit in element (2, 0)
    stuck_creg = 1;
    for (int t = 0; t <= CHAIN_W; t++) begin
      @(negedge clk); mode = MODE_TEST;
      test_in = (t == 0 || t == CHAIN_W-1 || t == CHAIN_W);
    end
    @(negedge clk); mode = MODE_COLONIZE; test_in = 0;
    #1;
    for (int r = 0; r < ROWS; r++)
      chk(creg_fault_map[r] == ((r == 2) ? 5'b00001 : 5'b00000),
          $sformatf("chain test row %0d: %b", r, creg_fault_map[r]));
    if (creg_fault_map[2][0]) n_test_fault++;
    k = 0;
    do begin @(posedge clk); #1; k++; end while (!online && k < 100);
    repeat (2) @(posedge clk);
    #1;
    chk(dead_map[2] == 5'b00001 && claimed_map[2] == 5'b01000 && active_map[2] == 5'b11110,
        "row 2 repaired after the chain test");
    if (dead_map[2][0]) n_test_repair++;

    // 3. configuration
    stream = '0;
    for (int j = 0; j < NW; j++) begin
      pre_k[j] = ((j + j / 4) % 2) == 1;
      ff0_k[j] = 1'($urandom);
      // LEFT=SIN, RIGHT=SOBUS, N=NOUT, S=WIBUS, E=NOUT, W=EIBUS, R=1, EB=1 (EIBUS)
      w = creg_pack(3'd2, 3'd7, 2'd3, 2'd2, 2'd3, 2'd0, pre_k[j], 1'b1, 1'b1);
      // the word of the last path position goes first
      stream[(NW-1-j)*CHAIN_W +: CHAIN_W] = {ff0_k[j], w};
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < L; c++) begin
        pk = ((c < 3) ? c : c - 3) * ROWS + r;   // path position in its cell
        pre[r][c] = pre_k[pk];
        ff0[r][c] = ff0_k[pk];
        st[r][c]  = ff0[r][c];
      end
    for (int t = 0; t < CHAIN_W*NW; t++) begin
      @(negedge clk); mode = MODE_CONFIG;
      cfg_in = '0;
      cfg_in[0] = stream[t];
    end
    @(negedge clk); mode = MODE_COLONIZE; cfg_in = '0; n_config++;
    #1;
    outputs_check(-1);

    // 4. operation
    off_len = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      mode = MODE_RUN;
      w_ibus = ROWS'($urandom); e_ibus = ROWS'($urandom); s_in = PCOLS'($urandom);
      w_in = ROWS'($urandom); e_in = ROWS'($urandom); s_ibus = PCOLS'($urandom);
      n_ibus = PCOLS'($urandom);
      do_init = (cyc == 50);
      init = do_init;
      if (cyc == 100) begin
        fault1_on = 1;
      end
      if (cyc == 250) begin
        fault2_on = 1;
      end
      #1;
      was_online = online;
      if (online) begin
        if (off_len > 0) begin
          chk(off_len == CHAIN_W, $sformatf("off-line for %0d clocks", off_len));
          n_online_repair++;
          chk(dead_map[1] == 5'b00010 && claimed_map[1] == 5'b01000, "row 1 repaired on-line");
          off_len = 0;
        end
        outputs_check(cyc);
      end else begin
        off_len++;
        n_offline++;
      end
      @(posedge clk);
      if (was_online) begin
        if (do_init) begin
          for (int r = 0; r < ROWS; r++) for (int c = 0; c < L; c++) st[r][c] = pre[r][c];
          n_init++;
        end else begin
          for (int r = 0; r < ROWS; r++) begin
            if (e_ibus[r]) n_vshift++; else n_hshift++;
            for (int c = 0; c < L; c++)
              nxt[r][c] = e_ibus[r] ? ((r == 0) ? s_in[c] : st[r-1][c])
                                    : ((c == 0) ? w_ibus[r] : st[r][c-1]);
          end
          st = nxt;
        end
      end
    end
    chk(kill == 4'b0010, $sformatf("kill=%b after second fault in row 1", kill));
    if (kill[1]) n_kill++;

    chk(n_colonize > 0, "colonization happened");
    chk(n_test_fault > 0, "chain-test fault seen");
    chk(n_test_repair > 0, "test-time repair happened");
    chk(n_config > 0, "configuration happened");
    chk(n_online_repair > 0, "on-line repair happened");
    chk(n_kill > 0, "kill happened");
    chk(n_init > 0, "init happened");
    chk(n_vshift > 0 && n_hshift > 0, "both data directions used");
    $display("mechanisms: colonize=%0d test_fault=%0d test_repair=%0d config=%0d online_repair=%0d kill=%0d init=%0d vshift=%0d hshift=%0d offline_clocks=%0d",
             n_colonize, n_test_fault, n_test_repair, n_config, n_online_repair, n_kill, n_init,
             n_vshift, n_hshift, n_offline);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
