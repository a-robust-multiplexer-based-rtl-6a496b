// muxtree_array: a self-testing, self-repairing MUXTREE array.
//
// ROWS x PCOLS physical MUXTREE elements (mt_element), each with duplicated
// logic and on-line comparison, a colonization automaton (mt_colonizer) that
// programs which columns are spare, and one repair controller per row
// (mt_row_repair).
//
// Logical view. In each row the active elements, read left to right, are the
// logical columns 0 .. n_active-1. Spare columns that are not in use and
// dead elements are not logical columns: every connection is made between
// logical neighbours, so a dead or idle element is transparent to the
// east-west signals, and the north-south signals of a logical column are
// steered to whichever physical column holds it in the row above or below.
// The array edges are likewise logical: row r's west/east edge signals reach
// its first/last logical column, and column c of the north/south edge
// reaches logical column c of the top/bottom row (only the first n_active
// entries are meaningful; unused inputs are ignored and unused outputs are 0).
//
// Modes (mode, see mt_pkg::mode_t):
//   COLONIZE  the automaton consumes sym_in, one symbol per clock;
//             colonized rises when it has reached every element.
//   TEST      every element (spares included) shifts test_in in parallel and
//             checks its chain; the test stream is CHAIN_W+1 bits, 1 0..0 1 1,
//             and the mode must last exactly that many clocks.
//   CONFIG    the configuration stream weaves through each cell: it
//             enters the cell's lower-left element and goes up the cell's
//             first logical column, returns to the bottom and goes up the
//             next one, and so on (spare columns and dead elements are not
//             on the path). A cell whose bottom row is r is fed by
//             cfg_in[r]; all cells of that band of rows get the same stream,
//             so the element at path position k of every cell receives the
//             k-th word from the end of the stream (CHAIN_W bits per word).
//   RUN       the array computes; init loads every flip-flop with its preset.
// A fault (functional mismatch in RUN, chain-test fault after TEST) starts
// a repair in its row; while any row repairs, online is low and every
// flip-flop of the array holds (the array is off-line). kill[r] reports a
// row whose fault could not be repaired.
// Timing: one clock; all state is reset by the asynchronous active-low rst_n.
//
// The element, the spare columns, the replacement by the right-hand
// neighbour, the off-line repair and the colonization are the document's.
// Cells: the west edges come from the colonizer's column symbols and are
// attached to logical columns (the n-th non-spare column of a row is the home
// of logical column n), so a repair does not move a cell; the south edges
// come from the row symbols.
// The routing is done here with logical-index multiplexers, where the
// document draws bypass multiplexers at each element's sides. The path of
// the configuration stream (up every column of a cell, entering at its
// lower-left corner, skipping spare columns) follows the document's figure
// of a colonized cell; feeding all cells of a band of rows from one input,
// and the mode input, are this design's choices.
// The routed neighbour connections can close combinational loops through the
// elements for some configurations, as in any programmable array.
module muxtree_array
  import mt_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned PCOLS = 5
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  mode_t                       mode,
  input  sym_t                        sym_in,
  input  logic                        test_in,
  input  logic [ROWS-1:0]             cfg_in,
  input  logic                        init,
  input  logic [ROWS-1:0]             w_in,
  input  logic [ROWS-1:0]             w_ibus,
  output logic [ROWS-1:0]             w_out,
  output logic [ROWS-1:0]             w_obus,
  input  logic [ROWS-1:0]             e_in,
  input  logic [ROWS-1:0]             e_ibus,
  output logic [ROWS-1:0]             e_out,
  output logic [ROWS-1:0]             e_obus,
  input  logic [PCOLS-1:0]            s_in,
  input  logic [PCOLS-1:0]            s_ibus,
  output logic [PCOLS-1:0]            s_obus,
  input  logic [PCOLS-1:0]            n_ibus,
  output logic [PCOLS-1:0]            n_out,
  output logic [PCOLS-1:0]            n_obus,
  output logic                        colonized,
  output logic                        online,
  output logic [ROWS-1:0]             kill,
  output logic [ROWS-1:0][PCOLS-1:0]  spare_map,
  output logic [ROWS-1:0][PCOLS-1:0]  cell_w_map,
  output logic [ROWS-1:0][PCOLS-1:0]  cell_s_map,
  output logic [ROWS-1:0][PCOLS-1:0]  active_map,
  output logic [ROWS-1:0][PCOLS-1:0]  dead_map,
  output logic [ROWS-1:0][PCOLS-1:0]  claimed_map,
  output logic [ROWS-1:0][PCOLS-1:0]  func_fault_map,
  output logic [ROWS-1:0][PCOLS-1:0]  creg_fault_map
);

  localparam int unsigned CW = (PCOLS > 1) ? $clog2(PCOLS) : 1;
  localparam int unsigned NW = $clog2(PCOLS + 1);
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;

  // Element outputs, indexed [row][physical column].
  logic [ROWS-1:0][PCOLS-1:0] e_nout, e_eout, e_wout, e_nobus, e_sobus, e_eobus, e_wobus;
  logic [ROWS-1:0][PCOLS-1:0] e_chain_out;
  logic [ROWS-1:0][PCOLS-1:0] rep_shift, col_valid;
  logic [ROWS-1:0]            busy;
  logic                       busy_any, ce, run, testing;

  // Logical mapping per row.
  logic [CW-1:0] phys_of [ROWS][PCOLS];   // physical column of logical c
  logic [CW-1:0] log_of  [ROWS][PCOLS];   // logical column of physical p
  logic [NW-1:0] n_act   [ROWS];

  assign busy_any = |busy;
  assign online   = ~busy_any;
  assign run      = (mode == MODE_RUN);
  assign testing  = (mode == MODE_TEST);
  assign ce       = run && !busy_any;

  // ---------------------------------------------------------------- colonizer
  mt_colonizer #(.ROWS(ROWS), .PCOLS(PCOLS)) u_colonizer (
    .clk (clk), .rst_n (rst_n), .en (mode == MODE_COLONIZE), .sym_in (sym_in),
    .valid (col_valid), .spare (spare_map), .bnd_w (cell_w_map), .bnd_s (cell_s_map),
    .done (colonized)
  );

  // ------------------------------------------------------------ repair, rows
  for (genvar r = 0; r < ROWS; r++) begin : g_rep
    mt_row_repair #(.PCOLS(PCOLS)) u_rep (
      .clk (clk), .rst_n (rst_n),
      .run (run && !busy_any), .testing (testing),
      .spare (spare_map[r] & col_valid[r]),
      .func_fault (func_fault_map[r]), .creg_fault (creg_fault_map[r]),
      .active (active_map[r]), .dead (dead_map[r]), .claimed (claimed_map[r]),
      .shift_en (rep_shift[r]), .busy (busy[r]), .kill (kill[r])
    );

    always_comb begin
      automatic int unsigned cnt = 0;
      for (int unsigned p = 0; p < PCOLS; p++) begin
        phys_of[r][p] = '0;
        log_of[r][p]  = '0;
      end
      for (int unsigned p = 0; p < PCOLS; p++) begin
        log_of[r][p] = CW'(cnt);
        if (active_map[r][p]) begin
          phys_of[r][cnt] = CW'(p);
          cnt++;
        end
      end
      n_act[r] = NW'(cnt);
    end
  end

  // ------------------------------------------------------- cell geometry
  // cstart[c]: first logical column of the cell holding logical column c.
  // rbot[r] / rtop[r]: bottom and top rows of the cell band holding row r.
  logic [CW-1:0] cstart [PCOLS];
  logic [RW-1:0] rbot [ROWS];
  logic [RW-1:0] rtop [ROWS];

  always_comb begin
    automatic int unsigned cnt = 0;
    automatic logic [PCOLS-1:0] home_w = '0;
    for (int unsigned p = 0; p < PCOLS; p++) begin
      if (col_valid[0][p] && !spare_map[0][p]) begin
        home_w[cnt] = cell_w_map[0][p];
        cnt++;
      end
    end
    cstart[0] = '0;
    for (int unsigned c = 1; c < PCOLS; c++)
      cstart[c] = home_w[c] ? CW'(c) : cstart[c-1];
    rbot[0] = '0;
    for (int unsigned r = 1; r < ROWS; r++)
      rbot[r] = cell_s_map[r][0] ? RW'(r) : rbot[r-1];
    rtop[ROWS-1] = RW'(ROWS-1);
    for (int r = ROWS-2; r >= 0; r--)
      rtop[r] = cell_s_map[r+1][0] ? RW'(r) : rtop[r+1];
  end

  // ------------------------------------------------------------ the elements
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar p = 0; p < PCOLS; p++) begin : g_col
      logic sin, win, ein, nibus, sibus, eibus, wibus;
      logic chain_in, shift_en;
      logic [CW-1:0] c;

      assign c = log_of[r][p];

      // Neighbour routing in the logical view.
      always_comb begin
        if (c == '0) begin
          win   = w_in[r];
          wibus = w_ibus[r];
        end else begin
          win   = e_eout[r][phys_of[r][c-1'b1]];
          wibus = e_eobus[r][phys_of[r][c-1'b1]];
        end
        if (NW'(c) + 1'b1 >= n_act[r]) begin
          ein   = e_in[r];
          eibus = e_ibus[r];
        end else begin
          ein   = e_wout[r][phys_of[r][c+1'b1]];
          eibus = e_wobus[r][phys_of[r][c+1'b1]];
        end
        if (r == 0) begin
          sin   = s_in[c];
          sibus = s_ibus[c];
        end else if (NW'(c) < n_act[(r == 0) ? 0 : r-1]) begin
          sin   = e_nout[(r == 0) ? 0 : r-1][phys_of[(r == 0) ? 0 : r-1][c]];
          sibus = e_nobus[(r == 0) ? 0 : r-1][phys_of[(r == 0) ? 0 : r-1][c]];
        end else begin
          sin   = 1'b0;
          sibus = 1'b0;
        end
        if (r == ROWS-1) begin
          nibus = n_ibus[c];
        end else if (NW'(c) < n_act[(r == ROWS-1) ? r : r+1]) begin
          nibus = e_sobus[(r == ROWS-1) ? r : r+1][phys_of[(r == ROWS-1) ? r : r+1][c]];
        end else begin
          nibus = 1'b0;
        end
      end

      // Configuration chain: repair shift, test broadcast or row stream.
      always_comb begin
        if (busy[r]) begin
          shift_en = rep_shift[r][p];
          chain_in = (p == 0) ? 1'b0 : e_chain_out[r][(p == 0) ? 0 : p-1];
        end else if (testing) begin
          shift_en = 1'b1;
          chain_in = test_in;
        end else if (mode == MODE_CONFIG) begin
          shift_en = active_map[r][p];
          if (rbot[r] != RW'(r)) begin
            // from the element below, in the same logical column
            chain_in = (NW'(c) < n_act[(r == 0) ? 0 : r-1])
                     ? e_chain_out[(r == 0) ? 0 : r-1][phys_of[(r == 0) ? 0 : r-1][c]] : 1'b0;
          end else if (cstart[c] != c) begin
            // return path from the top of the previous logical column
            chain_in = (NW'(c) <= n_act[rtop[r]])
                     ? e_chain_out[rtop[r]][phys_of[rtop[r]][c-1'b1]] : 1'b0;
          end else begin
            chain_in = cfg_in[r];   // entry point of the cell
          end
        end else begin
          shift_en = 1'b0;
          chain_in = 1'b0;
        end
      end

      mt_element u_el (
        .clk (clk), .rst_n (rst_n), .ce (ce), .init (init && ce),
        .shift_en (shift_en), .test_en (testing),
        .chain_in (chain_in), .chain_out (e_chain_out[r][p]),
        .sin (sin), .win (win), .ein (ein),
        .nout (e_nout[r][p]), .eout (e_eout[r][p]), .wout (e_wout[r][p]),
        .nibus (nibus), .sibus (sibus), .eibus (eibus), .wibus (wibus),
        .nobus (e_nobus[r][p]), .sobus (e_sobus[r][p]),
        .eobus (e_eobus[r][p]), .wobus (e_wobus[r][p]),
        .func_fault (func_fault_map[r][p]), .creg_fault (creg_fault_map[r][p]),
        .creg_q ()
      );
    end
  end

  // ------------------------------------------------------------ array edges
  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      if (n_act[r] != '0) begin
        w_out[r]   = e_wout[r][phys_of[r][0]];
        w_obus[r]  = e_wobus[r][phys_of[r][0]];
        e_out[r]   = e_eout[r][phys_of[r][n_act[r]-1'b1]];
        e_obus[r]  = e_eobus[r][phys_of[r][n_act[r]-1'b1]];
      end else begin
        w_out[r]   = 1'b0;
        w_obus[r]  = 1'b0;
        e_out[r]   = 1'b0;
        e_obus[r]  = 1'b0;
      end
    end
    for (int unsigned c = 0; c < PCOLS; c++) begin
      if (NW'(c) < n_act[ROWS-1]) begin
        n_out[c]  = e_nout[ROWS-1][phys_of[ROWS-1][c]];
        n_obus[c] = e_nobus[ROWS-1][phys_of[ROWS-1][c]];
      end else begin
        n_out[c]  = 1'b0;
        n_obus[c] = 1'b0;
      end
      if (NW'(c) < n_act[0]) s_obus[c] = e_sobus[0][phys_of[0][c]];
      else                   s_obus[c] = 1'b0;
    end
  end

endmodule
