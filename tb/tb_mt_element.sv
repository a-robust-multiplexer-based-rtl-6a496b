// tb_mt_element: one self-testing MUXTREE element.
//  1. Chain test with the 1 0..0 1 1 stream: no fault on a good element, a
//     fault when a CREG bit is held stuck at 0.
//  2. Configuration: 21-bit words shifted in (CREG[0] first, flip-flop last)
//     must appear in CREG and in the flip-flop, and shift out unchanged.
//  3. Operation: random inputs against a model of the switch block and the
//     functional part; no functional fault may be reported.
//  4. A flip-flop of copy M2 held stuck at 1: the comparison must report the
//     fault and the majority must still give M1's flip-flop value.
module tb_mt_element;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ce = 0, init = 0, shift_en = 0, test_en = 0, chain_in = 0, chain_out;
  logic sin = 0, win = 0, ein = 0, nout, eout, wout;
  logic nibus = 0, sibus = 0, eibus = 0, wibus = 0, nobus, sobus, eobus, wobus;
  logic func_fault, creg_fault;
  creg_t creg_q;
  int checks = 0, failures = 0;
  logic ff_m;

  mt_element dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic test_pattern();
    for (int t = 0; t <= CHAIN_W; t++) begin
      @(negedge clk);
      shift_en = 1; test_en = 1;
      chain_in = (t == 0 || t == CHAIN_W-1 || t == CHAIN_W);
    end
    @(negedge clk); shift_en = 0; test_en = 0; chain_in = 0;
  endtask

  task automatic load(input creg_t w, input logic ff, output logic [CHAIN_W-1:0] shifted_out);
    logic [CHAIN_W-1:0] word;
    word = {ff, w};          // bit 0 goes first
    for (int t = 0; t < CHAIN_W; t++) begin
      @(negedge clk);
      shift_en = 1; chain_in = word[t];
      shifted_out[t] = chain_out;
    end
    @(negedge clk); shift_en = 0; chain_in = 0;
  endtask

  function automatic logic sel8(input logic [2:0] s, input logic ff, input logic sb, input logic ob);
    case (s)
      0: return 1'b0; 1: return 1'b1; 2: return sin; 3: return ein;
      4: return win;  5: return ff;   6: return sb;  default: return ob;
    endcase
  endfunction

  initial begin
    creg_t w, w_prev;
    logic [CHAIN_W-1:0] so;
    logic e_nobus, e_sobus, e_eobus, e_wobus, ctl, d, e_nout;
    #12 rst_n = 1;

    // 1. chain test
    test_pattern();
    chk(!creg_fault, "good chain passes the test");
    force dut.u_creg.q[7] = 1'b0;
    rst_n = 0; #1 rst_n = 1;
    test_pattern();
    chk(creg_fault, "stuck CREG bit detected");
    release dut.u_creg.q[7];
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;

    // 2. configuration
    w_prev = '0;
    for (int i = 0; i < 4; i++) begin
      w = creg_t'($urandom);
      if (w[S_LSB +: 2] == 2'd3) w[S_LSB +: 2] = 2'd2;
      if (w[E_LSB +: 2] == 2'd3) w[E_LSB +: 2] = 2'd2;
      ff_m = $urandom % 2;
      load(w, ff_m, so);
      chk(creg_q == w, "CREG loaded");
      chk(dut.u_m1.ff_out == ff_m && dut.u_m2.ff_out == ff_m && dut.u_test.d3 == ff_m, "flip-flops loaded");
      if (i > 0) chk(so[CHAIN_W-2:0] == w_prev[CHAIN_W-2:0] || so[CHAIN_W-1:1] == w_prev[CHAIN_W-2:0],
                     "previous word shifted out");
      w_prev = w;
    end

    // 3. operation, configurations without a loop through NOUT into the
    //    buses that feed the functional part back (S, E != 3)
    for (int i = 0; i < 600; i++) begin
      if (i % 50 == 0) begin
        w = creg_t'($urandom);
        if (w[S_LSB +: 2] == 2'd3) w[S_LSB +: 2] = 2'd0;
        if (w[E_LSB +: 2] == 2'd3) w[E_LSB +: 2] = 2'd1;
        ff_m = $urandom % 2;
        ce = 0; init = 0;
        load(w, ff_m, so);
      end
      @(negedge clk);
      {sin, win, ein, nibus, sibus, eibus, wibus} = 7'($urandom);
      ce = ($urandom % 4) != 0;
      init = ($urandom % 20) == 0;
      #1;
      case (w[S_LSB +: 2]) 0: e_sobus = nibus; 1: e_sobus = eibus; default: e_sobus = wibus; endcase
      case (w[E_LSB +: 2]) 0: e_eobus = wibus; 1: e_eobus = nibus; default: e_eobus = sibus; endcase
      ctl = w[EB_BIT] ? eibus : e_eobus;
      d = ctl ? sel8(w[LEFT_LSB +: 3], ff_m, sibus, e_sobus) : sel8(w[RIGHT_LSB +: 3], ff_m, sibus, e_sobus);
      e_nout = w[R_BIT] ? ff_m : d;
      case (w[N_LSB +: 2]) 0: e_nobus = sibus; 1: e_nobus = eibus; 2: e_nobus = wibus; default: e_nobus = e_nout; endcase
      case (w[W_LSB +: 2]) 0: e_wobus = eibus; 1: e_wobus = nibus; 2: e_wobus = sibus; default: e_wobus = e_nout; endcase
      chk(nout == e_nout && sobus == e_sobus && eobus == e_eobus && nobus == e_nobus && wobus == e_wobus,
          $sformatf("outputs cfg=%h i=%0d got %b%b%b%b%b exp %b%b%b%b%b ff=%b/%b", w, i,
                    nout, sobus, eobus, nobus, wobus, e_nout, e_sobus, e_eobus, e_nobus, e_wobus,
                    dut.u_m1.ff_out, ff_m));
      chk(eout == sin && wout == sin, "EOUT/WOUT repeat SIN");
      chk(!func_fault, "no functional fault");
      @(posedge clk);
      if (init) ff_m = w[P_BIT];
      else if (ce) ff_m = d;
    end

    // 4. stuck flip-flop in copy M2
    @(negedge clk); ce = 0; init = 0;
    load(creg_pack(3'd0, 3'd0, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 1'b1, 1'b0), 1'b0, so);
    force dut.u_m2.ff_out = 1'b1;
    #1;
    chk(func_fault, "stuck M2 flip-flop detected");
    chk(dut.u_test.maj == 1'b0, "majority keeps the correct state");
    release dut.u_m2.ff_out;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
