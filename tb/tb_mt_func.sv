// tb_mt_func: the functional part of a MUXTREE element against a reference
// model. Random configurations and input vectors are applied; the
// combinational outputs FF_IN and NOUT are checked in every cycle and the
// flip-flop is tracked through its shift, init and clock-enable loads.
module tb_mt_func;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  creg_t creg;
  logic sin, ein, win, sibus, sobus, eibus, eobus, ce, init, shift_en, shift_in;
  logic nout, ff_in, ff_out;
  logic ff_m;
  int checks = 0, failures = 0;

  mt_func dut (.*);

  always #5 clk = ~clk;

  function automatic logic pick(input logic [2:0] s, input logic ff);
    case (s)
      3'd0: return 1'b0;
      3'd1: return 1'b1;
      3'd2: return sin;
      3'd3: return ein;
      3'd4: return win;
      3'd5: return ff;
      3'd6: return sibus;
      default: return sobus;
    endcase
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ctl, d, exp_nout;
    creg = '0; {sin, ein, win, sibus, sobus, eibus, eobus, ce, init, shift_en, shift_in} = '0;
    ff_m = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i % 16 == 0) creg = creg_t'($urandom);
      {sin, ein, win, sibus, sobus, eibus, eobus} = 7'($urandom);
      ce       = ($urandom % 4) != 0;
      init     = ($urandom % 16) == 0;
      shift_en = ($urandom % 16) == 0;
      shift_in = $urandom % 2;
      #1;
      ctl = creg[EB_BIT] ? eibus : eobus;
      d   = ctl ? pick(creg[LEFT_LSB +: 3], ff_m) : pick(creg[RIGHT_LSB +: 3], ff_m);
      exp_nout = creg[R_BIT] ? ff_m : d;
      checks++;
      if (ff_in !== d || nout !== exp_nout || ff_out !== ff_m) begin
        failures++;
        if (failures < 10) $display("cycle %0d creg=%h ff_in=%b/%b nout=%b/%b ff=%b/%b",
                                    i, creg, ff_in, d, nout, exp_nout, ff_out, ff_m);
      end
      @(posedge clk);
      if (shift_en)  ff_m = shift_in;
      else if (init) ff_m = creg[P_BIT];
      else if (ce)   ff_m = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
