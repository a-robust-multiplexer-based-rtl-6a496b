// tb_mt_test_unit: the TEST unit with random stimulus. Checks the comparator
// (NOUT or FF_IN of the two copies differ), the majority of the three
// flip-flops and the loading of the third flip-flop D3 against a model.
module tb_mt_test_unit;
  logic clk = 0, rst_n = 0;
  logic nout1, nout2, ffin1, ffin2, ff1, ff2, ce, init, preset, shift_en, shift_in;
  logic fault, d3, maj;
  logic d3_m;
  int checks = 0, failures = 0;

  mt_test_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic exp_fault, exp_maj;
    {nout1, nout2, ffin1, ffin2, ff1, ff2, ce, init, preset, shift_en, shift_in} = '0;
    d3_m = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      {nout1, nout2, ffin1, ffin2, ff1, ff2, preset, shift_in} = 8'($urandom);
      ce = $urandom % 2; init = ($urandom % 8) == 0; shift_en = ($urandom % 8) == 0;
      #1;
      exp_fault = (nout1 != nout2) || (ffin1 != ffin2);
      ones = int'(ff1) + int'(ff2) + int'(d3_m);
      exp_maj = (ones >= 2);
      checks++;
      if (fault !== exp_fault || maj !== exp_maj || d3 !== d3_m) begin
        failures++;
        if (failures < 10) $display("cycle %0d fault %b/%b maj %b/%b d3 %b/%b", i,
                                    fault, exp_fault, maj, exp_maj, d3, d3_m);
      end
      @(posedge clk);
      if (shift_en)  d3_m = shift_in;
      else if (init) d3_m = preset;
      else if (ce)   d3_m = ffin1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
