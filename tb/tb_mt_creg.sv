// tb_mt_creg: the configuration shift register against a bit-queue model.
// Random bits are shifted in with shift_en toggling randomly; after every
// clock the parallel contents and the serial output are compared with the
// model. Also checks that reset clears the register.
module tb_mt_creg;
  localparam int W = 20;
  logic clk = 0, rst_n = 0, shift_en = 0, si = 0;
  logic [W-1:0] q;
  logic so;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  mt_creg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12 rst_n = 1;
    checks++; if (q !== '0) failures++;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      shift_en = ($urandom % 4) != 0;
      si = $urandom % 2;
      @(posedge clk);
      if (shift_en) model = {si, model[W-1:1]};
      #1;
      checks++;
      if (q !== model || so !== model[0]) begin
        failures++;
        if (failures < 10) $display("cycle %0d q=%h exp %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
