// tb_mt_row_repair: the repair controller of a 5-column row whose column 3
// is spare. Scenarios: a functional fault in column 1 (repair shifts columns
// 1..3 for exactly 21 clocks, then column 1 is dead and the spare in use); a
// second fault in the same segment (kill); a chain-test fault, acted on only
// after the test phase; a fault right of the last spare (kill); a functional
// fault while not running (ignored).
module tb_mt_row_repair;
  import mt_pkg::*;
  localparam int PCOLS = 5;
  logic clk = 0, rst_n = 0, run = 0, testing = 0;
  logic [PCOLS-1:0] spare, func_fault, creg_fault, active, dead, claimed, shift_en;
  logic busy, kill;
  int checks = 0, failures = 0;

  mt_row_repair #(.PCOLS(PCOLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 0; run = 0; testing = 0; func_fault = '0; creg_fault = '0;
    @(negedge clk); rst_n = 1;
  endtask

  // wait for a repair, return its length in clocks and the shift pattern seen
  task automatic measure(output int len, output logic [PCOLS-1:0] sh);
    len = 0; sh = '0;
    @(posedge clk); #1;
    while (busy && len < 100) begin
      sh |= shift_en;
      @(posedge clk); #1;
      len++;
    end
  endtask

  initial begin
    int len;
    logic [PCOLS-1:0] sh;
    spare = 5'b01000;
    func_fault = '0; creg_fault = '0;
    #12 rst_n = 1;
    @(negedge clk); run = 1;
    repeat (3) @(posedge clk); #1;
    chk(active == 5'b10111 && !busy && !kill, "initial active set");

    // on-line fault in column 1
    @(negedge clk); func_fault[1] = 1;
    measure(len, sh);
    chk(len == CHAIN_W, $sformatf("repair length %0d", len));
    chk(sh == 5'b01110, "shifted columns 1..3");
    chk(dead == 5'b00010 && claimed == 5'b01000 && active == 5'b11101, "map after repair");
    repeat (3) @(posedge clk); #1;
    chk(!busy && !kill, "dead element's fault ignored");

    // second fault in the same segment
    @(negedge clk); func_fault[2] = 1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    chk(kill && !busy, "second fault in segment kills the row");

    // chain-test fault: only after the test phase
    do_reset();
    @(negedge clk); testing = 1; creg_fault[0] = 1;
    repeat (4) @(posedge clk); #1;
    chk(!busy && dead == '0, "no repair during test");
    @(negedge clk); testing = 0;
    measure(len, sh);
    chk(len == CHAIN_W && sh == 5'b01111 && dead == 5'b00001 && claimed == 5'b01000,
        "repair of chain-test fault");

    // fault right of the last spare column
    do_reset();
    @(negedge clk); run = 1; func_fault[4] = 1;
    repeat (2) @(posedge clk); #1;
    chk(kill && !busy && dead == '0, "no spare to the right");

    // functional fault while not running
    do_reset();
    @(negedge clk); run = 0; func_fault[0] = 1;
    repeat (3) @(posedge clk); #1;
    chk(!busy && !kill, "functional fault ignored off-line");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
