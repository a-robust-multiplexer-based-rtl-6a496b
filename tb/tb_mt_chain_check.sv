// tb_mt_chain_check: the chain test logic driven by a 21-stage shift-chain
// model (one flip-flop stage followed by the 20 CREG stages). The test stream
// 1, 0 x 19, 1, 1 is shifted in once for a fault-free chain and once for
// every stage stuck at 0 and stuck at 1. Expected outcome: no fault for the
// good chain, a fault for every stuck stage except the first stage stuck at
// 0, which this logic cannot see (in the element that stage is the
// triplicated flip-flop, covered by its majority). Also checks that the flag
// is not collected while en is low.
module tb_mt_chain_check;
  localparam int N = 21;
  logic clk = 0, rst_n = 0, en = 0, chain_in = 0;
  logic first, head_m1, head_q, fault_now, fault;
  logic [N-1:0] st;   // st[0] first stage ... st[N-1] last stage
  int checks = 0, failures = 0;

  assign first   = st[0];
  assign head_m1 = st[N-2];
  assign head_q  = st[N-1];

  mt_chain_check dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stuck < 0: fault-free chain
  task automatic run_pattern(input int stuck, input logic val, input logic enable);
    logic exp;
    logic [N-1:0] nxt;
    rst_n = 0; en = 0; chain_in = 0; st = '0;
    if (stuck >= 0) st[stuck] = val;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t <= N; t++) begin
      @(negedge clk);
      en = enable;
      chain_in = (t == 0 || t == N-1 || t == N);
      @(posedge clk);
      nxt = {st[N-2:0], chain_in};
      if (stuck >= 0) nxt[stuck] = val;
      st <= nxt;
    end
    @(negedge clk); en = 0;
    exp = enable && (stuck >= 0) && !(stuck == 0 && val == 1'b0);
    checks++;
    if (fault !== exp) begin
      failures++;
      $display("stuck=%0d val=%b en=%b fault=%b exp=%b", stuck, val, enable, fault, exp);
    end
  endtask

  initial begin
    run_pattern(-1, 1'b0, 1'b1);
    for (int k = 0; k < N; k++) begin
      run_pattern(k, 1'b0, 1'b1);
      run_pattern(k, 1'b1, 1'b1);
    end
    run_pattern(5, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
