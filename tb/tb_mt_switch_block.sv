// tb_mt_switch_block: exhaustive check of the switch block. Every combination
// of the five data inputs and of the four 2-bit selects is applied and each
// output is compared with the routing table written out independently below.
module tb_mt_switch_block;
  logic nibus, sibus, eibus, wibus, nout;
  logic [1:0] sel_n, sel_s, sel_e, sel_w;
  logic nobus, sobus, eobus, wobus;
  int checks = 0, failures = 0;

  mt_switch_block dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] v;       // {nout, wibus, eibus, sibus, nibus}
    logic en, es, ee, ew;
    for (int iv = 0; iv < 32; iv++) begin
      for (int s = 0; s < 256; s++) begin
        v = 5'(iv);
        {nout, wibus, eibus, sibus, nibus} = v;
        {sel_n, sel_s, sel_e, sel_w} = 8'(s);
        #1;
        // table: output <- {sel0, sel1, sel2, sel3}
        case (sel_n) 0: en = v[1]; 1: en = v[2]; 2: en = v[3]; default: en = v[4]; endcase
        case (sel_s) 0: es = v[0]; 1: es = v[2]; 2: es = v[3]; default: es = v[4]; endcase
        case (sel_e) 0: ee = v[3]; 1: ee = v[0]; 2: ee = v[1]; default: ee = v[4]; endcase
        case (sel_w) 0: ew = v[2]; 1: ew = v[0]; 2: ew = v[1]; default: ew = v[4]; endcase
        checks++;
        if ({nobus, sobus, eobus, wobus} !== {en, es, ee, ew}) begin
          failures++;
          if (failures < 10) $display("mismatch v=%b sel=%h got %b exp %b", v, s,
                                      {nobus, sobus, eobus, wobus}, {en, es, ee, ew});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
