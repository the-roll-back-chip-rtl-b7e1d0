// tb_mrv_subtractor: every pair (CMF, offset) of the 16-frame chip; MRV must
// be (CMF - offset) mod 16, computed here with integer arithmetic.
module tb_mrv_subtractor;
  logic [3:0] cmf, offset, mrv;
  int checks = 0, failures = 0;

  mrv_subtractor #(.NMF(16)) dut (.cmf, .offset, .mrv);

  initial begin
    for (int c = 0; c < 16; c++)
      for (int o = 0; o < 16; o++) begin
        cmf = 4'(c); offset = 4'(o);
        #1;
        checks++;
        if (int'(mrv) != (c - o + 16) % 16) begin
          failures++;
          $display("FAIL cmf=%0d offset=%0d mrv=%0d", c, o, mrv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
