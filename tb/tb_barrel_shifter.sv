// tb_barrel_shifter: exhaustive check of the CMF alignment of a written-bits
// row. For random rows and every CMF, output bit i must equal the row bit of
// frame (CMF - i) mod NMF, worked out here with integer arithmetic.
module tb_barrel_shifter;
  localparam int NMF = 16;
  logic [NMF-1:0] row, aligned;
  logic [3:0]     cmf;
  int checks = 0, failures = 0;

  barrel_shifter #(.NMF(NMF)) dut (.row, .cmf, .aligned);

  initial begin
    for (int t = 0; t < 400; t++) begin
      row = (t < 16) ? NMF'(1) << t : NMF'($urandom);
      for (int c = 0; c < NMF; c++) begin
        cmf = 4'(c);
        #1;
        for (int i = 0; i < NMF; i++) begin
          checks++;
          if (aligned[i] !== row[(c - i + NMF) % NMF]) begin
            failures++;
            if (failures < 10) $display("FAIL row=%h cmf=%0d bit %0d", row, c, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
