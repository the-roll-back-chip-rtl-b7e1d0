// tb_frame_pointer_regs: random mark, rollback and advance GVT commands with
// random k against integer CMF/OMF counters modulo 16. Checks the accept
// flags (mark refused when CMF + 1 = OMF, rollback and advance refused when
// k exceeds (CMF - OMF) mod 16), the register values after each command,
// the next frame and the new-frame mask.
module tb_frame_pointer_regs;
  localparam int NMF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init = 0, mark = 0, rollback = 0, advance = 0;
  logic [3:0] k = 0, cmf, omf, next_frame, depth;
  logic mark_ok, rollback_ok, advance_ok;
  logic [NMF-1:0] new_mask;
  int gc = 0, go = 0;
  int checks = 0, failures = 0;
  int n_refused = 0, n_full = 0;

  frame_pointer_regs #(.NMF(NMF)) dut (.*);

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int op, d;
      @(negedge clk);
      op = $urandom_range(0, 9);
      k = 4'($urandom_range(0, 6));
      mark = 0; rollback = 0; advance = 0; init = 0;
      d = (gc - go + NMF) % NMF;
      #1;
      expect_eq(cmf, gc, "cmf");
      expect_eq(omf, go, "omf");
      expect_eq(next_frame, (gc + 1) % NMF, "next_frame");
      expect_eq(mark_ok, ((gc + 1) % NMF) != go, "mark_ok");
      expect_eq(rollback_ok, k <= d, "rollback_ok");
      expect_eq(advance_ok, k <= d, "advance_ok");
      for (int f = 0; f < NMF; f++) begin
        int off;
        off = (f - go + NMF) % NMF;
        expect_eq(new_mask[f], off >= 1 && off <= d, "new_mask");
      end
      if (((gc + 1) % NMF) == go) n_full++;
      if (op < 5) begin
        mark = 1;
        if (((gc + 1) % NMF) != go) gc = (gc + 1) % NMF; else n_refused++;
      end else if (op < 7) begin
        rollback = 1;
        if (k <= d) gc = (gc - k + NMF) % NMF; else n_refused++;
      end else if (op < 9) begin
        advance = 1;
        if (k <= d) go = (go + k) % NMF; else n_refused++;
      end else if ($urandom_range(0, 9) == 0) begin
        init = 1; gc = 0; go = 0;
      end
    end
    @(negedge clk);
    mark = 0; rollback = 0; advance = 0; init = 0;
    expect_eq(n_refused > 0 && n_full > 0, 1, "refused and full cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
