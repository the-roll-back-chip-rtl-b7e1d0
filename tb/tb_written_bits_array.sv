// tb_written_bits_array: random single-bit sets and clears, column clears
// with a line mask, whole-row loads for a line mask, and re-initialisation, against a shadow copy of the
// array kept in the testbench. After every clock the full array and the
// selected row are compared; the initial contents must be frame 0 only.
module tb_written_bits_array;
  localparam int NL = 16, NMF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init = 0, set_en = 0, clr_en = 0, col_clr_en = 0;
  logic [3:0] rd_line = 0, set_line = 0, set_frame = 0, clr_line = 0, clr_frame = 0, col_frame = 0;
  logic [NL-1:0] col_mask = 0, ld_mask = 0;
  logic [NL-1:0][NMF-1:0] ld_rows = '0;
  logic [NMF-1:0] rd_row;
  logic [NL-1:0][NMF-1:0] rows;
  logic [NMF-1:0] model [NL];
  int checks = 0, failures = 0;

  written_bits_array #(.NLINES(NL), .NMF(NMF)) dut (.*);

  task automatic compare();
    for (int l = 0; l < NL; l++) begin
      checks++;
      if (rows[l] !== model[l]) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d = %h want %h", l, rows[l], model[l]);
      end
    end
    checks++;
    if (rd_row !== model[rd_line]) begin failures++; $display("FAIL rd_row"); end
  endtask

  initial begin
    for (int l = 0; l < NL; l++) model[l] = NMF'(1);
    #12 rst_n = 1;
    @(negedge clk);
    compare();
    for (int t = 0; t < 5000; t++) begin
      int r;
      r = $urandom_range(0, 99);
      init = (r == 0);
      set_en = $urandom_range(0, 1); set_line = 4'($urandom); set_frame = 4'($urandom);
      clr_en = $urandom_range(0, 1); clr_line = 4'($urandom); clr_frame = 4'($urandom);
      col_clr_en = (r < 20); col_frame = 4'($urandom); col_mask = NL'($urandom);
      rd_line = 4'($urandom);
      ld_mask = '0;
      for (int l = 0; l < NL; l++) ld_rows[l] = NMF'($urandom);
      if (r >= 20 && r < 30) begin
        // a row load comes alone
        set_en = 0; clr_en = 0;
        ld_mask = NL'($urandom);
      end
      @(negedge clk);
      if (init) begin
        for (int l = 0; l < NL; l++) model[l] = NMF'(1);
      end else begin
        for (int l = 0; l < NL; l++) if (ld_mask[l]) model[l] = ld_rows[l];
        if (col_clr_en) for (int l = 0; l < NL; l++) if (col_mask[l]) model[l][col_frame] = 0;
        if (clr_en) model[clr_line][clr_frame] = 0;
        if (set_en) model[set_line][set_frame] = 1;
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
