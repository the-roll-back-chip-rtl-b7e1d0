// tb_virtual_rbc_store: the tag and saved-row store for four virtual RBCs.
//
// The testbench plays the written-bits array: it holds one row per line,
// loads the rows the store offers, and changes rows at random in between
// (as writes and marks would). Independently, it keeps the logical rows of
// every virtual RBC, as if each had its own array: a change to line l goes
// to the virtual RBC that line l currently belongs to. After every swap, the
// row in the array must equal the logical row of the requested virtual RBC,
// the tags must follow the swaps, and only lines whose tag differed may be
// loaded. Reset and re-initialisation must give tag 0 and "frame 0 only"
// rows everywhere.
module tb_virtual_rbc_store;
  localparam int NV = 4, NL = 16, NMF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init = 0, swap_en = 0;
  logic [NL-1:0] swap_mask = 0, load_mask;
  logic [1:0] swap_tag = 0;
  logic [NL-1:0][NMF-1:0] rows, load_rows;
  logic [NL-1:0][1:0] tags;

  logic [NMF-1:0] logical [NV][NL];
  int owner [NL];
  int checks = 0, failures = 0, n_miss = 0, n_hit = 0;

  virtual_rbc_store #(.NVRBC(NV), .NLINES(NL), .NMF(NMF)) dut (.*);

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h want %h", what, got, want);
    end
  endtask

  task automatic model_init();
    for (int v = 0; v < NV; v++)
      for (int l = 0; l < NL; l++) logical[v][l] = NMF'(1);
    for (int l = 0; l < NL; l++) begin
      owner[l] = 0;
      rows[l] = NMF'(1);
    end
  endtask

  initial begin
    model_init();
    #12 rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int r;
      logic [NL-1:0] lm;
      logic [NL-1:0][NMF-1:0] lr;
      r = $urandom_range(0, 99);
      @(negedge clk);
      init = (r == 0);
      swap_en = (r >= 1 && r < 60);
      swap_tag = 2'($urandom);
      swap_mask = (r < 30) ? NL'(1) << $urandom_range(0, NL - 1) : '1;
      #1;
      if (swap_en && !init) begin
        for (int l = 0; l < NL; l++) begin
          bit miss;
          miss = swap_mask[l] && owner[l] != int'(swap_tag);
          expect_eq(32'(load_mask[l]), 32'(miss), $sformatf("load_mask line %0d", l));
          if (miss) expect_eq(32'(load_rows[l]), 32'(logical[swap_tag][l]), $sformatf("row swapped in, line %0d", l));
          if (miss) n_miss++; else if (swap_mask[l]) n_hit++;
        end
      end
      lm = load_mask; lr = load_rows;
      @(posedge clk);
      #1;
      if (init) model_init();
      else if (swap_en) begin
        for (int l = 0; l < NL; l++)
          if (lm[l]) begin
            rows[l] = lr[l];
            owner[l] = int'(swap_tag);
          end
      end else begin
        // the array changes some rows of the virtual RBCs they belong to
        for (int l = 0; l < NL; l++)
          if ($urandom_range(0, 3) == 0) begin
            rows[l] = NMF'($urandom);
            logical[owner[l]][l] = rows[l];
          end
      end
      for (int l = 0; l < NL; l++) begin
        expect_eq(32'(tags[l]), owner[l], $sformatf("tag line %0d", l));
        expect_eq(32'(rows[l]), 32'(logical[owner[l]][l]), $sformatf("array row line %0d", l));
      end
      init = 0;
    end
    expect_eq(32'(n_miss > 100 && n_hit > 100), 1, "both hits and misses seen");
    $display("misses %0d hits %0d", n_miss, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
