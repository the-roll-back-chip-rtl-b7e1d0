// tb_line_buffer: random word loads and byte-masked merges (also in the same
// cycle) against a byte array shadow of the 16-byte line; every word is read
// back after each clock.
module tb_line_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  logic load = 0, merge = 0;
  logic [1:0] idx = 0, m_idx = 0;
  logic [31:0] din = 0, m_data = 0, dout;
  logic [3:0] m_be = 0;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  line_buffer #(.LINE_BYTES(16), .DATA_W(32)) dut (.*);

  initial begin
    // fill the buffer first
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      load = 1; idx = 2'(w); din = $urandom;
      for (int b = 0; b < 4; b++) model[w * 4 + b] = din[b*8 +: 8];
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      load = $urandom_range(0, 1); idx = 2'($urandom); din = $urandom;
      merge = $urandom_range(0, 1); m_idx = 2'($urandom); m_be = 4'($urandom); m_data = $urandom;
      if (load) for (int b = 0; b < 4; b++) model[idx * 4 + b] = din[b*8 +: 8];
      if (merge) for (int b = 0; b < 4; b++) if (m_be[b]) model[m_idx * 4 + b] = m_data[b*8 +: 8];
      @(negedge clk);
      load = 0; merge = 0;
      for (int w = 0; w < 4; w++) begin
        idx = 2'(w);
        #1;
        checks++;
        if (dout !== {model[w*4+3], model[w*4+2], model[w*4+1], model[w*4]}) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d = %h", w, dout);
        end
      end
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
