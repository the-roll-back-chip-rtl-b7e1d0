// tb_priority_encoder: the index of the lowest set bit and the valid flag,
// for every one-hot vector, the zero vector and random vectors, compared with
// a linear search done in the testbench.
module tb_priority_encoder;
  localparam int N = 16;
  logic [N-1:0] vec;
  logic [3:0]   idx;
  logic         valid;
  int checks = 0, failures = 0;

  priority_encoder #(.N(N)) dut (.vec, .idx, .valid);

  task automatic check_one(input logic [N-1:0] v);
    int exp_idx; bit exp_valid;
    vec = v;
    #1;
    exp_valid = 0; exp_idx = 0;
    for (int i = 0; i < N; i++) if (v[i]) begin exp_idx = i; exp_valid = 1; break; end
    checks++;
    if (valid !== exp_valid || (exp_valid && idx !== 4'(exp_idx))) begin
      failures++;
      if (failures < 10) $display("FAIL vec=%h idx=%0d valid=%0d want %0d/%0d", v, idx, valid, exp_idx, exp_valid);
    end
  endtask

  initial begin
    check_one('0);
    for (int i = 0; i < N; i++) check_one(N'(1) << i);
    for (int i = 0; i < N; i++) check_one(N'('1) << i);
    for (int t = 0; t < 2000; t++) check_one(N'($urandom));
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
