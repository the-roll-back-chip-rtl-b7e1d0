// tb_line_state_logic: random written-bit rows against random OMF/CMF
// windows. The testbench builds the "new" mask itself (frames after OMF up to
// CMF), counts old and new written bits and applies the state table
// (00: old 0 new 1, 01: old 1 new 0, 10: old 1 new > 0, 11: old > 1), with
// every other combination expected to be flagged illegal.
module tb_line_state_logic;
  import rbc_pkg::*;
  localparam int NMF = 16;
  logic [NMF-1:0] row, new_mask;
  line_state_e    state;
  logic           illegal;
  int checks = 0, failures = 0;
  int seen [4];

  line_state_logic #(.NMF(NMF)) dut (.row, .new_mask, .state, .illegal);

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int omf, d, n_old, n_new;
      line_state_e exp_s; bit exp_ill;
      omf = $urandom_range(0, NMF - 1);
      d   = $urandom_range(0, NMF - 1);
      new_mask = '0;
      for (int i = 1; i <= d; i++) new_mask[(omf + i) % NMF] = 1'b1;
      // sparse rows so that every state appears often
      row = '0;
      repeat ($urandom_range(0, 3)) row[$urandom_range(0, NMF - 1)] = 1'b1;
      #1;
      n_old = 0; n_new = 0;
      for (int f = 0; f < NMF; f++) if (row[f]) begin
        if (new_mask[f]) n_new++; else n_old++;
      end
      exp_ill = 0;
      if (n_old > 1)                      exp_s = ST_11;
      else if (n_old == 1 && n_new == 0)  exp_s = ST_01;
      else if (n_old == 1)                exp_s = ST_10;
      else begin exp_s = ST_00; exp_ill = (n_new != 1); end
      checks++;
      if (illegal !== exp_ill || (!exp_ill && state !== exp_s)) begin
        failures++;
        if (failures < 10) $display("FAIL row=%h mask=%h state=%0d ill=%0d want %0d/%0d",
                                    row, new_mask, state, illegal, exp_s, exp_ill);
      end
      if (!exp_ill) seen[exp_s]++;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL state %0d never produced", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
