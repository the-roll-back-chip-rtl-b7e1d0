// tb_control_unit: the control unit alone, with the datapath replaced by
// testbench signals. For each operation the testbench sets up the status the
// datapath would report (written bit at CMF, line state, MRV, copy masks,
// frame pointers), issues the CPU request and logs every memory transfer
// (read/write, frame, line, word), every written-bit update and every frame
// pointer command. The log is compared with the sequence worked out by hand
// from the operation table:
//   write case 1: W cmf                          (no WB change)
//   write case 2: R cmf x4, W omf x4, set omf, W cmf
//   write case 3: R mrv x4, merge, W cmf x4, set cmf
//   write case 4: R mrv x4, W omf x4, set omf, merge, W cmf x4, set cmf, clr mrv
//   read        : R mrv             mark: per copied line R new x4, W omf x4,
//   set omf, then column clear of the new frame and CMF + 1.
// Also checks error responses, control registers, and that a case-1 write
// takes exactly as many cycles as an ordinary write. A versioned access whose
// tag misses must first request a swap of its line's row, then proceed as
// usual one clock later.
module tb_control_unit;
  import rbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_req = 0, cpu_we = 0, cpu_ack, cpu_err;
  logic [3:0] cpu_be = 4'h6;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  acc_kind_e kind = ACC_ORDINARY;
  logic [4:0] csr_off = 0;
  logic [3:0] cpu_line = 0;
  logic [1:0] cpu_word = 0;
  logic [23:0] sa;
  logic [3:0] sel_line;
  logic mrv_valid = 1, wb_cmf_bit = 0;
  logic [3:0] mrv = 0;
  line_state_e sel_state = ST_01;
  logic [15:0] copy_mask = 0, keep_mask = 0;
  logic wb_init, wb_set_en, wb_clr_en, wb_col_clr_en;
  logic [3:0] wb_set_line, wb_set_frame, wb_clr_line, wb_clr_frame, wb_col_frame;
  logic [15:0] wb_col_mask;
  logic [3:0] cmf = 0, omf = 0, next_frame, fp_k;
  logic mark_ok = 1, rollback_ok = 1, advance_ok = 1;
  logic fp_init, fp_mark, fp_rollback, fp_advance, pass;
  logic [3:0] frame_sel, line_sel;
  logic [1:0] word_sel, buf_idx;
  logic buf_load, buf_merge;
  logic [31:0] buf_dout, mem_wdata, mem_rdata = 0;
  logic mem_req, mem_we, mem_ack = 0;
  logic [3:0] mem_be;
  logic cpu_tag = 0, tag_hit = 1, op_tag, vt_swap_en, vt_swap_tag;
  logic [15:0] vt_swap_mask;

  assign next_frame = cmf + 4'd1;
  assign buf_dout = {28'hB0FFE00, 2'b00, buf_idx};

  control_unit dut (.*);

  int checks = 0, failures = 0;
  string log_q [$];

  // memory responder: acknowledges one cycle after it sees a request
  always @(posedge clk) begin
    if (mem_req && !mem_ack) begin
      mem_ack <= 1'b1;
      mem_rdata <= {16'h0, 4'(frame_sel), 4'(line_sel), 6'h0, word_sel};
    end else mem_ack <= 1'b0;
  end

  // event log
  always @(posedge clk) if (rst_n) begin
    if (mem_req && mem_ack) begin
      if (pass) log_q.push_back($sformatf("%s pass", mem_we ? "W" : "R"));
      else if (!mem_we) log_q.push_back($sformatf("R f%0d l%0d w%0d", frame_sel, line_sel, word_sel));
      else log_q.push_back($sformatf("W f%0d l%0d w%0d %s", frame_sel, line_sel, word_sel,
                                     (mem_wdata == cpu_wdata && mem_be == cpu_be) ? "cpu" :
                                     (mem_wdata == buf_dout && mem_be == 4'hF) ? "buf" : "bad"));
    end
    if (buf_merge) log_q.push_back("merge");
    if (wb_set_en) log_q.push_back($sformatf("set l%0d f%0d", wb_set_line, wb_set_frame));
    if (wb_clr_en) log_q.push_back($sformatf("clr l%0d f%0d", wb_clr_line, wb_clr_frame));
    if (wb_col_clr_en) log_q.push_back($sformatf("col f%0d m%h", wb_col_frame, wb_col_mask));
    if (fp_mark) log_q.push_back("fp mark");
    if (fp_rollback) log_q.push_back($sformatf("fp rollback %0d", fp_k));
    if (fp_advance) log_q.push_back($sformatf("fp advance %0d", fp_k));
    if (fp_init && wb_init) log_q.push_back("init");
    if (vt_swap_en) begin
      log_q.push_back($sformatf("swap m%h t%0d", vt_swap_mask, vt_swap_tag));
      tag_hit <= 1'b1;
    end
    // a mark copy clears that line's copy request once WB[omf] is set
    if (wb_set_en && int'(wb_set_frame) == int'(omf)) copy_mask[wb_set_line] <= 1'b0;
  end

  task automatic op(input bit we, input acc_kind_e k, input logic [31:0] wd,
                    output bit err, output logic [31:0] rd, output int cyc);
    @(negedge clk);
    log_q.delete();
    cpu_req = 1; cpu_we = we; kind = k; cpu_wdata = wd;
    cyc = 0;
    forever begin
      @(negedge clk);
      cyc++;
      if (cpu_ack) break;
      if (cyc > 200) break;
    end
    err = cpu_err; rd = cpu_rdata;
    cpu_req = 0;
  endtask

  task automatic expect_log(input string exp [$], input string what);
    checks++;
    if (exp != log_q) begin
      failures++;
      $display("FAIL %s", what);
      foreach (log_q[i]) $display("   got  %s", log_q[i]);
      foreach (exp[i]) $display("   want %s", exp[i]);
    end
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: %h want %h", what, got, want);
    end
  endtask

  initial begin
    bit err; logic [31:0] rd; int cyc, ord_cyc;
    string e [$];
    #12 rst_n = 1;
    cmf = 4'd6; omf = 4'd2; mrv = 4'd4; cpu_line = 4'd9; cpu_word = 2'd2;

    // ordinary write and read pass straight through
    op(1, ACC_ORDINARY, 32'h1234, err, rd, ord_cyc);
    expect_log('{"W pass"}, "ordinary write");
    op(0, ACC_ORDINARY, 0, err, rd, cyc);
    expect_log('{"R pass"}, "ordinary read");
    expect_eq(err, 0, "ordinary error");

    // versioned read uses MRV
    op(0, ACC_VERSIONED, 0, err, rd, cyc);
    expect_log('{"R f4 l9 w2"}, "versioned read");
    expect_eq(rd, {16'h0, 4'd4, 4'd9, 8'd2}, "versioned read data");
    ord_cyc = cyc;
    // the same read with a tag miss: swap first, one clock longer
    tag_hit = 0; cpu_tag = 1;
    op(0, ACC_VERSIONED, 0, err, rd, cyc);
    expect_log('{"swap m0200 t1", "R f4 l9 w2"}, "versioned read after a tag miss");
    expect_eq(cyc, ord_cyc + 1, "tag miss costs one clock");
    expect_eq(op_tag, 1, "operation tag from the CPU address");
    cpu_tag = 0;
    op(1, ACC_ORDINARY, 32'h1234, err, rd, ord_cyc);

    // write case 1
    wb_cmf_bit = 1; sel_state = ST_10;
    op(1, ACC_VERSIONED, 32'hAA, err, rd, cyc);
    expect_log('{"W f6 l9 w2 cpu"}, "write case 1");
    expect_eq(cyc, ord_cyc, "case-1 write as fast as an ordinary write");

    // write case 2
    wb_cmf_bit = 1; sel_state = ST_00;
    op(1, ACC_VERSIONED, 32'hAA, err, rd, cyc);
    e = '{"R f6 l9 w0", "R f6 l9 w1", "R f6 l9 w2", "R f6 l9 w3",
          "W f2 l9 w0 buf", "W f2 l9 w1 buf", "W f2 l9 w2 buf", "W f2 l9 w3 buf", "set l9 f2", "W f6 l9 w2 cpu"};
    expect_log(e, "write case 2");

    // write case 3
    wb_cmf_bit = 0; sel_state = ST_11;
    op(1, ACC_VERSIONED, 32'hAA, err, rd, cyc);
    e = '{"R f4 l9 w0", "R f4 l9 w1", "R f4 l9 w2", "R f4 l9 w3", "merge",
          "W f6 l9 w0 buf", "W f6 l9 w1 buf", "W f6 l9 w2 buf", "W f6 l9 w3 buf", "set l9 f6"};
    expect_log(e, "write case 3");

    // write case 4
    wb_cmf_bit = 0; sel_state = ST_00;
    op(1, ACC_VERSIONED, 32'hAA, err, rd, cyc);
    e = '{"R f4 l9 w0", "R f4 l9 w1", "R f4 l9 w2", "R f4 l9 w3",
          "W f2 l9 w0 buf", "W f2 l9 w1 buf", "W f2 l9 w2 buf", "W f2 l9 w3 buf", "set l9 f2", "merge",
          "W f6 l9 w0 buf", "W f6 l9 w1 buf", "W f6 l9 w2 buf", "W f6 l9 w3 buf", "set l9 f6", "clr l9 f4"};
    expect_log(e, "write case 4");
    expect_eq(err, 0, "write error");

    // access to a forbidden frame and to a line with no written bit
    op(0, ACC_FORBIDDEN, 0, err, rd, cyc);
    expect_log('{}, "forbidden access");
    expect_eq(err, 1, "forbidden access flagged");
    mrv_valid = 0;
    op(0, ACC_VERSIONED, 0, err, rd, cyc);
    expect_eq(err, 1, "illegal line state flagged");
    mrv_valid = 1;

    // mark with two lines to copy (3 and 12), keep line 5
    csr_off = CSR_MARK; copy_mask = 16'h1008; keep_mask = 16'h0020;
    op(1, ACC_CSR, 0, err, rd, cyc);
    e = '{"R f7 l3 w0", "R f7 l3 w1", "R f7 l3 w2", "R f7 l3 w3",
          "W f2 l3 w0 buf", "W f2 l3 w1 buf", "W f2 l3 w2 buf", "W f2 l3 w3 buf", "set l3 f2",
          "R f7 l12 w0", "R f7 l12 w1", "R f7 l12 w2", "R f7 l12 w3",
          "W f2 l12 w0 buf", "W f2 l12 w1 buf", "W f2 l12 w2 buf", "W f2 l12 w3 buf", "set l12 f2",
          "col f7 mffdf", "fp mark"};
    expect_log(e, "mark with copies");
    expect_eq(err, 0, "mark error");
    // mark without copies takes 3 cycles
    op(1, ACC_CSR, 0, err, rd, cyc);
    expect_eq(cyc, 2, "mark without copies, cycles");
    mark_ok = 0;
    op(1, ACC_CSR, 0, err, rd, cyc);
    expect_log('{}, "refused mark");
    expect_eq(err, 1, "refused mark flagged");
    mark_ok = 1;

    // rollback and advance
    csr_off = CSR_ROLLBACK;
    op(1, ACC_CSR, 3, err, rd, cyc);
    expect_log('{"fp rollback 3"}, "rollback");
    expect_eq({err, 8'(cyc)}, {1'b0, 8'd1}, "rollback acknowledged after 1 cycle");
    rollback_ok = 0;
    op(1, ACC_CSR, 3, err, rd, cyc);
    expect_log('{}, "refused rollback");
    expect_eq(err, 1, "refused rollback flagged");
    rollback_ok = 1;
    op(1, ACC_CSR, 32'h13, err, rd, cyc);
    expect_eq(err, 1, "rollback k too large flagged");
    csr_off = CSR_ADVANCE;
    op(1, ACC_CSR, 2, err, rd, cyc);
    expect_log('{"fp advance 2"}, "advance");
    advance_ok = 0;
    op(1, ACC_CSR, 2, err, rd, cyc);
    expect_eq(err, 1, "refused advance flagged");
    advance_ok = 1;

    // status register: errors seen so far, CMF and OMF
    csr_off = CSR_STATUS;
    op(0, ACC_CSR, 0, err, rd, cyc);
    expect_eq(rd, {8'h0, 8'd2, 8'd6, 8'h1F}, "status");
    op(1, ACC_CSR, 32'h03, err, rd, cyc);
    op(0, ACC_CSR, 0, err, rd, cyc);
    expect_eq(rd[7:0], 8'h1C, "status after clearing two errors");

    // start address register keeps only the ROA bits
    csr_off = CSR_SA;
    op(1, ACC_CSR, 32'h00ABCDEF, err, rd, cyc);
    op(0, ACC_CSR, 0, err, rd, cyc);
    expect_eq(rd, 32'h00ABC000, "SA register");
    expect_eq(sa, 24'hABC000, "SA output");

    // reset operation
    csr_off = CSR_RESET;
    op(1, ACC_CSR, 0, err, rd, cyc);
    expect_log('{"init"}, "reset operation");
    csr_off = CSR_STATUS;
    op(0, ACC_CSR, 0, err, rd, cyc);
    expect_eq(rd[7:0], 8'h00, "errors cleared by reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
