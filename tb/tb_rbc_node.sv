// tb_rbc_node: end-to-end test of a node with two rollback chips (each at
// the default size) behind the address decoder, broadcast logic and memory
// arbiter.
//
// The random CPU model of the single-chip test spreads its version-controlled
// accesses over both chips: chip c owns the block at 0x004000 + c x 4 KB,
// and its registers are at 0xFFFFE0 - 32 x c. Reset, mark, rollback and
// advance are written to the registers of a random chip and must reach both. The
// reference model keeps one image per chip and frame and knows nothing of
// chips or written bits. It predicts every read value and every error, and
// the status registers of both chips must show the same CMF and OMF. A
// monitor on the memory bus checks that version-controlled memory is only
// ever written in the CMF or OMF frame.
//
// Mechanisms counted (each must occur): the four write cases, mark copies
// in chip 1, a broadcast started at chip 1, both chips asking for the memory bus at once, fossil
// collection, a seldom-written line kept by a mark, CMF wrap-around, refused
// mark, rollback and advance, forbidden and ordinary accesses, reset. Timing:
// a case-1 write takes as long as an ordinary write; a broadcast rollback or
// advance is acknowledged one clock after it is seen.
module tb_rbc_node;
  import rbc_pkg::*;

  localparam int ADDR_W = 24, DATA_W = 32, NMF = 16, NLINES = 16, LINE_BYTES = 16;
  localparam int FB = NLINES * LINE_BYTES;              // bytes per frame
  localparam int NV = 2;                              // chips
  localparam logic [ADDR_W-1:0] SA = 24'h004000;
  localparam logic [ADDR_W-1:0] CSR = 24'hFFFFE0;
  localparam logic [ADDR_W-1:0] ORD_BASE = 24'h010000;
  localparam int NOPS = 40000;

  int n_bc_chip1 = 0;                     // broadcasts started at chip 1

  // register block of a random chip: a broadcast may start at any of them
  function automatic logic [23:0] bcast_csr();
    int c = $urandom_range(0, NV - 1);
    if (c == 1) n_bc_chip1++;
    return CSR - 24'(32 * c);
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cpu_req = 1'b0, cpu_we = 1'b0;
  logic [ADDR_W-1:0] cpu_addr = '0;
  logic [3:0]        cpu_be = '0;
  logic [DATA_W-1:0] cpu_wdata = '0, cpu_rdata;
  logic              cpu_ack, cpu_err;
  logic              mem_req, mem_we, mem_ack;
  logic [ADDR_W-1:0] mem_addr;
  logic [3:0]        mem_be;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  rbc_node #(.NRBC(NV), .SA_RESET(SA)) dut (.*);

  rbc_mem_model #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .LAT(1)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .be(mem_be),
    .wdata(mem_wdata), .rdata(mem_rdata), .ack(mem_ack));

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- reference
  logic [7:0] img   [NV][NMF][FB];
  bit         known [NV][NMF][FB];
  int         gcmf, gomf;
  logic [7:0] ord [int];

  function automatic int depth();
    return (gcmf - gomf + NMF) % NMF;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- CPU model
  task automatic cpu_op(input bit we, input logic [ADDR_W-1:0] a,
                        input logic [3:0] be, input logic [31:0] wd,
                        output logic [31:0] rd, output bit err, output int cyc);
    @(negedge clk);
    cpu_req = 1'b1; cpu_we = we; cpu_addr = a; cpu_be = be; cpu_wdata = wd;
    cyc = 0;
    forever begin
      @(negedge clk);
      cyc++;
      if (cpu_ack) break;
    end
    rd = cpu_rdata;
    err = cpu_err;
    cpu_req = 1'b0;
  endtask

  // ---------------------------------------------------------------- counters
  int n_case[1:4];
  int n_mark_copy, n_fossil, n_keep, n_wrap, n_err_mark, n_err_rb, n_err_adv;
  int n_forbid, n_ord, n_reset, n_mark, n_rb, n_adv, n_reads;
  int ord_write_cyc = -1;
  int n_vt_copy, n_conflict;

  // write case chosen by each chip, seen when it accepts a versioned write
  for (genvar c = 0; c < NV; c++) begin : g_count
    always @(posedge clk) begin
      if (rst_n && int'(dut.g_chip[c].u_chip.u_ctrl.state_q) == 0 && dut.g_chip[c].u_chip.cpu_req &&
          cpu_we && dut.g_chip[c].u_chip.kind == ACC_VERSIONED && dut.g_chip[c].u_chip.mrv_valid) begin
        bit wbc, s00;
        wbc = dut.g_chip[c].u_chip.u_ctrl.wb_cmf_bit;
        s00 = dut.g_chip[c].u_chip.u_ctrl.sel_state == ST_00;
        n_case[wbc ? (s00 ? 2 : 1) : (s00 ? 4 : 3)]++;
      end
      if (rst_n && int'(dut.g_chip[c].u_chip.u_ctrl.state_q) == 7) begin
        if (dut.g_chip[c].u_chip.copy_mask != '0) begin
          n_mark_copy++;
          if (c != 0) n_vt_copy++;
        end else begin
          for (int l = 0; l < NLINES; l++) begin
            if (dut.g_chip[c].u_chip.rows[l][dut.g_chip[c].u_chip.next_frame] &&
                !dut.g_chip[c].u_chip.keep_mask[l]) n_fossil++;
            if (dut.g_chip[c].u_chip.rows[l][dut.g_chip[c].u_chip.next_frame] &&
                dut.g_chip[c].u_chip.keep_mask[l]) n_keep++;
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && dut.m_req == '1) n_conflict++;
    // memory-bus monitor: versioned frames are written only in CMF or OMF
    if (rst_n && mem_req && mem_we && mem_ack &&
        mem_addr[ADDR_W-1:13] == SA[ADDR_W-1:13]) begin
      int f;
      f = int'(mem_addr[11:8]);
      check(f == int'(dut.g_chip[0].u_chip.cmf) || f == int'(dut.g_chip[0].u_chip.omf),
            "version write outside CMF/OMF");
    end
  end

  // ---------------------------------------------------------------- stimulus
  task automatic do_reset_op();
    logic [31:0] rd; bit err; int cyc;
    cpu_op(1, bcast_csr() + 24'h08, 4'hF, 0, rd, err, cyc);
    check(!err, "reset op error");
    gcmf = 0; gomf = 0;
    foreach (known[v, f, b]) known[v][f][b] = 0;
    n_reset++;
  endtask

  task automatic do_vwrite(input int v, input int line, input int word, input logic [3:0] be,
                           input logic [31:0] d);
    logic [31:0] rd; bit err; int cyc, c1;
    c1 = n_case[1];
    cpu_op(1, SA + ADDR_W'(v * 4096 + line * 16 + word * 4), be, d, rd, err, cyc);
    check(!err, "versioned write error");
    for (int b = 0; b < 4; b++)
      if (be[b]) begin
        img[v][gcmf][line * 16 + word * 4 + b] = d[b*8 +: 8];
        known[v][gcmf][line * 16 + word * 4 + b] = 1;
      end
    if (n_case[1] != c1 && ord_write_cyc >= 0)
      check(cyc == ord_write_cyc,
            $sformatf("case-1 write took %0d cycles, ordinary %0d", cyc, ord_write_cyc));
  endtask

  task automatic do_vread(input int v, input int line, input int word);
    logic [31:0] rd; bit err; int cyc;
    cpu_op(0, SA + ADDR_W'(v * 4096 + line * 16 + word * 4), 4'hF, 0, rd, err, cyc);
    check(!err, "versioned read error");
    for (int b = 0; b < 4; b++)
      if (known[v][gcmf][line * 16 + word * 4 + b])
        check(rd[b*8 +: 8] == img[v][gcmf][line * 16 + word * 4 + b],
              $sformatf("read chip %0d line %0d word %0d byte %0d: got %02x want %02x (cmf %0d omf %0d)",
                        v, line, word, b, rd[b*8 +: 8], img[v][gcmf][line * 16 + word * 4 + b], gcmf, gomf));
    n_reads++;
  endtask

  task automatic do_mark();
    logic [31:0] rd; bit err; int cyc; bit ok;
    ok = ((gcmf + 1) % NMF) != gomf;
    cpu_op(1, bcast_csr() + 24'h0C, 4'hF, 0, rd, err, cyc);
    check(err == !ok, "mark error flag");
    if (ok) begin
      int n;
      n = (gcmf + 1) % NMF;
      for (int v = 0; v < NV; v++) begin
        img[v][n] = img[v][gcmf];
        known[v][n] = known[v][gcmf];
      end
      if (gcmf == NMF - 1) n_wrap++;
      gcmf = n;
      n_mark++;
    end else n_err_mark++;
  endtask

  task automatic do_rollback(input int k);
    logic [31:0] rd; bit err; int cyc; bit ok;
    ok = k <= depth();
    cpu_op(1, bcast_csr() + 24'h10, 4'hF, k, rd, err, cyc);
    check(err == !ok, $sformatf("rollback %0d error flag (depth %0d)", k, depth()));
    check(cyc == 1, "rollback not acknowledged after 1 cycle");
    if (ok) begin gcmf = (gcmf - k + NMF) % NMF; n_rb++; end
    else n_err_rb++;
  endtask

  task automatic do_advance(input int k);
    logic [31:0] rd; bit err; int cyc; bit ok;
    ok = k <= depth();
    cpu_op(1, bcast_csr() + 24'h14, 4'hF, k, rd, err, cyc);
    check(err == !ok, $sformatf("advance %0d error flag (depth %0d)", k, depth()));
    check(cyc == 1, "advance not acknowledged after 1 cycle");
    if (ok) begin gomf = (gomf + k) % NMF; n_adv++; end
    else n_err_adv++;
  endtask

  task automatic do_status();
    logic [31:0] rd; bit err; int cyc;
    for (int c = 0; c < NV; c++) begin
      cpu_op(0, CSR - ADDR_W'(32 * c) + 24'h04, 4'hF, 0, rd, err, cyc);
      check(!err && rd[11:8] == 4'(gcmf) && rd[19:16] == 4'(gomf), $sformatf("status CMF/OMF of chip %0d", c));
    end
  endtask

  task automatic do_ord(input bit we);
    logic [31:0] rd; bit err; int cyc; int a;
    a = $urandom_range(0, 63) * 4;
    if (we) begin
      logic [31:0] d;
      d = $urandom;
      cpu_op(1, ORD_BASE + ADDR_W'(a), 4'hF, d, rd, err, cyc);
      for (int b = 0; b < 4; b++) ord[a + b] = d[b*8 +: 8];
      check(ord_write_cyc < 0 || cyc == ord_write_cyc, "ordinary write time varies");
      ord_write_cyc = cyc;
    end else begin
      cpu_op(0, ORD_BASE + ADDR_W'(a), 4'hF, 0, rd, err, cyc);
      for (int b = 0; b < 4; b++)
        if (ord.exists(a + b)) check(rd[b*8 +: 8] == ord[a + b], "ordinary read");
    end
    check(!err, "ordinary access error");
    n_ord++;
  endtask

  task automatic do_forbidden();
    logic [31:0] rd; bit err; int cyc;
    cpu_op($urandom_range(0, 1), SA + ADDR_W'($urandom_range(0, NV - 1) * 4096 +
           $urandom_range(1, NMF - 1) * 256 + $urandom_range(0, 63) * 4),
           4'hF, $urandom, rd, err, cyc);
    check(err, "forbidden access not flagged");
    n_forbid++;
  endtask

  initial begin
    for (int i = 1; i <= 4; i++) n_case[i] = 0;
    gcmf = 0; gomf = 0;
    foreach (known[v, f, b]) known[v][f][b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do_ord(1);
    for (int op = 0; op < NOPS; op++) begin
      int r;
      r = $urandom_range(0, 999);
      // a few hot lines are written often, the rest seldom
      if (r < 330) begin
        int line;
        line = ($urandom_range(0, 3) == 0) ? $urandom_range(0, NLINES - 1) : $urandom_range(0, 3);
        do_vwrite($urandom_range(0, NV - 1), line, $urandom_range(0, 3), 4'($urandom_range(1, 15)), $urandom);
      end
      else if (r < 620) do_vread($urandom_range(0, NV - 1), $urandom_range(0, NLINES - 1), $urandom_range(0, 3));
      else if (r < 760) do_mark();
      else if (r < 830) do_rollback($urandom_range(0, 4));
      else if (r < 920) do_advance($urandom_range(0, 5));
      else if (r < 950) do_ord($urandom_range(0, 1));
      else if (r < 965) do_forbidden();
      else if (r < 985) do_status();
      else if (r < 987) do_reset_op();
      else if (r < 990) do_rollback($urandom_range(0, NMF - 1));
      else do_advance($urandom_range(0, NMF - 1));
    end
    // finally fill the version stack until a mark is refused
    do_reset_op();
    repeat (NMF) do_mark();
    do_vread(1, 0, 0);
    // every mechanism must have been exercised
    for (int i = 1; i <= 4; i++) check(n_case[i] > 0, $sformatf("write case %0d never happened", i));
    check(n_mark_copy > 0, "no mark copy");
    check(n_vt_copy > 0, "no mark copy in chip 1");
    check(n_bc_chip1 > 0, "no broadcast started at chip 1");
    check(n_conflict > 0, "the chips never asked for the memory bus at once");
    check(n_fossil > 0, "no fossil collection");
    check(n_keep > 0, "no seldom-written line kept by a mark");
    check(n_wrap > 0, "CMF never wrapped");
    check(n_err_mark > 0, "no refused mark");
    check(n_err_rb > 0, "no refused rollback");
    check(n_err_adv > 0, "no refused advance");
    check(n_forbid > 0 && n_ord > 0 && n_reset > 0, "access classes");
    $display("cases 1..4: %0d %0d %0d %0d  mark copies %0d  fossils %0d  kept %0d  wraps %0d",
             n_case[1], n_case[2], n_case[3], n_case[4], n_mark_copy, n_fossil, n_keep, n_wrap);
    $display("mark copies in chip 1 %0d  memory bus conflicts %0d  broadcasts at chip 1 %0d", n_vt_copy, n_conflict, n_bc_chip1);
    $display("marks %0d rollbacks %0d advances %0d reads %0d  refused: mark %0d rb %0d adv %0d  forbidden %0d ordinary %0d resets %0d",
             n_mark, n_rb, n_adv, n_reads, n_err_mark, n_err_rb, n_err_adv, n_forbid, n_ord, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
