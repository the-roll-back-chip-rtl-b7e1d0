// tb_address_translator: address classes and physical addresses.
// Random addresses inside the version-controlled block (frame field zero and
// non-zero), in the control-register block and elsewhere are classified and
// checked against the field layout {ROA[23:12], frame[11:8], line[7:4],
// byte[3:0]}; physical addresses must carry SA's ROA with the chosen frame,
// line and word, or the CPU address unchanged in pass-through. A second
// instance with four virtual RBCs must compare only ROA[23:14], give out
// ROA[13:12] as the tag and put op_tag into the physical address.
module tb_address_translator;
  import rbc_pkg::*;
  logic [23:0] cpu_addr, sa, phys_addr;
  acc_kind_e   kind;
  logic [3:0]  cpu_line, frame_sel, line_sel;
  logic [1:0]  cpu_word, word_sel;
  logic [4:0]  csr_off;
  logic        pass;
  logic        cpu_tag1, op_tag1;
  logic [1:0]  cpu_tag4, op_tag4;
  acc_kind_e   kind4;
  logic [3:0]  cpu_line4;
  logic [1:0]  cpu_word4;
  logic [4:0]  csr_off4;
  logic [23:0] phys_addr4;
  int checks = 0, failures = 0;
  int seen [4];

  address_translator #(.CSR_BASE(24'hFFFFE0)) dut (
    .cpu_addr, .sa, .kind, .cpu_line, .cpu_word, .csr_off,
    .cpu_tag(cpu_tag1), .op_tag(op_tag1),
    .pass, .frame_sel, .line_sel, .word_sel, .phys_addr);

  address_translator #(.CSR_BASE(24'hFFFFE0), .NVRBC(4)) dut4 (
    .cpu_addr, .sa, .kind(kind4), .cpu_line(cpu_line4), .cpu_word(cpu_word4),
    .csr_off(csr_off4), .cpu_tag(cpu_tag4), .op_tag(op_tag4),
    .pass, .frame_sel, .line_sel, .word_sel, .phys_addr(phys_addr4));

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h want %h (addr %h)", what, got, want, cpu_addr);
    end
  endtask

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int r;
      acc_kind_e exp_k;
      sa = {12'($urandom_range(1, 4000)), 12'h000};
      r = $urandom_range(0, 3);
      case (r)
        0: cpu_addr = {sa[23:12], 4'h0, 8'($urandom)};
        1: cpu_addr = {sa[23:12], 4'($urandom_range(1, 15)), 8'($urandom)};
        2: cpu_addr = {19'h7FFFF, 5'($urandom)};
        default: cpu_addr = 24'($urandom);
      endcase
      pass = $urandom_range(0, 1);
      frame_sel = 4'($urandom); line_sel = 4'($urandom); word_sel = 2'($urandom);
      op_tag1 = 1'($urandom); op_tag4 = 2'($urandom);
      if ($urandom_range(0, 1)) sa[13:12] = 2'b00;     // aligned for the tagged instance
      #1;
      if (cpu_addr[23:5] == 19'h7FFFF) exp_k = ACC_CSR;
      else if (cpu_addr[23:12] == sa[23:12]) exp_k = (cpu_addr[11:8] == 0) ? ACC_VERSIONED : ACC_FORBIDDEN;
      else exp_k = ACC_ORDINARY;
      expect_eq(kind, exp_k, "kind");
      seen[exp_k]++;
      expect_eq(cpu_line, cpu_addr[7:4], "line");
      expect_eq(cpu_word, cpu_addr[3:2], "word");
      expect_eq(csr_off, cpu_addr[4:0], "csr offset");
      if (pass) expect_eq(phys_addr, cpu_addr, "pass-through address");
      else      expect_eq(phys_addr, {sa[23:12], frame_sel, line_sel, word_sel, 2'b00}, "physical address");
      expect_eq(cpu_tag1, 0, "no tag without virtual RBCs");
      // four virtual RBCs
      if (cpu_addr[23:5] == 19'h7FFFF) exp_k = ACC_CSR;
      else if (cpu_addr[23:14] == sa[23:14]) exp_k = (cpu_addr[11:8] == 0) ? ACC_VERSIONED : ACC_FORBIDDEN;
      else exp_k = ACC_ORDINARY;
      expect_eq(kind4, exp_k, "kind, tagged");
      expect_eq(cpu_tag4, cpu_addr[13:12], "tag");
      if (pass) expect_eq(phys_addr4, cpu_addr, "pass-through address, tagged");
      else      expect_eq(phys_addr4, {sa[23:14], op_tag4, frame_sel, line_sel, word_sel, 2'b00},
                          "physical address, tagged");
    end
    for (int k = 0; k < 4; k++) expect_eq(seen[k] > 0, 1, "every class seen");
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
