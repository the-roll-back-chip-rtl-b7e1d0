// address_translator: classifies CPU addresses and forms physical addresses.
//
// A CPU address is split (from the LSB) into byte-in-line, line, frame and
// "rest of address" (ROA) fields. If ROA equals the ROA bits of the start
// address SA the access is to version-controlled memory; its frame field
// must then be zero, otherwise it hits the forbidden frames and is flagged.
// Addresses inside the 32-byte control-register block at CSR_BASE go to the
// RBC registers; everything else is ordinary memory and is passed on
// unmodified.
//
// The physical address for a version-controlled access is
// {ROA of SA, frame_sel, line_sel, word_sel, byte-in-word} (the ROA is
// taken from SA because a mark copies lines while the CPU address is that
// of the MARK register): the frame field is
// replaced by the frame chosen by the control unit (CMF for writes, MRV for
// reads, OMF or the new frame for copies), and line/word come from the
// control unit so that whole-line copies can be addressed. With pass set,
// the CPU address goes out unchanged. Combinational.
//
// With NVRBC > 1 virtual RBCs, the lowest TW = log2(NVRBC) ROA bits are a
// tag that selects the virtual RBC: only the ROA bits above the tag are
// compared with SA, the tag is given out on cpu_tag, and the physical
// address carries op_tag, the tag chosen by the control unit, in that field.
// With NVRBC = 1 there is no tag, cpu_tag is 0 and op_tag is unused.
//
// Field layout, the ROA comparison and the tag field follow the design description (24-bit
// address, 4/4/4 bits of byte/line/frame for the prototype). The register
// block and the word-wide data path are this design's own.
module address_translator
  import rbc_pkg::*;
#(
  parameter int               ADDR_W     = 24,
  parameter int               NMF        = 16,
  parameter int               NLINES     = 16,
  parameter int               LINE_BYTES = 16,
  parameter int               DATA_W     = 32,
  parameter logic [ADDR_W-1:0] CSR_BASE  = ADDR_W'('hFFFFE0),
  parameter int               NVRBC      = 1,
  localparam int BW  = $clog2(LINE_BYTES),
  localparam int LW  = $clog2(NLINES),
  localparam int FW  = $clog2(NMF),
  localparam int OFW = BW + LW + FW,            // bits below ROA
  localparam int DBW = $clog2(DATA_W / 8),      // byte-in-word bits
  localparam int WW  = BW - DBW,                // word-in-line bits
  localparam int TW  = (NVRBC > 1) ? $clog2(NVRBC) : 0,  // tag bits
  localparam int TGL = (TW > 0) ? TW : 1        // width of the tag ports
) (
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [ADDR_W-1:0] sa,
  output acc_kind_e         kind,
  output logic [LW-1:0]     cpu_line,
  output logic [WW-1:0]     cpu_word,
  output logic [4:0]        csr_off,
  output logic [TGL-1:0]    cpu_tag,
  input  logic [TGL-1:0]    op_tag,
  input  logic              pass,
  input  logic [FW-1:0]     frame_sel,
  input  logic [LW-1:0]     line_sel,
  input  logic [WW-1:0]     word_sel,
  output logic [ADDR_W-1:0] phys_addr
);

  localparam int HW = OFW + TW;                  // bits below the compared ROA

  logic [ADDR_W-HW-1:0] roa;
  logic [FW-1:0]        frame;
  logic [ADDR_W-OFW-1:0] phys_roa;

  assign roa      = cpu_addr[ADDR_W-1:HW];
  assign frame    = cpu_addr[OFW-1:BW+LW];
  assign cpu_line = cpu_addr[BW+LW-1:BW];
  assign cpu_word = cpu_addr[BW-1:DBW];
  assign csr_off  = cpu_addr[4:0];

  always_comb begin
    if (cpu_addr[ADDR_W-1:5] == CSR_BASE[ADDR_W-1:5])
      kind = ACC_CSR;
    else if (roa == sa[ADDR_W-1:HW])
      kind = (frame == '0) ? ACC_VERSIONED : ACC_FORBIDDEN;
    else
      kind = ACC_ORDINARY;
  end

  if (TW > 0) begin : g_tag
    assign cpu_tag  = cpu_addr[HW-1:OFW];
    assign phys_roa = {sa[ADDR_W-1:HW], op_tag};
  end else begin : g_notag
    assign cpu_tag  = '0;
    assign phys_roa = sa[ADDR_W-1:OFW];
  end

  always_comb begin
    if (pass)
      phys_addr = cpu_addr;
    else
      phys_addr = {phys_roa, frame_sel, line_sel, word_sel, DBW'(0)};
  end

endmodule
