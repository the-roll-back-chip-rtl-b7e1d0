// rollback_chip: state saving and rollback for a Time Warp node.
//
// The chip sits between the CPU and memory. A block of "version-controlled"
// memory (one mark frame of NLINES lines of LINE_BYTES bytes at start
// address SA) is backed by NMF mark frames in the memory that follows it. A
// mark operation opens a new frame on top of a circular version stack
// (register CMF); writes go to the current frame, so older versions stay in
// older frames; a rollback pops k frames (CMF - k); advance GVT drops the k
// oldest (OMF + k). A read returns the most recent version of its line: the
// row of written bits WB[line, *] is rotated so that CMF is bit 0, a priority
// encoder finds the first set bit, and subtracting its index from CMF gives
// the frame (MRV) whose copy is read. A two-bit state per line, derived from
// the written bits and the OMF..CMF window, tells the control unit when data
// must be copied into the OMF frame so that a rollback to OMF always finds
// a valid copy, while lines written only rarely are copied only when needed.
//
// Virtual RBCs: with NVRBC > 1 the version-controlled block is NVRBC times
// larger, and the virtual RBC is selected by a tag in the lowest ROA bits.
// A virtual_rbc_store keeps a tag per line and the written-bit rows of the
// virtual RBCs that are not in the array; the control unit swaps rows on a
// tag miss and runs the mark once per virtual RBC. SA must then be a
// multiple of NVRBC x 4 KB (its low bits are forced to zero). The default
// NVRBC = 1 is the prototype without virtual RBCs; the store is then left
// out.
//
// Structure (one instance each unless noted): address_translator,
// written_bits_array, barrel_shifter, priority_encoder, mrv_subtractor,
// line_state_logic (one per line), frame_pointer_regs, line_buffer and
// control_unit, plus virtual_rbc_store when NVRBC > 1. The datapath of the read search follows the functional block
// diagram of the design description.
//
// Interfaces: CPU bus (slave) and memory bus (master), both a request held
// until a one-cycle acknowledge; word-wide data (DATA_W) with byte enables;
// an access never crosses a line. Memory addresses are byte addresses of
// ADDR_W bits. Operations are started by writes to the control registers at
// CSR_BASE (see control_unit). start_addr gives out the SA register so that
// a node with several chips can decode addresses. See control_unit for
// cycle counts.
module rollback_chip
  import rbc_pkg::*;
#(
  parameter int                ADDR_W     = 24,
  parameter int                DATA_W     = 32,
  parameter int                NMF        = 16,
  parameter int                NLINES     = 16,
  parameter int                LINE_BYTES = 16,
  parameter logic [ADDR_W-1:0] SA_RESET   = ADDR_W'('h001000),
  parameter logic [ADDR_W-1:0] CSR_BASE   = ADDR_W'('hFFFFE0),
  parameter int                NVRBC      = 1,
  localparam int NB  = DATA_W / 8,
  localparam int BW  = $clog2(LINE_BYTES),
  localparam int LW  = $clog2(NLINES),
  localparam int FW  = $clog2(NMF),
  localparam int DBW = $clog2(NB),
  localparam int WW  = BW - DBW,
  localparam int TW  = (NVRBC > 1) ? $clog2(NVRBC) : 0,
  localparam int TGL = (TW > 0) ? TW : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU bus
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [NB-1:0]     cpu_be,
  input  logic [DATA_W-1:0] cpu_wdata,
  output logic [DATA_W-1:0] cpu_rdata,
  output logic              cpu_ack,
  output logic              cpu_err,
  output logic [ADDR_W-1:0] start_addr,  // current SA register, for address decoding
  // memory bus
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [NB-1:0]     mem_be,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  input  logic              mem_ack
);

  // address translation
  acc_kind_e          kind;
  logic [LW-1:0]      cpu_line, line_sel, sel_line;
  logic [WW-1:0]      cpu_word, word_sel;
  logic [4:0]         csr_off;
  logic [ADDR_W-1:0]  sa;
  logic               pass;
  logic [FW-1:0]      frame_sel;

  // written bits
  logic [NLINES-1:0][NMF-1:0] rows;
  logic [NMF-1:0]     sel_row, aligned;
  logic               wb_init, wb_set_en, wb_clr_en, wb_col_clr_en;
  logic [LW-1:0]      wb_set_line, wb_clr_line;
  logic [FW-1:0]      wb_set_frame, wb_clr_frame, wb_col_frame;
  logic [NLINES-1:0]  wb_col_mask;

  // version search and line states
  logic [FW-1:0]      prio_idx, mrv;
  logic               mrv_valid;
  line_state_e        states [NLINES];
  logic [NLINES-1:0]  illegal, copy_mask, keep_mask;

  // frame pointers
  logic [FW-1:0]      cmf, omf, next_frame, depth, fp_k;
  logic               mark_ok, rollback_ok, advance_ok;
  logic               fp_init, fp_mark, fp_rollback, fp_advance;
  logic [NMF-1:0]     new_mask;

  // virtual RBCs
  logic [TGL-1:0]     cpu_tag, op_tag, vt_swap_tag;
  logic               tag_hit, vt_swap_en;
  logic [NLINES-1:0]  vt_swap_mask, ld_mask;
  logic [NLINES-1:0][NMF-1:0] ld_rows;

  // line buffer
  logic               buf_load, buf_merge;
  logic [WW-1:0]      buf_idx;
  logic [DATA_W-1:0]  buf_dout;

  address_translator #(
    .ADDR_W(ADDR_W), .NMF(NMF), .NLINES(NLINES), .LINE_BYTES(LINE_BYTES),
    .DATA_W(DATA_W), .CSR_BASE(CSR_BASE), .NVRBC(NVRBC)
  ) u_xlate (
    .cpu_addr, .sa, .kind, .cpu_line, .cpu_word, .csr_off, .cpu_tag, .op_tag,
    .pass, .frame_sel, .line_sel, .word_sel, .phys_addr(mem_addr)
  );

  written_bits_array #(.NLINES(NLINES), .NMF(NMF)) u_wb (
    .clk, .rst_n, .init(wb_init), .rd_line(sel_line), .rd_row(sel_row), .rows,
    .set_en(wb_set_en), .set_line(wb_set_line), .set_frame(wb_set_frame),
    .clr_en(wb_clr_en), .clr_line(wb_clr_line), .clr_frame(wb_clr_frame),
    .col_clr_en(wb_col_clr_en), .col_frame(wb_col_frame), .col_mask(wb_col_mask),
    .ld_mask, .ld_rows
  );

  if (NVRBC > 1) begin : g_vrbc
    logic [NLINES-1:0][TW-1:0] tags;
    virtual_rbc_store #(.NVRBC(NVRBC), .NLINES(NLINES), .NMF(NMF)) u_vstore (
      .clk, .rst_n, .init(wb_init), .rows, .swap_en(vt_swap_en),
      .swap_mask(vt_swap_mask), .swap_tag(vt_swap_tag),
      .load_mask(ld_mask), .load_rows(ld_rows), .tags
    );
    assign tag_hit = (tags[cpu_line] == cpu_tag);
  end else begin : g_novrbc
    assign ld_mask = '0;
    assign ld_rows = '0;
    assign tag_hit = 1'b1;
  end

  barrel_shifter #(.NMF(NMF)) u_shift (.row(sel_row), .cmf, .aligned);

  priority_encoder #(.N(NMF)) u_prio (.vec(aligned), .idx(prio_idx), .valid(mrv_valid));

  mrv_subtractor #(.NMF(NMF)) u_sub (.cmf, .offset(prio_idx), .mrv);

  for (genvar l = 0; l < NLINES; l++) begin : g_state
    line_state_logic #(.NMF(NMF)) u_state (
      .row(rows[l]), .new_mask, .state(states[l]), .illegal(illegal[l])
    );
    // a mark must copy a line in state 10 whose only old copy is in the new frame
    assign copy_mask[l] = (states[l] == ST_10) && rows[l][next_frame];
    // a line in state 01 keeps its written bit in the new frame
    assign keep_mask[l] = (states[l] == ST_01);
  end

  frame_pointer_regs #(.NMF(NMF)) u_fp (
    .clk, .rst_n, .init(fp_init), .mark(fp_mark), .rollback(fp_rollback),
    .advance(fp_advance), .k(fp_k), .cmf, .omf, .next_frame, .depth,
    .mark_ok, .rollback_ok, .advance_ok, .new_mask
  );

  line_buffer #(.LINE_BYTES(LINE_BYTES), .DATA_W(DATA_W)) u_buf (
    .clk, .load(buf_load), .idx(buf_idx), .din(mem_rdata),
    .merge(buf_merge), .m_idx(cpu_word), .m_be(cpu_be), .m_data(cpu_wdata),
    .dout(buf_dout)
  );

  control_unit #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .NMF(NMF), .NLINES(NLINES),
    .LINE_BYTES(LINE_BYTES), .SA_RESET(SA_RESET), .NVRBC(NVRBC)
  ) u_ctrl (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_be, .cpu_wdata, .cpu_rdata, .cpu_ack, .cpu_err,
    .kind, .csr_off, .cpu_line, .cpu_word, .sa, .cpu_tag,
    .tag_hit, .op_tag, .vt_swap_en, .vt_swap_mask, .vt_swap_tag,
    .sel_line, .mrv_valid, .mrv, .wb_cmf_bit(sel_row[cmf]),
    .sel_state(states[sel_line]), .copy_mask, .keep_mask,
    .wb_init, .wb_set_en, .wb_set_line, .wb_set_frame,
    .wb_clr_en, .wb_clr_line, .wb_clr_frame,
    .wb_col_clr_en, .wb_col_frame, .wb_col_mask,
    .cmf, .omf, .next_frame, .mark_ok, .rollback_ok, .advance_ok,
    .fp_init, .fp_mark, .fp_rollback, .fp_advance, .fp_k,
    .pass, .frame_sel, .line_sel, .word_sel,
    .buf_load, .buf_idx, .buf_merge, .buf_dout,
    .mem_req, .mem_we, .mem_be, .mem_wdata, .mem_rdata, .mem_ack
  );

  assign start_addr = sa;

  // Every line always has a written bit and never reaches old = 0, new > 1.
  a_states_legal: assert property (@(posedge clk) disable iff (!rst_n) illegal == '0);

endmodule
