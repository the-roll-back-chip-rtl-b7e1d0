// control_unit: sequencer and control registers of the rollback chip.
//
// It carries out the six operations of the chip:
//   reset      : clears the written bits to "frame 0 only" and CMF = OMF = 0.
//   read       : one memory read with the frame field replaced by MRV.
//   write      : one of four cases chosen from WB[line,CMF] and the line state
//                when the write is accepted:
//                  1  WB set,   state != 00 : write the word into CMF.
//                  2  WB set,   state == 00 : copy line CMF -> OMF, set
//                                             WB[OMF]; write the word into CMF.
//                  3  WB clear, state != 00 : load line MRV, merge the word,
//                                             store it into CMF, set WB[CMF].
//                  4  WB clear, state == 00 : load line MRV, store into OMF,
//                                             set WB[OMF], merge, store into
//                                             CMF, set WB[CMF], clear WB[MRV].
//   mark       : refused when CMF + 1 = OMF. Otherwise each line in state 10
//                whose bit in the new frame N = CMF + 1 is set is copied from
//                N to OMF (WB[OMF] set), one line at a time; then the bits of
//                column N are cleared except for lines in state 01, and
//                CMF := N.
//   rollback k : CMF := CMF - k.       advance GVT k : OMF := OMF + k.
// Ordinary addresses pass straight to memory. A version-controlled address
// with a non-zero frame field, a refused operation, or a line with no written
// bit ends the access with cpu_err and sets a sticky status bit.
//
// CPU bus: the CPU raises cpu_req with address/data/byte enables and holds
// them until the one-cycle cpu_ack (cpu_err, cpu_rdata valid with it).
// Memory bus: the same handshake with the chip as master, mem_ack ends each
// word transfer. Timing, in clock edges from the one at which the chip
// first sees cpu_req to the one after which cpu_ack is high: control
// register accesses, reset, rollback and advance GVT 1; a mark without copies
// 2; an ordinary access, a read and a write of case 1 all 2 + L, where L
// edges pass from mem_req to mem_ack (so a case-1 write costs exactly as
// much as an ordinary write); every line copy adds 2 x LINE_WORDS transfers.
//
// Virtual RBCs (NVRBC > 1): the written-bits array holds, per line, the row
// of the virtual RBC named by that line's tag. A versioned access whose tag
// differs swaps the line's row (vt_swap_*) and waits one clock without
// acknowledging; the access is then handled as above. A mark swaps in all
// rows of virtual RBC 0, runs the copy scan and column clear on them, and
// repeats this for every virtual RBC; CMF moves once, after the last one.
// Copies during a mark carry the tag of the virtual RBC being scanned
// (op_tag). A tag miss adds 1 to the times above, and a mark without copies
// takes 1 + 2 x NVRBC. With NVRBC = 1 none of this happens.
//
// Control registers (offsets from CSR_BASE): SA, STATUS (errors [4:0],
// CMF [15:8], OMF [23:16]; write 1 to clear an error), RESET, MARK,
// ROLLBACK and ADVANCE (k in the write data). The operations, their cases
// and error conditions follow the design description; the register map, the
// bus handshake and the word-serial line transfers are this design's own.
module control_unit
  import rbc_pkg::*;
#(
  parameter int                ADDR_W     = 24,
  parameter int                DATA_W     = 32,
  parameter int                NMF        = 16,
  parameter int                NLINES     = 16,
  parameter int                LINE_BYTES = 16,
  parameter logic [ADDR_W-1:0] SA_RESET   = ADDR_W'('h001000),
  parameter int                NVRBC      = 1,
  localparam int NB  = DATA_W / 8,
  localparam int BW  = $clog2(LINE_BYTES),
  localparam int LW  = $clog2(NLINES),
  localparam int FW  = $clog2(NMF),
  localparam int OFW = BW + LW + FW,
  localparam int DBW = $clog2(NB),
  localparam int WW  = BW - DBW,
  localparam int NW  = LINE_BYTES / NB,
  localparam int TW  = (NVRBC > 1) ? $clog2(NVRBC) : 0,
  localparam int TGL = (TW > 0) ? TW : 1,
  localparam int SAW = OFW + TW            // SA is a multiple of 2**SAW
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // CPU side
  input  logic                       cpu_req,
  input  logic                       cpu_we,
  input  logic [NB-1:0]              cpu_be,
  input  logic [DATA_W-1:0]          cpu_wdata,
  output logic [DATA_W-1:0]          cpu_rdata,
  output logic                       cpu_ack,
  output logic                       cpu_err,
  // decoded CPU address
  input  acc_kind_e                  kind,
  input  logic [4:0]                 csr_off,
  input  logic [LW-1:0]              cpu_line,
  input  logic [WW-1:0]              cpu_word,
  output logic [ADDR_W-1:0]          sa,
  input  logic [TGL-1:0]             cpu_tag,
  // virtual RBCs
  input  logic                       tag_hit,
  output logic [TGL-1:0]             op_tag,
  output logic                       vt_swap_en,
  output logic [NLINES-1:0]          vt_swap_mask,
  output logic [TGL-1:0]             vt_swap_tag,
  // written bits and line state
  output logic [LW-1:0]              sel_line,
  input  logic                       mrv_valid,
  input  logic [FW-1:0]              mrv,
  input  logic                       wb_cmf_bit,
  input  line_state_e                sel_state,
  input  logic [NLINES-1:0]          copy_mask,
  input  logic [NLINES-1:0]          keep_mask,
  output logic                       wb_init,
  output logic                       wb_set_en,
  output logic [LW-1:0]              wb_set_line,
  output logic [FW-1:0]              wb_set_frame,
  output logic                       wb_clr_en,
  output logic [LW-1:0]              wb_clr_line,
  output logic [FW-1:0]              wb_clr_frame,
  output logic                       wb_col_clr_en,
  output logic [FW-1:0]              wb_col_frame,
  output logic [NLINES-1:0]          wb_col_mask,
  // frame pointers
  input  logic [FW-1:0]              cmf,
  input  logic [FW-1:0]              omf,
  input  logic [FW-1:0]              next_frame,
  input  logic                       mark_ok,
  input  logic                       rollback_ok,
  input  logic                       advance_ok,
  output logic                       fp_init,
  output logic                       fp_mark,
  output logic                       fp_rollback,
  output logic                       fp_advance,
  output logic [FW-1:0]              fp_k,
  // address translation
  output logic                       pass,
  output logic [FW-1:0]              frame_sel,
  output logic [LW-1:0]              line_sel,
  output logic [WW-1:0]              word_sel,
  // line buffer
  output logic                       buf_load,
  output logic [WW-1:0]              buf_idx,
  output logic                       buf_merge,
  input  logic [DATA_W-1:0]          buf_dout,
  // memory side
  output logic                       mem_req,
  output logic                       mem_we,
  output logic [NB-1:0]              mem_be,
  output logic [DATA_W-1:0]          mem_wdata,
  input  logic [DATA_W-1:0]          mem_rdata,
  input  logic                       mem_ack
);

  typedef enum logic [3:0] {
    S_IDLE, S_PASS, S_VREAD, S_WORD, S_LOAD, S_STORE, S_MERGE, S_MSCAN, S_ACK,
    S_VSWAP
  } state_e;

  state_e              state_q;
  logic [LW-1:0]       op_line_q;
  logic [WW-1:0]       word_q;
  logic [FW-1:0]       src_q, dst_q, mrv_q;
  logic                f_omf_q;    // next store goes to OMF
  logic                f_line_q;   // final write is a merged line (cases 3, 4)
  logic                f_clr_q;    // clear WB[MRV] at the end (case 4)
  logic                f_mark_q;   // copy belongs to a mark operation
  logic                err_q;
  logic [TGL-1:0]      vi_q;       // virtual RBC being marked
  logic [DATA_W-1:0]   rdata_q;
  logic [NERR-1:0]     errors_q;

  logic                k_over;
  logic                last_word;
  logic [LW-1:0]       first_copy;
  logic [NERR-1:0]     err_set;
  logic                miss;
  logic                last_vi;

  assign fp_k      = cpu_wdata[FW-1:0];
  assign k_over    = (cpu_wdata >> FW) != '0;
  assign last_word = (word_q == WW'(NW - 1));
  assign sel_line  = (state_q == S_IDLE) ? cpu_line : op_line_q;
  assign miss      = (kind == ACC_VERSIONED) && !tag_hit;
  assign last_vi   = (vi_q == TGL'(NVRBC - 1));
  assign op_tag    = (state_q != S_IDLE && f_mark_q) ? vi_q : cpu_tag;

  always_comb begin
    first_copy = '0;
    for (int l = NLINES - 1; l >= 0; l--)
      if (copy_mask[l]) first_copy = LW'(l);
  end

  // ---------------------------------------------------------------- outputs
  always_comb begin
    cpu_ack       = (state_q == S_ACK);
    cpu_err       = (state_q == S_ACK) && err_q;
    cpu_rdata     = rdata_q;
    wb_init       = 1'b0;
    wb_set_en     = 1'b0;
    wb_set_line   = op_line_q;
    wb_set_frame  = cmf;
    wb_clr_en     = 1'b0;
    wb_clr_line   = op_line_q;
    wb_clr_frame  = mrv_q;
    wb_col_clr_en = 1'b0;
    wb_col_frame  = next_frame;
    wb_col_mask   = ~keep_mask;
    fp_init       = 1'b0;
    fp_mark       = 1'b0;
    fp_rollback   = 1'b0;
    fp_advance    = 1'b0;
    pass          = 1'b0;
    frame_sel     = cmf;
    line_sel      = op_line_q;
    word_sel      = word_q;
    buf_load      = 1'b0;
    buf_idx       = word_q;
    buf_merge     = 1'b0;
    mem_req       = 1'b0;
    mem_we        = 1'b0;
    mem_be        = '1;
    mem_wdata     = buf_dout;
    err_set       = '0;
    vt_swap_en    = 1'b0;
    vt_swap_mask  = '1;
    vt_swap_tag   = vi_q;

    unique case (state_q)
      S_IDLE: begin
        if (cpu_req && miss) begin
          vt_swap_en   = 1'b1;
          vt_swap_mask = NLINES'(1) << cpu_line;
          vt_swap_tag  = cpu_tag;
        end else if (cpu_req) begin
          unique case (kind)
            ACC_FORBIDDEN: err_set[ERR_FRAME] = 1'b1;
            ACC_VERSIONED: err_set[ERR_STATE] = !mrv_valid;
            ACC_CSR: begin
              if (cpu_we) begin
                unique case (csr_off)
                  CSR_RESET: begin
                    wb_init = 1'b1;
                    fp_init = 1'b1;
                  end
                  CSR_MARK:     err_set[ERR_NOFRAME] = !mark_ok;
                  CSR_ROLLBACK: begin
                    fp_rollback = rollback_ok && !k_over;
                    err_set[ERR_ROLLBACK] = !(rollback_ok && !k_over);
                  end
                  CSR_ADVANCE: begin
                    fp_advance = advance_ok && !k_over;
                    err_set[ERR_ADVANCE] = !(advance_ok && !k_over);
                  end
                  default: ;
                endcase
              end
            end
            default: ;
          endcase
        end
      end
      S_PASS: begin
        mem_req   = 1'b1;
        pass      = 1'b1;
        mem_we    = cpu_we;
        mem_be    = cpu_be;
        mem_wdata = cpu_wdata;
      end
      S_VREAD: begin
        mem_req   = 1'b1;
        frame_sel = mrv_q;
        word_sel  = cpu_word;
      end
      S_WORD: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        frame_sel = cmf;
        word_sel  = cpu_word;
        mem_be    = cpu_be;
        mem_wdata = cpu_wdata;
      end
      S_LOAD: begin
        mem_req   = 1'b1;
        frame_sel = src_q;
        buf_load  = mem_ack;
      end
      S_STORE: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        frame_sel = dst_q;
        if (mem_ack && last_word) begin
          wb_set_en    = 1'b1;
          wb_set_frame = dst_q;
          wb_clr_en    = !f_omf_q && f_clr_q;
        end
      end
      S_MERGE:   buf_merge = 1'b1;
      S_MSCAN: begin
        if (copy_mask == '0) begin
          wb_col_clr_en = 1'b1;
          fp_mark       = last_vi;
        end
      end
      S_VSWAP:   vt_swap_en = 1'b1;
      default: ;
    endcase
  end

  // ------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      op_line_q <= '0;
      word_q    <= '0;
      src_q     <= '0;
      dst_q     <= '0;
      mrv_q     <= '0;
      f_omf_q   <= 1'b0;
      f_line_q  <= 1'b0;
      f_clr_q   <= 1'b0;
      f_mark_q  <= 1'b0;
      err_q     <= 1'b0;
      vi_q      <= '0;
      rdata_q   <= '0;
      errors_q  <= '0;
      sa        <= SA_RESET & ~ADDR_W'((1 << SAW) - 1);
    end else begin
      errors_q <= errors_q | err_set;
      unique case (state_q)
        S_IDLE: begin
          if (cpu_req && !miss) begin
            err_q     <= |err_set;
            rdata_q   <= '0;
            op_line_q <= cpu_line;
            mrv_q     <= mrv;
            word_q    <= '0;
            f_mark_q  <= 1'b0;
            state_q   <= S_ACK;
            unique case (kind)
              ACC_ORDINARY: state_q <= S_PASS;
              ACC_VERSIONED: begin
                if (mrv_valid) begin
                  if (!cpu_we) begin
                    state_q <= S_VREAD;
                  end else begin
                    f_line_q <= !wb_cmf_bit;
                    f_clr_q  <= !wb_cmf_bit && (sel_state == ST_00);
                    f_omf_q  <= (sel_state == ST_00);
                    src_q    <= wb_cmf_bit ? cmf : mrv;
                    dst_q    <= omf;
                    if (wb_cmf_bit && sel_state != ST_00) state_q <= S_WORD;
                    else                                  state_q <= S_LOAD;
                  end
                end
              end
              ACC_CSR: begin
                if (cpu_we) begin
                  if (csr_off == CSR_SA)
                    sa <= cpu_wdata[ADDR_W-1:0] & ~ADDR_W'((1 << SAW) - 1);
                  if (csr_off == CSR_STATUS)
                    errors_q <= (errors_q & ~cpu_wdata[NERR-1:0]) | err_set;
                  if (csr_off == CSR_RESET)
                    errors_q <= '0;
                  if (csr_off == CSR_MARK && mark_ok) begin
                    f_mark_q <= 1'b1;
                    vi_q     <= '0;
                    state_q  <= (NVRBC > 1) ? S_VSWAP : S_MSCAN;
                  end
                end else begin
                  if (csr_off == CSR_SA)
                    rdata_q <= DATA_W'(sa);
                  if (csr_off == CSR_STATUS)
                    rdata_q <= DATA_W'({8'(omf), 8'(cmf), 8'(errors_q)});
                end
              end
              default: ;
            endcase
          end
        end
        S_PASS, S_VREAD, S_WORD: begin
          if (mem_ack) begin
            rdata_q <= mem_rdata;
            state_q <= S_ACK;
          end
        end
        S_LOAD: begin
          if (mem_ack) begin
            word_q <= word_q + WW'(1);
            if (last_word) begin
              word_q  <= '0;
              dst_q   <= f_omf_q ? omf : cmf;
              state_q <= f_omf_q ? S_STORE : S_MERGE;
            end
          end
        end
        S_STORE: begin
          if (mem_ack) begin
            word_q <= word_q + WW'(1);
            if (last_word) begin
              word_q <= '0;
              if (f_omf_q) begin
                f_omf_q <= 1'b0;
                if (f_mark_q)      state_q <= S_MSCAN;
                else if (f_line_q) state_q <= S_MERGE;
                else               state_q <= S_WORD;
              end else begin
                state_q <= S_ACK;
              end
            end
          end
        end
        S_MERGE: begin
          dst_q   <= cmf;
          state_q <= S_STORE;
        end
        S_MSCAN: begin
          if (copy_mask != '0) begin
            op_line_q <= first_copy;
            src_q     <= next_frame;
            f_omf_q   <= 1'b1;
            word_q    <= '0;
            state_q   <= S_LOAD;
          end else if (last_vi) begin
            state_q <= S_ACK;
          end else begin
            vi_q    <= vi_q + TGL'(1);
            state_q <= S_VSWAP;
          end
        end
        S_VSWAP: state_q <= S_MSCAN;
        S_ACK: begin
          err_q   <= 1'b0;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A request is held, unchanged, until the cycle in which it is acknowledged.
  a_cpu_hold: assert property (@(posedge clk) disable iff (!rst_n)
      cpu_req && !cpu_ack |=> cpu_ack || (cpu_req && $stable(cpu_we) && $stable(cpu_wdata)));
  // The chip keeps its memory request up until the memory acknowledges it.
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
      mem_req && !mem_ack |=> mem_req);

endmodule
