// written_bits_array: the written-bits (WB) array of the rollback chip.
//
// WB[l][f] is set when line l of mark frame f holds valid data. A read of a
// line searches row l, so the whole row is given out for the selected line,
// and all rows are given out for the per-line state logic. Updates:
//   init       : frame 0 column set, every other bit cleared (reset operation).
//   set_en     : WB[set_line][set_frame] := 1
//   clr_en     : WB[clr_line][clr_frame] := 0
//   col_clr_en : for every line l with col_mask[l], WB[l][col_frame] := 0
//                (the mark operation clearing the newly allocated frame).
//   ld_mask    : for every line l with ld_mask[l], WB[l] := ld_rows[l]
//                (a row swapped in from a virtual RBC; never active together
//                with the other updates).
// All updates take effect at the next rising clock edge; if set and clear
// hit the same bit in one cycle the set wins. Asynchronous active-low reset
// gives the same contents as init. The organisation (one bit per line per
// frame, reset pattern) follows the design description; the port set is
// this design's own.
module written_bits_array #(
  parameter int NLINES = 16,
  parameter int NMF    = 16,
  localparam int LW = $clog2(NLINES),
  localparam int FW = $clog2(NMF)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         init,
  input  logic [LW-1:0]                rd_line,
  output logic [NMF-1:0]               rd_row,
  output logic [NLINES-1:0][NMF-1:0]   rows,
  input  logic                         set_en,
  input  logic [LW-1:0]                set_line,
  input  logic [FW-1:0]                set_frame,
  input  logic                         clr_en,
  input  logic [LW-1:0]                clr_line,
  input  logic [FW-1:0]                clr_frame,
  input  logic                         col_clr_en,
  input  logic [FW-1:0]                col_frame,
  input  logic [NLINES-1:0]            col_mask,
  input  logic [NLINES-1:0]            ld_mask,
  input  logic [NLINES-1:0][NMF-1:0]   ld_rows
);

  logic [NLINES-1:0][NMF-1:0] wb;

  localparam logic [NMF-1:0] RESET_ROW = NMF'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb <= {NLINES{RESET_ROW}};
    end else if (init) begin
      wb <= {NLINES{RESET_ROW}};
    end else begin
      for (int l = 0; l < NLINES; l++)
        if (ld_mask[l]) wb[l] <= ld_rows[l];
      if (col_clr_en) begin
        for (int l = 0; l < NLINES; l++)
          if (col_mask[l]) wb[l][col_frame] <= 1'b0;
      end
      if (clr_en) wb[clr_line][clr_frame] <= 1'b0;
      if (set_en) wb[set_line][set_frame] <= 1'b1;
    end
  end

  assign rows   = wb;
  assign rd_row = wb[rd_line];

endmodule
