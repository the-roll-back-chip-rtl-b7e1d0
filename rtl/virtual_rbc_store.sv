// virtual_rbc_store: tags and saved written bits for virtual rollback chips.
//
// With NVRBC virtual RBCs sharing one physical chip, the version-controlled
// block grows NVRBC-fold. The virtual RBC is selected by a tag field: the
// lowest ROA bits of the address. The physical written-bits array holds,
// for each line l, the row of one virtual RBC only, the one named by TAG[l].
// The rows of every other virtual RBC are kept here, in VC[v][l]. This works
// like a direct-mapped cache of written-bit rows.
//
// Swap: with swap_en, every line l in swap_mask whose TAG[l] differs from
// swap_tag is "missed". For a missed line, the store:
//   * gives VC[swap_tag][l] on load_rows[l], with load_mask[l] set, so that
//     the written-bits array loads it in the same clock;
//   * saves the outgoing row rows[l] into VC[TAG[l]][l];
//   * sets TAG[l] := swap_tag.
// A line whose tag already matches is not touched; its entry in VC for the
// current tag is stale, and the live row is the one in the array. load_mask
// and load_rows are combinational; the store updates at the rising edge.
// init and the asynchronous reset set every TAG to 0 and every VC row to
// "frame 0 only", the reset pattern of the array itself.
//
// The tag array, the swap on a miss and the reset pattern follow the design
// description. Holding VC in registers on the chip, rather than in ordinary
// memory reached over the memory bus, is this design's own choice: a swap
// then costs one clock and no memory transfers.
module virtual_rbc_store #(
  parameter int NVRBC  = 4,
  parameter int NLINES = 16,
  parameter int NMF    = 16,
  localparam int TW = $clog2(NVRBC)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       init,
  input  logic [NLINES-1:0][NMF-1:0] rows,
  input  logic                       swap_en,
  input  logic [NLINES-1:0]          swap_mask,
  input  logic [TW-1:0]              swap_tag,
  output logic [NLINES-1:0]          load_mask,
  output logic [NLINES-1:0][NMF-1:0] load_rows,
  output logic [NLINES-1:0][TW-1:0]  tags
);

  localparam logic [NMF-1:0] RESET_ROW = NMF'(1);

  logic [NVRBC-1:0][NLINES-1:0][NMF-1:0] vc;
  logic [NLINES-1:0][TW-1:0]             tag_q;

  always_comb begin
    for (int l = 0; l < NLINES; l++) begin
      load_mask[l] = swap_en && swap_mask[l] && (tag_q[l] != swap_tag);
      load_rows[l] = vc[swap_tag][l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vc    <= {(NVRBC * NLINES){RESET_ROW}};
      tag_q <= '0;
    end else if (init) begin
      vc    <= {(NVRBC * NLINES){RESET_ROW}};
      tag_q <= '0;
    end else begin
      for (int l = 0; l < NLINES; l++) begin
        if (load_mask[l]) begin
          vc[tag_q[l]][l] <= rows[l];
          tag_q[l]        <= swap_tag;
        end
      end
    end
  end

  assign tags = tag_q;

endmodule
