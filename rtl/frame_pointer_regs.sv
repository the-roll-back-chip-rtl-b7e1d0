// frame_pointer_regs: the current mark frame (CMF) and oldest mark frame
// (OMF) registers of the rollback chip.
//
// The mark frames form a circular list of NMF frames. CMF is the top of the
// version stack, OMF the oldest frame a rollback may return to.
//   init      : CMF := 0, OMF := 0                (reset operation)
//   mark      : CMF := CMF + 1 mod NMF, refused when CMF + 1 = OMF
//   rollback  : CMF := CMF - k, refused when k > (CMF - OMF) mod NMF
//   advance   : OMF := OMF + k, refused when k > (CMF - OMF) mod NMF
// The *_ok outputs tell whether the command would be accepted with the
// present k; a refused command leaves both registers unchanged. depth is
// (CMF - OMF) mod NMF, next_frame is the frame a mark would allocate, and
// new_mask has a one for every frame after OMF up to and including CMF (the
// "new" frames of the line-state definition). Updates at the rising edge;
// asynchronous active-low reset. The operations and their error conditions
// follow the design description (with its comparisons read modulo NMF); k
// being NMF-1 at most is this design's choice.
module frame_pointer_regs #(
  parameter int NMF = 16,
  localparam int FW = $clog2(NMF)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           mark,
  input  logic           rollback,
  input  logic           advance,
  input  logic [FW-1:0]  k,
  output logic [FW-1:0]  cmf,
  output logic [FW-1:0]  omf,
  output logic [FW-1:0]  next_frame,
  output logic [FW-1:0]  depth,
  output logic           mark_ok,
  output logic           rollback_ok,
  output logic           advance_ok,
  output logic [NMF-1:0] new_mask
);

  assign next_frame  = cmf + FW'(1);
  assign depth       = cmf - omf;
  assign mark_ok     = (next_frame != omf);
  assign rollback_ok = (k <= depth);
  assign advance_ok  = (k <= depth);

  always_comb begin
    for (int f = 0; f < NMF; f++) begin
      // frame f is new when 1 <= (f - OMF) mod NMF <= depth
      logic [FW-1:0] offs;
      offs = FW'(f) - omf;
      new_mask[f] = (offs != '0) && (offs <= depth);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmf <= '0;
      omf <= '0;
    end else if (init) begin
      cmf <= '0;
      omf <= '0;
    end else if (mark) begin
      if (mark_ok) cmf <= next_frame;
    end else if (rollback) begin
      if (rollback_ok) cmf <= cmf - k;
    end else if (advance) begin
      if (advance_ok) omf <= omf + k;
    end
  end

endmodule
