// mrv_subtractor: frame number of the most recent version (MRV) of a line.
//
// MRV = (CMF - offset) mod NMF, where offset is the priority encoder result
// (frames back from CMF). With NMF a power of two the modulo is the natural
// wrap of a log2(NMF)-bit subtractor. Combinational, as in the design
// description.
module mrv_subtractor #(
  parameter int NMF = 16,
  localparam int FW = $clog2(NMF)
) (
  input  logic [FW-1:0] cmf,
  input  logic [FW-1:0] offset,
  output logic [FW-1:0] mrv
);

  assign mrv = cmf - offset;

endmodule
