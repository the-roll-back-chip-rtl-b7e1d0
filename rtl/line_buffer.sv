// line_buffer: the one-line data buffer of the rollback chip.
//
// Holds LINE_BYTES bytes as LINE_BYTES/(DATA_W/8) words. Used to copy a line
// from one mark frame to another and for the read-modify-write of a first
// write into a line of the current frame.
//   load   : word[idx] := din                   (a word read from memory)
//   merge  : bytes of word[m_idx] with m_be set := m_data (the CPU write)
// When both hit the same cycle the merge is applied on top of the load.
// dout is word[idx], read combinationally. No reset: the buffer is always
// loaded before it is read. The buffer follows the design description; its
// word organisation is this design's own.
module line_buffer #(
  parameter int LINE_BYTES = 16,
  parameter int DATA_W     = 32,
  localparam int NB = DATA_W / 8,
  localparam int NW = LINE_BYTES / NB,
  localparam int WW = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic              clk,
  input  logic              load,
  input  logic [WW-1:0]     idx,
  input  logic [DATA_W-1:0] din,
  input  logic              merge,
  input  logic [WW-1:0]     m_idx,
  input  logic [NB-1:0]     m_be,
  input  logic [DATA_W-1:0] m_data,
  output logic [DATA_W-1:0] dout
);

  logic [NW-1:0][DATA_W-1:0] buf_q;

  always_ff @(posedge clk) begin
    if (load) buf_q[idx] <= din;
    if (merge) begin
      for (int b = 0; b < NB; b++)
        if (m_be[b]) buf_q[m_idx][b*8 +: 8] <= m_data[b*8 +: 8];
    end
  end

  assign dout = buf_q[idx];

endmodule
