// barrel_shifter: aligns a row of written bits to the current mark frame.
//
// Output bit i is the written bit of frame (cmf - i) mod NMF, so bit 0 is
// the CMF frame, bit 1 the frame marked before it, and so on backwards round
// the circular list. The priority encoder that follows then finds the most
// recent frame holding the line. Purely combinational: log2(NMF) rotate
// stages followed by a fixed bit reversal. NMF must be a power of two.
// The function is the one given in the design description; the stage
// structure is this design's own.
module barrel_shifter #(
  parameter int NMF = 16,
  localparam int FW = $clog2(NMF)
) (
  input  logic [NMF-1:0] row,
  input  logic [FW-1:0]  cmf,
  output logic [NMF-1:0] aligned
);

  // Reverse the frame order: rev[j] = row[NMF-1-j]. Frame (cmf - i) sits at
  // rev index NMF-1-cmf+i, so rotating rev right by NMF-1-cmf gives the
  // result.
  logic [NMF-1:0] rev;
  logic [FW-1:0]  amount;
  logic [NMF-1:0] stage [FW+1];

  always_comb begin
    for (int j = 0; j < NMF; j++) rev[j] = row[NMF-1-j];
    amount = FW'(NMF - 1) - cmf;
    stage[0] = rev;
    for (int s = 0; s < FW; s++) begin
      if (amount[s])
        stage[s+1] = (stage[s] >> (1 << s)) | (stage[s] << (NMF - (1 << s)));
      else
        stage[s+1] = stage[s];
    end
    aligned = stage[FW];
  end

endmodule
