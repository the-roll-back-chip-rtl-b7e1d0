// priority_encoder: index of the lowest set bit of the aligned written bits.
//
// Bit 0 (the current mark frame) has the highest priority. idx is how many
// frames back from CMF the most recent version of the line lies; valid is
// low when no bit is set, which is the illegal state of a line (every line
// must always have at least one written bit). Combinational. Behaviour as
// in the design description.
module priority_encoder #(
  parameter int N = 16,
  localparam int IW = $clog2(N)
) (
  input  logic [N-1:0]  vec,
  output logic [IW-1:0] idx,
  output logic          valid
);

  always_comb begin
    idx   = '0;
    valid = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (vec[i]) begin
        idx   = IW'(i);
        valid = 1'b1;
      end
    end
  end

endmodule
