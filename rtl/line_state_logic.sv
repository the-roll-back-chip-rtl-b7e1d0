// line_state_logic: two-bit state of one line from its written bits.
//
// new_mask marks the frames after OMF up to and including CMF (the "new"
// frames); every other frame, OMF included, is "old". The module counts the
// set written bits in each group (saturating at 2) and encodes:
//   old = 0, new = 1  -> ST_00      old = 1, new = 0  -> ST_01
//   old = 1, new > 0  -> ST_10      old > 1           -> ST_11
// old = 0 with new = 0 or new > 1 cannot arise in a working chip and is
// flagged by illegal (state then reads ST_00). Combinational; one instance
// per line so the states follow every change of WB, CMF and OMF without any
// action by the control unit, as the design description suggests.
module line_state_logic
  import rbc_pkg::*;
#(
  parameter int NMF = 16
) (
  input  logic [NMF-1:0] row,
  input  logic [NMF-1:0] new_mask,
  output line_state_e    state,
  output logic           illegal
);

  logic [1:0] n_new, n_old;   // saturating counts 0, 1, 2 (= two or more)

  always_comb begin
    n_new = 2'd0;
    n_old = 2'd0;
    for (int f = 0; f < NMF; f++) begin
      if (row[f]) begin
        if (new_mask[f]) n_new = (n_new == 2'd2) ? 2'd2 : n_new + 2'd1;
        else             n_old = (n_old == 2'd2) ? 2'd2 : n_old + 2'd1;
      end
    end
    illegal = 1'b0;
    if (n_old == 2'd2)        state = ST_11;
    else if (n_old == 2'd1)   state = (n_new == 2'd0) ? ST_01 : ST_10;
    else begin
      state   = ST_00;
      illegal = (n_new != 2'd1);
    end
  end

endmodule
