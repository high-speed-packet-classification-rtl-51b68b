// bv_and: combines the per-field bit vectors into the final bit vector.
//
// Bit n of the result is the AND of bit n of every input vector: a packet
// matches rule n only if each of its fields matches that rule's field.
//
// Interface: vecs (NUM_VEC x N bits), v (N bits). Timing: combinational.
module bv_and #(
  parameter int unsigned N       = 8,  // number of rules
  parameter int unsigned NUM_VEC = 5   // one vector per 5-tuple field
) (
  input  logic [NUM_VEC-1:0][N-1:0] vecs,
  output logic [N-1:0]              v
);

  always_comb begin
    v = '1;
    for (int i = 0; i < NUM_VEC; i++) v &= vecs[i];
  end

endmodule
