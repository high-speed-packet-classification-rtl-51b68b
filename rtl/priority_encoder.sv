// priority_encoder: picks the highest-priority rule from a multi-match vector.
//
// Rules are stored in decreasing order of priority, so bit 0 is the highest
// priority. idx is the lowest set bit of v and hit says whether any bit is set;
// with no bit set idx is 0 and hit is 0.
//
// Interface: v (N bits) in, idx ($clog2(N) bits) and hit out.
// Timing: combinational; the classifier registers its outputs.
module priority_encoder #(
  parameter int unsigned N  = 8,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  v,
  output logic [IW-1:0] idx,
  output logic          hit
);

  always_comb begin
    idx = '0;
    hit = 1'b0;
    // Scan from the lowest priority up so that the last hit wins.
    for (int n = N - 1; n >= 0; n--) begin
      if (v[n]) begin
        idx = IW'(n);
        hit = 1'b1;
      end
    end
  end

endmodule
