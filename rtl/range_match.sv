// range_match: range match of one port field against N rules.
//
// Each rule n holds an inclusive range [lo[n], hi[n]]. Two comparators per
// rule give field >= lo and field <= hi; their AND is bv[n]. This checks the
// range directly, so no range-to-prefix expansion of rules is needed. An empty
// range (lo > hi) never matches.
//
// Interface: field (W bits), lo / hi (N x W bits), bv (N bits); bv[0] is the
// highest-priority rule. Timing: purely combinational.
module range_match #(
  parameter int unsigned W = 16,  // port width in bits
  parameter int unsigned N = 8    // number of rules
) (
  input  logic [W-1:0]        field,
  input  logic [N-1:0][W-1:0] lo,
  input  logic [N-1:0][W-1:0] hi,
  output logic [N-1:0]        bv
);

  always_comb begin
    for (int n = 0; n < N; n++) begin
      bv[n] = (field >= lo[n]) && (field <= hi[n]);
    end
  end

endmodule
