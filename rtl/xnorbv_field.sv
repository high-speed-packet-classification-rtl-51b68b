// xnorbv_field: ternary match of one header field against N rules (XnorBV).
//
// For every rule n the K field bits T are compared with the rule's K pattern
// bits W by an XNOR each; a bit whose care flag is 0 is a wildcard and is
// forced to 1. The K results are then ANDed into one bit, bv[n], which is 1
// when the field matches rule n. Doing this for all N rules gives the field's
// N-bit vector. The XNOR-then-AND structure is the design's; the care mask
// that realises the '*' symbol is this implementation's encoding of it.
//
// Interface: field (K bits), rule_val / rule_care (N x K bits), bv (N bits).
// bv[0] belongs to rule 0, the highest-priority rule.
// Timing: purely combinational; the classifier registers bv.
module xnorbv_field #(
  parameter int unsigned K = 32,  // field width in bits
  parameter int unsigned N = 8    // number of rules
) (
  input  logic [K-1:0]         field,
  input  logic [N-1:0][K-1:0]  rule_val,
  input  logic [N-1:0][K-1:0]  rule_care,
  output logic [N-1:0]         bv
);

  always_comb begin
    for (int n = 0; n < N; n++) begin
      logic [K-1:0] s;  // per-bit XNOR result, wildcards forced to 1
      s     = ~(rule_val[n] ^ field) | ~rule_care[n];
      bv[n] = &s;
    end
  end

endmodule
