// rule_table: storage for the N rules of the ruleset.
//
// The ruleset is held in registers so that every rule is visible at once to
// the field matchers: the per-field parts of each rule (address patterns, port
// ranges, protocol pattern) go to their own matcher, which is how the rules
// for each tuple are stored and searched separately. Entry 0 is the
// highest-priority rule; the order of entries is the priority order.
//
// Writing: with wr_en high at a rising clock edge, entry wr_addr takes wr_rule
// and its valid flag takes wr_valid (write wr_valid=0 to delete a rule). The
// new contents are visible from the next cycle. Reset clears every valid flag,
// so an empty table matches nothing. The write port, the valid flags and the
// reset behaviour are this implementation's choices; the design does not say
// how rules are loaded.
module rule_table
  import xnorbv_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic             wr_valid,
  input  rule_t            wr_rule,
  output rule_t [N-1:0]    rules,
  output logic  [N-1:0]    rule_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rule_valid <= '0;
    end else if (wr_en && (32'(wr_addr) < N)) begin
      rule_valid[wr_addr] <= wr_valid;
    end
  end

  // Rule contents need no reset: an entry is ignored until it is valid.
  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < N)) rules[wr_addr] <= wr_rule;
  end

endmodule
