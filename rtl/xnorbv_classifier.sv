// xnorbv_classifier: 5-tuple packet classifier built on XnorBV bit vectors.
//
// A 104-bit header (source IP, destination IP, source port, destination port,
// protocol) is checked against a ruleset of N rules and the result is the
// highest-priority matching rule, plus the full multi-match vector.
//
// Pipeline, one header per clock, latency 3 clock edges:
//   stage 1  the header is split into its five fields and each field produces
//            an N-bit vector: xnorbv_field (ternary XNOR/AND match) for the two
//            addresses and the protocol, range_match (lo <= port <= hi) for the
//            two ports. The five vectors are registered.
//   stage 2  bv_and ANDs the five vectors, bit by bit, into the final vector;
//            it is masked with the rule valid flags and registered.
//   stage 3  priority_encoder turns the final vector into the index of the
//            highest-priority set bit (bit 0 is the highest); registered.
// A header presented with in_valid before rising edge t appears on the
// outputs with out_valid after edge t+2, i.e. three edges including t.
//
// The three-stage split, the field matchers, the AND and the priority encoder
// follow the design. The rule write port and valid flags (rule_table), the
// in_valid/out_valid qualifiers and the reset are this implementation's own.
// A rule write takes effect for headers entering stage 1 on the cycle after
// the write; headers already in the pipeline are not affected.
module xnorbv_classifier
  import xnorbv_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // rule update port
  input  logic           wr_en,
  input  logic [IW-1:0]  wr_addr,
  input  logic           wr_valid,
  input  rule_t          wr_rule,
  // packet headers in
  input  logic           in_valid,
  input  header_t        in_hdr,
  // classification result out
  output logic           out_valid,
  output logic           out_hit,
  output logic [IW-1:0]  out_rule,
  output logic [N-1:0]   out_match_vec
);

  // The header struct must be the 104-bit 5-tuple.
  if ($bits(header_t) != HDR_W) begin : g_hdr_width_check
    $error("header_t is not %0d bits wide", HDR_W);
  end

  rule_t [N-1:0] rules;
  logic  [N-1:0] rule_valid;

  rule_table #(.N(N), .AW(IW)) u_rules (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_valid, .wr_rule,
    .rules, .rule_valid
  );

  // ---- stage 1: per-field bit vectors -----------------------------------
  logic [N-1:0][IP_W-1:0]    sip_val, sip_care, dip_val, dip_care;
  logic [N-1:0][PORT_W-1:0]  sp_lo, sp_hi, dp_lo, dp_hi;
  logic [N-1:0][PROTO_W-1:0] pr_val, pr_care;

  always_comb begin
    for (int n = 0; n < N; n++) begin
      sip_val[n]  = rules[n].sip_val;
      sip_care[n] = rules[n].sip_care;
      dip_val[n]  = rules[n].dip_val;
      dip_care[n] = rules[n].dip_care;
      sp_lo[n]    = rules[n].sport_lo;
      sp_hi[n]    = rules[n].sport_hi;
      dp_lo[n]    = rules[n].dport_lo;
      dp_hi[n]    = rules[n].dport_hi;
      pr_val[n]   = rules[n].proto_val;
      pr_care[n]  = rules[n].proto_care;
    end
  end

  logic [NUM_FIELDS-1:0][N-1:0] bv_d, bv_q;

  xnorbv_field #(.K(IP_W), .N(N)) u_sip (
    .field(in_hdr.sip), .rule_val(sip_val), .rule_care(sip_care), .bv(bv_d[F_SIP]));
  xnorbv_field #(.K(IP_W), .N(N)) u_dip (
    .field(in_hdr.dip), .rule_val(dip_val), .rule_care(dip_care), .bv(bv_d[F_DIP]));
  range_match #(.W(PORT_W), .N(N)) u_sport (
    .field(in_hdr.sport), .lo(sp_lo), .hi(sp_hi), .bv(bv_d[F_SPORT]));
  range_match #(.W(PORT_W), .N(N)) u_dport (
    .field(in_hdr.dport), .lo(dp_lo), .hi(dp_hi), .bv(bv_d[F_DPORT]));
  xnorbv_field #(.K(PROTO_W), .N(N)) u_proto (
    .field(in_hdr.proto), .rule_val(pr_val), .rule_care(pr_care), .bv(bv_d[F_PROTO]));

  logic         v1_q;
  logic [N-1:0] rvalid1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      bv_q      <= '0;
      rvalid1_q <= '0;
    end else begin
      v1_q      <= in_valid;
      bv_q      <= bv_d;
      rvalid1_q <= rule_valid;
    end
  end

  // ---- stage 2: combine the field vectors --------------------------------
  logic [N-1:0] v_and;
  logic         v2_q;
  logic [N-1:0] final_q;

  bv_and #(.N(N), .NUM_VEC(NUM_FIELDS)) u_and (.vecs(bv_q), .v(v_and));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2_q    <= 1'b0;
      final_q <= '0;
    end else begin
      v2_q    <= v1_q;
      final_q <= v_and & rvalid1_q;
    end
  end

  // ---- stage 3: priority encoding -----------------------------------------
  logic [IW-1:0] pe_idx;
  logic          pe_hit;

  priority_encoder #(.N(N), .IW(IW)) u_pe (.v(final_q), .idx(pe_idx), .hit(pe_hit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_hit       <= 1'b0;
      out_rule      <= '0;
      out_match_vec <= '0;
    end else begin
      out_valid     <= v2_q;
      out_hit       <= pe_hit;
      out_rule      <= pe_idx;
      out_match_vec <= final_q;
    end
  end

  // Output invariants (out_valid is 0 during reset): a hit names a rule that is in the match vector, no
  // higher-priority rule is in it, and a miss comes with an empty vector.
  a_hit_in_vec: assert property (@(posedge clk)
    out_valid && out_hit |-> out_match_vec[out_rule]);
  a_hit_is_best: assert property (@(posedge clk)
    out_valid && out_hit |-> (out_match_vec & ((N'(1) << out_rule) - N'(1))) == '0);
  a_miss_empty: assert property (@(posedge clk)
    out_valid |-> out_hit == (|out_match_vec));

endmodule
