// tb_xnorbv_classifier: end-to-end test of the 5-tuple classifier.
//
// Runs the classifier at its default size (8 rules, 104-bit headers). The
// testbench keeps its own copy of the ruleset and works out, for every header,
// the match vector and the winning rule with plain integer and mask
// arithmetic. It then checks the classifier's outputs and that each result
// arrives exactly three clock edges after its header was presented.
//
// Phases:
//   1. reset, then an empty table: every header must miss;
//   2. a directed ruleset (prefix, arbitrary-mask, exact-protocol, port range
//      and catch-all rules) and headers aimed at each rule;
//   3. a long random stream, one header per clock, with rule writes and
//      deletions mixed into the traffic.
// It counts how often each mechanism occurs (prefix match, wildcard bits,
// range match and range miss, exact protocol match, multi-match resolved by
// priority, no match, rule update in flight, back-to-back headers) and fails
// if any of them never occurred.
module tb_xnorbv_classifier;
  import xnorbv_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned LATENCY = 3;

  int checks = 0, failures = 0;
  longint cycle = 0;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr_en = 1'b0, wr_valid = 1'b0;
  logic [2:0]    wr_addr = '0;
  rule_t         wr_rule = '0;
  logic          in_valid = 1'b0;
  header_t       in_hdr = '0;
  logic          out_valid, out_hit;
  logic [2:0]    out_rule;
  logic [N-1:0]  out_match_vec;

  xnorbv_classifier u_dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_valid, .wr_rule,
    .in_valid, .in_hdr, .out_valid, .out_hit, .out_rule, .out_match_vec
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model -------------------------------------
  rule_t        m_rules [N];
  logic [N-1:0] m_valid = '0;

  typedef struct {
    longint       at;
    logic         hit;
    int           idx;
    logic [N-1:0] vec;
  } exp_t;
  exp_t q[$];

  // mechanism counters
  int n_prefix, n_wild, n_range_hit, n_range_miss, n_proto, n_multi, n_nomatch;
  int n_update_inflight, n_b2b, n_results;
  logic last_in_valid = 1'b0;

  function automatic logic tern(logic [31:0] f, logic [31:0] v, logic [31:0] c);
    return ((f ^ v) & c) == 0;
  endfunction

  function automatic logic rule_hits(rule_t r, header_t h);
    return tern(h.sip, r.sip_val, r.sip_care) &&
           tern(h.dip, r.dip_val, r.dip_care) &&
           int'(h.sport) >= int'(r.sport_lo) && int'(h.sport) <= int'(r.sport_hi) &&
           int'(h.dport) >= int'(r.dport_lo) && int'(h.dport) <= int'(r.dport_hi) &&
           tern(32'(h.proto), 32'(r.proto_val), 32'(r.proto_care));
  endfunction

  function automatic logic is_prefix(logic [31:0] c);
    return (c != 0) && (c != '1) && ((~c & (~c + 1)) == 0);
  endfunction

  function automatic exp_t model(header_t h);
    exp_t e;
    e.at = cycle;
    e.vec = '0;
    e.hit = 1'b0;
    e.idx = 0;
    for (int n = 0; n < N; n++) e.vec[n] = m_valid[n] && rule_hits(m_rules[n], h);
    for (int n = N - 1; n >= 0; n--) if (e.vec[n]) begin e.hit = 1'b1; e.idx = n; end
    // coverage of the mechanisms, on the winning rule
    if (e.hit) begin
      rule_t r = m_rules[e.idx];
      if (is_prefix(r.sip_care) || is_prefix(r.dip_care)) n_prefix++;
      if (r.sip_care != '1 || r.dip_care != '1 || r.proto_care != '1) n_wild++;
      if (r.sport_lo != r.sport_hi || r.dport_lo != r.dport_hi) n_range_hit++;
      if (r.proto_care == '1) n_proto++;
    end else begin
      n_nomatch++;
    end
    if ($countones(e.vec) > 1) n_multi++;
    for (int n = 0; n < N; n++)
      if (m_valid[n] && int'(h.sport) > int'(m_rules[n].sport_hi) &&
          m_rules[n].sport_lo != m_rules[n].sport_hi) n_range_miss++;
    return e;
  endfunction

  // ---------------- stimulus helpers ------------------------------------
  function automatic rule_t mk_rule(logic [31:0] sv, int sl, logic [31:0] dv, int dl,
                                    int splo, int sphi, int dplo, int dphi,
                                    int proto, logic proto_any);
    rule_t r;
    r.sip_val    = sv;
    r.sip_care   = (sl == 0) ? 32'h0 : ~((32'h1 << (32 - sl)) - 1);
    r.dip_val    = dv;
    r.dip_care   = (dl == 0) ? 32'h0 : ~((32'h1 << (32 - dl)) - 1);
    r.sport_lo   = 16'(splo);
    r.sport_hi   = 16'(sphi);
    r.dport_lo   = 16'(dplo);
    r.dport_hi   = 16'(dphi);
    r.proto_val  = 8'(proto);
    r.proto_care = proto_any ? 8'h00 : 8'hff;
    return r;
  endfunction

  function automatic rule_t rand_rule();
    rule_t r;
    int a, b;
    r.sip_val = $urandom();
    case ($urandom_range(3))
      0: r.sip_care = '1;
      1: r.sip_care = ~((32'h1 << $urandom_range(31)) - 1);
      2: r.sip_care = $urandom();
      default: r.sip_care = '0;
    endcase
    r.dip_val = $urandom();
    case ($urandom_range(3))
      0: r.dip_care = '1;
      1: r.dip_care = ~((32'h1 << $urandom_range(31)) - 1);
      2: r.dip_care = $urandom();
      default: r.dip_care = '0;
    endcase
    a = $urandom_range(65535); b = $urandom_range(65535);
    r.sport_lo = 16'(a < b ? a : b); r.sport_hi = 16'(a < b ? b : a);
    if ($urandom_range(2) == 0) begin r.sport_lo = 0; r.sport_hi = 16'hffff; end
    a = $urandom_range(65535); b = $urandom_range(65535);
    r.dport_lo = 16'(a < b ? a : b); r.dport_hi = 16'(a < b ? b : a);
    if ($urandom_range(3) == 0) r.dport_hi = r.dport_lo;
    r.proto_val  = 8'($urandom_range(255));
    r.proto_care = ($urandom_range(1) != 0) ? 8'hff : 8'h00;
    return r;
  endfunction

  // A header that falls inside rule r, with an occasional field pushed out.
  function automatic header_t aim_at(rule_t r);
    header_t h;
    int flip;
    h.sip   = (r.sip_val & r.sip_care) | ($urandom() & ~r.sip_care);
    h.dip   = (r.dip_val & r.dip_care) | ($urandom() & ~r.dip_care);
    h.sport = 16'($urandom_range(int'(r.sport_lo), int'(r.sport_hi)));
    h.dport = 16'($urandom_range(int'(r.dport_lo), int'(r.dport_hi)));
    h.proto = (r.proto_val & r.proto_care) | (8'($urandom()) & ~r.proto_care);
    flip = $urandom_range(31);
    case ($urandom_range(7))
      0: h.sip[flip] ^= 1'b1;
      1: h.sport = 16'(int'(r.sport_hi) + 1);
      2: h.proto ^= 8'h01;
      default: ;
    endcase
    return h;
  endfunction

  // One clock: present header (if send) and a rule write (if we), from a
  // negative edge. The header sees the rules as they were before the write.
  task automatic step(logic send, header_t h, logic we, int addr, logic vld, rule_t r);
    in_valid = send;
    in_hdr   = h;
    if (send) begin
      q.push_back(model(h));
      if (last_in_valid) n_b2b++;
    end
    last_in_valid = send;
    wr_en    = we;
    wr_addr  = 3'(addr);
    wr_valid = vld;
    wr_rule  = r;
    if (we && send) n_update_inflight++;
    @(posedge clk);
    if (we) begin
      m_valid[addr] = vld;
      m_rules[addr] = r;
    end
    @(negedge clk);
  endtask

  // result checker, sampled at each negative edge
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      n_results++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (cycle - e.at != longint'(LATENCY)) begin
          failures++;
          $display("FAIL latency %0d cycles, expected %0d", cycle - e.at, LATENCY);
        end
        if (out_match_vec !== e.vec || out_hit !== e.hit || (e.hit && int'(out_rule) != e.idx)) begin
          failures++;
          if (failures < 20)
            $display("FAIL cycle %0d: vec=%b hit=%b rule=%0d expected vec=%b hit=%b rule=%0d",
                     cycle, out_match_vec, out_hit, out_rule, e.vec, e.hit, e.idx);
        end
      end
    end
  end

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    header_t h;
    rule_t   r0;
    r0 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. empty table
    for (int i = 0; i < 10; i++) begin
      h = header_t'({$urandom(), $urandom(), $urandom(), 8'($urandom())});
      step(1'b1, h, 1'b0, 0, 1'b0, r0);
    end

    // 2. directed ruleset, highest priority first
    step(1'b0, h, 1'b1, 0, 1'b1,  // 10.0.0.0/8 -> any, web server ports, TCP
         mk_rule(32'h0a000000, 8, 32'h0, 0, 0, 65535, 80, 80, 6, 0));
    step(1'b0, h, 1'b1, 1, 1'b1,  // any -> 192.168.1.0/24, high ports -> low ports, UDP
         mk_rule(32'h0, 0, 32'hc0a80100, 24, 1024, 65535, 0, 1023, 17, 0));
    begin
      rule_t r;  // arbitrary mask: odd source addresses in 172.16/16, any proto
      r = mk_rule(32'hac100001, 16, 32'h0, 0, 0, 65535, 0, 65535, 0, 1);
      r.sip_care = 32'hffff0001;
      step(1'b0, h, 1'b1, 2, 1'b1, r);
    end
    step(1'b0, h, 1'b1, 3, 1'b1,  // exact host pair, ICMP
         mk_rule(32'h01020304, 32, 32'h05060708, 32, 0, 65535, 0, 65535, 1, 0));
    step(1'b0, h, 1'b1, 7, 1'b1,  // catch-all
         mk_rule(32'h0, 0, 32'h0, 0, 0, 65535, 0, 65535, 0, 1));
    for (int i = 0; i < 200; i++) begin
      int pick, a;
      pick = $urandom_range(4);
      a = (pick == 4) ? 7 : pick;
      h = aim_at(m_rules[a]);
      step(1'b1, h, 1'b0, 0, 1'b0, r0);
    end
    // remove the catch-all so that misses occur again
    step(1'b1, h, 1'b1, 7, 1'b0, r0);

    // 3. random stream with rule updates in flight
    for (int i = 0; i < 20000; i++) begin
      logic send, we;
      int   a, tgt;
      send = ($urandom_range(7) != 0);
      we   = ($urandom_range(15) == 0);
      a    = $urandom_range(N - 1);
      tgt  = $urandom_range(N - 1);
      if (m_valid[tgt] && $urandom_range(3) != 0) h = aim_at(m_rules[tgt]);
      else h = header_t'({$urandom(), $urandom(), $urandom(), 8'($urandom())});
      step(send, h, we, a, ($urandom_range(5) != 0), rand_rule());
    end
    step(1'b0, h, 1'b0, 0, 1'b0, r0);
    repeat (LATENCY + 2) @(negedge clk);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never arrived", q.size());
    end

    $display("mechanisms: prefix=%0d wildcard=%0d range_hit=%0d range_miss=%0d exact_proto=%0d",
             n_prefix, n_wild, n_range_hit, n_range_miss, n_proto);
    $display("            multi_match=%0d no_match=%0d update_in_flight=%0d back_to_back=%0d results=%0d",
             n_multi, n_nomatch, n_update_inflight, n_b2b, n_results);
    require("prefix match", n_prefix);
    require("wildcard bits", n_wild);
    require("range match", n_range_hit);
    require("range miss", n_range_miss);
    require("exact protocol match", n_proto);
    require("multi-match priority", n_multi);
    require("no match", n_nomatch);
    require("rule update in flight", n_update_inflight);
    require("back-to-back headers", n_b2b);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
