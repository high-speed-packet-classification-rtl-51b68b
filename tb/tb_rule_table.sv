// tb_rule_table: self-checking test of the rule store.
//
// Checks that reset leaves every entry invalid, that a write shows up on the
// rule outputs from the next cycle with its valid flag, that a write touches
// only its own entry, and that writing with wr_valid=0 deletes a rule. The
// testbench keeps its own copy of the table and compares all entries after
// every cycle of random writes.
module tb_rule_table;
  import xnorbv_pkg::*;
  localparam int unsigned N = 8;

  int checks = 0, failures = 0;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr_en = 1'b0, wr_valid = 1'b0;
  logic [2:0]    wr_addr = '0;
  rule_t         wr_rule = '0;
  rule_t [N-1:0] rules;
  logic  [N-1:0] rule_valid;

  rule_t         m_rules [N];
  logic  [N-1:0] m_valid;

  rule_table u_dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_valid, .wr_rule, .rules, .rule_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rule_t rand_rule();
    rule_t r;
    logic [255:0] bits;
    for (int i = 0; i < 256; i += 32) bits[i +: 32] = $urandom();
    r = rule_t'(bits[$bits(rule_t)-1:0]);
    return r;
  endfunction

  task automatic compare(string what);
    checks++;
    if (rule_valid !== m_valid) begin
      failures++;
      $display("FAIL %s: valid=%b expected %b", what, rule_valid, m_valid);
    end
    for (int n = 0; n < N; n++) begin
      if (m_valid[n]) begin
        checks++;
        if (rules[n] !== m_rules[n]) begin
          failures++;
          $display("FAIL %s: entry %0d differs", what, n);
        end
      end
    end
  endtask

  initial begin
    m_valid = '0;
    repeat (2) @(negedge clk);
    compare("in reset");
    rst_n = 1'b1;
    @(negedge clk);
    compare("after reset");

    for (int t = 0; t < 1000; t++) begin
      wr_en    = ($urandom_range(3) != 0);
      wr_addr  = 3'($urandom_range(N - 1));
      wr_valid = ($urandom_range(4) != 0);
      wr_rule  = rand_rule();
      @(posedge clk);
      if (wr_en) begin
        m_valid[wr_addr] = wr_valid;
        m_rules[wr_addr] = wr_rule;
      end
      @(negedge clk);
      compare("random write");
    end

    // reset again clears every valid flag
    rst_n = 1'b0;
    wr_en = 1'b0;
    @(negedge clk);
    m_valid = '0;
    compare("second reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
