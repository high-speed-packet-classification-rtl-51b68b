// tb_range_match: self-checking test of the port range matcher.
//
// Runs a hand-made ruleset against the field value 1000 (binary, i.e. 8) on a
// 4-bit instance, then drives a default-size instance (16-bit ports, 8 rules)
// with random ranges, including single-value, full and empty ranges, and
// fields placed on and around the bounds. The expected vector is computed in
// the testbench with integer comparisons.
module tb_range_match;
  localparam int unsigned W = 16;
  localparam int unsigned N = 8;

  int checks = 0, failures = 0;

  logic [3:0]      ex_field;
  logic [3:0][3:0] ex_lo, ex_hi;
  logic [3:0]      ex_bv;
  range_match #(.W(4), .N(4)) u_ex (.field(ex_field), .lo(ex_lo), .hi(ex_hi), .bv(ex_bv));

  logic [W-1:0]        field;
  logic [N-1:0][W-1:0] lo, hi;
  logic [N-1:0]        bv, exp_bv;
  range_match u_dut (.field(field), .lo(lo), .hi(hi), .bv(bv));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // [2,7] no, [8,8] yes, [5,12] yes, [9,15] no
    ex_lo = {4'd9, 4'd5, 4'd8, 4'd2};
    ex_hi = {4'd15, 4'd12, 4'd8, 4'd7};
    ex_field = 4'b1000;
    #1;
    checks++;
    if (ex_bv !== 4'b0110) begin
      failures++;
      $display("FAIL example: bv=%b expected 0110", ex_bv);
    end

    for (int t = 0; t < 2000; t++) begin
      for (int n = 0; n < N; n++) begin
        int unsigned a, b;
        a = $urandom_range(65535);
        b = $urandom_range(65535);
        case ($urandom_range(4))
          0: begin lo[n] = '0; hi[n] = '1; end                   // any port
          1: begin lo[n] = W'(a); hi[n] = W'(a); end             // one port
          2: begin lo[n] = W'(a > b ? a : b); hi[n] = W'(a > b ? b : a); end  // possibly empty
          default: begin lo[n] = W'(a < b ? a : b); hi[n] = W'(a < b ? b : a); end
        endcase
      end
      begin
        int unsigned pick;
        pick = $urandom_range(N - 1);
        case ($urandom_range(3))
          0: field = lo[pick];
          1: field = hi[pick];
          2: field = lo[pick] + W'($urandom_range(2)) - W'(1);
          default: field = W'($urandom());
        endcase
      end
      #1;
      for (int n = 0; n < N; n++)
        exp_bv[n] = (int'(field) >= int'(lo[n])) && (int'(field) <= int'(hi[n]));
      checks++;
      if (bv !== exp_bv) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d field=%0d bv=%b expected %b", t, field, bv, exp_bv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
