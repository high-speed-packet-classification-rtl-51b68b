// tb_xnorbv_field: self-checking test of the ternary XNOR/AND field matcher.
//
// Checks the 4-bit worked example (rules 1010, 1*01, 0010, *001 against field
// 1101: only the second rule matches) on a K=4, N=4 instance, then compares a
// default-size instance (K=32, N=8) with a reference model on random rules,
// wildcard masks and fields. The reference uses a different formulation:
// the field matches when (field ^ value) & care is all zero.
module tb_xnorbv_field;
  localparam int unsigned K = 32;
  localparam int unsigned N = 8;

  int checks = 0, failures = 0;

  // worked example, K=4, N=4
  logic [3:0]      ex_field;
  logic [3:0][3:0] ex_val, ex_care;
  logic [3:0]      ex_bv;
  xnorbv_field #(.K(4), .N(4)) u_ex (.field(ex_field), .rule_val(ex_val), .rule_care(ex_care), .bv(ex_bv));

  // full width
  logic [K-1:0]        field;
  logic [N-1:0][K-1:0] val, care;
  logic [N-1:0]        bv, exp_bv;
  xnorbv_field u_dut (.field(field), .rule_val(val), .rule_care(care), .bv(bv));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] rand_mask();
    case ($urandom_range(3))
      0: return '1;                                        // exact
      1: return ~((K'(1) << $urandom_range(K)) - K'(1));   // prefix
      2: return K'($urandom());                            // arbitrary mask
      default: return '0;                                  // full wildcard
    endcase
  endfunction

  initial begin
    // rule index 0 is R1; '*' has care=0
    ex_val[0] = 4'b1010; ex_care[0] = 4'b1111;
    ex_val[1] = 4'b1001; ex_care[1] = 4'b1011;
    ex_val[2] = 4'b0010; ex_care[2] = 4'b1111;
    ex_val[3] = 4'b0001; ex_care[3] = 4'b0111;
    ex_field  = 4'b1101;
    #1;
    checks++;
    if (ex_bv !== 4'b0010) begin
      failures++;
      $display("FAIL worked example: bv=%b expected 0010", ex_bv);
    end

    for (int t = 0; t < 2000; t++) begin
      for (int n = 0; n < N; n++) begin
        val[n]  = K'($urandom());
        care[n] = rand_mask();
      end
      // half the time start from a rule's value so that matches occur
      if ($urandom_range(1) != 0) begin
        int unsigned pick;
        pick = $urandom_range(N - 1);
        field = (val[pick] & care[pick]) | (K'($urandom()) & ~care[pick]);
        if ($urandom_range(3) == 0) field[$urandom_range(K - 1)] ^= 1'b1;
      end else begin
        field = K'($urandom());
      end
      #1;
      for (int n = 0; n < N; n++) exp_bv[n] = (((field ^ val[n]) & care[n]) == '0);
      checks++;
      if (bv !== exp_bv) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d field=%h bv=%b expected %b", t, field, bv, exp_bv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
