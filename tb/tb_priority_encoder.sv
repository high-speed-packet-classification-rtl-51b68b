// tb_priority_encoder: self-checking test of the priority encoder.
//
// Exhaustive over all 256 vectors of the default 8-rule instance. The
// expected index is the position of the lowest set bit (bit 0 is the
// highest-priority rule), found by counting trailing zeros; an all-zero
// vector must give hit=0.
module tb_priority_encoder;
  localparam int unsigned N = 8;

  int checks = 0, failures = 0;

  logic [N-1:0] v;
  logic [2:0]   idx;
  logic         hit;

  priority_encoder u_dut (.v(v), .idx(idx), .hit(hit));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << N); x++) begin
      int tz;
      v = N'(x);
      #1;
      tz = 0;
      while (tz < N && !v[tz]) tz++;
      checks++;
      if (x == 0) begin
        if (hit !== 1'b0) begin
          failures++;
          $display("FAIL v=0 gave hit");
        end
      end else if (hit !== 1'b1 || int'(idx) != tz) begin
        failures++;
        if (failures < 10) $display("FAIL v=%b idx=%0d hit=%b expected %0d", v, idx, hit, tz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
