// tb_bv_and: self-checking test of the bit-vector combiner.
//
// Drives five random 8-bit vectors (biased towards ones so that some rules
// survive) and checks each output bit against a per-bit loop that requires
// all five inputs to be set.
module tb_bv_and;
  localparam int unsigned N = 8;
  localparam int unsigned NUM_VEC = 5;

  int checks = 0, failures = 0;

  logic [NUM_VEC-1:0][N-1:0] vecs;
  logic [N-1:0]              v, exp_v;

  bv_and u_dut (.vecs(vecs), .v(v));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < NUM_VEC; i++)
        vecs[i] = N'($urandom() | $urandom() | $urandom());
      #1;
      for (int n = 0; n < N; n++) begin
        bit all;
        all = 1'b1;
        for (int i = 0; i < NUM_VEC; i++) if (!vecs[i][n]) all = 1'b0;
        exp_v[n] = all;
      end
      checks++;
      if (v !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d v=%b expected %b", t, v, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
