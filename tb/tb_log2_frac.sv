// tb_log2_frac: exhaustive test of the 13-bit log2(1+x) approximation.
// For all 8192 codes of x the output must equal the floating-point model bit for bit
// and stay within 1.2e-3 of the true log2(1+x). Reports the maximum and mean
// absolute error (the error analysis of the method). Counts the uses of each of the
// four segments (two direct, two through the complement) and of the saturation at
// the top of the range.
module tb_log2_frac;
  import tb_log2_ref_pkg::*;
  logic        clk = 1'b0;
  logic [12:0] x, y;
  int checks = 0, failures = 0;
  int seg_hits [4];
  int sat_hits = 0;
  real err, max_err = 0.0, sum_err = 0.0;

  log2_frac dut (.x(x), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8192; v++) begin
      int e;
      x = 13'(v);
      @(posedge clk); #1;
      e = ref_frac(v, 13, 7, 3);
      seg_hits[v / 2048]++;
      if (v + ref_d(v, 13) + 8 * ref_lut(v >> 6, 13, 7, 3) > 8191) sat_hits++;
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", v, y, e);
      end
      err = real'(y) / 8192.0 - rlog2(1.0 + real'(v) / 8192.0);
      if (err < 0) err = -err;
      sum_err += err;
      if (err > max_err) max_err = err;
      checks++;
      if (err > 1.2e-3) begin
        failures++;
        $display("FAIL x=%0d error %g", v, err);
      end
    end
    $display("log2(1+x), 13-bit: max abs error %g, mean abs error %g", max_err, sum_err / 8192.0);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seg_hits[s] == 0) begin failures++; $display("FAIL segment %0d unused", s); end
    end
    checks++;
    if (sat_hits == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
