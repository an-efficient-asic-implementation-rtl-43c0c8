// tb_log2_gen: end-to-end test of the 16-bit logarithm generator at its default
// parameters (W = 16, L = 13), over every input N from 0 to 65535.
// For each N it checks the flag z (1 for nonzero N), the integer part n against a
// scan for the leading one, the fraction F bit for bit against the floating-point
// model of the whole chain (fraction extraction, segments, correction table,
// saturation), and the error of n + F against log2(N), which must stay below
// 1.35e-3. It counts how often each mechanism of the design is used: zero input,
// each quarter of the split LODE selected, each of the four segments (two of them
// through the complement), fraction bits truncated by the shifter, and saturation;
// one that never happens counts as a failure.
module tb_log2_gen;
  import tb_log2_ref_pkg::*;
  logic        clk = 1'b0;
  logic [15:0] n_in;
  logic [3:0]  n;
  logic [12:0] f;
  logic        z;
  int checks = 0, failures = 0;
  int hits_zero = 0, hits_trunc = 0, hits_sat = 0;
  int hits_quarter [4];
  int hits_seg [4];
  real err, max_err = 0.0, sum_err = 0.0;

  log2_gen dut (.n_in(n_in), .n(n), .f(f), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what, input int v);
    failures++;
    if (failures < 20) $display("FAIL N=%0d: %s (n=%0d F=%0d z=%0b)", v, what, n, f, z);
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int p, xr, fe;
      longint unsigned r;
      n_in = 16'(v);
      @(posedge clk); #1;
      p = ref_lead(longint'(v), 16);
      checks++;
      if (z !== (p >= 0)) fail("zero flag", v);
      if (p < 0) begin
        hits_zero++;
        checks++;
        if (n != 0) fail("n for N=0", v);
        continue;
      end
      checks++;
      if (int'(n) != p) fail("integer part", v);
      hits_quarter[p / 4]++;
      r  = longint'(v) - (64'd1 << p);
      xr = int'((r << 13) >> p);
      if (((r << 13) & ((64'd1 << p) - 1)) != 0) hits_trunc++;
      hits_seg[xr / 2048]++;
      if (xr + ref_d(xr, 13) + 8 * ref_lut(xr >> 6, 13, 7, 3) > 8191) hits_sat++;
      fe = ref_frac(xr, 13, 7, 3);
      checks++;
      if (int'(f) != fe) fail($sformatf("fraction, expected %0d", fe), v);
      err = real'(n) + real'(f) / 8192.0 - rlog2(real'(v));
      if (err < 0) err = -err;
      sum_err += err;
      if (err > max_err) max_err = err;
      checks++;
      if (err > 1.35e-3) fail($sformatf("error %g", err), v);
    end
    $display("log2(N), N = 1..65535: max abs error %g, mean abs error %g",
             max_err, sum_err / 65535.0);
    $display("mechanisms: zero %0d, quarters %0d/%0d/%0d/%0d, segments %0d/%0d/%0d/%0d, truncated %0d, saturated %0d",
             hits_zero, hits_quarter[0], hits_quarter[1], hits_quarter[2], hits_quarter[3],
             hits_seg[0], hits_seg[1], hits_seg[2], hits_seg[3], hits_trunc, hits_sat);
    checks++;  if (hits_zero == 0)  begin failures++; $display("FAIL zero input never applied"); end
    checks++;  if (hits_trunc == 0) begin failures++; $display("FAIL truncation never happened"); end
    checks++;  if (hits_sat == 0)   begin failures++; $display("FAIL saturation never happened"); end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (hits_quarter[i] == 0) begin failures++; $display("FAIL LODE quarter %0d never selected", i); end
      checks++;
      if (hits_seg[i] == 0) begin failures++; $display("FAIL segment %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
