// tb_lode4: exhaustive check of the 4-bit merged LODE against a scan of the input.
module tb_lode4;
  import tb_log2_ref_pkg::*;
  logic       clk = 1'b0;
  logic [3:0] d;
  logic [1:0] a;
  logic       z;
  int checks = 0, failures = 0;

  lode4 dut (.d(d), .a(a), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int p;
      d = 4'(v);
      @(posedge clk); #1;
      p = ref_lead(longint'(v), 4);
      checks++;
      if (z !== (p >= 0) || a !== 2'((p < 0) ? 0 : p)) begin
        failures++;
        $display("FAIL d=%b a=%0d z=%0b expected a=%0d z=%0b", d, a, z, (p < 0) ? 0 : p, p >= 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
