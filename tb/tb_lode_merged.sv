// tb_lode_merged: exhaustive check of the direct merged LODE at 8 bits (the primitive
// of the 32-bit split LODE) and at 4 bits.
module tb_lode_merged;
  import tb_log2_ref_pkg::*;
  logic       clk = 1'b0;
  logic [7:0] d8;
  logic [2:0] a8;
  logic       z8;
  logic [3:0] d4;
  logic [1:0] a4;
  logic       z4;
  int checks = 0, failures = 0;

  lode_merged #(.W(8)) dut8 (.d(d8), .a(a8), .z(z8));
  lode_merged #(.W(4)) dut4 (.d(d4), .a(a4), .z(z4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int p8, p4;
      d8 = 8'(v);
      d4 = 4'(v);
      @(posedge clk); #1;
      p8 = ref_lead(longint'(v), 8);
      p4 = ref_lead(longint'(v) & 64'd15, 4);
      checks++;
      if (z8 !== (p8 >= 0) || a8 !== 3'((p8 < 0) ? 0 : p8)) begin
        failures++;
        $display("FAIL W=8 d=%b a=%0d z=%0b", d8, a8, z8);
      end
      checks++;
      if (z4 !== (p4 >= 0) || a4 !== 2'((p4 < 0) ? 0 : p4)) begin
        failures++;
        $display("FAIL W=4 d=%b a=%0d z=%0b", d4, a4, z4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
