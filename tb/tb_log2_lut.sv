// tb_log2_lut: every entry of the 128 x 5 correction table against the same
// definition evaluated in floating point, and a check that the table uses its signed
// range (negative and positive entries) without exceeding 5 bits.
module tb_log2_lut;
  import tb_log2_ref_pkg::*;
  logic              clk = 1'b0;
  logic [6:0]        addr;
  logic signed [4:0] data;
  int checks = 0, failures = 0;
  int neg = 0, pos = 0;

  log2_lut dut (.addr(addr), .data(data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 128; j++) begin
      int e;
      addr = 7'(j);
      @(posedge clk); #1;
      e = ref_lut(j, 13, 7, 3);
      checks++;
      if (e < -16 || e > 15 || int'(data) != e) begin
        failures++;
        $display("FAIL entry %0d = %0d expected %0d", j, data, e);
      end
      if (data < 0) neg++;
      if (data > 0) pos++;
    end
    checks++;
    if (neg == 0 || pos == 0) begin
      failures++;
      $display("FAIL table has no negative or no positive entries");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
