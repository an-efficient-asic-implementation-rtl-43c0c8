// tb_lode_inv: the INV block must give W-1-n, the left shift that puts the leading
// one on the top bit, for every n at W = 16 and W = 64.
module tb_lode_inv;
  logic       clk = 1'b0;
  logic [3:0] n16, s16;
  logic [5:0] n64, s64;
  int checks = 0, failures = 0;

  lode_inv #(.W(16)) dut16 (.n(n16), .shamt(s16));
  lode_inv #(.W(64)) dut64 (.n(n64), .shamt(s64));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      n16 = 4'(v);
      n64 = 6'(v);
      @(posedge clk); #1;
      checks += 2;
      if (int'(s16) != 15 - (v % 16)) begin
        failures++;
        $display("FAIL W=16 n=%0d shamt=%0d", n16, s16);
      end
      if (int'(s64) != 63 - v) begin
        failures++;
        $display("FAIL W=64 n=%0d shamt=%0d", n64, s64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
