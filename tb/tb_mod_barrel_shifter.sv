// tb_mod_barrel_shifter: for every nonzero 16-bit N, the shifter driven with
// 15 - (leading-one position) must return floor((N - 2^n) * 2^13 / 2^n), the first
// 13 bits of the fraction x of N = 2^n (1+x). A second instance with W = 8, L = 13
// checks the zero-padded case (fewer input bits than fraction bits).
module tb_mod_barrel_shifter;
  import tb_log2_ref_pkg::*;
  logic        clk = 1'b0;
  logic [15:0] n16;  logic [3:0] sh16;  logic [12:0] x16;
  logic [7:0]  n8;   logic [2:0] sh8;   logic [12:0] x8;
  int checks = 0, failures = 0;
  int truncated = 0;

  mod_barrel_shifter #(.W(16), .L(13)) dut16 (.n_in(n16), .shamt(sh16), .x(x16));
  mod_barrel_shifter #(.W(8),  .L(13)) dut8  (.n_in(n8),  .shamt(sh8),  .x(x8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 1; v < 65536; v++) begin
      int p, p8;
      longint unsigned r, ex;
      p  = ref_lead(longint'(v), 16);
      n16 = 16'(v);
      sh16 = 4'(15 - p);
      n8  = 8'(v);
      p8  = ref_lead(longint'(v) & 64'd255, 8);
      sh8 = 3'((p8 < 0) ? 7 : 7 - p8);
      @(posedge clk); #1;
      r  = longint'(v) - (64'd1 << p);
      ex = (r << 13) >> p;
      if (((r << 13) & ((64'd1 << p) - 1)) != 0) truncated++;
      checks++;
      if (longint'(x16) != ex) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d x=%0d expected %0d", v, x16, ex);
      end
      if (p8 >= 0) begin
        r  = longint'(v) & 64'd255 - (64'd1 << p8);
        ex = (r << 13) >> p8;
        checks++;
        if (longint'(x8) != ex) begin
          failures++;
          if (failures < 10) $display("FAIL W=8 N=%0d x=%0d expected %0d", v & 255, x8, ex);
        end
      end
    end
    checks++;
    if (truncated == 0) begin
      failures++;
      $display("FAIL no input had fraction bits below the 13 kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
