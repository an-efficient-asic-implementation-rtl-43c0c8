// tb_lode_split: the split LODE at 16 bits (exhaustive) and at 32 and 64 bits
// (every single-bit word, every word with a leading one plus random lower bits,
// and zero), checked against a scan of the input. Counts how often each quarter
// is the one selected, so that every path through the MUX4s is exercised.
module tb_lode_split;
  import tb_log2_ref_pkg::*;
  logic        clk = 1'b0;
  logic [15:0] d16;  logic [3:0] a16;  logic z16;
  logic [31:0] d32;  logic [4:0] a32;  logic z32;
  logic [63:0] d64;  logic [5:0] a64;  logic z64;
  int checks = 0, failures = 0;
  int quarter_hits [3][4];

  lode_split #(.W(16)) dut16 (.d(d16), .a(a16), .z(z16));
  lode_split #(.W(32)) dut32 (.d(d32), .a(a32), .z(z32));
  lode_split #(.W(64)) dut64 (.d(d64), .a(a64), .z(z64));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int wi, input int w, input longint unsigned v,
                       input int a, input bit z);
    int p;
    p = ref_lead(v, w);
    checks++;
    if (z !== (p >= 0) || a != ((p < 0) ? 0 : p)) begin
      failures++;
      $display("FAIL W=%0d d=%h a=%0d z=%0b expected %0d", w, v, a, z, p);
    end
    if (p >= 0) quarter_hits[wi][p / (w / 4)]++;
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      d16 = 16'(v);
      @(posedge clk); #1;
      check(0, 16, longint'(d16), int'(a16), z16);
    end
    for (int p = -1; p < 64; p++) begin
      for (int r = 0; r < 20; r++) begin
        longint unsigned v;
        v = {$urandom, $urandom};
        if (p < 0) v = 0;
        else begin
          if (p < 63) v = v & ((64'd1 << p) - 1);
          if (r == 0) v = 0;
          v = v | (64'd1 << p);
        end
        d64 = v;
        d32 = v[31:0];
        @(posedge clk); #1;
        check(2, 64, v, int'(a64), z64);
        if (p < 32) check(1, 32, longint'(d32), int'(a32), z32);
      end
    end
    for (int wi = 0; wi < 3; wi++)
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (quarter_hits[wi][q] == 0) begin
          failures++;
          $display("FAIL quarter %0d of width index %0d never selected", q, wi);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
