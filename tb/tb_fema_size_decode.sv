// tb_fema_size_decode: self-checking test of the size decoder.
// Every size 0 .. 2N-1 (N = 256) is loaded; S1, the power-of-two flag and
// S2 before and after its shift step are compared with values computed
// arithmetically: S1 = 2^floor(log2 k), r = k - S1, S2 loaded as
// 2^floor(log2 r) and ending as the smallest power of two >= r.
module tb_fema_size_decode;
  localparam int unsigned N  = 256;
  localparam int unsigned LW = $clog2(N) + 1;
  logic clk = 0, rst_n = 0, load = 0, shift_en = 0;
  logic [LW-1:0] size, s1, s2;
  logic pow2;
  int checks = 0, failures = 0;

  fema_size_decode #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp, int k);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL k=%0d %s got %0d expected %0d", k, what, got, exp);
    end
  endtask

  initial begin
    size = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2 * N; k++) begin
      int e1, r, e2lo, e2;
      e1 = 0;
      for (int b = 0; b < 31; b++) if ((1 << b) <= k) e1 = 1 << b;
      r = k - e1;
      e2lo = 0;
      for (int b = 0; b < 31; b++) if ((1 << b) <= r) e2lo = 1 << b;
      e2 = 0;
      if (r > 0) begin e2 = 1; while (e2 < r) e2 = e2 * 2; end
      @(negedge clk);
      size = LW'(k); load = 1;
      @(negedge clk);
      load = 0; size = '0;
      expect_eq("s1", int'(s1), e1, k);
      expect_eq("pow2", int'(pow2), (k == e1) ? 1 : 0, k);
      expect_eq("s2 loaded", int'(s2), e2lo, k);
      shift_en = 1;
      @(negedge clk);
      shift_en = 0;
      expect_eq("s2 shifted", int'(s2), e2, k);
      // a second shift step must not shift again
      shift_en = 1;
      @(negedge clk);
      shift_en = 0;
      expect_eq("s2 held", int'(s2), e2, k);
      expect_eq("s1 held", int'(s1), e1, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
