// tb_fema_search: self-checking test of the search of free blocks.
// N = 64. For random bit-vectors and every pair of levels (p, q <= p),
// Step 2 (S1 = 2^p) must register v[j] = 1 where 2^p free chunks start at
// j, and Step 3 (S2 = 2^q, input V1) must register v[j] = 1 where 2^p + 2^q
// free chunks start at j. The reference counts free chunks directly.
module tb_fema_search;
  localparam int unsigned N  = 64;
  localparam int unsigned LW = $clog2(N) + 1;
  logic clk = 0, rst_n = 0, step3 = 0, v_load = 0;
  logic [N-1:0]  bitvec, v;
  logic [LW-1:0] s1, s2;
  int checks = 0, failures = 0;

  fema_search #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] free_starts(logic [N-1:0] bv, int len);
    logic [N-1:0] res = '0;
    for (int j = 0; j < N; j++) begin
      if (j + len <= N) begin
        res[j] = 1'b1;
        for (int b = j; b < j + len; b++) if (bv[b]) res[j] = 1'b0;
      end
    end
    return res;
  endfunction

  initial begin
    bitvec = '0; s1 = '0; s2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      bitvec = {$urandom(), $urandom()};
      if (t % 3 == 0) bitvec &= {$urandom(), $urandom()};
      if (t % 3 == 1) bitvec &= {$urandom(), $urandom()} & {$urandom(), $urandom()};
      if (t == 0) bitvec = '0;
      for (int p = 0; p < LW; p++) begin
        for (int q = 0; q <= p; q++) begin
          s1 = LW'(1) << p;
          s2 = LW'(1) << q;
          step3 = 0; v_load = 1;
          @(negedge clk);
          checks++;
          if (v !== free_starts(bitvec, 1 << p)) begin
            failures++;
            $display("FAIL step2 p=%0d bv=%h v=%h", p, bitvec, v);
          end
          step3 = 1;
          @(negedge clk);
          v_load = 0; step3 = 0;
          checks++;
          if (v !== free_starts(bitvec, (1 << p) + (1 << q))) begin
            failures++;
            $display("FAIL step3 p=%0d q=%0d bv=%h v=%h", p, q, bitvec, v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
