// tb_fema_high_addr: self-checking test of the highest address detection.
// N = 256. Random V-vectors (including empty ones) are loaded; sa must be
// the highest set index and found must be set when any bit is. With load
// low the outputs must hold.
module tb_fema_high_addr;
  localparam int unsigned N = 256;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N-1:0] v;
  logic [7:0]   sa;
  logic         found;
  int checks = 0, failures = 0;

  fema_high_addr #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sa;
    bit exp_found;
    v = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int w = 0; w < N / 32; w++) v[w*32 +: 32] = $urandom() & $urandom() & $urandom();
      v = v >> ($urandom() % N);
      if (t % 10 == 0) v = '0;
      exp_found = 0; exp_sa = 0;
      for (int j = N - 1; j >= 0; j--) if (v[j]) begin exp_sa = j; exp_found = 1; break; end
      load = 1;
      @(negedge clk);
      load = 0;
      v = ~v;   // must not be taken while load is low
      @(negedge clk);
      checks++;
      if (found !== exp_found || (exp_found && int'(sa) != exp_sa)) begin
        failures++;
        $display("FAIL sa=%0d found=%0d expected %0d/%0d", sa, found, exp_sa, exp_found);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
