// tb_fema_prio_enc: self-checking test of the high-priority encoder.
// Applies zero, every one-hot vector and random vectors of several
// densities at W = 256, and compares idx/any with a top-down search.
module tb_fema_prio_enc;
  localparam int unsigned W = 256;
  logic [W-1:0] in_vec;
  logic [7:0]   idx;
  logic         any;
  int checks = 0, failures = 0;

  fema_prio_enc #(.W(W)) dut (.in_vec(in_vec), .idx(idx), .any(any));

  task automatic check_one();
    int exp_idx = 0;
    bit exp_any = 0;
    for (int i = W - 1; i >= 0; i--) if (in_vec[i]) begin exp_idx = i; exp_any = 1; break; end
    #1;
    checks++;
    if (any !== exp_any || (exp_any && int'(idx) != exp_idx)) begin
      failures++;
      $display("FAIL vec=%h idx=%0d any=%0d exp %0d/%0d", in_vec, idx, any, exp_idx, exp_any);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_vec = '0; check_one();
    for (int i = 0; i < W; i++) begin in_vec = '0; in_vec[i] = 1'b1; check_one(); end
    for (int t = 0; t < 2000; t++) begin
      for (int w = 0; w < W / 32; w++) in_vec[w*32 +: 32] = $urandom();
      // thin the vector out so that high bits are often clear
      if (t % 3 == 0) in_vec = in_vec >> ($urandom() % W);
      if (t % 3 == 1) for (int w = 0; w < W / 32; w++) in_vec[w*32 +: 32] &= $urandom() & $urandom() & $urandom();
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
