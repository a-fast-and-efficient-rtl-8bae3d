// tb_fema_bit_inverter: self-checking test of the bit-vector and its
// inverters. N = 64. Random set (allocate) and clear (deallocate)
// operations of random start and size, each taking a mask cycle and an
// apply cycle, are mirrored in a reference bit array; the bit-vector must
// not change in the mask cycle and must equal the reference after apply.
// Set operations only touch free chunks, as the allocator guarantees.
module tb_fema_bit_inverter;
  localparam int unsigned N  = 64;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned LW = AW + 1;
  logic clk = 0, rst_n = 0, mask_load = 0, apply = 0, set_bits = 0;
  logic [AW-1:0] sa;
  logic [LW-1:0] size;
  logic [N-1:0]  bitvec, model;
  int checks = 0, failures = 0;

  fema_bit_inverter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, k;
    bit set_op, clash;
    sa = '0; size = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (bitvec !== '0) begin failures++; $display("FAIL reset state %h", bitvec); end
    for (int t = 0; t < 4000; t++) begin
      s = $urandom() % N;
      k = (t % 7 == 0) ? ($urandom() % (2 * N)) : ($urandom() % 9);
      set_op = (($urandom() % 2) != 0);
      clash = 0;
      if (set_op) for (int j = s; j < s + k && j < N; j++) if (model[j]) clash = 1;
      if (clash) continue;
      sa = AW'(s); size = LW'(k); set_bits = set_op; mask_load = 1;
      @(negedge clk);
      mask_load = 0; sa = '0; size = '0; set_bits = ~set_op;
      checks++;
      if (bitvec !== model) begin failures++; $display("FAIL changed in mask cycle"); end
      apply = 1;
      @(negedge clk);
      apply = 0;
      for (int j = s; j < s + k && j < N; j++) model[j] = set_op;
      checks++;
      if (bitvec !== model) begin
        failures++;
        $display("FAIL sa=%0d k=%0d set=%0d got %h exp %h", s, k, set_op, bitvec, model);
        model = bitvec;   // continue from the block's state
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
