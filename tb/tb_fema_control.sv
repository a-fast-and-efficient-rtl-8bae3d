// tb_fema_control: self-checking test of the sequencer.
// Random allocation (power-of-two or not, found or not) and deallocation
// requests, with idle gaps. For each, the test counts the clocks from the
// accepting cycle to the response strobe (5, 6 or 2), and checks the enable
// pattern cycle by cycle: size load only on an accepted allocation, V loads
// with step3 only in the Step 3 cycle, one address load, one mask load, an
// apply exactly when a block was found or on deallocation.
module tb_fema_control;
  import fema_pkg::*;
  logic  clk = 0, rst_n = 0, req_valid = 0, pow2 = 0, found = 0;
  op_e   req_op;
  logic  req_ready;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  fema_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    req_op = OP_ALLOC;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      bit alloc, p2, fnd;
      int lat, n_size, n_v, n_v3, n_addr, n_mask, n_apply, n_set, n_shift;
      alloc = ($urandom() % 3) != 0;
      p2    = (($urandom() % 2) != 0);
      fnd   = (($urandom() % 2) != 0);
      repeat ($urandom() % 3) @(negedge clk);
      expect_eq("ready when idle", int'(req_ready), 1);
      req_valid = 1; req_op = alloc ? OP_ALLOC : OP_DEALLOC;
      lat = 0; n_size = 0; n_v = 0; n_v3 = 0; n_addr = 0; n_mask = 0; n_apply = 0; n_set = 0; n_shift = 0;
      forever begin
        #1;
        pow2  = (lat >= 1) ? p2 : ~p2;     // the comparator flag is valid after the decode cycle
        found = (lat >= 3) ? fnd : ~fnd;   // the found flag is valid after Step 4
        #1;
        lat++;
        n_size  += ctrl.size_load;
        n_v     += ctrl.v_load;
        n_v3    += (ctrl.v_load && ctrl.step3);
        n_addr  += ctrl.addr_load;
        n_mask  += ctrl.mask_load;
        n_apply += ctrl.apply;
        n_set   += (ctrl.mask_load && ctrl.set_bits);
        n_shift += ctrl.s2_shift;
        if (lat > 1 && req_ready) begin failures++; $display("FAIL ready while busy"); end
        if (ctrl.resp_valid) break;
        if (lat > 20) break;
        @(negedge clk);
        req_valid = 0;
      end
      expect_eq("resp_alloc", int'(ctrl.resp_alloc), int'(alloc));
      expect_eq("latency", lat, !alloc ? 2 : (p2 ? 5 : 6));
      expect_eq("size loads", n_size, int'(alloc));
      expect_eq("V loads", n_v, !alloc ? 0 : (p2 ? 1 : 2));
      expect_eq("Step 3 loads", n_v3, (alloc && !p2) ? 1 : 0);
      expect_eq("S2 shift steps", n_shift, alloc ? 1 : 0);
      expect_eq("address loads", n_addr, int'(alloc));
      expect_eq("mask loads", n_mask, 1);
      expect_eq("set masks", n_set, int'(alloc));
      expect_eq("applies", n_apply, (!alloc || fnd) ? 1 : 0);
      @(negedge clk);
      req_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
