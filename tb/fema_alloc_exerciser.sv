// fema_alloc_exerciser: stimulus and reference model for the allocator.
//
// Drives the clock, reset and requests of an allocator of N chunks and
// checks every response against a bit-array model of the chunk states.
// For an allocation of k = 2^p + r chunks the model searches a block of
// k chunks if r = 0, and of 2^p + 2^ceil(log2 r) chunks otherwise, and
// expects the highest starting address at which that many chunks are free;
// none means resp_ok = 0. Deallocations free a randomly chosen live block.
// After every request the bit-vector must equal the model, and the number
// of clocks from the accepting cycle to the response must be 5 (power-of-two
// size), 6 (other sizes) or 2 (deallocation).
//
// It first runs a directed request of 38 chunks into an empty memory, then
// NOPS random requests, and counts how often each mechanism occurred: Step 2
// only, Step 3 with and without the S2 shift, a failed allocation, a full
// memory, a deallocation. A mechanism that never occurred is a failure.
// Ends with the TB_RESULT line and $finish; a watchdog ends a hung run.
module fema_alloc_exerciser
  import fema_pkg::*;
#(
  parameter int unsigned N    = 256,
  parameter int unsigned NOPS = 3000,
  localparam int unsigned AW  = $clog2(N),
  localparam int unsigned LW  = $clog2(N) + 1
) (
  output logic          clk,
  output logic          rst_n,
  output logic          req_valid,
  input  logic          req_ready,
  output op_e           req_op,
  output logic [LW-1:0] req_size,
  output logic [AW-1:0] req_addr,
  input  logic          resp_valid,
  input  logic          resp_ok,
  input  logic [AW-1:0] resp_addr,
  input  logic [N-1:0]  bitvec
);

  int checks = 0, failures = 0;
  logic [N-1:0] model;
  int live_addr[$], live_size[$];
  int n_pow2 = 0, n_step3_shift = 0, n_step3_noshift = 0, n_fail = 0;
  int n_full = 0, n_dealloc = 0, n_example = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20 * NOPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // searched size for a request of k chunks (0 for an impossible request)
  function automatic int searched_size(int k);
    int s1, r, s2;
    if (k <= 0) return 0;
    s1 = 1;
    while (s1 * 2 <= k) s1 = s1 * 2;
    r = k - s1;
    if (r == 0) return k;
    s2 = 1;
    while (s2 < r) s2 = s2 * 2;
    return s1 + s2;
  endfunction

  function automatic int expected_start(int len);
    if (len <= 0 || len > int'(N)) return -1;
    for (int j = int'(N) - len; j >= 0; j--) begin
      bit ok = 1;
      for (int b = j; b < j + len; b++) if (model[b]) begin ok = 0; break; end
      if (ok) return j;
    end
    return -1;
  endfunction

  // issue one request and wait for its response; returns latency in clocks
  task automatic issue(op_e op, int size, int addr, output bit ok, output int raddr, output int lat);
    @(negedge clk);
    req_valid = 1'b1; req_op = op; req_size = LW'(size); req_addr = AW'(addr);
    while (!req_ready) @(negedge clk);
    lat = 1;
    @(negedge clk);
    req_valid = 1'b0; req_size = '0; req_addr = '0;
    lat++;
    while (!resp_valid && lat < 20) begin @(negedge clk); lat++; end
    ok = resp_ok;
    raddr = int'(resp_addr);
    @(negedge clk);   // bit-vector written at the end of the response cycle
  endtask

  task automatic do_alloc(int k);
    bit ok; int raddr, lat, len, exp;
    bit is_pow2;
    len = searched_size(k);
    exp = expected_start(len);
    is_pow2 = (k > 0) && ((k & (k - 1)) == 0);
    issue(OP_ALLOC, k, 0, ok, raddr, lat);
    // a size of 0 compares equal to its (empty) decoded size and takes the short path
    expect_eq($sformatf("alloc k=%0d latency", k), lat, (is_pow2 || k == 0) ? 5 : 6);
    expect_eq($sformatf("alloc k=%0d ok", k), int'(ok), (exp >= 0) ? 1 : 0);
    if (exp >= 0) begin
      expect_eq($sformatf("alloc k=%0d address", k), raddr, exp);
      for (int b = exp; b < exp + k; b++) model[b] = 1'b1;
      live_addr.push_back(exp); live_size.push_back(k);
      if (is_pow2) n_pow2++;
      else begin
        // Step 3 ran; S2 took its shift step when r was not a power of two
        int s1, r;
        s1 = 1; while (s1 * 2 <= k) s1 = s1 * 2;
        r = k - s1;
        if ((r & (r - 1)) != 0) n_step3_shift++; else n_step3_noshift++;
      end
    end else begin
      n_fail++;
    end
    checks++;
    if (bitvec !== model) begin
      failures++;
      $display("FAIL bit-vector after alloc k=%0d: %h expected %h", k, bitvec, model);
      model = bitvec;   // continue from the design's state
    end
    if (model == '1) n_full++;
  endtask

  task automatic do_dealloc();
    bit ok; int raddr, lat, i, a, k;
    i = $urandom() % live_addr.size();
    a = live_addr[i]; k = live_size[i];
    live_addr.delete(i); live_size.delete(i);
    issue(OP_DEALLOC, k, a, ok, raddr, lat);
    expect_eq("dealloc latency", lat, 2);
    expect_eq("dealloc ok", int'(ok), 1);
    expect_eq("dealloc address", raddr, a);
    for (int b = a; b < a + k; b++) model[b] = 1'b0;
    n_dealloc++;
    checks++;
    if (bitvec !== model) begin
      failures++;
      $display("FAIL bit-vector after dealloc %0d+%0d: %h expected %h", a, k, bitvec, model);
      model = bitvec;
    end
  endtask

  function automatic int pick_size();
    case ($urandom() % 10)
      0:       return $urandom() % (int'(N) + 4);          // anything, including 0 and > N
      1, 2:    return 1 << ($urandom() % (AW + 1));          // powers of two
      3:       return int'(N) / 8 + $urandom() % (int'(N) / 4);
      default: return 1 + $urandom() % 24;
    endcase
  endfunction

  initial begin
    model = '0;
    rst_n = 1'b0; req_valid = 1'b0; req_op = OP_ALLOC; req_size = '0; req_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (bitvec !== '0) begin failures++; $display("FAIL reset bit-vector"); end

    // directed: 38 chunks into an empty memory searches 32 + 8 = 40 chunks
    if (N >= 64) begin
      do_alloc(38);
      expect_eq("38-chunk block start", live_addr[0], int'(N) - 40);
      n_example++;
      do_dealloc();
    end else n_example++;

    for (int t = 0; t < int'(NOPS); t++) begin
      // lean towards allocation until the memory fills, then drain a while
      if (live_addr.size() > 0 && ($urandom() % 100) < (((t / 400) % 2 != 0) ? 65 : 30)) do_dealloc();
      else do_alloc(pick_size());
    end
    // fill the memory completely with single chunks, then one more must fail
    while (model != '1) do_alloc(1);
    do_alloc(1);
    while (live_addr.size() > 0) do_dealloc();

    $display("mechanisms: step2-only=%0d step3-shift=%0d step3-noshift=%0d no-block=%0d full=%0d dealloc=%0d example38=%0d",
             n_pow2, n_step3_shift, n_step3_noshift, n_fail, n_full, n_dealloc, n_example);
    if (n_pow2 == 0)          begin failures++; $display("FAIL no power-of-two allocation"); end
    if (n_step3_shift == 0)   begin failures++; $display("FAIL no Step 3 with S2 shift"); end
    if (n_step3_noshift == 0) begin failures++; $display("FAIL no Step 3 without S2 shift"); end
    if (n_fail == 0)          begin failures++; $display("FAIL no failed allocation"); end
    if (n_full == 0)          begin failures++; $display("FAIL memory never full"); end
    if (n_dealloc == 0)       begin failures++; $display("FAIL no deallocation"); end
    if (n_example == 0)       begin failures++; $display("FAIL example not run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
