// fema_allocator: hardware allocator/deallocator for a memory of N chunks.
//
// The memory is divided into N equal chunks; a bit-vector holds one bit per
// chunk (1 = used, 0 = free). An allocation request of k chunks finds, in
// five or six clocks, the free block with the highest starting address that
// can hold k chunks, marks k chunks from there as used and returns the
// starting address. A deallocation request gives a starting address and a
// size and frees those chunks in two clocks.
//
// Search: with k = 2^p + r (0 <= r < 2^p), Step 2 runs the bit-vector
// through the or-gate prefix at level p, giving V: v[j] = 1 where 2^p free
// chunks start at j. If r = 0 that is the answer. Otherwise, with 2^q the
// smallest power of two >= r, Step 3 runs V1 = NAND of neighbouring V bits
// through the same prefix at level q, finding where 2^p + 2^q free chunks
// start. Step 4 takes the highest such start; Steps 5/6 set or clear the
// bits of chunks SA .. SA+k-1.
//
// Interface: a valid/ready request (req_op, req_size = k, req_addr = start
// of a block to free) and a one-cycle response strobe resp_valid with
// resp_ok (0 when no free block was found; always 1 for a deallocation) and
// resp_addr (the allocated, or freed, starting address). bitvec shows
// the chunk states. Sizes of 0 or above N are answered with resp_ok = 0.
// The handshake, the failure answer and the reset state (all chunks free)
// are this design's own; the block structure and the cycle counts follow
// the method.
module fema_allocator
  import fema_pkg::*;
#(
  parameter int unsigned N  = 256,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned LW = $clog2(N) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  op_e           req_op,
  input  logic [LW-1:0] req_size,
  input  logic [AW-1:0] req_addr,
  output logic          resp_valid,
  output logic          resp_ok,
  output logic [AW-1:0] resp_addr,
  output logic [N-1:0]  bitvec
);

  ctrl_t         ctrl;
  logic [LW-1:0] s1, s2;
  logic          pow2;
  logic [N-1:0]  v;
  logic [AW-1:0] sa;
  logic          found;
  logic [LW-1:0] size_q;
  logic [AW-1:0] dealloc_addr_q;
  logic [AW-1:0] inv_sa;
  logic [LW-1:0] inv_size;

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $fatal(1, "N must be a power of two");
  end

  fema_control u_control (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_valid (req_valid),
    .req_op    (req_op),
    .pow2      (pow2),
    .found     (found),
    .req_ready (req_ready),
    .ctrl      (ctrl)
  );

  fema_size_decode #(.N(N)) u_size (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (ctrl.size_load),
    .shift_en (ctrl.s2_shift),
    .size     (req_size),
    .s1       (s1),
    .s2       (s2),
    .pow2     (pow2)
  );

  fema_search #(.N(N)) u_search (
    .clk        (clk),
    .rst_n      (rst_n),
    .bitvec (bitvec),
    .s1         (s1),
    .s2         (s2),
    .step3      (ctrl.step3),
    .v_load     (ctrl.v_load),
    .v          (v)
  );

  fema_high_addr #(.N(N)) u_high (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (ctrl.addr_load),
    .v     (v),
    .sa    (sa),
    .found (found)
  );

  // Request registers: k for Step 5, the freed address for the response.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      size_q         <= '0;
      dealloc_addr_q <= '0;
    end else begin
      if (ctrl.size_load) size_q <= req_size;
      if (ctrl.mask_load && ctrl.mask_from_req) dealloc_addr_q <= req_addr;
    end
  end

  assign inv_sa   = ctrl.mask_from_req ? req_addr : sa;
  assign inv_size = ctrl.mask_from_req ? req_size : size_q;

  fema_bit_inverter #(.N(N)) u_inv (
    .clk        (clk),
    .rst_n      (rst_n),
    .mask_load  (ctrl.mask_load),
    .sa         (inv_sa),
    .size       (inv_size),
    .apply      (ctrl.apply),
    .set_bits   (ctrl.set_bits),
    .bitvec (bitvec)
  );

  assign resp_valid = ctrl.resp_valid;
  assign resp_ok    = ctrl.resp_alloc ? found : 1'b1;
  assign resp_addr  = ctrl.resp_alloc ? sa : dealloc_addr_q;

endmodule
