// tb_fema_allocator: end-to-end test of the allocator at its default size
// (N = 256 chunks, no parameter override). A directed 38-chunk request is
// followed by 3000 random allocations and deallocations, a fill to a full
// memory and a drain; fema_alloc_exerciser checks every address, every
// bit-vector update and every request latency against its model.
module tb_fema_allocator;
  import fema_pkg::*;
  localparam int unsigned N  = 256;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned LW = AW + 1;

  logic clk, rst_n, req_valid, req_ready, resp_valid, resp_ok;
  op_e  req_op;
  logic [LW-1:0] req_size;
  logic [AW-1:0] req_addr, resp_addr;
  logic [N-1:0]  bitvec;

  fema_allocator dut (.*);

  fema_alloc_exerciser #(.N(N), .NOPS(3000)) u_ex (.*);

  // outer watchdog; the exerciser normally finishes long before
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_ex.checks, u_ex.failures + 1);
    $finish;
  end
endmodule
