// tb_fema_allocator_512: the allocator with a 512-chunk memory, the larger
// of the two memory sizes the method was evaluated with. Same random
// allocation/deallocation run and checks as tb_fema_allocator.
module tb_fema_allocator_512;
  import fema_pkg::*;
  localparam int unsigned N  = 512;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned LW = AW + 1;

  logic clk, rst_n, req_valid, req_ready, resp_valid, resp_ok;
  op_e  req_op;
  logic [LW-1:0] req_size;
  logic [AW-1:0] req_addr, resp_addr;
  logic [N-1:0]  bitvec;

  fema_allocator #(.N(N)) dut (.*);

  fema_alloc_exerciser #(.N(N), .NOPS(3000)) u_ex (.*);

  // outer watchdog; the exerciser normally finishes long before
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_ex.checks, u_ex.failures + 1);
    $finish;
  end
endmodule
