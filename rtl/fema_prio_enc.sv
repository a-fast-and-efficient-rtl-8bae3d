// fema_prio_enc: high-priority encoder.
//
// Returns the index of the highest set bit of in_vec, and any = 1 when at
// least one bit is set (idx is 0 otherwise). The highest index wins because
// the allocator picks the free block with the greatest starting address.
// The same encoder also turns a block size into floor(log2 k) in the size
// decoder. Purely combinational.
module fema_prio_enc #(
  parameter int unsigned W  = 256,
  localparam int unsigned IW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  in_vec,
  output logic [IW-1:0] idx,
  output logic          any
);

  always_comb begin
    idx = '0;
    any = 1'b0;
    for (int unsigned i = 0; i < W; i++) begin
      if (in_vec[i]) begin
        idx = IW'(i);
        any = 1'b1;
      end
    end
  end

endmodule
