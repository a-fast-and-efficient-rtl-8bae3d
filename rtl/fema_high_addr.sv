// fema_high_addr: free block detection with the highest address (Step 4).
//
// A high-priority encoder over the V-vector picks the greatest j with
// v[j] = 1, i.e. the free block whose starting address is highest. The
// result is registered on load (one clock): sa is the starting address and
// found tells whether any block was detected at all. The found flag is this
// design's own addition, used to answer a request that cannot be served.
module fema_high_addr #(
  parameter int unsigned N  = 256,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [N-1:0]  v,
  output logic [AW-1:0] sa,
  output logic          found
);

  logic [AW-1:0] idx;
  logic          any;

  fema_prio_enc #(.W(N)) u_enc (.in_vec(v), .idx(idx), .any(any));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa    <= '0;
      found <= 1'b0;
    end else if (load) begin
      sa    <= idx;
      found <= any;
    end
  end

endmodule
