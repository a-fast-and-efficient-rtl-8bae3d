// fema_search: search of free blocks (Steps 2 and 3).
//
// Two 2x1 multiplexers, both switched by the controller's step3 signal,
// choose the level selector (S1 in Step 2, S2 in Step 3) and the input of the
// or-gate prefix (the bit-vector in Step 2, V1 in Step 3). The prefix output
// is registered into V when v_load is high.
//
// After Step 2 with S1 = 2^p, v[j] = 1 means chunks j .. j+2^p-1 are free.
// Neighbouring V bits overlap by all but one chunk, so m+1 consecutive
// active V bits mean a free block of 2^p + m chunks. V1[j] = NAND(V[j],
// V[j+1]) (V[N] read as 0) is 0 exactly where two neighbours are active, so
// V1 is a new bit-vector in which a free block of 2^q "chunks" starting at j
// stands for a free block of 2^p + 2^q real chunks starting at j. Running
// V1 through the prefix at level q (Step 3) finds those blocks.
//
// Timing: one clock per pass; the V register is the only state.
module fema_search #(
  parameter int unsigned N  = 256,
  localparam int unsigned LW = $clog2(N) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  bitvec,
  input  logic [LW-1:0] s1,
  input  logic [LW-1:0] s2,
  input  logic          step3,
  input  logic          v_load,
  output logic [N-1:0]  v
);

  logic [N-1:0]  v1, prefix_in, prefix_out;
  logic [LW-1:0] sel;

  // NAND of neighbouring V bits
  assign v1 = ~(v & {1'b0, v[N-1:1]});

  assign sel       = step3 ? s2 : s1;
  assign prefix_in = step3 ? v1 : bitvec;

  fema_or_prefix #(.N(N)) u_prefix (
    .bits (prefix_in),
    .sel  (sel),
    .v    (prefix_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      v <= '0;
    else if (v_load) v <= prefix_out;
  end

endmodule
