// fema_or_prefix: or-gate prefix circuit with level selectors.
//
// For a bit-vector of N = 2^n chunk states (1 = used, 0 = free) the circuit
// has levels L0..Ln. Level L0 is the bit-vector itself; node j of level Li
// is the OR of the two level-(i-1) nodes j and j + 2^(i-1), so it is the OR
// of the 2^i bits j .. j+2^i-1. A node value of 0 therefore marks a free
// block of 2^i chunks starting at chunk j, wherever j lies. Nodes whose
// window runs past chunk N-1 see the missing chunks as used.
//
// The one-hot level selector sel (S0 = 2^0 .. Sn = 2^n) picks one level; the
// inverted node outputs of that level form the V-vector: v[j] = 1 when a free
// block of 2^i chunks starts at j. The original drives the V lines through
// tri-state buffers; here an AND-OR multiplexer over the one-hot selector
// does the same job. With no selector bit set, v is all zero.
//
// Purely combinational, depth n OR levels plus the selector.
module fema_or_prefix #(
  parameter int unsigned N  = 256,
  localparam int unsigned LW = $clog2(N) + 1   // number of levels / selectors
) (
  input  logic [N-1:0]  bits,
  input  logic [LW-1:0] sel,
  output logic [N-1:0]  v
);

  logic [N-1:0] lvl [LW];

  assign lvl[0] = bits;

  for (genvar i = 1; i < LW; i++) begin : g_level
    localparam int unsigned HALF = 1 << (i - 1);
    for (genvar j = 0; j < N; j++) begin : g_node
      if (j + HALF < N) begin : g_pair
        assign lvl[i][j] = lvl[i-1][j] | lvl[i-1][j+HALF];
      end else begin : g_edge
        assign lvl[i][j] = 1'b1;
      end
    end
  end

  always_comb begin
    v = '0;
    for (int unsigned i = 0; i < LW; i++) begin
      if (sel[i]) v = v | ~lvl[i];
    end
  end

endmodule
