// fema_size_decode: turns a requested block size k into level selectors.
//
// Encoder 1 finds p = floor(log2 k) and decoder 1 forms S1 = 2^p, which is
// also the one-hot selector of level p of the or-gate prefix. Comparator 1
// tests k == S1, i.e. whether k is a power of two. The subtractor forms the
// remainder r = k - S1; encoder 2 and decoder 2 form 2^floor(log2 r) and
// comparator 2 tests whether that equals r.
//
// On load, register S1 takes 2^p, the flag pow2 takes the comparator 1
// result, and the shift register S2 takes 2^floor(log2 r). On the next
// shift_en, S2 shifts one place left (x2) if r was not a power of two, so S2
// ends as 2^ceil(log2 r). A request that is not a power of two is then
// searched as a block of S1 + S2 >= k chunks. Loading S2 first and shifting
// it one cycle later (while Step 2 runs) is this design's own timing.
//
// k = 0 gives S1 = 0 (no level selected); sizes above N give selectors that
// match no block, so such requests simply find nothing.
module fema_size_decode
  import fema_pkg::*;
#(
  parameter int unsigned N  = 256,
  localparam int unsigned LW = $clog2(N) + 1,
  localparam int unsigned PW = $clog2(LW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          shift_en,
  input  logic [LW-1:0] size,
  output logic [LW-1:0] s1,
  output logic [LW-1:0] s2,
  output logic          pow2
);

  logic [PW-1:0] p, q;
  logic          p_any, q_any;
  logic [LW-1:0] dec1, dec2, r;
  logic          eq1, eq2;
  logic          s2_pending;

  fema_prio_enc #(.W(LW)) u_enc1 (.in_vec(size), .idx(p), .any(p_any));

  always_comb begin
    dec1 = p_any ? (LW'(1) << p) : '0;
    eq1  = (dec1 == size);
    r    = size - dec1;
  end

  fema_prio_enc #(.W(LW)) u_enc2 (.in_vec(r), .idx(q), .any(q_any));

  always_comb begin
    dec2 = q_any ? (LW'(1) << q) : '0;
    eq2  = (dec2 == r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1         <= '0;
      s2         <= '0;
      pow2       <= 1'b0;
      s2_pending <= 1'b0;
    end else if (load) begin
      s1         <= dec1;
      s2         <= dec2;
      pow2       <= eq1;
      s2_pending <= !eq2;
    end else if (shift_en && s2_pending) begin
      s2         <= s2 << 1;
      s2_pending <= 1'b0;
    end
  end

endmodule
