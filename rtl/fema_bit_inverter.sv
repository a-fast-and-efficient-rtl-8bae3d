// fema_bit_inverter: the bit-vector and its bit inverters (Steps 5 and 6).
//
// Holds the status of the N chunks, 1 = used, 0 = free; reset frees all.
// An update takes two clocks. In the first (mask_load) the ending address
// EA = SA + k - 1 is formed and a mask with ones at chunks SA .. EA is
// registered, together with the direction. In the second (apply) the masked
// bits are inverted: set to 1 for an allocation (set_bits = 1), cleared to 0
// for a deallocation. Mask bits past chunk N-1 are dropped; a size of 0
// gives an empty mask. Exactly k bits change, even when the free block that
// was found is larger than k.
module fema_bit_inverter #(
  parameter int unsigned N  = 256,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned LW = $clog2(N) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mask_load,
  input  logic [AW-1:0] sa,
  input  logic [LW-1:0] size,
  input  logic          apply,
  input  logic          set_bits,
  output logic [N-1:0]  bitvec
);

  logic [LW:0]  ea;        // one bit wider than SA + k can reach
  logic [N-1:0] mask_d, mask_q;
  logic         set_q;

  always_comb begin
    ea = (LW+1)'(sa) + (LW+1)'(size) - (LW+1)'(1);
    for (int unsigned j = 0; j < N; j++) begin
      mask_d[j] = (size != '0) && ((LW+1)'(j) >= (LW+1)'(sa)) && ((LW+1)'(j) <= ea);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q     <= '0;
      set_q      <= 1'b0;
      bitvec <= '0;
    end else begin
      if (mask_load) begin
        mask_q <= mask_d;
        set_q  <= set_bits;
      end
      if (apply) begin
        // an allocation may only claim chunks that are free
        assert (!set_q || (bitvec & mask_q) == '0)
          else $error("allocation overlaps used chunks");
        bitvec <= set_q ? (bitvec | mask_q) : (bitvec & ~mask_q);
      end
    end
  end

endmodule
