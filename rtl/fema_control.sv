// fema_control: sequencer of the allocator.
//
// One request at a time. req_ready is high in ST_IDLE; a request is taken
// when req_valid is also high. An allocation then runs
//   IDLE (size decode) -> SEARCH1 (Step 2) -> [SEARCH2 (Step 3)] -> FIND
//   (Step 4) -> INV1 -> INV2 (Step 5),
// with SEARCH2 only when the comparator reports that k is not a power of
// two. A deallocation runs IDLE (EA and mask from the request) -> DINV2
// (Step 6). Counting the accepting cycle and the response cycle, an
// allocation takes 5 clocks for a power-of-two size and 6 otherwise, and a
// deallocation 2, which are the figures the method is specified with. The
// response strobe is given in the last cycle (INV2 or DINV2), and a new
// request can be taken in the following one. The valid/ready handshake and
// the rule that an allocation that finds no block still runs all its cycles
// (leaving the bit-vector unchanged) are this design's own choices.
//
// The datapath enables are decoded from the state into the ctrl_t bundle.
module fema_control
  import fema_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req_valid,
  input  op_e    req_op,
  input  logic   pow2,
  input  logic   found,
  output logic   req_ready,
  output ctrl_t  ctrl
);

  state_e state, state_n;

  always_comb begin
    state_n = state;
    case (state)
      ST_IDLE:    if (req_valid) state_n = (req_op == OP_ALLOC) ? ST_SEARCH1 : ST_DINV2;
      ST_SEARCH1: state_n = pow2 ? ST_FIND : ST_SEARCH2;
      ST_SEARCH2: state_n = ST_FIND;
      ST_FIND:    state_n = ST_INV1;
      ST_INV1:    state_n = ST_INV2;
      ST_INV2:    state_n = ST_IDLE;
      ST_DINV2:   state_n = ST_IDLE;
      default:    state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= state_n;
  end

  assign req_ready = (state == ST_IDLE);

  always_comb begin
    ctrl = '0;
    case (state)
      ST_IDLE: begin
        if (req_valid && req_op == OP_ALLOC) ctrl.size_load = 1'b1;
        if (req_valid && req_op == OP_DEALLOC) begin
          ctrl.mask_load     = 1'b1;
          ctrl.mask_from_req = 1'b1;
          ctrl.set_bits      = 1'b0;
        end
      end
      ST_SEARCH1: begin
        ctrl.v_load   = 1'b1;
        ctrl.s2_shift = 1'b1;
      end
      ST_SEARCH2: begin
        ctrl.v_load = 1'b1;
        ctrl.step3  = 1'b1;
      end
      ST_FIND:    ctrl.addr_load = 1'b1;
      ST_INV1: begin
        ctrl.mask_load = 1'b1;
        ctrl.set_bits  = 1'b1;
      end
      ST_INV2: begin
        ctrl.apply      = found;
        ctrl.resp_valid = 1'b1;
        ctrl.resp_alloc = 1'b1;
      end
      ST_DINV2: begin
        ctrl.apply      = 1'b1;
        ctrl.resp_valid = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
