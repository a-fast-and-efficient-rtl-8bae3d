// fema_pkg: types shared by the allocator modules.
//
// op_e is the request type (allocate a block of k chunks, or free one).
// state_e is the controller state; the datapath enables are decoded from it
// in the top module. The states follow the steps of the allocation
// algorithm: DECODE covers the size encoders and the S1/S2 registers,
// SEARCH1/SEARCH2 the two passes through the or-gate prefix (Steps 2 and 3),
// FIND the highest address detection (Step 4), INV1/INV2 the two cycles of
// bit inversion (Steps 5 and 6).
package fema_pkg;

  typedef enum logic {
    OP_ALLOC   = 1'b0,
    OP_DEALLOC = 1'b1
  } op_e;

  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_SEARCH1 = 3'd1,
    ST_SEARCH2 = 3'd2,
    ST_FIND    = 3'd3,
    ST_INV1    = 3'd4,
    ST_INV2    = 3'd5,
    ST_DINV2   = 3'd6
  } state_e;

  // Datapath enables decoded from the controller state.
  typedef struct packed {
    logic size_load;     // load S1 / S2 / pow2 and the size register
    logic s2_shift;      // let the S2 shift register take its x2 step
    logic v_load;        // register the or-gate prefix output into V
    logic step3;         // mux select: 0 = Step 2 (bit-vector, S1), 1 = Step 3 (V1, S2)
    logic addr_load;     // register the highest address (Step 4)
    logic mask_load;     // first bit-inversion cycle: form EA and the mask
    logic mask_from_req; // mask taken from the request (deallocation)
    logic set_bits;      // 1 = allocate (set bits), 0 = deallocate (clear bits)
    logic apply;         // second bit-inversion cycle: write the bit-vector
    logic resp_valid;    // response strobe
    logic resp_alloc;    // the response belongs to an allocation
  } ctrl_t;

endpackage
