// mvp_coh_fsm: next-state and action logic of the two-state ownership machine
// that keeps the MVP-cache coherent with the scalar core's L1 data cache.
//
// One state bit is kept per MVP-cache block (in the tag array). STATE0 means the
// MVP-cache owns the latest data; STATE1 means the L1 data cache also holds it.
//   STATE0: VLD, VST -> stay; SLD, SST -> copy the block to the L1, go to STATE1.
//   STATE1: VLD, VST -> invalidate the L1 copy and take its latest data back
//                       into the MVP-cache (early eviction), go to STATE0;
//           SLD, SST -> stay.
// The machine is the document's; encoding the state as one bit per block and
// keeping it next to the tag are this design's choices.
// Combinational: the caller samples `state` with its tag read and writes
// `next_state` back when the access completes.
module mvp_coh_fsm (
  input  logic        valid,       // an access is being decided
  input  logic [1:0]  req,         // 0 VLD, 1 VST, 2 SLD, 3 SST
  input  logic        state,       // 0 = STATE0, 1 = STATE1
  output logic        next_state,
  output logic        to_l1,       // transfer the block to the L1 cache
  output logic        evict_l1     // invalidate the L1 copy and update the MVP-cache
);

  typedef enum logic [1:0] { VLD = 2'd0, VST = 2'd1, SLD = 2'd2, SST = 2'd3 } coh_req_e;
  typedef enum logic { STATE0 = 1'b0, STATE1 = 1'b1 } coh_state_e;

  coh_req_e   r;
  coh_state_e s, ns;

  always_comb begin
    r        = coh_req_e'(req);
    s        = coh_state_e'(state);
    ns       = s;
    to_l1    = 1'b0;
    evict_l1 = 1'b0;
    if (valid) begin
      unique case (s)
        STATE0: if (r == SLD || r == SST) begin ns = STATE1; to_l1 = 1'b1; end
        STATE1: if (r == VLD || r == VST) begin ns = STATE0; evict_l1 = 1'b1; end
      endcase
    end
    next_state = ns;
  end

endmodule
