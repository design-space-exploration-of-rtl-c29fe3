// mvp_req_gen: builds MVP-cache request entries from one group of element
// addresses (one address per cache port), following the five generation steps of
// the MVP-cache controller.
//
//   1. each address is split into byte offset [2:0], data array id [5:3],
//      sub-cache id [7:6], and above that set id and tag; the cache port of an
//      address is the position it arrives on;
//   2. the data array id is decoded into a one-hot Masked Bits vector;
//   3. addresses are compared on tag, set and sub-cache id (the block address);
//   4. accesses to the same block are merged: Masked Bits are ORed, the port ids
//      are packed into the Request Info field of their data array, and the block
//      address becomes the entry's Address Info;
//   5. the entry carries its sub-cache id (low bits of the block address), which
//      the request queues use to take only their own entries.
// Two ports that name the same 8-byte line cannot share one entry (a data array
// drives one port per access); the later one opens a new entry. That rule and the
// address bit order are this design's choices.
//
// Purely combinational: entries for a group appear in the same cycle, in the
// order of their first port, packed into ent[0..count-1].
module mvp_req_gen
  import mvp_pkg::*;
(
  input  logic                    we,
  input  logic [PORTS-1:0]        en,
  input  logic [ADDR_W-1:0]       addr  [PORTS],
  input  logic [DATA_W-1:0]       wdata [PORTS],
  input  logic [EL_W-1:0]         eidx  [PORTS],
  output logic [PORTS-1:0]        ent_valid,
  output creq_t                   ent   [PORTS]
);

  always_comb begin
    logic [PID_W:0]      cnt;
    logic                merged;
    logic [BLK_W-1:0]    blk;
    logic [AID_W-1:0]    aid;
    cnt       = '0;
    ent_valid = '0;
    for (int k = 0; k < PORTS; k++) ent[k] = '0;
    for (int j = 0; j < PORTS; j++) begin
      blk    = addr[j][ADDR_W-1 -: BLK_W];
      aid    = addr[j][OFS_W +: AID_W];
      merged = 1'b0;
      if (en[j]) begin
        for (int k = 0; k < PORTS; k++) begin
          if (!merged && ent_valid[k] && ent[k].blk == blk && !ent[k].mask[aid]) begin
            ent[k].mask[aid]  = 1'b1;
            ent[k].rinfo[aid] = PID_W'(j);
            ent[k].eidx[aid]  = eidx[j];
            ent[k].wdata[aid] = wdata[j];
            merged            = 1'b1;
          end
        end
        if (!merged) begin
          for (int k = 0; k < PORTS; k++) begin
            if (k == int'(cnt)) begin
              ent_valid[k]      = 1'b1;
              ent[k].we         = we;
              ent[k].blk        = blk;
              ent[k].mask[aid]  = 1'b1;
              ent[k].rinfo[aid] = PID_W'(j);
              ent[k].eidx[aid]  = eidx[j];
              ent[k].wdata[aid] = wdata[j];
            end
          end
          cnt = cnt + 1'b1;
        end
      end
    end
  end

endmodule
