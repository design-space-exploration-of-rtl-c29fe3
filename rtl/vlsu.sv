// vlsu: vector load/store unit with its address generation unit (AGU).
//
// A memory instruction taken from the memory issue queue is cut into groups of
// PORTS elements. Each cycle the AGU forms the byte addresses of one group
// (base + element x stride x 8), and for a store reads the matching group of the
// data register, then hands the group to the MVP-cache, whose request generator
// turns it into sub-cache requests. Load data come back from the cache ports one
// element at a time, in any order, tagged with the element index, and are written
// straight into the destination register; store acknowledgements are counted the
// same way. When every element has come back the instruction completes.
//
// This design keeps one memory instruction in the unit at a time (the document
// does not say how many may overlap) and gives the AGU to memory instructions
// only, whereas the document also routes the address-generation step through the
// arithmetic issue queue.
//
// Timing: one group per cycle while the cache accepts groups; completion is
// reported in the cycle after the last element returns.
module vlsu
  import mvp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                issue_valid,
  input  vren_t               issue_ent,
  output logic                issue_ready,
  // store data read (one group port of the register file)
  output logic [PR_W-1:0]     rd_preg,
  output logic [GR_W-1:0]     rd_grp,
  input  logic [DATA_W-1:0]   rd_data [LANES],
  // cache side
  output logic                grp_valid,
  input  logic                grp_ready,
  output logic                grp_we,
  output logic [PORTS-1:0]    grp_en,
  output logic [ADDR_W-1:0]   grp_addr  [PORTS],
  output logic [DATA_W-1:0]   grp_wdata [PORTS],
  output logic [EL_W-1:0]     grp_eidx  [PORTS],
  input  logic [PORTS-1:0]    resp_valid,
  input  xdat_t               resp      [PORTS],
  // load data write (element ports of the register file)
  output logic [PORTS-1:0]    we_en,
  output logic [PR_W-1:0]     we_preg [PORTS],
  output logic [EL_W-1:0]     we_eidx [PORTS],
  output logic [DATA_W-1:0]   we_data [PORTS],
  // completion
  output logic                cmp_valid,
  output logic                cmp_has_pd,
  output logic [PR_W-1:0]     cmp_pd,
  output logic [7:0]          cmp_rob,
  output logic                busy
);

  logic            act, sent_all;
  vren_t           cur;
  logic [VL_W-1:0] g_elem;     // first element of the next group
  logic [VL_W-1:0] recv;
  logic [PID_W+1:0] n_resp;

  assign issue_ready = !act && !cmp_valid;
  assign busy        = act;
  assign rd_preg     = cur.ps1;
  assign rd_grp      = g_elem[EL_W-1:LN_W];
  assign grp_valid   = act && !sent_all;
  assign grp_we      = (cur.inst.op == OP_VST);

  always_comb begin
    logic [VL_W:0] e;
    for (int j = 0; j < PORTS; j++) begin
      e            = (VL_W+1)'(g_elem) + (VL_W+1)'(j);
      grp_en[j]    = (e < (VL_W+1)'(cur.inst.vl));
      grp_eidx[j]  = e[EL_W-1:0];
      grp_addr[j]  = cur.inst.base + ADDR_W'($signed(cur.inst.stride) * $signed({1'b0, e}) * 8);
      grp_wdata[j] = rd_data[j % LANES];
    end
    n_resp = '0;
    for (int j = 0; j < PORTS; j++) begin
      n_resp     = n_resp + (PID_W+2)'(resp_valid[j]);
      we_en[j]   = resp_valid[j] && !resp[j].we && act;
      we_preg[j] = cur.pd;
      we_eidx[j] = resp[j].eidx;
      we_data[j] = resp[j].data;
    end
  end

  always_ff @(posedge clk) begin
    logic [VL_W:0] r;
    if (!rst_n) begin
      act       <= 1'b0;
      sent_all  <= 1'b0;
      cur       <= '0;
      g_elem    <= '0;
      recv      <= '0;
      cmp_valid <= 1'b0;
      cmp_has_pd <= 1'b0;
      cmp_pd    <= '0;
      cmp_rob   <= '0;
    end else begin
      cmp_valid <= 1'b0;
      if (!act) begin
        if (issue_valid && issue_ready) begin
          cur      <= issue_ent;
          act      <= 1'b1;
          sent_all <= 1'b0;
          g_elem   <= '0;
          recv     <= '0;
        end
      end else begin
        if (grp_valid && grp_ready) begin
          g_elem <= g_elem + VL_W'(PORTS);
          if (int'(g_elem) + PORTS >= int'(cur.inst.vl)) sent_all <= 1'b1;
        end
        r = (VL_W+1)'(recv) + (VL_W+1)'(n_resp);
        recv <= r[VL_W-1:0];
        if (r == (VL_W+1)'(cur.inst.vl)) begin
          act        <= 1'b0;
          cmp_valid  <= 1'b1;
          cmp_has_pd <= (cur.inst.op == OP_VLD);
          cmp_pd     <= cur.pd;
          cmp_rob    <= cur.rob;
        end
      end
    end
  end

endmodule
