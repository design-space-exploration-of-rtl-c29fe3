// vrf: physical vector register file, 96 registers of 128 64-bit elements.
//
// Element e of a register lives in lane e mod LANES, so one "group" (LANES
// consecutive elements) is what the lanes read or write together in one cycle.
// Functional units read and write whole groups (with a lane mask for a short
// last group); the load/store unit writes single elements, because load data come
// back from the cache ports one element at a time and in any order, and reads
// store data a group at a time.
//
// Interface: NRG group read ports (combinational), NWG group write ports and NWE
// element write ports (written at the clock edge). The port counts are this
// design's choice; simultaneous writes to one element are not expected (the
// renaming gives every producer its own register).
module vrf
  import mvp_pkg::*;
#(
  parameter int unsigned NRG = 7,
  parameter int unsigned NWG = 3,
  parameter int unsigned NWE = PORTS
)(
  input  logic                     clk,
  input  logic [PR_W-1:0]          rg_preg [NRG],
  input  logic [GR_W-1:0]          rg_grp  [NRG],
  output logic [DATA_W-1:0]        rg_data [NRG][LANES],
  input  logic [NWG-1:0]           wg_en,
  input  logic [PR_W-1:0]          wg_preg [NWG],
  input  logic [GR_W-1:0]          wg_grp  [NWG],
  input  logic [LANES-1:0]         wg_mask [NWG],
  input  logic [DATA_W-1:0]        wg_data [NWG][LANES],
  input  logic [NWE-1:0]           we_en,
  input  logic [PR_W-1:0]          we_preg [NWE],
  input  logic [EL_W-1:0]          we_eidx [NWE],
  input  logic [DATA_W-1:0]        we_data [NWE]
);

  localparam int unsigned NGRP = MVL / LANES;

  // one bank per lane: bank[l][preg][group]
  logic [DATA_W-1:0] bank [LANES][PREGS][NGRP];

  always_comb
    for (int r = 0; r < NRG; r++)
      for (int l = 0; l < LANES; l++)
        rg_data[r][l] = bank[l][rg_preg[r]][rg_grp[r]];

  always_ff @(posedge clk) begin
    for (int w = 0; w < NWG; w++)
      if (wg_en[w])
        for (int l = 0; l < LANES; l++)
          if (wg_mask[w][l]) bank[l][wg_preg[w]][wg_grp[w]] <= wg_data[w][l];
    for (int w = 0; w < NWE; w++)
      if (we_en[w])
        bank[we_eidx[w][LN_W-1:0]][we_preg[w]][we_eidx[w][EL_W-1:LN_W]] <= we_data[w];
  end

endmodule
