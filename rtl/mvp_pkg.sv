// mvp_pkg: constants and types shared by the MVPX vector unit, the MVP-cache and
// the PPoM configuration engine.
//
// The organisation numbers (8 cache ports, 4 sub-caches, 8 data arrays of 8-byte
// lines per sub-cache, 8 lanes, 16 architectural and 96 physical vector registers
// of 128 elements) are the evaluated MVPX configuration. They are fixed here
// because the request and response structs are shaped by them; the cache capacity
// and the latencies stay module parameters. The 32-bit byte address, the 64-bit
// integer element and the instruction encoding are this design's own choices.
package mvp_pkg;

  // ---------------- datapath ----------------
  localparam int unsigned ADDR_W   = 32;          // byte address width (own choice)
  localparam int unsigned DATA_W   = 64;          // one element = one 8-byte cache line
  localparam int unsigned PORTS    = 8;           // cache ports
  localparam int unsigned SUBC     = 4;           // sub-caches
  localparam int unsigned ARRAYS   = 8;           // data arrays sharing one tag array
  localparam int unsigned NARR     = SUBC * ARRAYS;
  localparam int unsigned PID_W    = $clog2(PORTS);
  localparam int unsigned AID_W    = $clog2(ARRAYS);
  localparam int unsigned SID_W    = $clog2(SUBC);
  localparam int unsigned OFS_W    = 3;           // byte within an 8-byte line
  // block = ARRAYS lines under one tag; block address drops array id and byte bits
  localparam int unsigned BLK_W    = ADDR_W - OFS_W - AID_W;
  localparam int unsigned LINE_W   = ARRAYS * DATA_W;   // one refill block, 64 bytes

  // ---------------- vector unit ----------------
  localparam int unsigned LANES    = 8;
  localparam int unsigned AREGS    = 16;
  localparam int unsigned PREGS    = 96;
  localparam int unsigned MVL      = 128;         // elements per vector register
  localparam int unsigned AR_W     = $clog2(AREGS);
  localparam int unsigned PR_W     = $clog2(PREGS);
  localparam int unsigned EL_W     = $clog2(MVL);
  localparam int unsigned VL_W     = EL_W + 1;    // vector length 1..MVL
  localparam int unsigned LN_W     = $clog2(LANES);
  localparam int unsigned GR_W     = EL_W - LN_W; // group of LANES elements

  typedef enum logic [3:0] {
    OP_VADD = 4'd0, OP_VSUB = 4'd1, OP_VAND = 4'd2, OP_VOR = 4'd3, OP_VXOR = 4'd4,
    OP_VMUL = 4'd5, OP_VDIV = 4'd6, OP_VLD = 4'd7, OP_VST = 4'd8
  } vop_e;

  // functional unit classes of the arithmetic side
  typedef enum logic [1:0] { FU_ALU = 2'd0, FU_MUL = 2'd1, FU_DIV = 2'd2 } fu_e;

  // decoded vector instruction as handed over by the scalar core's decoder
  typedef struct packed {
    vop_e                     op;
    logic [AR_W-1:0]          vd;      // destination (loads, arithmetic)
    logic [AR_W-1:0]          vs1;     // first source / store data
    logic [AR_W-1:0]          vs2;     // second source
    logic [ADDR_W-1:0]        base;    // memory ops: byte base address
    logic signed [15:0]       stride;  // memory ops: stride in elements
    logic [VL_W-1:0]          vl;      // vector length 1..MVL
  } vinst_t;

  // renamed instruction held in VAIB/VMIB and the issue queues
  typedef struct packed {
    vinst_t                   inst;
    logic [PR_W-1:0]          pd;
    logic [PR_W-1:0]          ps1;
    logic [PR_W-1:0]          ps2;
    logic [7:0]               rob;     // commit slot
  } vren_t;

  // one entry of a sub-cache request queue: Address Info, Masked Bits, Request Info
  typedef struct packed {
    logic                           we;
    logic [BLK_W-1:0]               blk;       // Address Info (tag, set, sub-cache id)
    logic [ARRAYS-1:0]              mask;      // Masked Bits
    logic [ARRAYS-1:0][PID_W-1:0]   rinfo;     // Request Info: cache port per data array
    logic [ARRAYS-1:0][EL_W-1:0]    eidx;      // element index carried back with data
    logic [ARRAYS-1:0][DATA_W-1:0]  wdata;     // store data per data array
  } creq_t;

  // what a data array puts on the crossbar, and what a cache port receives
  typedef struct packed {
    logic                 we;
    logic [EL_W-1:0]      eidx;
    logic [DATA_W-1:0]    data;
  } xdat_t;

  // main memory block request (one 64-byte block)
  typedef struct packed {
    logic                 we;
    logic [BLK_W-1:0]     blk;
    logic [SID_W-1:0]     id;       // requesting sub-cache, echoed in the response
    logic [LINE_W-1:0]    wdata;
  } mreq_t;

  // ---------------- PPoM ----------------
  // Peak power in mW of each (pipes, ports) configuration; rows pipe4..pipe64,
  // columns port4..port64 (the 5x5 power table of the evaluated MVPX).
  localparam int unsigned NCFG = 5;
  typedef logic [15:0] mw_t;
  localparam mw_t TDP_MW [NCFG][NCFG] = '{
    '{16'd5180,  16'd5630,  16'd7060,  16'd12090, 16'd31410},
    '{16'd6910,  16'd7360,  16'd8780,  16'd13820, 16'd33140},
    '{16'd10360, 16'd10810, 16'd12230, 16'd17270, 16'd36590},
    '{16'd17260, 16'd17710, 16'd19140, 16'd24170, 16'd43490},
    '{16'd32780, 16'd33230, 16'd34660, 16'd39690, 16'd59010}
  };

  function automatic fu_e fu_of(vop_e op);
    case (op)
      OP_VMUL: return FU_MUL;
      OP_VDIV: return FU_DIV;
      default: return FU_ALU;
    endcase
  endfunction

  function automatic logic is_mem(vop_e op);
    return (op == OP_VLD) || (op == OP_VST);
  endfunction

endpackage
