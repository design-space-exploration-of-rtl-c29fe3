// mem_model: behavioural main memory for simulation (not synthesizable design).
// Accepts one 64-byte block request per BEAT cycles (32 bytes per cycle), writes
// immediately, and returns read blocks in order LAT cycles after acceptance with
// the requester's id. Never-written words read as init_word(address), so tests
// can predict them without preloading.
module mem_model
  import mvp_pkg::*;
#(
  parameter int LAT  = 100,
  parameter int BEAT = 2
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  mreq_t             req,
  output logic              req_ready,
  output logic              resp_valid,
  output logic [SID_W-1:0]  resp_id,
  output logic [LINE_W-1:0] resp_line,
  output int                n_reads,
  output int                n_writes
);
  logic [DATA_W-1:0] words [logic [ADDR_W-1:0]];
  typedef struct { longint due; logic [SID_W-1:0] id; logic [BLK_W-1:0] blk; } pend_t;
  pend_t  pend [$];
  longint now;
  int     busy;

  function automatic logic [DATA_W-1:0] init_word(logic [ADDR_W-1:0] a);
    return {a ^ 32'hA5A5_5A5A, a};
  endfunction

  function automatic logic [DATA_W-1:0] rd(logic [ADDR_W-1:0] a);
    return words.exists(a) ? words[a] : init_word(a);
  endfunction

  assign req_ready = rst_n && (busy == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      now <= 0; busy <= 0; resp_valid <= 0; resp_id <= '0; resp_line <= '0;
      n_reads <= 0; n_writes <= 0;
    end else begin
      now <= now + 1;
      if (busy > 0) busy <= busy - 1;
      resp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        busy <= BEAT - 1;
        if (req.we) begin
          n_writes <= n_writes + 1;
          for (int a = 0; a < ARRAYS; a++) words[{req.blk, AID_W'(a), 3'b000}] = req.wdata[a*DATA_W +: DATA_W];
        end else begin
          n_reads <= n_reads + 1;
          pend.push_back('{due: now + LAT, id: req.id, blk: req.blk});
        end
      end
      if (pend.size() > 0 && pend[0].due <= now) begin
        resp_valid <= 1'b1;
        resp_id    <= pend[0].id;
        for (int a = 0; a < ARRAYS; a++) resp_line[a*DATA_W +: DATA_W] <= rd({pend[0].blk, AID_W'(a), 3'b000});
        void'(pend.pop_front());
      end
    end
  end
endmodule
