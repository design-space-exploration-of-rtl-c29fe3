// ppom_engine: run-time search for the most power-efficient number of parallel
// pipelines per vector functional unit (pipes) and cache ports (ports).
//
// After one run of an application at the base configuration (4 pipes, 4 ports),
// the engine receives what was measured there: enqueue and dequeue throughputs of
// the arithmetic and memory issue queues (EA, DA, EM, DM), the cache hit rate HR,
// the dependency ratios K, S, AL, ML and the instruction counts IA, IM. It then
// repeats a greedy step:
//   * bottleneck: the queue whose enqueue throughput outruns its dequeue
//     throughput the most (EM/DM against EA/DA) names the scarce resource;
//   * that resource is doubled and the throughputs are revised:
//       more pipes:  DA' = 2*DA, DM' = DM, EA' = EA*(1+K),     EM' = EM*(1+S)
//       more ports:  DA' = DA,   DM' = DM*(1+HR),
//                    EA' = EA*(1+AL*HR), EM' = EM*(1+ML*HR)
//     (the revision equations with revised = 2 x current);
//   * execution cycles = instructions of the bottleneck queue / its dequeue
//     throughput; energy = cycles x peak power of the configuration, read from
//     the 5x5 table TDP_MW (pipes and ports 4..64);
//   * the revised configuration is kept if its energy is lower, otherwise the
//     search stops and the current configuration is the answer. It also stops
//     when the scarce resource is already at 64.
//
// Number formats (this design's choice): throughputs unsigned Q16.16, ratios
// Q0.16, energy in cycle x mW. One estimation takes two clock cycles (revise,
// evaluate); `n_est` counts estimations as the document counts them.
// Interface: pulse `start` with the inputs stable; `done` pulses with the result.
module ppom_engine
  import mvp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   ea, da, em, dm,      // Q16.16 instructions per cycle
  input  logic [15:0]   hr, k, s, al, ml,    // Q0.16
  input  logic [31:0]   ia, im,              // issued arithmetic / memory instructions
  output logic          busy,
  output logic          done,
  output logic [2:0]    pipe_idx,            // pipes = 4 << pipe_idx
  output logic [2:0]    port_idx,            // ports = 4 << port_idx
  output logic [3:0]    n_est,
  output logic [63:0]   best_cycles,
  output logic [63:0]   best_energy,
  output logic          last_bottleneck_mem  // bottleneck of the chosen configuration
);

  localparam logic [16:0] ONE = 17'h10000;

  typedef struct packed {
    logic [2:0]  pi, ci;
    logic [31:0] ea, da, em, dm;
  } cfg_t;

  typedef enum logic [2:0] { P_IDLE, P_BASE, P_REVISE, P_EVAL, P_DONE } p_state_e;

  p_state_e    st;
  cfg_t        cur, rev;
  logic [63:0] cur_energy, cur_cycles;
  logic [15:0] r_hr, r_k, r_s, r_al, r_ml;
  logic [31:0] r_ia, r_im;

  // scale a Q16.16 throughput by (1 + x), x in Q0.16
  function automatic logic [31:0] grow(logic [31:0] t, logic [16:0] x);
    logic [49:0] p;
    p = 50'(t) * 50'(ONE + x);
    return p[47:16];
  endfunction

  function automatic logic [15:0] qmul(logic [15:0] a, logic [15:0] b);
    logic [31:0] p;
    p = a * b;
    return p[31:16];
  endfunction

  // bottleneck: memory when EM/DM > EA/DA
  function automatic logic mem_bound(cfg_t c);
    return (64'(c.em) * 64'(c.da)) > (64'(c.ea) * 64'(c.dm));
  endfunction

  function automatic logic [63:0] cycles_of(cfg_t c, logic [31:0] nia, logic [31:0] nim);
    logic [63:0] num, den;
    num = {16'd0, (mem_bound(c) ? nim : nia), 16'd0};
    den = {32'd0, (mem_bound(c) ? c.dm : c.da)};
    return (den == 0) ? 64'hFFFF_FFFF_FFFF : num / den;
  endfunction

  logic [63:0] eval_cycles, eval_energy;
  always_comb begin
    eval_cycles = cycles_of(rev, r_ia, r_im);
    eval_energy = eval_cycles * 64'(TDP_MW[rev.pi][rev.ci]);
  end

  assign busy = (st != P_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= P_IDLE;
      done <= 1'b0;
      n_est <= '0;
      cur <= '0; rev <= '0;
      cur_energy <= '0; cur_cycles <= '0;
      pipe_idx <= '0; port_idx <= '0;
      best_cycles <= '0; best_energy <= '0;
      last_bottleneck_mem <= 1'b0;
      {r_hr, r_k, r_s, r_al, r_ml} <= '0;
      {r_ia, r_im} <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          rev   <= '{pi: 3'd0, ci: 3'd0, ea: ea, da: da, em: em, dm: dm};
          r_hr  <= hr; r_k <= k; r_s <= s; r_al <= al; r_ml <= ml;
          r_ia  <= ia; r_im <= im;
          n_est <= '0;
          st    <= P_BASE;
        end
        P_BASE: begin                      // base configuration from the measured run
          cur        <= rev;
          cur_cycles <= eval_cycles;
          cur_energy <= eval_energy;
          st         <= P_REVISE;
        end
        P_REVISE: begin
          if (mem_bound(cur)) begin
            if (cur.ci == 3'd4) st <= P_DONE;
            else begin
              rev    <= cur;
              rev.ci <= cur.ci + 1'b1;
              rev.dm <= grow(cur.dm, {1'b0, r_hr});
              rev.ea <= grow(cur.ea, {1'b0, qmul(r_al, r_hr)});
              rev.em <= grow(cur.em, {1'b0, qmul(r_ml, r_hr)});
              st     <= P_EVAL;
            end
          end else begin
            if (cur.pi == 3'd4) st <= P_DONE;
            else begin
              rev    <= cur;
              rev.pi <= cur.pi + 1'b1;
              rev.da <= {cur.da[30:0], 1'b0};
              rev.ea <= grow(cur.ea, {1'b0, r_k});
              rev.em <= grow(cur.em, {1'b0, r_s});
              st     <= P_EVAL;
            end
          end
        end
        P_EVAL: begin
          n_est <= n_est + 1'b1;
          if (eval_energy < cur_energy) begin
            cur        <= rev;
            cur_cycles <= eval_cycles;
            cur_energy <= eval_energy;
            st         <= P_REVISE;
          end else st <= P_DONE;
        end
        P_DONE: begin
          pipe_idx            <= cur.pi;
          port_idx            <= cur.ci;
          best_cycles         <= cur_cycles;
          best_energy         <= cur_energy;
          last_bottleneck_mem <= mem_bound(cur);
          done                <= 1'b1;
          st                  <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

endmodule
