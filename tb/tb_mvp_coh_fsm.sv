// tb_mvp_coh_fsm: exhaustive check of the L1/MVP-cache ownership machine.
// Every (state, request) pair is applied and compared with the transition table:
// STATE0 moves to STATE1 (block copied to the L1) on scalar load/store, STATE1
// moves back to STATE0 (L1 copy evicted) on vector load/store, all else stays.
module tb_mvp_coh_fsm;
  logic       valid, state, next_state, to_l1, evict_l1;
  logic [1:0] req;
  int checks = 0, failures = 0;

  mvp_coh_fsm dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_ns, exp_l1, exp_ev;
    for (int v = 0; v < 2; v++)
      for (int s = 0; s < 2; s++)
        for (int r = 0; r < 4; r++) begin
          valid = v[0]; state = s[0]; req = r[1:0];
          #1;
          exp_l1 = v == 1 && s == 0 && r >= 2;
          exp_ev = v == 1 && s == 1 && r < 2;
          exp_ns = exp_l1 ? 1'b1 : exp_ev ? 1'b0 : s[0];
          checks++;
          if (next_state !== exp_ns || to_l1 !== exp_l1 || evict_l1 !== exp_ev) begin
            failures++;
            $display("FAIL v=%0d s=%0d r=%0d: ns=%0d l1=%0d ev=%0d", v, s, r, next_state, to_l1, evict_l1);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
