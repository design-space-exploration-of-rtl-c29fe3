// tb_viq: random pushes and pops of an 8-entry issue queue against a queue
// model: order, full/empty flags and the enqueue/dequeue event pulses.
module tb_viq;
  import mvp_pkg::*;
  logic clk = 0, rst_n = 0, push, push_ready, head_valid, pop, full, ev_enq, ev_deq;
  vren_t push_ent, head;
  vren_t model [$];
  int checks = 0, failures = 0, n_full = 0;

  viq #(.DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_ent = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      push = ($urandom % 4) < ((t / 500) % 2 ? 1 : 3);
      push_ent = vren_t'({$urandom, $urandom, $urandom});
      pop = head_valid && ($urandom % 2);
      #1;
      checks++;
      if (full != (model.size() == 8) || head_valid != (model.size() != 0) ||
          ev_enq != (push && model.size() < 8) || ev_deq != pop) begin
        failures++; $display("FAIL flags at %0d", t);
      end
      if (full) n_full++;
      if (pop) begin
        checks++;
        if (head != model[0]) begin failures++; $display("FAIL order at %0d", t); end
        void'(model.pop_front());
      end
      if (push && push_ready) model.push_back(push_ent);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
