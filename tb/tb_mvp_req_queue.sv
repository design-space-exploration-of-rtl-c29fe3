// tb_mvp_req_queue: pushes random groups of entries for all sub-caches into the
// queue of sub-cache 2 and pops at random. The popped stream must equal, in
// order, the entries whose sub-cache id is 2; push_ready must drop when fewer
// than PORTS slots are free.
module tb_mvp_req_queue;
  import mvp_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic [PORTS-1:0] push_valid;
  creq_t            push_ent [PORTS];
  logic             push_ready, head_valid, pop;
  creq_t            head;
  logic [$clog2(DEPTH):0] count;
  creq_t            model [$];
  int checks = 0, failures = 0, pops = 0;

  mvp_req_queue #(.DEPTH(DEPTH), .SUB_ID(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = '0; pop = 0;
    for (int j = 0; j < PORTS; j++) push_ent[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int j = 0; j < PORTS; j++) begin
        push_ent[j] = '0;
        push_ent[j].blk  = BLK_W'({$urandom});
        push_ent[j].mask = ARRAYS'($urandom);
        push_ent[j].we   = 1'($urandom);
      end
      push_valid = ($urandom % 2) ? PORTS'($urandom) : '0;
      pop = head_valid && ($urandom % 3 != 0);
      checks++;
      if (push_ready != (int'(count) + PORTS <= DEPTH)) begin failures++; $display("FAIL push_ready"); end
      if (pop) begin
        checks++;
        if (model.size() == 0 || head != model[0]) begin failures++; $display("FAIL order at pop %0d", pops); end
        else void'(model.pop_front());
        pops++;
      end
      if (push_ready)
        for (int j = 0; j < PORTS; j++)
          if (push_valid[j] && push_ent[j].blk[1:0] == 2) model.push_back(push_ent[j]);
      @(posedge clk);
    end
    checks++;
    if (pops < 100) begin failures++; $display("FAIL too few pops %0d", pops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
