// tb_vrf: random group writes (with lane masks) and element writes to the
// physical register file, checked by group reads against a model array.
module tb_vrf;
  import mvp_pkg::*;
  logic clk = 0;
  logic [PR_W-1:0]   rg_preg [7];
  logic [GR_W-1:0]   rg_grp  [7];
  logic [DATA_W-1:0] rg_data [7][LANES];
  logic [2:0]        wg_en;
  logic [PR_W-1:0]   wg_preg [3];
  logic [GR_W-1:0]   wg_grp  [3];
  logic [LANES-1:0]  wg_mask [3];
  logic [DATA_W-1:0] wg_data [3][LANES];
  logic [PORTS-1:0]  we_en;
  logic [PR_W-1:0]   we_preg [PORTS];
  logic [EL_W-1:0]   we_eidx [PORTS];
  logic [DATA_W-1:0] we_data [PORTS];
  logic [DATA_W-1:0] model [PREGS][MVL];
  int checks = 0, failures = 0;

  vrf dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wg_en = '0; we_en = '0;
    // initialise every register through the element ports
    for (int p = 0; p < PREGS; p++)
      for (int e = 0; e < MVL; e += PORTS) begin
        @(negedge clk);
        for (int j = 0; j < PORTS; j++) begin
          we_en[j] = 1; we_preg[j] = PR_W'(p); we_eidx[j] = EL_W'(e + j);
          we_data[j] = {$urandom, $urandom}; model[p][e + j] = we_data[j];
        end
      end
    @(negedge clk); we_en = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // distinct targets: group writes use registers 0..47, element writes 48..95
      for (int w = 0; w < 3; w++) begin
        wg_en[w] = 1'($urandom); wg_preg[w] = PR_W'(w * 16 + $urandom % 16);
        wg_grp[w] = GR_W'($urandom); wg_mask[w] = LANES'($urandom);
        for (int l = 0; l < LANES; l++) wg_data[w][l] = {$urandom, $urandom};
      end
      for (int j = 0; j < PORTS; j++) begin
        we_en[j] = 1'($urandom); we_preg[j] = PR_W'(48 + j * 6 + $urandom % 6);
        we_eidx[j] = EL_W'($urandom); we_data[j] = {$urandom, $urandom};
      end
      for (int r = 0; r < 7; r++) begin rg_preg[r] = PR_W'($urandom % PREGS); rg_grp[r] = GR_W'($urandom); end
      #1;
      for (int r = 0; r < 7; r++)
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (rg_data[r][l] !== model[rg_preg[r]][int'(rg_grp[r]) * LANES + l]) begin
            failures++; $display("FAIL read p%0d g%0d l%0d", rg_preg[r], rg_grp[r], l);
          end
        end
      for (int w = 0; w < 3; w++) if (wg_en[w])
        for (int l = 0; l < LANES; l++) if (wg_mask[w][l]) model[wg_preg[w]][int'(wg_grp[w]) * LANES + l] = wg_data[w][l];
      for (int j = 0; j < PORTS; j++) if (we_en[j]) model[we_preg[j]][we_eidx[j]] = we_data[j];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
