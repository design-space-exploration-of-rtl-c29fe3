// tb_ppom_engine: the greedy configuration search.
//  * a hand-worked memory-bound case (EA 0.5, DA 0.5, EM 1.0, DM 0.25, HR 0.9,
//    AL = ML = 0.5, K = S = 0, 1000 instructions each): ports double twice, the
//    third step turns the kernel compute-bound and costs more energy, so the
//    answer is 4 pipes, 16 ports after 3 estimations;
//  * 300 random profiles compared with a reference written here in real
//    arithmetic (results are accepted when the reference's energy margin is too
//    small for the fixed-point rounding to decide);
//  * the search never takes more than 8 estimations, and it must take exactly
//    2 cycles per estimation plus 3.
module tb_ppom_engine;
  import mvp_pkg::*;
  logic clk = 0, rst_n = 0, start, busy, done, bmem;
  logic [31:0] ea, da, em, dm, ia, im;
  logic [15:0] hr, k, s, al, ml;
  logic [2:0] pipe_idx, port_idx;
  logic [3:0] n_est;
  logic [63:0] best_cycles, best_energy;
  int checks = 0, failures = 0;
  real tdp [5][5] = '{'{5.18, 5.63, 7.06, 12.09, 31.41}, '{6.91, 7.36, 8.78, 13.82, 33.14},
                      '{10.36, 10.81, 12.23, 17.27, 36.59}, '{17.26, 17.71, 19.14, 24.17, 43.49},
                      '{32.78, 33.23, 34.66, 39.69, 59.01}};

  ppom_engine dut (.clk, .rst_n, .start, .ea, .da, .em, .dm, .hr, .k, .s, .al, .ml, .ia, .im,
                   .busy, .done, .pipe_idx, .port_idx, .n_est, .best_cycles, .best_energy,
                   .last_bottleneck_mem(bmem));
  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] q16(real x); return 32'($rtoi(x * 65536.0)); endfunction

  task automatic run(real rea, real rda, real rem, real rdm, real rhr, real rk, real rs,
                     real ral, real rml, int nia, int nim,
                     output int pi, output int ci, output int ne, output int cyc);
    int t0, t;
    @(negedge clk);
    ea = q16(rea); da = q16(rda); em = q16(rem); dm = q16(rdm);
    hr = 16'(q16(rhr)); k = 16'(q16(rk)); s = 16'(q16(rs)); al = 16'(q16(ral)); ml = 16'(q16(rml));
    ia = nia; im = nim; start = 1;
    @(negedge clk); start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    pi = pipe_idx; ci = port_idx; ne = n_est; cyc = t;
  endtask

  // reference search in real arithmetic; also returns the smallest relative
  // energy gap met in a comparison, to spot ties
  task automatic model(real rea, real rda, real rem, real rdm, real rhr, real rk, real rs,
                       real ral, real rml, int nia, int nim,
                       output int pi, output int ci, output int ne, output real gap);
    real cea, cda, cem, cdm, nea, nda, nem, ndm, cur_e, new_e, c;
    int npi, nci;
    bit memb;
    cea = rea; cda = rda; cem = rem; cdm = rdm; pi = 0; ci = 0; ne = 0; gap = 1.0;
    memb = cem * cda > cea * cdm;
    c = memb ? nim / cdm : nia / cda;
    cur_e = c * tdp[0][0];
    forever begin
      memb = cem * cda > cea * cdm;
      if (memb ? ci == 4 : pi == 4) break;
      if (memb) begin
        npi = pi; nci = ci + 1;
        nda = cda; ndm = cdm * (1 + rhr); nea = cea * (1 + ral * rhr); nem = cem * (1 + rml * rhr);
      end else begin
        npi = pi + 1; nci = ci;
        nda = 2 * cda; ndm = cdm; nea = cea * (1 + rk); nem = cem * (1 + rs);
      end
      ne++;
      c = (nem * nda > nea * ndm) ? nim / ndm : nia / nda;
      new_e = c * tdp[npi][nci];
      if (((new_e - cur_e) / cur_e) < gap && ((cur_e - new_e) / cur_e) < gap)
        gap = (new_e > cur_e) ? (new_e - cur_e) / cur_e : (cur_e - new_e) / cur_e;
      // a bottleneck decided by a near tie is also a tie
      if ((nem * nda - nea * ndm) / (nea * ndm) < 1e-3 && (nea * ndm - nem * nda) / (nea * ndm) < 1e-3) gap = 0;
      if (new_e < cur_e) begin
        pi = npi; ci = nci; cea = nea; cda = nda; cem = nem; cdm = ndm; cur_e = new_e;
      end else break;
    end
  endtask

  initial begin
    int pi, ci, ne, cyc, mpi, mci, mne;
    real gap;
    start = 0; {ea, da, em, dm, ia, im} = '0; {hr, k, s, al, ml} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0.5, 0.5, 1.0, 0.25, 0.9, 0.0, 0.0, 0.5, 0.5, 1000, 1000, pi, ci, ne, cyc);
    checks++;
    if (pi != 0 || ci != 2 || ne != 3) begin
      failures++; $display("FAIL hand case: pipe_idx %0d port_idx %0d n_est %0d", pi, ci, ne);
    end
    checks++;
    if (cyc != 2 * ne + 3) begin failures++; $display("FAIL search took %0d cycles for %0d estimations", cyc, ne); end
    for (int t = 0; t < 300; t++) begin
      real r [9];
      int nia, nim;
      for (int i = 0; i < 4; i++) r[i] = 0.05 + ($urandom % 1000) / 500.0;
      for (int i = 4; i < 9; i++) r[i] = ($urandom % 1000) / 1000.0;
      nia = 100 + $urandom % 100000; nim = 100 + $urandom % 100000;
      run(r[0], r[1], r[2], r[3], r[4], r[5], r[6], r[7], r[8], nia, nim, pi, ci, ne, cyc);
      model(r[0], r[1], r[2], r[3], r[4], r[5], r[6], r[7], r[8], nia, nim, mpi, mci, mne, gap);
      checks++;
      if (ne > 8) begin failures++; $display("FAIL %0d estimations", ne); end
      if (gap > 1e-3) begin
        checks++;
        if (pi != mpi || ci != mci || ne != mne) begin
          failures++;
          $display("FAIL case %0d: got (%0d,%0d,%0d) expected (%0d,%0d,%0d)", t, pi, ci, ne, mpi, mci, mne);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
