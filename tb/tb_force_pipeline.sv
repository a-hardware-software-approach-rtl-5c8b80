// tb_force_pipeline: loads Lennard-Jones constants for four atom types,
// then runs several i atoms, each with a burst of random neighbor vectors
// inside the cutoff (one per cycle, with occasional gaps). A force memory
// model returns f_j two cycles after each read. Every force RAM write is
// compared with f_j - f_ij from a real-valued model of the shifted
// Lennard-Jones and cutoff Coulomb formulas, and after each atom the
// accumulated f_i and potential are compared too. The tolerance is 1e-5 of
// the largest term of the formula, so that cancellation between the
// shifted terms near the cutoff is not mistaken for an error. Also checks
// the 12-cycle latency from in_valid to the force RAM write.
module tb_force_pipeline;
  import fp32_pkg::*;
  import tb_pkg::*;
  localparam int RD_LAT = 2;
  localparam int MAXT = 22;
  localparam real RC = 10.0;
  localparam real KE = 332.06;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, lj_we = 0;
  fp32_t ke, inv_rc2, two_inv_rc, qi, lj_wdata, pe_i;
  logic [1:0] lj_wsel;
  logic [8:0] lj_waddr;
  logic [TYPE_W-1:0] typ_i;
  force_word_t fi_init, fi, fj_rd_data, fj1, fram_force;
  fifo_entry_t entry;
  logic fj_rd_en, fram_we, busy;
  logic [ATOM_W-1:0] fj_rd_idx, fram_idx;
  logic [9:0] fram_addr;
  logic [10:0] n_count;
  force_word_t fmem[64];
  real ra[4][4], rb[4][4], rfs[4][4], rps[4][4];
  int checks = 0, failures = 0, cycle = 0, lat_bad = 0;
  int in_cyc[$];
  real exp_fx[$], exp_fy[$], exp_fz[$], exp_sc[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  force_pipeline #(.RD_LAT(RD_LAT), .MAX_TYPES(MAXT)) dut (.*);

  always_ff @(posedge clk) begin
    fj1 <= fmem[fj_rd_idx[5:0]];
    fj_rd_data <= fj1;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (fram_we) begin
      real want[3], sc;
      int c0;
      c0 = in_cyc.pop_front();
      if (cycle - c0 != 12) lat_bad++;
      want[0] = exp_fx.pop_front();
      want[1] = exp_fy.pop_front();
      want[2] = exp_fz.pop_front();
      sc = exp_sc.pop_front();
      for (int c = 0; c < 3; c++) begin
        real got;
        got = fp2r(c == 0 ? fram_force.x : c == 1 ? fram_force.y : fram_force.z);
        checks++;
        if (rabs(got - want[c]) > 1e-5 * sc + 1e-6 * rabs(want[c])) begin
          failures++;
          $display("FAIL fram slot %0d comp %0d: %g want %g", fram_addr, c, got, want[c]);
        end
      end
    end

  initial begin
    real fsum[3], vsum, fscale, vscale;
    ke = r2fp(KE);
    inv_rc2 = r2fp(1.0 / (RC * RC));
    two_inv_rc = r2fp(2.0 / RC);
    for (int k = 0; k < 64; k++)
      fmem[k] = '{pad: FP_ZERO, z: r2fp(real'($urandom_range(2000)) / 100.0 - 10.0),
                  y: r2fp(real'($urandom_range(2000)) / 100.0 - 10.0),
                  x: r2fp(real'($urandom_range(2000)) / 100.0 - 10.0)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t1 = 0; t1 < 4; t1++)
    for (int t2 = 0; t2 < 4; t2++) begin
      real fs, ps;
      ra[t1][t2] = fp2r(r2fp(1.0e5 + real'($urandom_range(900)) * 1.0e3));
      rb[t1][t2] = fp2r(r2fp(300.0 + real'($urandom_range(700))));
      lj_shift(ra[t1][t2], rb[t1][t2], RC, fs, ps);
      rfs[t1][t2] = fp2r(r2fp(fs));
      rps[t1][t2] = fp2r(r2fp(ps));
      for (int s = 0; s < 4; s++) begin
        lj_we = 1;
        lj_wsel = 2'(s);
        lj_waddr = 9'(t1 * MAXT + t2);
        lj_wdata = r2fp(s == 0 ? ra[t1][t2] : s == 1 ? rb[t1][t2] : s == 2 ? rfs[t1][t2] : rps[t1][t2]);
        @(negedge clk);
      end
    end
    lj_we = 0;
    for (int i = 0; i < 6; i++) begin
      int ti;
      real rqi;
      ti = $urandom_range(3);
      rqi = fp2r(r2fp(real'($urandom_range(200)) / 100.0 - 1.0));
      start = 1;
      qi = r2fp(rqi);
      typ_i = TYPE_W'(ti);
      fi_init = '{pad: FP_ZERO, z: r2fp(1.5), y: r2fp(-2.0), x: r2fp(0.25)};
      fsum = '{0.25, -2.0, 1.5};
      vsum = 0.0;
      fscale = 1.0;
      vscale = 1.0;
      @(negedge clk);
      start = 0;
      for (int n = 0; n < 20 + i * 10; n++) begin
        real d[3], r2, rq, s, v, w[3], sc, r;
        int tj, j;
        tj = $urandom_range(3);
        j = $urandom_range(63);
        do begin
          for (int c = 0; c < 3; c++) d[c] = fp2r(r2fp(real'($urandom_range(20000)) / 1000.0 - 10.0));
          r2 = fp2r(r2fp(d[0] * d[0] + d[1] * d[1] + d[2] * d[2]));
        end while (r2 < 12.0 || r2 >= RC * RC);
        rq = fp2r(r2fp(real'($urandom_range(200)) / 100.0 - 1.0));
        pair_sv(r2, ra[ti][tj], rb[ti][tj], rfs[ti][tj], rps[ti][tj], KE * rqi * rq, RC, s, v);
        r = $sqrt(r2);
        sc = (12.0 * ra[ti][tj] / (r2 ** 7) + 6.0 * rb[ti][tj] / (r2 ** 4) + rabs(rfs[ti][tj]) / r
              + rabs(KE * rqi * rq) * (1.0 / r2 + 1.0 / (RC * RC)) / r) * r;
        for (int c = 0; c < 3; c++) begin
          w[c] = fp2r(c == 0 ? fmem[j].x : c == 1 ? fmem[j].y : fmem[j].z) - s * d[c];
          fsum[c] += s * d[c];
        end
        fscale += sc;
        vscale += ra[ti][tj] / (r2 ** 6) + rb[ti][tj] / (r2 ** 3) + rabs(rfs[ti][tj]) * r +
            rabs(rps[ti][tj]) + rabs(KE * rqi * rq) * (1.0 / r + 2.0 / RC + r / (RC * RC));
        vsum += v;
        exp_fx.push_back(w[0]);
        exp_fy.push_back(w[1]);
        exp_fz.push_back(w[2]);
        exp_sc.push_back(sc);
        in_cyc.push_back(cycle);
        in_valid = 1;
        entry = '{kind: ITEM_J, typ: TYPE_W'(tj), idx: ATOM_W'(j), q: r2fp(rq), dx: r2fp(d[0]),
                  dy: r2fp(d[1]), dz: r2fp(d[2]), r2: r2fp(r2)};
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(4) == 0) @(negedge clk);
      end
      while (busy) @(negedge clk);
      checks += 5;
      if (rabs(fp2r(fi.x) - fsum[0]) > 1e-5 * fscale || rabs(fp2r(fi.y) - fsum[1]) > 1e-5 * fscale
          || rabs(fp2r(fi.z) - fsum[2]) > 1e-5 * fscale) begin
        failures++;
        $display("FAIL fi atom %0d: %g %g %g want %g %g %g", i, fp2r(fi.x), fp2r(fi.y),
                 fp2r(fi.z), fsum[0], fsum[1], fsum[2]);
      end
      if (rabs(fp2r(pe_i) - vsum) > 1e-5 * vscale) begin
        failures++;
        $display("FAIL pe atom %0d: %g want %g", i, fp2r(pe_i), vsum);
      end
      if (n_count != 11'(20 + i * 10)) begin
        failures++;
        $display("FAIL n_count %0d", n_count);
      end
      if (lat_bad != 0) begin
        failures++;
        $display("FAIL latency");
      end
      if (exp_fx.size() != 0) begin
        failures++;
        $display("FAIL missing writes %0d", exp_fx.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
