// tb_force_controller: the force side of the accelerator on its own. The
// testbench places random atoms in a box, finds all pairs i < j within the
// cutoff, and writes i headers, neighbor records and the end marker straight
// into the FIFO. The controller, force pipeline and a force memory model
// (single port, two-cycle reads, zero-initialised) then run one pass.
// Checked: the final force on every atom against a real-valued Newton's
// third law reference, the total potential, the number of i atoms and of
// memory mode switches (two per atom), and the cycle count, which for the
// write-back scheme must be n(N + p) + n(N + 1) + n + 2sn plus a fixed
// per-atom overhead of this implementation.
module tb_force_controller;
  import fp32_pkg::*;
  import tb_pkg::*;
  localparam int RD_LAT = 2;
  localparam int DEAD = 4;
  localparam int NAT = 48;
  localparam int MAXT = 22;
  localparam real L = 24.0;
  localparam real RC = 9.0;
  localparam real KE = 332.06;
  // Cycles per i atom beyond 2N: f_i read (1 + RD_LAT), end of stream (1),
  // pipeline drain (13), two mode switches (2 * DEAD) and the f_i write (1).
  localparam int OVERHEAD = 1 + RD_LAT + 1 + 13 + 2 * DEAD + 1;

  logic clk = 0, rst_n = 0, go = 0, done, busy;
  logic push = 0, fifo_empty, fifo_full, fifo_af, fifo_pop;
  fifo_entry_t wentry, fifo_head;
  logic [$bits(fifo_entry_t)-1:0] fifo_rdata;
  logic [11:0] fifo_count;
  logic fp_start, fp_in_valid, fp_busy, fj_rd_en, fram_we, f_rd_en, f_wr_en;
  fp32_t fp_qi, fp_pe_i, pe_total;
  logic [TYPE_W-1:0] fp_typ_i;
  force_word_t fp_fi_init, fp_fi, fram_force, f_rd_data, f1, f_wr_data;
  logic [10:0] fp_n_count;
  logic [ATOM_W-1:0] fj_rd_idx, fram_idx, f_rd_addr, f_wr_addr;
  logic [9:0] fram_addr;
  logic [31:0] atoms_done, turnarounds, starve_cycles, orphan_entries;
  logic lj_we = 0;
  logic [1:0] lj_wsel = 0;
  logic [8:0] lj_waddr = 0;
  fp32_t lj_wdata, ke, inv_rc2, two_inv_rc;
  force_word_t fmem[NAT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign fifo_head = fifo_entry_t'(fifo_rdata);

  neighbor_fifo #(.WIDTH($bits(fifo_entry_t)), .DEPTH(2048)) u_fifo (
      .clk, .rst_n, .push, .wdata(wentry), .pop(fifo_pop), .rdata(fifo_rdata),
      .empty(fifo_empty), .full(fifo_full), .almost_full(fifo_af), .count(fifo_count)
  );
  force_pipeline #(.RD_LAT(RD_LAT), .MAX_TYPES(MAXT)) u_fp (
      .clk, .rst_n, .ke, .inv_rc2, .two_inv_rc, .lj_we, .lj_wsel, .lj_waddr, .lj_wdata,
      .start(fp_start), .qi(fp_qi), .typ_i(fp_typ_i), .fi_init(fp_fi_init),
      .in_valid(fp_in_valid), .entry(fifo_head), .fj_rd_en, .fj_rd_idx, .fj_rd_data(f_rd_data),
      .fram_we, .fram_addr, .fram_idx, .fram_force, .n_count(fp_n_count), .fi(fp_fi),
      .pe_i(fp_pe_i), .busy(fp_busy)
  );
  force_controller #(.RD_LAT(RD_LAT), .DEAD_CYCLES(DEAD)) dut (.*);

  always_ff @(posedge clk) begin
    f1 <= fmem[f_rd_addr[5:0]];
    f_rd_data <= f1;
    if (f_wr_en) fmem[f_wr_addr[5:0]] <= f_wr_data;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x[NAT][3], q[NAT], F[NAT][3], sc[NAT], pe, pesc, a, b, fs, ps;
    int nn[NAT], sum2n, cyc, n0;
    ke = r2fp(KE);
    inv_rc2 = r2fp(1.0 / (RC * RC));
    two_inv_rc = r2fp(2.0 / RC);
    a = fp2r(r2fp(6.0e5));
    b = fp2r(r2fp(600.0));
    lj_shift(a, b, RC, fs, ps);
    fs = fp2r(r2fp(fs));
    ps = fp2r(r2fp(ps));
    for (int k = 0; k < NAT; k++) begin
      fmem[k] = '0;
      q[k] = fp2r(r2fp(real'($urandom_range(100)) / 100.0 - 0.5));
      for (int c = 0; c < 3; c++) begin
        F[k][c] = 0.0;
        x[k][c] = real'($urandom_range(1000)) / 1000.0 * L;
      end
      sc[k] = 1.0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      lj_we = 1;
      lj_wsel = 2'(s);
      lj_waddr = 9'(0);
      lj_wdata = r2fp(s == 0 ? a : s == 1 ? b : s == 2 ? fs : ps);
      @(negedge clk);
    end
    lj_we = 0;
    pe = 0.0;
    pesc = 1.0;
    sum2n = 0;
    n0 = 0;
    for (int i = 0; i < NAT; i++) begin
      nn[i] = 0;
      push = 1;
      wentry = '{kind: ITEM_I, typ: '0, idx: ATOM_W'(i), q: r2fp(q[i]), default: '0};
      @(negedge clk);
      for (int j = i + 1; j < NAT; j++) begin
        real d[3], r2, s, v, r, t;
        for (int c = 0; c < 3; c++) d[c] = fp2r(r2fp(min_image(x[i][c] - x[j][c], L)));
        r2 = fp2r(r2fp(d[0] * d[0] + d[1] * d[1] + d[2] * d[2]));
        if (r2 >= RC * RC || r2 < 9.0) continue;
        pair_sv(r2, a, b, fs, ps, KE * q[i] * q[j], RC, s, v);
        r = $sqrt(r2);
        t = (12.0 * a / (r2 ** 7) + 6.0 * b / (r2 ** 4) + rabs(fs) / r +
             rabs(KE * q[i] * q[j]) * 2.0 / (r2 * r)) * r;
        for (int c = 0; c < 3; c++) begin
          F[i][c] += s * d[c];
          F[j][c] -= s * d[c];
        end
        sc[i] += t;
        sc[j] += t;
        pe += v;
        pesc += a / (r2 ** 6) + b / (r2 ** 3) + rabs(fs) * r + rabs(ps) + rabs(KE * q[i] * q[j]) * 3.0 / r;
        nn[i]++;
        wentry = '{kind: ITEM_J, typ: '0, idx: ATOM_W'(j), q: r2fp(q[j]), dx: r2fp(d[0]),
                   dy: r2fp(d[1]), dz: r2fp(d[2]), r2: r2fp(r2)};
        @(negedge clk);
      end
      sum2n += 2 * nn[i];
      if (nn[i] == 0) n0++;
    end
    wentry = '{kind: ITEM_END, default: '0};
    @(negedge clk);
    push = 0;
    @(negedge clk);
    go = 1;
    @(negedge clk);
    go  = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    for (int k = 0; k < NAT; k++)
    for (int c = 0; c < 3; c++) begin
      real got;
      got = fp2r(c == 0 ? fmem[k].x : c == 1 ? fmem[k].y : fmem[k].z);
      checks++;
      if (rabs(got - F[k][c]) > 1e-5 * sc[k]) begin
        failures++;
        $display("FAIL atom %0d comp %0d: %g want %g", k, c, got, F[k][c]);
      end
    end
    checks++;
    if (rabs(fp2r(pe_total) - pe) > 1e-5 * pesc) begin
      failures++;
      $display("FAIL pe %g want %g", fp2r(pe_total), pe);
    end
    checks++;
    if (atoms_done != NAT || turnarounds != 2 * NAT || orphan_entries != 0) begin
      failures++;
      $display("FAIL atoms %0d turnarounds %0d orphans %0d", atoms_done, turnarounds, orphan_entries);
    end
    checks++;
    // An atom without neighbors finds the pipeline empty at once, so its
    // drain takes 1 cycle instead of 13. Leaving idle, reading the end
    // marker and the done state add three cycles per pass.
    if (cyc != sum2n + NAT * OVERHEAD - 12 * n0 + 3) begin
      failures++;
      $display("FAIL cycles %0d, expected %0d (%0d atoms without neighbors)", cyc,
               sum2n + NAT * OVERHEAD - 12 * n0 + 3, n0);
    end
    $display("pairs %0d cycles %0d pe %g", sum2n / 2, cyc, fp2r(pe_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
