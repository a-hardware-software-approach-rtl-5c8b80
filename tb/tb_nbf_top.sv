// tb_nbf_top: one complete nonbonded force pass of the whole accelerator at
// its default parameters, with the host and the on-board memories modelled.
//
// The testbench places NAT atoms of three types at random in a periodic
// box, builds a half neighbor list with a list radius larger than the
// cutoff (so the distance pipeline has pairs to reject), packs it as the
// hardware expects, and feeds it through the two alternating buffers in
// sections of SEC words. The first refill is delayed so that the force
// side runs out of work once; the list is long enough that the FIFO later
// fills up and holds the reader back. Position and force memories are
// single-ported models with a two-cycle read latency.
// Checked: the force on every atom against a real-valued Newton's third law
// reference with minimum image, the total potential, and that each
// mechanism of the design occurred: cutoff rejection, minimum-image
// correction, buffer switching, FIFO-full back-pressure, force-side
// starvation, two memory mode switches per atom, and a pass that ends.
module tb_nbf_top;
  import fp32_pkg::*;
  import tb_pkg::*;
  localparam int NAT = 800;
  localparam int NT = 3;
  localparam int MAXT = 22;
  localparam int SEC = 4096;
  localparam int RD_LAT = 2;
  localparam real L = 40.0;
  localparam real RC = 10.0;
  localparam real RLIST = 12.0;
  localparam real KE = 332.06;

  logic clk = 0, rst_n = 0, cfg_we = 0, start = 0, busy, done;
  logic [11:0] cfg_addr;
  fp32_t cfg_wdata, pe_total;
  logic [1:0] sec_valid = 0, sec_last = 0, sec_release;
  logic [20:0] sec_len[2];
  logic nl_rd_en, nl_rd_sec, pos_rd_en, frc_rd_en, frc_wr_en;
  logic [19:0] nl_rd_addr;
  logic [63:0] nl_rd_data, nl1;
  logic [ATOM_W-1:0] pos_rd_addr, frc_rd_addr, frc_wr_addr;
  pos_word_t pos_rd_data, p1;
  force_word_t frc_rd_data, f1, frc_wr_data;
  logic [31:0] pairs_in, pairs_kept, image_wraps, fifo_full_cycles, starve_cycles, turnarounds;
  logic [31:0] atoms_done, sec_switches, orphan_entries;

  logic [63:0] nlbuf[2][SEC];
  logic [63:0] words[$];
  pos_word_t pmem[NAT];
  force_word_t fmem[NAT];
  int checks = 0, failures = 0, nsec, next_chunk = 0, refills = 0;

  always #5 clk = ~clk;

  nbf_top dut (.*);

  // On-board memory models: single port, read data two cycles after the read.
  always_ff @(posedge clk) begin
    nl1 <= nlbuf[nl_rd_sec][nl_rd_addr[11:0]];
    nl_rd_data <= nl1;
    p1 <= pmem[10'(pos_rd_addr)];
    pos_rd_data <= p1;
    f1 <= fmem[10'(frc_rd_addr)];
    frc_rd_data <= f1;
    if (frc_wr_en) fmem[10'(frc_wr_addr)] <= frc_wr_data;
  end

  task automatic load(input int s);
    int base = next_chunk * SEC;
    int n = (words.size() - base) < SEC ? words.size() - base : SEC;
    for (int k = 0; k < n; k++) nlbuf[s][k] = words[base+k];
    sec_len[s] = 21'(n);
    sec_last[s] = (next_chunk == nsec - 1);
    sec_valid[s] = 1;
    next_chunk++;
  endtask

  task automatic cfg(input logic [11:0] addr, input real val);
    cfg_we = 1;
    cfg_addr = addr;
    cfg_wdata = r2fp(val);
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Host side of the buffer handshake: refill a released buffer later.
  always @(negedge clk)
    for (int s = 0; s < 2; s++)
    if (sec_release[s]) begin
      sec_valid[s] = 0;
      if (next_chunk < nsec) begin
        fork
          automatic int ss = s;
          automatic int dly = (refills == 0) ? 3000 : 50;
          begin
            repeat (dly) @(negedge clk);
            load(ss);
          end
        join_none
        refills++;
      end
    end

  initial begin
    real x[NAT][3], q[NAT], F[NAT][3], sc[NAT], A[NT][NT], B[NT][NT], FS[NT][NT], PS[NT][NT];
    real pe, pesc;
    int ty[NAT], cyc, listed;
    sec_len[0] = 0;
    sec_len[1] = 0;
    for (int t1 = 0; t1 < NT; t1++)
    for (int t2 = t1; t2 < NT; t2++) begin
      A[t1][t2] = fp2r(r2fp(2.0e5 + 2.0e5 * real'(t1 + t2)));
      B[t1][t2] = fp2r(r2fp(400.0 + 150.0 * real'(t1 * t2)));
      lj_shift(A[t1][t2], B[t1][t2], RC, FS[t1][t2], PS[t1][t2]);
      FS[t1][t2] = fp2r(r2fp(FS[t1][t2]));
      PS[t1][t2] = fp2r(r2fp(PS[t1][t2]));
      A[t2][t1] = A[t1][t2];
      B[t2][t1] = B[t1][t2];
      FS[t2][t1] = FS[t1][t2];
      PS[t2][t1] = PS[t1][t2];
    end
    // Atoms on a jittered grid so that no two come unphysically close.
    for (int k = 0; k < NAT; k++) begin
      int g[3];
      g = '{k % 10, (k / 10) % 10, k / 100};
      for (int c = 0; c < 3; c++)
      x[k][c] = fp2r(r2fp((real'(g[c]) + 0.2 + 0.6 * real'($urandom_range(1000)) / 1000.0) *
                          (c == 2 ? L / 8.0 : L / 10.0)));
      q[k] = fp2r(r2fp(real'($urandom_range(100)) / 100.0 - 0.5));
      ty[k] = $urandom_range(NT - 1);
      pmem[k] = '{q: r2fp(q[k]), z: r2fp(x[k][2]), y: r2fp(x[k][1]), x: r2fp(x[k][0])};
      fmem[k] = '0;
      sc[k] = 1.0;
      for (int c = 0; c < 3; c++) F[k][c] = 0.0;
    end
    // Neighbor list and reference forces.
    pe = 0.0;
    pesc = 1.0;
    listed = 0;
    for (int i = 0; i < NAT; i++) begin
      words.push_back({1'b1, 26'b0, 5'(ty[i]), 12'b0, 20'(i)});
      for (int j = i + 1; j < NAT; j++) begin
        real d[3], r2;
        for (int c = 0; c < 3; c++) d[c] = min_image(x[i][c] - x[j][c], L);
        r2 = d[0] * d[0] + d[1] * d[1] + d[2] * d[2];
        if (r2 >= RLIST * RLIST) continue;
        words.push_back({1'b0, 26'b0, 5'(ty[j]), 12'b0, 20'(j)});
        listed++;
        if (r2 < RC * RC) begin
          real s, v, r, qq, t;
          qq = KE * q[i] * q[j];
          pair_sv(r2, A[ty[i]][ty[j]], B[ty[i]][ty[j]], FS[ty[i]][ty[j]], PS[ty[i]][ty[j]], qq,
                  RC, s, v);
          r = $sqrt(r2);
          t = (12.0 * A[ty[i]][ty[j]] / (r2 ** 7) + 6.0 * B[ty[i]][ty[j]] / (r2 ** 4) +
               rabs(FS[ty[i]][ty[j]]) / r + rabs(qq) * 2.0 / (r2 * r)) * r;
          for (int c = 0; c < 3; c++) begin
            F[i][c] += s * d[c];
            F[j][c] -= s * d[c];
          end
          sc[i] += t;
          sc[j] += t;
          pe += v;
          pesc += A[ty[i]][ty[j]] / (r2 ** 6) + rabs(B[ty[i]][ty[j]]) / (r2 ** 3) +
              rabs(FS[ty[i]][ty[j]]) * r + rabs(PS[ty[i]][ty[j]]) + rabs(qq) * 3.0 / r;
        end
      end
    end
    nsec = (words.size() + SEC - 1) / SEC;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg(12'd0, L);
    cfg(12'd1, L);
    cfg(12'd2, L);
    cfg(12'd3, RC * RC);
    cfg(12'd4, KE);
    cfg(12'd5, 1.0 / (RC * RC));
    cfg(12'd6, 2.0 / RC);
    for (int t1 = 0; t1 < NT; t1++)
    for (int t2 = 0; t2 < NT; t2++) begin
      cfg({3'b100, 9'(t1 * MAXT + t2)}, A[t1][t2]);
      cfg({3'b101, 9'(t1 * MAXT + t2)}, B[t1][t2]);
      cfg({3'b110, 9'(t1 * MAXT + t2)}, FS[t1][t2]);
      cfg({3'b111, 9'(t1 * MAXT + t2)}, PS[t1][t2]);
    end
    load(0);
    if (nsec > 1) load(1);
    start = 1;
    @(negedge clk);
    start = 0;
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
        if (failures < 10) $display("FAIL atom %0d comp %0d: %g want %g", k, c, got, F[k][c]);
      end
    end
    checks++;
    if (rabs(fp2r(pe_total) - pe) > 1e-5 * pesc) begin
      failures++;
      $display("FAIL pe %g want %g", fp2r(pe_total), pe);
    end
    $display("atoms %0d list %0d kept %0d sections %0d cycles %0d", NAT, listed, pairs_kept,
             nsec, cyc);
    $display("events: cutoff rejects %0d, image wraps %0d, buffer switches %0d,",
             pairs_in - pairs_kept, image_wraps, sec_switches);
    $display("        fifo-full cycles %0d, starved cycles %0d, mode switches %0d", fifo_full_cycles,
             starve_cycles, turnarounds);
    checks += 8;
    if (pairs_in != 32'(listed)) begin failures++; $display("FAIL pairs tested"); end
    if (pairs_in == pairs_kept) begin failures++; $display("FAIL no cutoff reject"); end
    if (image_wraps == 0) begin failures++; $display("FAIL no minimum-image correction"); end
    if (sec_switches != 32'(nsec - 1) || nsec < 3) begin failures++; $display("FAIL buffer switches"); end
    if (fifo_full_cycles == 0) begin failures++; $display("FAIL fifo never full"); end
    if (starve_cycles == 0) begin failures++; $display("FAIL never starved"); end
    if (turnarounds != 2 * NAT || atoms_done != NAT) begin failures++; $display("FAIL mode switches"); end
    if (orphan_entries != 0 || busy) begin failures++; $display("FAIL orphans/busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
