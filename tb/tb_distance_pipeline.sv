// tb_distance_pipeline: random atoms in a periodic box, a stream of i
// headers and neighbors, and a position memory with a read latency of two
// cycles. Every output is compared, in order, with a real-valued reference
// of the minimum-image distance vector and the cutoff test; pairs closer
// than 1e-3 relative to the cutoff are avoided so that rounding cannot
// decide them. Also checks the latency (RD_LAT + 6) and the counters.
module tb_distance_pipeline;
  import fp32_pkg::*;
  import tb_pkg::*;
  localparam int RD_LAT = 2;
  localparam int NAT = 64;
  localparam real L = 20.0;
  localparam real RC = 6.0;

  logic clk = 0, rst_n = 0, item_valid = 0;
  fp32_t box[3], rc2;
  nl_item_t item;
  logic pos_rd_en, out_valid, busy;
  logic [ATOM_W-1:0] pos_rd_addr;
  pos_word_t pos_rd_data, p1, pmem[NAT];
  fifo_entry_t out_entry, exp_q[$];
  logic [31:0] pairs_in, pairs_kept, image_wraps;
  int checks = 0, failures = 0, cycle = 0, exp_kept = 0, in_cyc[$], lat_bad = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  distance_pipeline #(.RD_LAT(RD_LAT)) dut (.*);

  always_ff @(posedge clk) begin
    p1 <= pmem[6'(pos_rd_addr)];
    pos_rd_data <= p1;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input item_kind_e k, input int idx, input int cyc_gap);
    item_valid = 1;
    item = '{kind: k, typ: 5'(idx % 7), idx: ATOM_W'(idx)};
    in_cyc.push_back(cycle);
    @(negedge clk);
    item_valid = 0;
    repeat (cyc_gap) @(negedge clk);
  endtask

  // Inputs older than the latency without an output were dropped pairs.
  always @(posedge clk) begin
    while (in_cyc.size() > 0 && cycle - in_cyc[0] > RD_LAT + 6) void'(in_cyc.pop_front());
    if (out_valid) begin
      fifo_entry_t e;
      int c0;
      checks++;
      e  = exp_q.pop_front();
      c0 = in_cyc.pop_front();
      if (cycle - c0 != RD_LAT + 6) lat_bad++;
      if (out_entry.kind != e.kind || out_entry.idx != e.idx || out_entry.typ != e.typ ||
          (e.kind != ITEM_END && out_entry.q != e.q) ||
          (e.kind == ITEM_J && !(close(fp2r(out_entry.dx), fp2r(e.dx), 1e-5, 1e-4) &&
                                 close(fp2r(out_entry.dy), fp2r(e.dy), 1e-5, 1e-4) &&
                                 close(fp2r(out_entry.dz), fp2r(e.dz), 1e-5, 1e-4) &&
                                 close(fp2r(out_entry.r2), fp2r(e.r2), 1e-5, 1e-4)))) begin
        failures++;
        $display("FAIL out kind %0d idx %0d dx %g want %g r2 %g want %g", out_entry.kind,
                 out_entry.idx, fp2r(out_entry.dx), fp2r(e.dx), fp2r(out_entry.r2), fp2r(e.r2));
      end
    end
  end

  initial begin
    real x[NAT][3];
    for (int a = 0; a < NAT; a++) begin
      for (int c = 0; c < 3; c++) x[a][c] = real'($urandom_range(100000)) / 100000.0 * L;
      pmem[a] = '{q: r2fp(real'($urandom_range(200)) / 100.0 - 1.0), z: r2fp(x[a][2]),
                  y: r2fp(x[a][1]), x: r2fp(x[a][0])};
      for (int c = 0; c < 3; c++) x[a][c] = fp2r(c == 0 ? pmem[a].x : c == 1 ? pmem[a].y : pmem[a].z);
    end
    box = '{r2fp(L), r2fp(L), r2fp(L)};
    rc2 = r2fp(RC * RC);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      exp_q.push_back('{kind: ITEM_I, typ: 5'(i % 7), idx: ATOM_W'(i), q: pmem[i].q, default: '0});
      drive(ITEM_I, i, 0);
      for (int j = i + 1; j < NAT; j++) begin
        real d[3], r2;
        for (int c = 0; c < 3; c++) d[c] = min_image(x[i][c] - x[j][c], L);
        r2 = d[0] * d[0] + d[1] * d[1] + d[2] * d[2];
        if (rabs(r2 - RC * RC) < 1e-3 * RC * RC) continue;
        if (r2 < RC * RC) begin
          exp_kept++;
          exp_q.push_back('{kind: ITEM_J, typ: 5'(j % 7), idx: ATOM_W'(j), q: pmem[j].q,
                            dx: r2fp(d[0]), dy: r2fp(d[1]), dz: r2fp(d[2]), r2: r2fp(r2)});
        end
        drive(ITEM_J, j, $urandom_range(3) == 0 ? 1 : 0);
      end
    end
    exp_q.push_back('{kind: ITEM_END, default: '0});
    drive(ITEM_END, 0, 0);
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || pairs_kept != 32'(exp_kept) || image_wraps == 0 || lat_bad != 0
        || busy) begin
      failures++;
      $display("FAIL totals: left %0d kept %0d/%0d wraps %0d lat_bad %0d", exp_q.size(),
               pairs_kept, exp_kept, image_wraps, lat_bad);
    end
    $display("pairs %0d kept %0d wraps %0d", pairs_in, pairs_kept, image_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
