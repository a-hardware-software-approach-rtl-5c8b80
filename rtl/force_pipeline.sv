// force_pipeline: the second pipeline of the write-back design, CALC_NBF
// followed by the Newton's-third-law update of the neighbor.
//
// For each pair (i, j) inside the cutoff it evaluates the shifted-force
// Lennard-Jones force plus the cutoff Coulomb force,
//   s = (12A/r^6 - 6B) / r^8 - FS/r + qq (1/r^2 - 1/rc^2) / r,
//   f_ij = s * r_ij,
// and the shifted pair potential
//   v = A/r^12 - B/r^6 + FS*r - PS + qq (1/r - 2/rc + r/rc^2),
// where A, B, FS (the LJ force magnitude at rc) and PS (V_LJ(rc) + rc*FS)
// come from the type-pair constant RAMs and qq = ke * q_i * q_j. f_ij and v
// are added into the i-atom accumulators, and f_j - f_ij, with f_j read
// from force memory, is written to force RAM slot n for the later write-back.
// Timing: one neighbor enters per cycle on in_valid (entry = FIFO head).
// f_ij reaches the accumulators 11 cycles later (LATENCY), the read of f_j
// is issued RD_LAT cycles before that, and force RAM is written one cycle
// after. `start` (one cycle, with the i atom's charge, type and stored
// force) restarts the accumulators and slot counter; the controller only
// pulses it when the pipeline is empty. `busy` is high while any pair is in
// flight; fi/pe_i are final one cycle after busy falls.
// The force and potential formulas follow the published pair force (LJ plus
// cutoff Coulomb) with shifted forces; the stage order and one-cycle
// operators are this design's own (the original pipeline is about 200
// stages deep, built from vendor floating-point cores).
module force_pipeline
  import fp32_pkg::*;
#(
    parameter int unsigned RD_LAT = 2,
    parameter int unsigned MAX_TYPES = 22,
    parameter int unsigned LJ_DEPTH = 512,
    parameter int unsigned FRAM_DEPTH = 1024
) (
    input  logic                          clk,
    input  logic                          rst_n,
    // constants
    input  fp32_t                         ke,
    input  fp32_t                         inv_rc2,
    input  fp32_t                         two_inv_rc,
    input  logic                          lj_we,
    input  logic [                   1:0] lj_wsel,
    input  logic [ $clog2(LJ_DEPTH)-1:0]  lj_waddr,
    input  fp32_t                         lj_wdata,
    // new i atom
    input  logic                          start,
    input  fp32_t                         qi,
    input  logic [            TYPE_W-1:0] typ_i,
    input  force_word_t                   fi_init,
    // neighbors
    input  logic                          in_valid,
    input  fifo_entry_t                   entry,
    // f_j read from force memory
    output logic                          fj_rd_en,
    output logic [            ATOM_W-1:0] fj_rd_idx,
    input  force_word_t                   fj_rd_data,
    // updated f_j to force RAM
    output logic                          fram_we,
    output logic [$clog2(FRAM_DEPTH)-1:0] fram_addr,
    output logic [            ATOM_W-1:0] fram_idx,
    output force_word_t                   fram_force,
    output logic [ $clog2(FRAM_DEPTH):0]  n_count,
    // i-atom sums
    output force_word_t                   fi,
    output fp32_t                         pe_i,
    output logic                          busy
);

  localparam int unsigned LATENCY = 11;
  localparam fp32_t FP_ONE = 32'h3F80_0000;
  localparam int unsigned LJ_AW = $clog2(LJ_DEPTH);

  // ---- valid and index travel with the pair ----
  logic [LATENCY+1:0] vld;  // vld[k]: pair at stage k+1
  logic [ATOM_W-1:0] idx_p[LATENCY+1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else vld <= {vld[LATENCY:0], in_valid};
  end
  always_ff @(posedge clk) begin
    idx_p[0] <= entry.idx;
    for (int k = 1; k <= LATENCY; k++) idx_p[k] <= idx_p[k-1];
  end
  assign busy = |vld;

  // i-atom context
  fp32_t qi_r;
  logic [TYPE_W-1:0] ti_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qi_r <= FP_ZERO;
      ti_r <= '0;
    end else if (start) begin
      qi_r <= qi;
      ti_r <= typ_i;
    end
  end

  // ---- S0 (t): sqrt, constant lookup, q_i*q_j ----
  fp32_t a1, b1, fs1, ps1, sq1, qq0_1;
  logic [LJ_AW-1:0] lj_raddr;
  assign lj_raddr = LJ_AW'(32'(ti_r) * MAX_TYPES + 32'(entry.typ));
  lj_const_ram #(.DEPTH(LJ_DEPTH)) u_lj (
      .clk, .we(lj_we), .wsel(lj_wsel), .waddr(lj_waddr), .wdata(lj_wdata),
      .re(1'b1), .raddr(lj_raddr),
      .a_out(a1), .b_out(b1), .fs_out(fs1), .ps_out(ps1)
  );
  fp_core #(.OP(FP_SQRT)) u_sqrt (.clk, .en(1'b1), .a(entry.r2), .b(FP_ZERO), .y(sq1));
  fp_core #(.OP(FP_MUL)) u_qq0 (.clk, .en(1'b1), .a(qi_r), .b(entry.q), .y(qq0_1));

  // ---- S1 (t+1) ----
  fp32_t inv_r2_, qq2, a12_2, b6_2;
  fp_core #(.OP(FP_DIV)) u_invr (.clk, .en(1'b1), .a(FP_ONE), .b(sq1), .y(inv_r2_));
  fp_core #(.OP(FP_MUL)) u_qq (.clk, .en(1'b1), .a(qq0_1), .b(ke), .y(qq2));
  fp_core #(.OP(FP_MUL)) u_a12 (.clk, .en(1'b1), .a(a1), .b(FP_TWELVE), .y(a12_2));
  fp_core #(.OP(FP_MUL)) u_b6 (.clk, .en(1'b1), .a(b1), .b(FP_SIX), .y(b6_2));

  // ---- S2 (t+2) ----
  fp32_t r2_2, fs_2, fs_3, ir2_3, r_3, fsl_3, vc1_3;
  pipe_delay #(.W(32), .N(2)) d_r2 (.clk, .d(entry.r2), .q(r2_2));
  pipe_delay #(.W(32), .N(1)) d_fs2 (.clk, .d(fs1), .q(fs_2));
  pipe_delay #(.W(32), .N(2)) d_fs3 (.clk, .d(fs1), .q(fs_3));
  fp_core #(.OP(FP_MUL)) u_ir2 (.clk, .en(1'b1), .a(inv_r2_), .b(inv_r2_), .y(ir2_3));
  fp_core #(.OP(FP_MUL)) u_r (.clk, .en(1'b1), .a(r2_2), .b(inv_r2_), .y(r_3));
  fp_core #(.OP(FP_MUL)) u_fsl (.clk, .en(1'b1), .a(fs_2), .b(inv_r2_), .y(fsl_3));
  fp_core #(.OP(FP_SUB)) u_vc1 (.clk, .en(1'b1), .a(inv_r2_), .b(two_inv_rc), .y(vc1_3));

  // ---- S3 (t+3) ----
  fp32_t ir4_4, cdiff_4, fsr_4, vc2_4;
  fp_core #(.OP(FP_MUL)) u_ir4 (.clk, .en(1'b1), .a(ir2_3), .b(ir2_3), .y(ir4_4));
  fp_core #(.OP(FP_SUB)) u_cdiff (.clk, .en(1'b1), .a(ir2_3), .b(inv_rc2), .y(cdiff_4));
  fp_core #(.OP(FP_MUL)) u_fsr (.clk, .en(1'b1), .a(fs_3), .b(r_3), .y(fsr_4));
  fp_core #(.OP(FP_MUL)) u_vc2 (.clk, .en(1'b1), .a(r_3), .b(inv_rc2), .y(vc2_4));

  // ---- S4 (t+4) ----
  fp32_t ir2_4, qq_4, vc1_4, ir6_5, ir8_5, cterm_5, vc3_5;
  pipe_delay #(.W(32), .N(1)) d_ir2 (.clk, .d(ir2_3), .q(ir2_4));
  pipe_delay #(.W(32), .N(2)) d_qq4 (.clk, .d(qq2), .q(qq_4));
  pipe_delay #(.W(32), .N(1)) d_vc1 (.clk, .d(vc1_3), .q(vc1_4));
  fp_core #(.OP(FP_MUL)) u_ir6 (.clk, .en(1'b1), .a(ir4_4), .b(ir2_4), .y(ir6_5));
  fp_core #(.OP(FP_MUL)) u_ir8 (.clk, .en(1'b1), .a(ir4_4), .b(ir4_4), .y(ir8_5));
  fp_core #(.OP(FP_MUL)) u_ct (.clk, .en(1'b1), .a(qq_4), .b(cdiff_4), .y(cterm_5));
  fp_core #(.OP(FP_ADD)) u_vc3 (.clk, .en(1'b1), .a(vc1_4), .b(vc2_4), .y(vc3_5));

  // ---- S5 (t+5) ----
  fp32_t a12_5, a_5, b_5, ir_5, qq_5, t1_6, ar6_6, br6_6, cc_6, vc4_6;
  pipe_delay #(.W(32), .N(3)) d_a12 (.clk, .d(a12_2), .q(a12_5));
  pipe_delay #(.W(32), .N(4)) d_a (.clk, .d(a1), .q(a_5));
  pipe_delay #(.W(32), .N(4)) d_b (.clk, .d(b1), .q(b_5));
  pipe_delay #(.W(32), .N(3)) d_ir (.clk, .d(inv_r2_), .q(ir_5));
  pipe_delay #(.W(32), .N(3)) d_qq5 (.clk, .d(qq2), .q(qq_5));
  fp_core #(.OP(FP_MUL)) u_t1 (.clk, .en(1'b1), .a(a12_5), .b(ir6_5), .y(t1_6));
  fp_core #(.OP(FP_MUL)) u_ar6 (.clk, .en(1'b1), .a(a_5), .b(ir6_5), .y(ar6_6));
  fp_core #(.OP(FP_MUL)) u_br6 (.clk, .en(1'b1), .a(b_5), .b(ir6_5), .y(br6_6));
  fp_core #(.OP(FP_MUL)) u_cc (.clk, .en(1'b1), .a(cterm_5), .b(ir_5), .y(cc_6));
  fp_core #(.OP(FP_MUL)) u_vc4 (.clk, .en(1'b1), .a(qq_5), .b(vc3_5), .y(vc4_6));

  // ---- S6 (t+6) ----
  fp32_t b6_6, ir6_6, t2_7, va_7;
  pipe_delay #(.W(32), .N(4)) d_b6 (.clk, .d(b6_2), .q(b6_6));
  pipe_delay #(.W(32), .N(1)) d_ir6 (.clk, .d(ir6_5), .q(ir6_6));
  fp_core #(.OP(FP_SUB)) u_t2 (.clk, .en(1'b1), .a(t1_6), .b(b6_6), .y(t2_7));
  fp_core #(.OP(FP_MUL)) u_va (.clk, .en(1'b1), .a(ar6_6), .b(ir6_6), .y(va_7));

  // ---- S7 (t+7) ----
  fp32_t ir8_7, br6_7, t3_8, v1_8;
  pipe_delay #(.W(32), .N(2)) d_ir8 (.clk, .d(ir8_5), .q(ir8_7));
  pipe_delay #(.W(32), .N(1)) d_br6 (.clk, .d(br6_6), .q(br6_7));
  fp_core #(.OP(FP_MUL)) u_t3 (.clk, .en(1'b1), .a(t2_7), .b(ir8_7), .y(t3_8));
  fp_core #(.OP(FP_SUB)) u_v1 (.clk, .en(1'b1), .a(va_7), .b(br6_7), .y(v1_8));

  // ---- S8 (t+8) ----
  fp32_t fsl_8, fsr_8, t4_9, v2_9;
  pipe_delay #(.W(32), .N(5)) d_fsl (.clk, .d(fsl_3), .q(fsl_8));
  pipe_delay #(.W(32), .N(4)) d_fsr (.clk, .d(fsr_4), .q(fsr_8));
  fp_core #(.OP(FP_SUB)) u_t4 (.clk, .en(1'b1), .a(t3_8), .b(fsl_8), .y(t4_9));
  fp_core #(.OP(FP_ADD)) u_v2 (.clk, .en(1'b1), .a(v1_8), .b(fsr_8), .y(v2_9));

  // ---- S9 (t+9) ----
  fp32_t cc_9, ps_9, s_10, v3_10;
  pipe_delay #(.W(32), .N(3)) d_cc (.clk, .d(cc_6), .q(cc_9));
  pipe_delay #(.W(32), .N(8)) d_ps (.clk, .d(ps1), .q(ps_9));
  fp_core #(.OP(FP_ADD)) u_s (.clk, .en(1'b1), .a(t4_9), .b(cc_9), .y(s_10));
  fp_core #(.OP(FP_SUB)) u_v3 (.clk, .en(1'b1), .a(v2_9), .b(ps_9), .y(v3_10));

  // ---- S10 (t+10) ----
  fp32_t vc4_10, v_11;
  fp32_t d_t[3], d_10[3], f_11[3];
  assign d_t[0] = entry.dx;
  assign d_t[1] = entry.dy;
  assign d_t[2] = entry.dz;
  pipe_delay #(.W(32), .N(4)) d_vc4 (.clk, .d(vc4_6), .q(vc4_10));
  fp_core #(.OP(FP_ADD)) u_v (.clk, .en(1'b1), .a(v3_10), .b(vc4_10), .y(v_11));

  // ---- S11 (t+11): f_ij ready; S12: f_j - f_ij ready ----
  fp32_t fj_11[3], fjn_12[3];
  assign fj_11[0] = fj_rd_data.x;
  assign fj_11[1] = fj_rd_data.y;
  assign fj_11[2] = fj_rd_data.z;
  for (genvar c = 0; c < 3; c++) begin : g_comp
    pipe_delay #(.W(32), .N(10)) d_d (.clk, .d(d_t[c]), .q(d_10[c]));
    fp_core #(.OP(FP_MUL)) u_f (.clk, .en(1'b1), .a(s_10), .b(d_10[c]), .y(f_11[c]));
    fp_core #(.OP(FP_SUB)) u_fj (.clk, .en(1'b1), .a(fj_11[c]), .b(f_11[c]), .y(fjn_12[c]));
  end

  // Read f_j so that it arrives together with f_ij.
  assign fj_rd_en = vld[LATENCY-RD_LAT-1];
  assign fj_rd_idx = idx_p[LATENCY-RD_LAT-1];

  // i-atom accumulators: three force components and the potential energy.
  fp_accumulator u_acc_x (.clk, .rst_n, .start, .init(fi_init.x), .in_valid(vld[LATENCY-1]), .in_data(f_11[0]), .sum(fi.x));
  fp_accumulator u_acc_y (.clk, .rst_n, .start, .init(fi_init.y), .in_valid(vld[LATENCY-1]), .in_data(f_11[1]), .sum(fi.y));
  fp_accumulator u_acc_z (.clk, .rst_n, .start, .init(fi_init.z), .in_valid(vld[LATENCY-1]), .in_data(f_11[2]), .sum(fi.z));
  fp_accumulator u_acc_v (.clk, .rst_n, .start, .init(FP_ZERO), .in_valid(vld[LATENCY-1]), .in_data(v_11), .sum(pe_i));
  assign fi.pad = FP_ZERO;

  // Updated neighbor force to force RAM slot n.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_count <= '0;
    else if (start) n_count <= '0;
    else if (fram_we) n_count <= n_count + 1'b1;
  end
  assign fram_we = vld[LATENCY];
  assign fram_addr = n_count[$clog2(FRAM_DEPTH)-1:0];
  assign fram_idx = idx_p[LATENCY];
  assign fram_force = '{pad: FP_ZERO, z: fjn_12[2], y: fjn_12[1], x: fjn_12[0]};

  a_start_when_empty :
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_fram_fits :
  assert property (@(posedge clk) disable iff (!rst_n) fram_we |-> 32'(n_count) < FRAM_DEPTH);

endmodule
