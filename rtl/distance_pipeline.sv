// distance_pipeline: the first of the two pipelines of the write-back
// design. For every neighbor j of the current i atom it finds the distance
// vector r_ij = r_i - r_j under the minimum image convention, its squared
// length r2, and keeps the pair only if r2 < rc2.
//
// Items come from the neighbor-list reader. For every item but ITEM_END it
// reads the atom's {q, z, y, x} record from position memory (the two
// position banks, read in parallel); the record returns RD_LAT cycles later.
// An i header loads the current-i registers and is passed on to the FIFO
// with i's charge and type. A neighbor j is passed on as {dx, dy, dz, r2,
// q_j, type_j, j} if it lies inside the cutoff, and dropped otherwise.
// ITEM_END is passed on unchanged. There is no dependence between items, so
// the pipeline never stalls: one item enters and one leaves per cycle, and
// the writer upstream stops issuing when the FIFO is almost full.
// Stages after the position read (one floating-point operation deep each):
//   B  dx = xi - xj
//   C  minimum image: dx > L/2 -> dx - L, dx < -L/2 -> dx + L (computed in
//      parallel, selected at the next stage)
//   D  dx^2, dy^2, dz^2
//   E  dx^2 + dy^2       F  + dz^2 = r2       G  r2 < rc2
// Latency from item_valid to out_valid: RD_LAT + 6 cycles.
// The test r2 < rc2 and the record contents follow the design; a single
// image correction per component (atoms stay inside the box) and the
// stage split are this design's choices.
module distance_pipeline
  import fp32_pkg::*;
#(
    parameter int unsigned RD_LAT = 2
) (
    input  logic               clk,
    input  logic               rst_n,
    input  fp32_t              box[3],
    input  fp32_t              rc2,
    input  logic               item_valid,
    input  nl_item_t           item,
    output logic               pos_rd_en,
    output logic [ATOM_W-1:0]  pos_rd_addr,
    input  pos_word_t          pos_rd_data,
    output logic               out_valid,
    output fifo_entry_t        out_entry,
    output logic               busy,
    output logic [31:0]        pairs_in,
    output logic [31:0]        pairs_kept,
    output logic [31:0]        image_wraps
);

  typedef struct packed {
    logic vld;
    item_kind_e kind;
    logic [TYPE_W-1:0] typ;
    logic [ATOM_W-1:0] idx;
    fp32_t q;
  } meta_t;

  localparam int unsigned NST = 6;  // stages B..G

  logic [RD_LAT-1:0] dl_vld;
  nl_item_t dl_item[RD_LAT];
  meta_t meta[NST];
  pos_word_t ri;

  assign pos_rd_en = item_valid && (item.kind != ITEM_END);
  assign pos_rd_addr = item.idx;

  // Read latency of position memory.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dl_vld <= '0;
    else dl_vld <= {dl_vld[RD_LAT-2:0], item_valid};
  end
  always_ff @(posedge clk) begin
    dl_item[0] <= item;
    for (int k = 1; k < RD_LAT; k++) dl_item[k] <= dl_item[k-1];
  end

  // Stage A: position data present.
  wire a_vld = dl_vld[RD_LAT-1];
  nl_item_t a_item;
  assign a_item = dl_item[RD_LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ri <= '0;
    else if (a_vld && a_item.kind == ITEM_I) ri <= pos_rd_data;
  end

  meta_t a_meta;
  always_comb begin
    a_meta.vld = a_vld;
    a_meta.kind = a_item.kind;
    a_meta.typ = a_item.typ;
    a_meta.idx = a_item.idx;
    a_meta.q = pos_rd_data.q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NST; k++) meta[k] <= '0;
    end else begin
      meta[0] <= a_meta;
      for (int k = 1; k < NST; k++) meta[k] <= meta[k-1];
    end
  end

  fp32_t pj[3], pi[3];
  assign pj[0] = pos_rd_data.x;
  assign pj[1] = pos_rd_data.y;
  assign pj[2] = pos_rd_data.z;
  assign pi[0] = ri.x;
  assign pi[1] = ri.y;
  assign pi[2] = ri.z;

  fp32_t d_b[3], gt_c[3], lt_c[3], dm_c[3], dp_c[3], draw_c[3], d_sel[3], sq_d[3];
  fp32_t sxy_e, sqz_e, r2_f, in_g, r2_g;
  fp32_t dd_d[3], dd_e[3], dd_f[3], dd_g[3];

  for (genvar c = 0; c < 3; c++) begin : g_comp
    // B: raw difference
    fp_core #(.OP(FP_SUB)) u_sub (.clk, .en(1'b1), .a(pi[c]), .b(pj[c]), .y(d_b[c]));
    // C: image candidates
    fp_core #(.OP(FP_LT)) u_gt (.clk, .en(1'b1), .a(fp_half(box[c])), .b(d_b[c]), .y(gt_c[c]));
    fp_core #(.OP(FP_LT)) u_lt (.clk, .en(1'b1), .a(d_b[c]), .b(fp_neg(fp_half(box[c]))), .y(lt_c[c]));
    fp_core #(.OP(FP_SUB)) u_dm (.clk, .en(1'b1), .a(d_b[c]), .b(box[c]), .y(dm_c[c]));
    fp_core #(.OP(FP_ADD)) u_dp (.clk, .en(1'b1), .a(d_b[c]), .b(box[c]), .y(dp_c[c]));
    always_ff @(posedge clk) draw_c[c] <= d_b[c];
    assign d_sel[c] = gt_c[c][0] ? dm_c[c] : (lt_c[c][0] ? dp_c[c] : draw_c[c]);
    // D: square
    fp_core #(.OP(FP_MUL)) u_sq (.clk, .en(1'b1), .a(d_sel[c]), .b(d_sel[c]), .y(sq_d[c]));
    always_ff @(posedge clk) begin
      dd_d[c] <= d_sel[c];
      dd_e[c] <= dd_d[c];
      dd_f[c] <= dd_e[c];
      dd_g[c] <= dd_f[c];
    end
  end

  // E, F: sum of squares
  fp_core #(.OP(FP_ADD)) u_sxy (.clk, .en(1'b1), .a(sq_d[0]), .b(sq_d[1]), .y(sxy_e));
  always_ff @(posedge clk) sqz_e <= sq_d[2];
  fp_core #(.OP(FP_ADD)) u_r2 (.clk, .en(1'b1), .a(sxy_e), .b(sqz_e), .y(r2_f));
  // G: cutoff test
  fp_core #(.OP(FP_LT)) u_cut (.clk, .en(1'b1), .a(r2_f), .b(rc2), .y(in_g));
  always_ff @(posedge clk) r2_g <= r2_f;

  meta_t mg;
  assign mg = meta[NST-1];
  wire keep = mg.vld && ((mg.kind != ITEM_J) || in_g[0]);

  always_comb begin
    out_valid = keep;
    out_entry.kind = mg.kind;
    out_entry.typ = mg.typ;
    out_entry.idx = mg.idx;
    out_entry.q = mg.q;
    out_entry.dx = dd_g[0];
    out_entry.dy = dd_g[1];
    out_entry.dz = dd_g[2];
    out_entry.r2 = r2_g;
  end

  always_comb begin
    busy = |dl_vld;
    for (int k = 0; k < NST; k++) busy = busy | meta[k].vld;
  end

  wire wrap_c = gt_c[0][0] | lt_c[0][0] | gt_c[1][0] | lt_c[1][0] | gt_c[2][0] | lt_c[2][0];

  // Event counters: pairs tested, pairs inside the cutoff, image corrections.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pairs_in <= '0;
      pairs_kept <= '0;
      image_wraps <= '0;
    end else begin
      if (mg.vld && mg.kind == ITEM_J) pairs_in <= pairs_in + 1;
      if (mg.vld && mg.kind == ITEM_J && in_g[0]) pairs_kept <= pairs_kept + 1;
      if (meta[1].vld && meta[1].kind == ITEM_J)
        image_wraps <= image_wraps + {31'b0, wrap_c};
    end
  end

endmodule
