// nbf_top: nonbonded-force accelerator of a hardware/software molecular
// dynamics system. The host processor runs every other task of the
// simulation (integration, neighbor-list construction, bonded forces) and,
// at each time step, hands this unit the atom positions and the neighbor
// list; the unit returns the nonbonded force on every atom and the total
// nonbonded potential energy.
//
// Organisation (the write-back design):
//   nl_reader -> distance_pipeline -> neighbor_fifo -> force_pipeline
//                                                    \-> force_controller
// The neighbor-list reader streams the packed list from two alternating
// on-board memory buffers. The distance pipeline reads positions and drops
// pairs beyond the cutoff; the survivors wait in the FIFO, so that the
// distance side keeps working while the force side drains its pipeline and
// writes back after every i atom. The force controller owns the single
// port of force memory: per i atom it reads f_i, lets the force pipeline
// read every f_j, then writes f_i and the updated f_j values back.
//
// External memories (on-board banks), all single-ported with a read latency
// of OBM_RD_LAT cycles:
//   neighbor list  64-bit words, two buffers (nl_rd_sec selects)
//   positions      {q, z, y, x} fp32, two 64-bit banks read together
//   forces         {pad, z, y, x} fp32, two 64-bit banks; must hold the
//                  force to which this pass adds (zero for a fresh step)
// Configuration (cfg_we/cfg_addr/cfg_wdata, before `start`):
//   cfg_addr[11] = 0: register cfg_addr[2:0]: 0..2 box lengths x, y, z,
//     3 rc^2, 4 Coulomb constant ke, 5 1/rc^2, 6 2/rc
//   cfg_addr[11] = 1: LJ constant RAM cfg_addr[10:9] (A, B, force shift,
//     potential shift), entry cfg_addr[8:0] = type_i * MAX_TYPES + type_j
// `start` begins a pass; `done` pulses when all forces are in force memory.
// All arithmetic is IEEE single precision, as in the design this follows.
module nbf_top
  import fp32_pkg::*;
#(
    parameter int unsigned OBM_RD_LAT = 2,
    parameter int unsigned DEAD_CYCLES = 4,
    parameter int unsigned FIFO_DEPTH = 2048,
    parameter int unsigned FRAM_DEPTH = 1024,
    parameter int unsigned LJ_DEPTH = 512,
    parameter int unsigned MAX_TYPES = 22,
    parameter int unsigned NL_ADDR_W = 20
) (
    input  logic                 clk,
    input  logic                 rst_n,
    // configuration
    input  logic                 cfg_we,
    input  logic [         11:0] cfg_addr,
    input  fp32_t                cfg_wdata,
    // control
    input  logic                 start,
    output logic                 busy,
    output logic                 done,
    // neighbor-list buffers
    input  logic [          1:0] sec_valid,
    input  logic [NL_ADDR_W:0]   sec_len[2],
    input  logic [          1:0] sec_last,
    output logic [          1:0] sec_release,
    output logic                 nl_rd_en,
    output logic                 nl_rd_sec,
    output logic [NL_ADDR_W-1:0] nl_rd_addr,
    input  logic [     NL_W-1:0] nl_rd_data,
    // position memory
    output logic                 pos_rd_en,
    output logic [   ATOM_W-1:0] pos_rd_addr,
    input  pos_word_t            pos_rd_data,
    // force memory
    output logic                 frc_rd_en,
    output logic [   ATOM_W-1:0] frc_rd_addr,
    input  force_word_t          frc_rd_data,
    output logic                 frc_wr_en,
    output logic [   ATOM_W-1:0] frc_wr_addr,
    output force_word_t          frc_wr_data,
    // results and event counts
    output fp32_t                pe_total,
    output logic [         31:0] pairs_in,
    output logic [         31:0] pairs_kept,
    output logic [         31:0] image_wraps,
    output logic [         31:0] fifo_full_cycles,
    output logic [         31:0] starve_cycles,
    output logic [         31:0] turnarounds,
    output logic [         31:0] atoms_done,
    output logic [         31:0] sec_switches,
    output logic [         31:0] orphan_entries
);

  // In flight between the reader's decision to issue and the FIFO input:
  // both memory reads plus the distance stages, with margin.
  localparam int unsigned AF_SLACK = 2 * OBM_RD_LAT + 12;

  // ---- configuration registers ----
  fp32_t box[3];
  fp32_t rc2, ke, inv_rc2, two_inv_rc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      box <= '{default: FP_ZERO};
      rc2 <= FP_ZERO;
      ke <= FP_ZERO;
      inv_rc2 <= FP_ZERO;
      two_inv_rc <= FP_ZERO;
    end else if (cfg_we && !cfg_addr[11]) begin
      unique case (cfg_addr[2:0])
        3'd0: box[0] <= cfg_wdata;
        3'd1: box[1] <= cfg_wdata;
        3'd2: box[2] <= cfg_wdata;
        3'd3: rc2 <= cfg_wdata;
        3'd4: ke <= cfg_wdata;
        3'd5: inv_rc2 <= cfg_wdata;
        3'd6: two_inv_rc <= cfg_wdata;
        default: ;
      endcase
    end
  end

  // ---- neighbor-list reader ----
  logic item_valid;
  nl_item_t item;
  logic fifo_af, rd_busy;

  nl_reader #(.ADDR_W(NL_ADDR_W), .RD_LAT(OBM_RD_LAT)) u_reader (
      .clk, .rst_n, .start, .stall(fifo_af),
      .sec_valid, .sec_len, .sec_last, .sec_release,
      .nl_rd_en, .nl_rd_sec, .nl_rd_addr, .nl_rd_data,
      .item_valid, .item, .busy(rd_busy), .sec_switches
  );

  // ---- distance pipeline ----
  logic d_valid, d_busy;
  fifo_entry_t d_entry;
  distance_pipeline #(.RD_LAT(OBM_RD_LAT)) u_dist (
      .clk, .rst_n, .box, .rc2,
      .item_valid, .item,
      .pos_rd_en, .pos_rd_addr, .pos_rd_data,
      .out_valid(d_valid), .out_entry(d_entry), .busy(d_busy),
      .pairs_in, .pairs_kept, .image_wraps
  );

  // ---- FIFO between the pipelines ----
  logic fifo_pop, fifo_empty, fifo_full;
  logic [$bits(fifo_entry_t)-1:0] fifo_rdata;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  fifo_entry_t fifo_head;
  assign fifo_head = fifo_entry_t'(fifo_rdata);

  neighbor_fifo #(.WIDTH($bits(fifo_entry_t)), .DEPTH(FIFO_DEPTH), .AF_SLACK(AF_SLACK)) u_fifo (
      .clk, .rst_n,
      .push(d_valid), .wdata(d_entry),
      .pop(fifo_pop), .rdata(fifo_rdata),
      .empty(fifo_empty), .full(fifo_full), .almost_full(fifo_af), .count(fifo_count)
  );

  // ---- force pipeline ----
  logic fp_start, fp_in_valid, fp_busy;
  fp32_t fp_qi, fp_pe_i;
  logic [TYPE_W-1:0] fp_typ_i;
  force_word_t fp_fi_init, fp_fi;
  logic fj_rd_en;
  logic [ATOM_W-1:0] fj_rd_idx;
  logic fram_we;
  logic [$clog2(FRAM_DEPTH)-1:0] fram_addr;
  logic [ATOM_W-1:0] fram_idx;
  force_word_t fram_force;
  logic [$clog2(FRAM_DEPTH):0] fp_n_count;

  force_pipeline #(
      .RD_LAT(OBM_RD_LAT), .MAX_TYPES(MAX_TYPES), .LJ_DEPTH(LJ_DEPTH), .FRAM_DEPTH(FRAM_DEPTH)
  ) u_force (
      .clk, .rst_n, .ke, .inv_rc2, .two_inv_rc,
      .lj_we(cfg_we && cfg_addr[11]), .lj_wsel(cfg_addr[10:9]),
      .lj_waddr(cfg_addr[$clog2(LJ_DEPTH)-1:0]), .lj_wdata(cfg_wdata),
      .start(fp_start), .qi(fp_qi), .typ_i(fp_typ_i), .fi_init(fp_fi_init),
      .in_valid(fp_in_valid), .entry(fifo_head),
      .fj_rd_en, .fj_rd_idx, .fj_rd_data(frc_rd_data),
      .fram_we, .fram_addr, .fram_idx, .fram_force, .n_count(fp_n_count),
      .fi(fp_fi), .pe_i(fp_pe_i), .busy(fp_busy)
  );

  // ---- controller and force-memory port ----
  logic c_busy;
  force_controller #(.RD_LAT(OBM_RD_LAT), .DEAD_CYCLES(DEAD_CYCLES), .FRAM_DEPTH(FRAM_DEPTH)) u_ctrl (
      .clk, .rst_n, .go(start), .done, .busy(c_busy),
      .fifo_empty, .fifo_head, .fifo_pop,
      .fp_start, .fp_qi, .fp_typ_i, .fp_fi_init, .fp_in_valid, .fp_busy,
      .fp_fi, .fp_pe_i, .fp_n_count,
      .fj_rd_en, .fj_rd_idx, .fram_we, .fram_addr, .fram_idx, .fram_force,
      .f_rd_en(frc_rd_en), .f_rd_addr(frc_rd_addr), .f_rd_data(frc_rd_data),
      .f_wr_en(frc_wr_en), .f_wr_addr(frc_wr_addr), .f_wr_data(frc_wr_data),
      .pe_total, .atoms_done, .turnarounds, .starve_cycles, .orphan_entries
  );

  assign busy = rd_busy || d_busy || c_busy || !fifo_empty;

  // Cycles in which the reader was held back by a nearly full FIFO.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fifo_full_cycles <= '0;
    else if (start) fifo_full_cycles <= '0;
    else if (fifo_af && rd_busy) fifo_full_cycles <= fifo_full_cycles + 1;
  end

endmodule
