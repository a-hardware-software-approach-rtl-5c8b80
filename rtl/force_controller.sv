// force_controller: sequences the write-back design one i atom at a time and
// owns the single port of force memory.
//
// For every i atom taken from the FIFO it
//   1. reads f_i from force memory and restarts the force pipeline's
//      accumulators with it,
//   2. streams i's neighbors from the FIFO into the force pipeline, one per
//      cycle (the pipeline reads each f_j on the same port),
//   3. on reaching the next i header (or the end of the list) stops taking
//      from the FIFO and drains the pipeline,
//   4. switches force memory to write mode (DEAD_CYCLES idle cycles), writes
//      f_i, then writes every f_j - f_ij held in force RAM back to its atom,
//   5. switches force memory back to read mode (DEAD_CYCLES again).
// Because a new i atom starts only after the previous one's neighbors are
// written back, the read-after-write hazard on f_j cannot occur, and force
// memory changes mode only twice per i atom. The potential energy of each
// i atom is added into pe_total during step 4.
// Force memory: one access per cycle; read data arrives RD_LAT cycles after
// f_rd_en; a write takes effect at the clock edge with f_wr_en.
// `go` starts a pass; `done` pulses once after the ITEM_END entry has been
// reached and the last write-back is complete.
// The order of steps follows the write-back algorithm of the design; the
// four dead cycles per mode switch are the memory's, as the design states;
// the state machine itself is this design's own.
module force_controller
  import fp32_pkg::*;
#(
    parameter int unsigned RD_LAT = 2,
    parameter int unsigned DEAD_CYCLES = 4,
    parameter int unsigned FRAM_DEPTH = 1024
) (
    input  logic                          clk,
    input  logic                          rst_n,
    input  logic                          go,
    output logic                          done,
    output logic                          busy,
    // FIFO head
    input  logic                          fifo_empty,
    input  fifo_entry_t                   fifo_head,
    output logic                          fifo_pop,
    // force pipeline
    output logic                          fp_start,
    output fp32_t                         fp_qi,
    output logic [            TYPE_W-1:0] fp_typ_i,
    output force_word_t                   fp_fi_init,
    output logic                          fp_in_valid,
    input  logic                          fp_busy,
    input  force_word_t                   fp_fi,
    input  fp32_t                         fp_pe_i,
    input  logic [ $clog2(FRAM_DEPTH):0]  fp_n_count,
    input  logic                          fj_rd_en,
    input  logic [            ATOM_W-1:0] fj_rd_idx,
    input  logic                          fram_we,
    input  logic [$clog2(FRAM_DEPTH)-1:0] fram_addr,
    input  logic [            ATOM_W-1:0] fram_idx,
    input  force_word_t                   fram_force,
    // force memory
    output logic                          f_rd_en,
    output logic [            ATOM_W-1:0] f_rd_addr,
    input  force_word_t                   f_rd_data,
    output logic                          f_wr_en,
    output logic [            ATOM_W-1:0] f_wr_addr,
    output force_word_t                   f_wr_data,
    // results and event counts
    output fp32_t                         pe_total,
    output logic [                  31:0] atoms_done,
    output logic [                  31:0] turnarounds,
    output logic [                  31:0] starve_cycles,
    output logic [                  31:0] orphan_entries
);

  localparam int unsigned FAW = $clog2(FRAM_DEPTH);

  typedef enum logic [3:0] {
    C_IDLE,
    C_HEAD,
    C_FI,
    C_STREAM,
    C_DRAIN,
    C_TURN_W,
    C_WR_FI,
    C_WR_J,
    C_TURN_R,
    C_DONE
  } cstate_e;

  cstate_e state;
  logic [7:0] wait_cnt;
  logic [ATOM_W-1:0] i_idx;
  logic write_mode;
  logic [FAW:0] wr_k, rd_k;
  logic fram_re;
  logic [FAW-1:0] fram_raddr;
  logic [ATOM_W-1:0] fram_ridx;
  force_word_t fram_rforce;

  wire head_i = !fifo_empty && fifo_head.kind == ITEM_I;
  wire head_j = !fifo_empty && fifo_head.kind == ITEM_J;
  wire head_end = !fifo_empty && fifo_head.kind == ITEM_END;

  force_ram #(.DEPTH(FRAM_DEPTH)) u_fram (
      .clk,
      .we(fram_we),
      .waddr(fram_addr),
      .widx(fram_idx),
      .wforce(fram_force),
      .re(fram_re),
      .raddr(fram_raddr),
      .ridx(fram_ridx),
      .rforce(fram_rforce)
  );

  // Running sum of the potential energy over all i atoms.
  fp_accumulator u_pe (
      .clk,
      .rst_n,
      .start(go && state == C_IDLE),
      .init(FP_ZERO),
      .in_valid(state == C_WR_FI),
      .in_data(fp_pe_i),
      .sum(pe_total)
  );

  always_comb begin
    fifo_pop = 1'b0;
    fp_in_valid = 1'b0;
    unique case (state)
      C_HEAD: fifo_pop = head_i || head_end || head_j;
      C_STREAM: begin
        fifo_pop = head_j;
        fp_in_valid = head_j;
      end
      default: ;
    endcase
  end

  assign fp_start = (state == C_FI) && (wait_cnt == '0);
  assign fp_fi_init = f_rd_data;

  // Force memory port: the controller's f_i read, the pipeline's f_j reads,
  // and the write-back.
  always_comb begin
    f_rd_en   = 1'b0;
    f_rd_addr = fj_rd_idx;
    if (state == C_HEAD && head_i) begin
      f_rd_en   = 1'b1;
      f_rd_addr = fifo_head.idx;
    end else if (fj_rd_en) begin
      f_rd_en = 1'b1;
    end
    f_wr_en   = (state == C_WR_FI) || (state == C_WR_J);
    f_wr_addr = (state == C_WR_FI) ? i_idx : fram_ridx;
    f_wr_data = (state == C_WR_FI) ? fp_fi : fram_rforce;
  end

  assign fram_re = (state == C_WR_FI) || (state == C_WR_J && rd_k < fp_n_count);
  assign fram_raddr = rd_k[FAW-1:0];
  assign busy = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      wait_cnt <= '0;
      i_idx <= '0;
      fp_qi <= FP_ZERO;
      fp_typ_i <= '0;
      write_mode <= 1'b0;
      wr_k <= '0;
      rd_k <= '0;
      done <= 1'b0;
      atoms_done <= '0;
      turnarounds <= '0;
      starve_cycles <= '0;
      orphan_entries <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        C_IDLE:
        if (go) begin
          state <= C_HEAD;
          atoms_done <= '0;
          turnarounds <= '0;
          starve_cycles <= '0;
          orphan_entries <= '0;
        end
        C_HEAD:
        if (head_i) begin
          i_idx <= fifo_head.idx;
          fp_qi <= fifo_head.q;
          fp_typ_i <= fifo_head.typ;
          wait_cnt <= 8'(RD_LAT - 1);
          state <= C_FI;
        end else if (head_end) begin
          state <= C_DONE;
        end else if (head_j) begin
          orphan_entries <= orphan_entries + 1;
        end
        C_FI:
        if (wait_cnt == '0) state <= C_STREAM;
        else wait_cnt <= wait_cnt - 1'b1;
        C_STREAM:
        if (fifo_empty) starve_cycles <= starve_cycles + 1;
        else if (!head_j) state <= C_DRAIN;
        C_DRAIN:
        if (!fp_busy) begin
          wait_cnt <= 8'(DEAD_CYCLES - 1);
          state <= C_TURN_W;
        end
        C_TURN_W:
        if (wait_cnt == '0) begin
          write_mode <= 1'b1;
          turnarounds <= turnarounds + 1;
          rd_k <= '0;
          wr_k <= '0;
          state <= C_WR_FI;
        end else wait_cnt <= wait_cnt - 1'b1;
        C_WR_FI: begin
          atoms_done <= atoms_done + 1;
          rd_k <= 1;
          if (fp_n_count == '0) begin
            wait_cnt <= 8'(DEAD_CYCLES - 1);
            state <= C_TURN_R;
          end else state <= C_WR_J;
        end
        C_WR_J: begin
          if (rd_k < fp_n_count) rd_k <= rd_k + 1'b1;
          wr_k <= wr_k + 1'b1;
          if (wr_k + 1'b1 == fp_n_count) begin
            wait_cnt <= 8'(DEAD_CYCLES - 1);
            state <= C_TURN_R;
          end
        end
        C_TURN_R:
        if (wait_cnt == '0) begin
          write_mode <= 1'b0;
          turnarounds <= turnarounds + 1;
          state <= C_HEAD;
        end else wait_cnt <= wait_cnt - 1'b1;
        C_DONE: begin
          done  <= 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  wire turning = (state == C_TURN_W) || (state == C_TURN_R);

  // Single-ported force memory: reads only in read mode, writes only in
  // write mode, nothing while it switches.
  a_read_mode :
  assert property (@(posedge clk) disable iff (!rst_n) f_rd_en |-> !write_mode && !turning);
  a_write_mode :
  assert property (@(posedge clk) disable iff (!rst_n) f_wr_en |-> write_mode && !turning);
  a_one_access :
  assert property (@(posedge clk) disable iff (!rst_n) !(f_rd_en && f_wr_en));

endmodule
