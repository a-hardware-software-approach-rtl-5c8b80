// force_ram: on-chip store of the updated forces of the current i atom's
// neighbors.
//
// While the force pipeline works through atom i's neighbors, each new
// f_j - f_ij is written here at slot n (n counts the neighbors that passed
// the cutoff) together with the index j. After the last neighbor the
// write-back reads the slots back in order and stores them to force memory.
// The default depth of 1024 is that of two 512-word block RAMs per field,
// which covers the largest neighbor count seen in the design's workloads
// (750). Write at the clock edge when we is high; read data appears one
// cycle after re.
module force_ram
  import fp32_pkg::*;
#(
    parameter int unsigned DEPTH = 1024
) (
    input  logic                     clk,
    input  logic                     we,
    input  logic [$clog2(DEPTH)-1:0] waddr,
    input  logic [       ATOM_W-1:0] widx,
    input  force_word_t              wforce,
    input  logic                     re,
    input  logic [$clog2(DEPTH)-1:0] raddr,
    output logic [       ATOM_W-1:0] ridx,
    output force_word_t              rforce
);

  fp32_t ram_x[DEPTH];
  fp32_t ram_y[DEPTH];
  fp32_t ram_z[DEPTH];
  logic [ATOM_W-1:0] ram_idx[DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      ram_x[waddr]   <= wforce.x;
      ram_y[waddr]   <= wforce.y;
      ram_z[waddr]   <= wforce.z;
      ram_idx[waddr] <= widx;
    end
    if (re) begin
      rforce <= '{pad: FP_ZERO, z: ram_z[raddr], y: ram_y[raddr], x: ram_x[raddr]};
      ridx   <= ram_idx[raddr];
    end
  end

endmodule
