// lj_const_ram: the Lennard-Jones constants of every pair of atom types.
//
// Four RAMs of DEPTH words, one each for A, B, the force-shift constant and
// the potential-shift constant, as in the design this follows (one 512-word
// block RAM per constant). The host loads them once, before the first force
// calculation, through the write port: wsel picks the RAM (0 A, 1 B,
// 2 force shift, 3 potential shift), waddr the entry. The force pipeline
// reads all four at raddr at once; the words appear on the outputs one cycle
// later. The address of a type pair is ti * MAX_TYPES + tj (see
// force_pipeline); with 22 types the table fills 484 of the 512 entries.
module lj_const_ram
  import fp32_pkg::*;
#(
    parameter int unsigned DEPTH = 512
) (
    input  logic                     clk,
    input  logic                     we,
    input  logic [              1:0] wsel,
    input  logic [$clog2(DEPTH)-1:0] waddr,
    input  fp32_t                    wdata,
    input  logic                     re,
    input  logic [$clog2(DEPTH)-1:0] raddr,
    output fp32_t                    a_out,
    output fp32_t                    b_out,
    output fp32_t                    fs_out,
    output fp32_t                    ps_out
);

  fp32_t ram_a[DEPTH];
  fp32_t ram_b[DEPTH];
  fp32_t ram_fs[DEPTH];
  fp32_t ram_ps[DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      unique case (wsel)
        2'd0: ram_a[waddr] <= wdata;
        2'd1: ram_b[waddr] <= wdata;
        2'd2: ram_fs[waddr] <= wdata;
        default: ram_ps[waddr] <= wdata;
      endcase
    end
    if (re) begin
      a_out  <= ram_a[raddr];
      b_out  <= ram_b[raddr];
      fs_out <= ram_fs[raddr];
      ps_out <= ram_ps[raddr];
    end
  end

endmodule
