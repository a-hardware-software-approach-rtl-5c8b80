// fp_accumulator: single-precision running sum that takes one new input per
// clock cycle.
//
// The accelerator keeps four of these, one per force component of the
// current i atom and one for its potential energy. An accumulation is
// restarted with `start`, which loads `init` (the force already stored for
// the i atom, or zero) in place of the old sum; this is the flush the design
// performs at every new i atom. While in_valid is high the input is added
// on the next clock edge, so `sum` includes an input one cycle after it was
// presented. The adder is a single-cycle stage of this design's own; the
// vendor accumulator it stands in for is deeper and needs draining.
module fp_accumulator
  import fp32_pkg::*;
(
    input  logic  clk,
    input  logic  rst_n,
    input  logic  start,
    input  fp32_t init,
    input  logic  in_valid,
    input  fp32_t in_data,
    output fp32_t sum
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= FP_ZERO;
    else if (start) sum <= init;
    else if (in_valid) sum <= fp_add(sum, in_data);
  end

endmodule
