// fp_core: one single-precision floating-point operator with a single
// register stage behind it.
//
// The force pipelines are built from these cores in the way the design they
// follow builds them from vendor floating-point cores. Which operation a
// core performs is fixed by the OP parameter: add, subtract, multiply,
// divide, square root of a, or the comparison a < b (result 1 or 0 in bit 0).
// Timing: when en is high, y takes op(a, b) at the next rising clock edge,
// so the latency is one cycle and a new operand pair is accepted every cycle.
// When en is low, y holds. The single-cycle latency is this design's choice;
// the vendor cores it replaces are much deeper.
module fp_core
  import fp32_pkg::*;
#(
    parameter fp_op_e OP = FP_ADD
) (
    input  logic  clk,
    input  logic  en,
    input  fp32_t a,
    input  fp32_t b,
    output fp32_t y
);

  fp32_t res;

  always_comb begin
    unique case (OP)
      FP_ADD:  res = fp_add(a, b);
      FP_SUB:  res = fp_sub(a, b);
      FP_MUL:  res = fp_mul(a, b);
      FP_DIV:  res = fp_div(a, b);
      FP_SQRT: res = fp_sqrt(a);
      FP_LT:   res = {31'b0, fp_lt(a, b)};
      default: res = FP_ZERO;
    endcase
  end

  always_ff @(posedge clk) begin
    if (en) y <= res;
  end

endmodule
