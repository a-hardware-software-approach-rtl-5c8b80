// tb_fp_core: checks every operation of fp_core against real arithmetic on
// random operands. A correctly rounded single-precision result is within
// half a unit in the last place, so results must agree to 1.5e-7 relative.
// Also checks the one-cycle latency and that en=0 holds the output.
module tb_fp_core;
  import fp32_pkg::*;
  import tb_pkg::*;

  logic clk = 0, en = 1;
  fp32_t a, b;
  fp32_t y_add, y_sub, y_mul, y_div, y_sqrt, y_lt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_core #(.OP(FP_ADD)) u_add (.clk, .en, .a, .b, .y(y_add));
  fp_core #(.OP(FP_SUB)) u_sub (.clk, .en, .a, .b, .y(y_sub));
  fp_core #(.OP(FP_MUL)) u_mul (.clk, .en, .a, .b, .y(y_mul));
  fp_core #(.OP(FP_DIV)) u_div (.clk, .en, .a, .b, .y(y_div));
  fp_core #(.OP(FP_SQRT)) u_sqrt (.clk, .en, .a, .b, .y(y_sqrt));
  fp_core #(.OP(FP_LT)) u_lt (.clk, .en, .a, .b, .y(y_lt));

  function automatic fp32_t rnd_fp(input int emin, input int span);
    fp32_t f;
    f[31] = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom_range(span)));
    f[22:0] = 23'($urandom);
    return f;
  endfunction

  task automatic check(input string what, input real got, input real want);
    checks++;
    if (!close(got, want, 1.5e-7, 1e-30)) begin
      failures++;
      $display("FAIL %s: got %g want %g (a=%g b=%g)", what, got, want, fp2r(a), fp2r(b));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb;
    a = 32'h3F80_0000;
    b = 32'h4000_0000;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      a = rnd_fp(110, 30);
      b = (n % 4 == 0) ? {~a[31], a[30:23], 23'($urandom)} : rnd_fp(110, 30);
      if (n % 7 == 0) b = FP_ZERO;
      ra = fp2r(a);
      rb = fp2r(b);
      @(posedge clk);
      #1;
      check("add", fp2r(y_add), ra + rb);
      check("sub", fp2r(y_sub), ra - rb);
      check("mul", fp2r(y_mul), ra * rb);
      if (rb != 0.0) check("div", fp2r(y_div), ra / rb);
      check("sqrt", fp2r(y_sqrt), ra > 0.0 ? $sqrt(ra) : 0.0);
      checks++;
      if (y_lt[0] != (ra < rb)) begin
        failures++;
        $display("FAIL lt: a=%g b=%g got %0d", ra, rb, y_lt[0]);
      end
      @(negedge clk);
    end
    // Exact small cases.
    a = 32'h4080_0000;  // 4.0
    b = 32'h4000_0000;  // 2.0
    @(posedge clk);
    #1;
    checks++;
    if (y_sqrt != 32'h4000_0000 || y_div != 32'h4000_0000 || y_mul != 32'h4100_0000) begin
      failures++;
      $display("FAIL exact: sqrt %h div %h mul %h", y_sqrt, y_div, y_mul);
    end
    // Hold with en low.
    @(negedge clk);
    en = 0;
    a = 32'h4120_0000;
    @(posedge clk);
    #1;
    checks++;
    if (y_add != 32'h40C0_0000) begin
      failures++;
      $display("FAIL hold: %h", y_add);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
