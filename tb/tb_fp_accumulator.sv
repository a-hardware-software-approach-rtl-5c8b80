// tb_fp_accumulator: restarts the accumulator with an initial value, feeds
// runs of random inputs (one per cycle, with gaps), and compares the sum
// with a real-valued reference. Also checks that an input is included in
// the sum exactly one cycle after it is presented.
module tb_fp_accumulator;
  import fp32_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  fp32_t init, in_data, sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_accumulator dut (.clk, .rst_n, .start, .init, .in_valid, .in_data, .sum);

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_sum;
    init = FP_ZERO;
    in_data = FP_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      init = r2fp((real'($urandom_range(2000)) - 1000.0) / 7.0);
      start = 1;
      ref_sum = fp2r(init);
      @(negedge clk);
      start = 0;
      checks++;
      if (sum != init) begin
        failures++;
        $display("FAIL start: %h vs %h", sum, init);
      end
      for (int k = 0; k < 50; k++) begin
        in_valid = ($urandom_range(3) != 0);
        in_data = r2fp((real'($urandom_range(100000)) - 50000.0) / 1000.0);
        if (in_valid) ref_sum += fp2r(in_data);
        @(negedge clk);
        if (in_valid) begin
          checks++;
          if (!close(fp2r(sum), ref_sum, 1e-5, 1.0)) begin
            failures++;
            $display("FAIL run %0d step %0d: %g vs %g", run, k, fp2r(sum), ref_sum);
          end
        end
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
