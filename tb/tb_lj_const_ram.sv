// tb_lj_const_ram: loads all four constant tables with distinct random
// words, then reads random entries and checks all four outputs one cycle
// after the address is presented.
module tb_lj_const_ram;
  import fp32_pkg::*;
  localparam int DEPTH = 512;

  logic clk = 0, we = 0, re = 0;
  logic [1:0] wsel;
  logic [8:0] waddr, raddr;
  fp32_t wdata, a_out, b_out, fs_out, ps_out;
  fp32_t model[4][DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lj_const_ram #(.DEPTH(DEPTH)) dut (.clk, .we, .wsel, .waddr, .wdata, .re, .raddr, .a_out,
                                     .b_out, .fs_out, .ps_out);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int s = 0; s < 4; s++)
    for (int k = 0; k < DEPTH; k++) begin
      we = 1;
      wsel = 2'(s);
      waddr = 9'(k);
      wdata = $urandom;
      model[s][k] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 300; n++) begin
      re = 1;
      raddr = 9'($urandom_range(DEPTH - 1));
      @(negedge clk);
      checks++;
      if (a_out != model[0][raddr] || b_out != model[1][raddr] || fs_out != model[2][raddr] ||
          ps_out != model[3][raddr]) begin
        failures++;
        $display("FAIL addr %0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
