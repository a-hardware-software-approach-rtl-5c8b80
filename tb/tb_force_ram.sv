// tb_force_ram: writes random force records and neighbor indices into
// every slot, then reads them back in order (as the write-back does) and at
// random, checking data one cycle after the read.
module tb_force_ram;
  import fp32_pkg::*;
  localparam int DEPTH = 1024;

  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr, raddr;
  logic [ATOM_W-1:0] widx, ridx;
  force_word_t wforce, rforce;
  force_word_t mf[DEPTH];
  logic [ATOM_W-1:0] mi[DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  force_ram #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .widx, .wforce, .re, .raddr, .ridx, .rforce);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int k = 0; k < DEPTH; k++) begin
      we = 1;
      waddr = 10'(k);
      widx = ATOM_W'($urandom);
      wforce = '{pad: FP_ZERO, z: $urandom, y: $urandom, x: $urandom};
      mf[k] = wforce;
      mi[k] = widx;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 2 * DEPTH; n++) begin
      re = 1;
      raddr = (n < DEPTH) ? 10'(n) : 10'($urandom);
      @(negedge clk);
      checks++;
      if (rforce != mf[raddr] || ridx != mi[raddr]) begin
        failures++;
        $display("FAIL slot %0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
