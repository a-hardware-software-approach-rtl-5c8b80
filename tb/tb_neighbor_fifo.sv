// tb_neighbor_fifo: random pushes and pops against a queue model at the
// default depth of 2048; fills the FIFO completely to check full and
// almost_full, then drains it to check empty and order.
module tb_neighbor_fifo;
  localparam int W = 40;
  localparam int DEPTH = 2048;
  localparam int SLACK = 16;

  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] wdata, rdata;
  logic empty, full, almost_full;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  neighbor_fifo #(.WIDTH(W), .DEPTH(DEPTH), .AF_SLACK(SLACK)) dut (
      .clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .almost_full, .count
  );

  task automatic step(input bit do_push, input bit do_pop);
    push  = do_push && !full;
    pop   = do_pop && !empty;
    wdata = {8'($urandom), 32'($urandom)};
    if (pop) begin
      checks++;
      if (rdata != model[0]) begin
        failures++;
        $display("FAIL head %h want %h", rdata, model[0]);
      end
      void'(model.pop_front());
    end
    if (push) model.push_back(wdata);
    @(negedge clk);
    push = 0;
    pop  = 0;
    checks++;
    if (int'(count) != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH)
        || almost_full != (model.size() > DEPTH - SLACK)) begin
      failures++;
      $display("FAIL flags count %0d model %0d e%0d f%0d af%0d", count, model.size(), empty,
               full, almost_full);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 3000; k++) step(1'($urandom_range(1)), 1'($urandom_range(1)));
    while (!full) step(1, $urandom_range(9) == 0);
    for (int k = 0; k < 5; k++) step(1, 0);
    while (!empty) step($urandom_range(9) == 0, 1);
    for (int k = 0; k < 3; k++) step(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
