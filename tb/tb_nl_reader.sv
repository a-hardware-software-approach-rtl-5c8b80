// tb_nl_reader: builds a packed neighbor list of random i atoms and
// neighbors, cuts it into sections and plays the host: it fills the two
// buffers alternately, refilling a buffer some cycles after the reader
// releases it. The downstream stall is random. Checks that the items come
// out in list order with the right kind, type and index, followed by one
// ITEM_END, and that the reader switched buffers once per section boundary.
module tb_nl_reader;
  import fp32_pkg::*;
  localparam int RD_LAT = 2;
  localparam int AW = 12;
  localparam int SEC = 37;

  logic clk = 0, rst_n = 0, start = 0, stall = 0;
  logic [1:0] sec_valid = 0, sec_last = 0, sec_release;
  logic [AW:0] sec_len[2];
  logic nl_rd_en, nl_rd_sec, item_valid, busy;
  logic [AW-1:0] nl_rd_addr;
  logic [63:0] nl_rd_data, d1;
  nl_item_t item;
  logic [31:0] sec_switches;
  logic [63:0] buf_mem[2][SEC];
  logic [63:0] words[$];
  int checks = 0, failures = 0, got = 0, nsec, next_chunk = 0, ends = 0;

  always #5 clk = ~clk;

  nl_reader #(.ADDR_W(AW), .RD_LAT(RD_LAT)) dut (.*);

  // Buffer memory, read latency 2.
  always_ff @(posedge clk) begin
    d1 <= buf_mem[nl_rd_sec][6'(nl_rd_addr)];
    nl_rd_data <= d1;
  end

  task automatic load(input int s);
    int base = next_chunk * SEC;
    int n = (words.size() - base) < SEC ? words.size() - base : SEC;
    for (int k = 0; k < n; k++) buf_mem[s][k] = words[base+k];
    sec_len[s] = (AW + 1)'(n);
    sec_last[s] = (next_chunk == nsec - 1);
    sec_valid[s] = 1;
    next_chunk++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Host: refill a released buffer after a delay.
  initial begin
    for (int i = 0; i < 20; i++) begin
      words.push_back({1'b1, 26'b0, 5'($urandom), 12'b0, 20'(i * 7)});
      repeat ($urandom_range(12)) words.push_back({1'b0, 26'b0, 5'($urandom), 12'b0, 20'($urandom)});
    end
    nsec = (words.size() + SEC - 1) / SEC;
    sec_len[0] = 0;
    sec_len[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(0);
    if (nsec > 1) load(1);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    forever begin
      @(negedge clk);
      stall = ($urandom_range(3) == 0);
      for (int s = 0; s < 2; s++)
      if (sec_release[s]) begin
        sec_valid[s] = 0;
        if (next_chunk < nsec) begin
          fork
            automatic int ss = s;
            begin
              repeat (10) @(negedge clk);
              load(ss);
            end
          join_none
        end
      end
    end
  end

  always @(posedge clk)
    if (item_valid) begin
      checks++;
      if (got < words.size()) begin
        if (item.kind != (words[got][63] ? ITEM_I : ITEM_J) || item.idx != words[got][19:0] ||
            item.typ != words[got][36:32]) begin
          failures++;
          $display("FAIL item %0d: kind %0d idx %0d", got, item.kind, item.idx);
        end
      end else if (item.kind != ITEM_END) begin
        failures++;
        $display("FAIL expected end");
      end else ends++;
      got++;
    end

  initial begin
    wait (rst_n);
    @(posedge clk);
    wait (ends == 1 && !busy);
    repeat (5) @(posedge clk);
    checks++;
    if (got != words.size() + 1 || sec_switches != 32'(nsec - 1)) begin
      failures++;
      $display("FAIL totals: got %0d of %0d, switches %0d of %0d", got, words.size() + 1,
               sec_switches, nsec - 1);
    end
    $display("sections %0d words %0d", nsec, words.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
