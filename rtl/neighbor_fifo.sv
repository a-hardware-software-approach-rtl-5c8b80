// neighbor_fifo: synchronous FIFO between the distance pipeline and the
// force pipeline.
//
// It must hold the surviving neighbors of at least two consecutive i atoms
// so that the distance pipeline can run ahead while the force pipeline
// drains and writes back. Its default depth of 2048 entries is the depth of
// four 512-word block RAMs per field, as in the design it follows (with at
// most 750 neighbors per atom that is room for two atoms and more).
// Interface: push/wdata write at the clock edge when not full; the head
// entry is always visible on rdata while !empty (first-word fall-through)
// and pop removes it at the clock edge. almost_full rises when fewer than
// AF_SLACK entries are free; the writer uses it to stop issuing new work
// early enough that everything already in flight still fits.
// The head is read from the array without a register, which maps to
// distributed rather than block RAM; that is this design's choice.
module neighbor_fifo #(
    parameter int unsigned WIDTH = 32,
    parameter int unsigned DEPTH = 2048,
    parameter int unsigned AF_SLACK = 16
) (
    input  logic                     clk,
    input  logic                     rst_n,
    input  logic                     push,
    input  logic [        WIDTH-1:0] wdata,
    input  logic                     pop,
    output logic [        WIDTH-1:0] rdata,
    output logic                     empty,
    output logic                     full,
    output logic                     almost_full,
    output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem[DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  wire do_push = push && !full;
  wire do_pop = pop && !empty;

  assign empty = (count == '0);
  assign full = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign almost_full = (count > ($clog2(DEPTH+1))'(DEPTH - AF_SLACK));
  assign rdata = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (($clog2(DEPTH+1))'(do_push)) - (($clog2(DEPTH+1))'(do_pop));
    end
  end

  // A push into a full FIFO would lose an entry: the writer must prevent it.
  a_no_overflow :
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow :
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
