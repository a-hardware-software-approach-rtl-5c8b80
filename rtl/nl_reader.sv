// nl_reader: read controller for the packed neighbor list.
//
// The neighbor list is one flat stream of 64-bit words. A word whose most
// significant bit is set starts a new i atom; the words after it, up to the
// next flagged word, are i's neighbors j. Every word carries the atom's type
// next to its index, so no separate type array is needed:
//   [63] new-i flag, [32 +: TYPE_W] atom type, [0 +: ATOM_W] atom index.
// The list arrives in sections that the host copies into two alternating
// buffers (each a pair of on-board memory banks) while the accelerator works
// on the other one. The host announces a filled buffer s with sec_valid[s],
// its word count sec_len[s] and sec_last[s] for the final section; the
// reader answers with a one-cycle sec_release[s] once it has issued every
// read of that buffer, and then turns to the other buffer. After the last
// word of the final section it emits one ITEM_END item.
// Timing: one read per cycle while `stall` is low; on-board memory returns
// the word RD_LAT cycles after nl_rd_en, and the decoded item leaves on
// item_valid/item in that same cycle. The flag-in-bit-63 format and the
// ping-pong sections follow the design; the field positions of type and
// index and the handshake are this design's choice.
module nl_reader
  import fp32_pkg::*;
#(
    parameter int unsigned ADDR_W = 20,
    parameter int unsigned RD_LAT = 2
) (
    input  logic                   clk,
    input  logic                   rst_n,
    input  logic                   start,
    input  logic                   stall,
    input  logic [            1:0] sec_valid,
    input  logic [ADDR_W:0]        sec_len[2],
    input  logic [            1:0] sec_last,
    output logic [            1:0] sec_release,
    output logic                   nl_rd_en,
    output logic                   nl_rd_sec,
    output logic [ADDR_W-1:0]      nl_rd_addr,
    input  logic [       NL_W-1:0] nl_rd_data,
    output logic                   item_valid,
    output nl_item_t               item,
    output logic                   busy,
    output logic [           31:0] sec_switches
);

  typedef enum logic [1:0] {
    R_IDLE,
    R_WAIT,
    R_READ,
    R_FLUSH
  } rstate_e;

  rstate_e state;
  logic cur_sec;
  logic [ADDR_W:0] addr;
  logic [RD_LAT-1:0] dl_vld, dl_end;
  logic end_issue;

  wire sec_ready = sec_valid[cur_sec];
  wire issue = (state == R_READ) && !stall && (addr < sec_len[cur_sec]);

  assign nl_rd_en = issue;
  assign nl_rd_sec = cur_sec;
  assign nl_rd_addr = addr[ADDR_W-1:0];
  assign busy = (state != R_IDLE) || (|dl_vld);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      cur_sec <= 1'b0;
      addr <= '0;
      sec_release <= '0;
      end_issue <= 1'b0;
      sec_switches <= '0;
    end else begin
      sec_release <= '0;
      end_issue <= 1'b0;
      unique case (state)
        R_IDLE:
        if (start) begin
          cur_sec <= 1'b0;
          addr <= '0;
          state <= R_WAIT;
        end
        R_WAIT:
        if (sec_ready) begin
          addr  <= '0;
          state <= R_READ;
        end
        R_READ:
        if (addr >= sec_len[cur_sec]) begin
          sec_release[cur_sec] <= 1'b1;
          if (sec_last[cur_sec]) begin
            end_issue <= 1'b1;
            state <= R_FLUSH;
          end else begin
            cur_sec <= ~cur_sec;
            sec_switches <= sec_switches + 1;
            state <= R_WAIT;
          end
        end else if (issue) begin
          addr <= addr + 1'b1;
        end
        R_FLUSH: if (!(|dl_vld)) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

  // Delay line matching the fixed read latency of on-board memory.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl_vld <= '0;
      dl_end <= '0;
    end else begin
      dl_vld <= {dl_vld[RD_LAT-2:0], issue | end_issue};
      dl_end <= {dl_end[RD_LAT-2:0], end_issue};
    end
  end

  always_comb begin
    item_valid = dl_vld[RD_LAT-1];
    item.kind = dl_end[RD_LAT-1] ? ITEM_END : (nl_rd_data[NL_W-1] ? ITEM_I : ITEM_J);
    item.typ = nl_rd_data[32+:TYPE_W];
    item.idx = nl_rd_data[ATOM_W-1:0];
  end

endmodule
