// fp32_pkg: shared types, constants and IEEE-754 single-precision arithmetic
// for the nonbonded-force accelerator.
//
// The accelerator computes in single precision, as the design it follows
// does. The arithmetic below is this design's own: round to nearest even,
// denormal inputs and results are flushed to zero, and an overflow returns
// infinity. NaN is not propagated (a NaN input is treated as infinity).
// The functions are combinational; fp_core puts one register stage behind
// them. The package also holds the record formats passed between the
// pipelines: the neighbor-list item, the FIFO entry and the force words.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_SIX = 32'h40C0_0000;  // 6.0
  localparam fp32_t FP_TWELVE = 32'h4140_0000;  // 12.0

  // Width of an atom index, a type code and the neighbor-list word.
  localparam int unsigned ATOM_W = 20;
  localparam int unsigned TYPE_W = 5;
  localparam int unsigned NL_W = 64;

  typedef enum logic [2:0] {
    FP_ADD,
    FP_SUB,
    FP_MUL,
    FP_DIV,
    FP_SQRT,
    FP_LT
  } fp_op_e;

  // Kind of an item travelling from the neighbor-list reader to the force
  // pipeline: an i-atom header, a neighbor j, or the end of the list.
  typedef enum logic [1:0] {
    ITEM_I = 2'd0,
    ITEM_J = 2'd1,
    ITEM_END = 2'd2
  } item_kind_e;

  typedef struct packed {
    item_kind_e kind;
    logic [TYPE_W-1:0] typ;
    logic [ATOM_W-1:0] idx;
  } nl_item_t;

  // One FIFO entry. For ITEM_I only typ, idx and q are meaningful.
  typedef struct packed {
    item_kind_e kind;
    logic [TYPE_W-1:0] typ;
    logic [ATOM_W-1:0] idx;
    fp32_t q;
    fp32_t dx;
    fp32_t dy;
    fp32_t dz;
    fp32_t r2;
  } fifo_entry_t;

  // A position record as stored in the two position banks: {q, z, y, x}.
  typedef struct packed {
    fp32_t q;
    fp32_t z;
    fp32_t y;
    fp32_t x;
  } pos_word_t;

  // A force record as stored in the two force banks: {pad, z, y, x}.
  typedef struct packed {
    fp32_t pad;
    fp32_t z;
    fp32_t y;
    fp32_t x;
  } force_word_t;

  function automatic fp32_t fp_pack(input logic s, input int e, input logic [23:0] m);
    // m carries the hidden bit in m[23]; e is the biased exponent.
    if (e <= 0) return {s, 31'b0};
    if (e >= 255) return {s, 8'hFF, 23'b0};
    return {s, e[7:0], m[22:0]};
  endfunction

  // Round a 24-bit mantissa with guard, round and sticky bits to nearest even.
  function automatic fp32_t fp_round(input logic s, input int e, input logic [26:0] x);
    logic [24:0] m;
    int er;
    m  = {1'b0, x[26:3]};
    er = e;
    if (x[2] && (x[1] || x[0] || x[3])) m = m + 25'd1;
    if (m[24]) begin
      m  = m >> 1;
      er = er + 1;
    end
    return fp_pack(s, er, m[23:0]);
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    logic sa, sb;
    logic [7:0] ea, eb;
    logic [26:0] xa, xb;
    logic [27:0] s;
    int d, e, lz;
    logic sticky;
    sa = a[31];
    sb = b[31];
    ea = a[30:23];
    eb = b[30:23];
    if (ea == 8'd0) return (eb == 8'd0) ? {sa & sb, 31'b0} : {sb, eb, b[22:0]};
    if (eb == 8'd0) return {sa, ea, a[22:0]};
    if (ea == 8'hFF || eb == 8'hFF) return (ea == 8'hFF) ? {sa, 8'hFF, 23'b0} : {sb, 8'hFF, 23'b0};
    // Order so that |a| >= |b|.
    if (b[30:0] > a[30:0]) begin
      {sa, sb} = {sb, sa};
      {ea, eb} = {eb, ea};
      xa = {1'b1, b[22:0], 3'b0};
      xb = {1'b1, a[22:0], 3'b0};
    end else begin
      xa = {1'b1, a[22:0], 3'b0};
      xb = {1'b1, b[22:0], 3'b0};
    end
    d = int'(ea) - int'(eb);
    if (d > 26) begin
      xb = 27'd1;
    end else if (d > 0) begin
      sticky = 1'b0;
      for (int k = 0; k < 27; k++) if (k < d && xb[k]) sticky = 1'b1;
      xb = (xb >> d) | {26'b0, sticky};
    end
    e = int'(ea);
    if (sa == sb) begin
      s = {1'b0, xa} + {1'b0, xb};
      if (s[27]) begin
        s = {1'b0, s[27:2], s[1] | s[0]};
        e = e + 1;
      end
    end else begin
      s = {1'b0, xa} - {1'b0, xb};
      if (s == 28'd0) return FP_ZERO;
      lz = 0;
      for (int k = 26; k >= 0; k--) begin
        if (s[k]) break;
        lz++;
      end
      s = s << lz;
      e = e - lz;
    end
    return fp_round(sa, e, s[26:0]);
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic s;
    logic [47:0] p;
    logic [26:0] x;
    int e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'b0};
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'b0};
    p = {24'b0, 1'b1, a[22:0]} * {24'b0, 1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      x = {p[47:22], |p[21:0]};
      e = e + 1;
    end else begin
      x = {p[46:21], |p[20:0]};
    end
    return fp_round(s, e, x);
  endfunction

  function automatic fp32_t fp_div(input fp32_t a, input fp32_t b);
    logic s;
    logic [49:0] num, q, rem;
    logic [26:0] x;
    int e;
    s = a[31] ^ b[31];
    if (b[30:23] == 8'd0 || a[30:23] == 8'hFF) return {s, 8'hFF, 23'b0};
    if (a[30:23] == 8'd0 || b[30:23] == 8'hFF) return {s, 31'b0};
    num = {1'b1, a[22:0], 26'b0};
    q = num / {26'b0, 1'b1, b[22:0]};
    rem = num % {26'b0, 1'b1, b[22:0]};
    e = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[26]) begin
      x = {q[26:1], q[0] | (rem != 50'd0)};
    end else begin
      x = {q[25:0], (rem != 50'd0)};
      e = e - 1;
    end
    return fp_round(s, e, x);
  endfunction

  function automatic fp32_t fp_sqrt(input fp32_t a);
    logic [49:0] rad;
    logic [51:0] rem, trial;
    logic [24:0] root;
    int ue, er;
    if (a[30:23] == 8'd0 || a[31]) return FP_ZERO;
    if (a[30:23] == 8'hFF) return {1'b0, 8'hFF, 23'b0};
    ue = int'(a[30:23]) - 127;
    if (ue[0]) begin
      rad = {1'b1, a[22:0], 26'b0};
      ue  = ue - 1;
    end else begin
      rad = {1'b0, 1'b1, a[22:0], 25'b0};
    end
    er   = (ue >>> 1) + 127;
    rem  = '0;
    root = '0;
    for (int k = 24; k >= 0; k--) begin
      rem   = (rem << 2) | {50'b0, rad[2*k+1], rad[2*k]};
      trial = {25'b0, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[23:0], 1'b1};
      end else begin
        root = {root[23:0], 1'b0};
      end
    end
    return fp_round(1'b0, er, {root, 1'b0, rem != 52'd0});
  endfunction

  // a < b, with -0 equal to +0.
  function automatic logic fp_lt(input fp32_t a, input fp32_t b);
    logic az, bz;
    az = (a[30:23] == 8'd0);
    bz = (b[30:23] == 8'd0);
    if (az && bz) return 1'b0;
    if (az) return !b[31];
    if (bz) return a[31];
    if (a[31] != b[31]) return a[31];
    if (a[31]) return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

  // Halve a value by decrementing its exponent.
  function automatic fp32_t fp_half(input fp32_t a);
    if (a[30:23] <= 8'd1) return {a[31], 31'b0};
    return {a[31], a[30:23] - 8'd1, a[22:0]};
  endfunction

  function automatic fp32_t fp_neg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

endpackage
