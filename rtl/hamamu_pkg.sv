// hamamu_pkg: types, constants and arithmetic shared by the hard matrix
// multiplier fabric.
//
// A Hamamu matmul is built for one precision at a time: 8-bit signed integers
// or IEEE half precision (fp16). The precision is a parameter of every
// arithmetic module (prec_e). The MAC is pipelined 3 stages deep for int8 and
// 8 stages deep for fp16; those two depths are the figures the architecture is
// specified with. Accumulator widths (32-bit for int8, fp16 for fp16), the fp16
// rounding mode (round to nearest even) and the handling of subnormals (flushed
// to zero on input and output) are this design's own choices.
//
// The fp16 helpers are combinational and synthesizable:
//   fp16_mul(a, b) : correctly rounded product
//   fp16_add(a, b) : correctly rounded sum
// Special values: a NaN operand, Inf*0 and Inf-Inf give the quiet NaN 16'h7E00;
// Inf propagates; a result whose magnitude rounds to 2^16 or more is Inf.
package hamamu_pkg;

  typedef enum logic [0:0] {
    PREC_INT8 = 1'b0,
    PREC_FP16 = 1'b1
  } prec_e;

  // Operation modes of the MAC (the DSP slice exposes all three, a PE uses MAC).
  typedef enum logic [1:0] {
    OP_MUL = 2'd0,
    OP_ADD = 2'd1,
    OP_MAC = 2'd2
  } mac_op_e;

  // Size of the building-block matmul (M = N = K).
  localparam int unsigned MATMUL_DIM = 4;

  // Configuration cells of one building-block matmul, written at configuration
  // time. a_nbr/b_nbr select neighbor mode for the A/B inputs (0 = memory mode),
  // c_chain passes the left neighbor's C stream through the output mux.
  // row_pos/col_pos give the block's place inside a composed multiplier; the
  // memory-mode input setup delays its stream by 4*pos cycles so that the
  // composed array sees one global skew.
  typedef struct packed {
    logic       a_nbr;
    logic       b_nbr;
    logic       c_chain;
    logic [3:0] row_pos;
    logic [3:0] col_pos;
  } blk_cfg_t;

  // Flags that travel with each element of A through the array.
  typedef struct packed {
    logic valid;
    logic first;  // element k = 0: restart accumulation
    logic last;   // element k = K-1: accumulation completes
  } aflags_t;

  function automatic int unsigned data_w(prec_e p);
    return (p == PREC_INT8) ? 8 : 16;
  endfunction

  function automatic int unsigned acc_w(prec_e p);
    return (p == PREC_INT8) ? 32 : 16;
  endfunction

  function automatic int unsigned mac_stages(prec_e p);
    return (p == PREC_INT8) ? 3 : 8;
  endfunction

  localparam logic [15:0] FP16_QNAN = 16'h7E00;

  // Round a normalised significand and pack. sig holds the hidden bit at
  // position 13, mantissa in [12:3], guard in [2], round/sticky in [1:0].
  // exp is the biased exponent of the hidden bit.
  function automatic logic [15:0] fp16_pack(logic sgn, int exp, logic [13:0] sig);
    logic [11:0] m;
    logic        up;
    int          e;
    e  = exp;
    up = sig[2] & (sig[1] | sig[0] | sig[3]);
    m  = {1'b0, sig[13:3]} + 12'(up);
    if (m[11]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (exp <= 0) return {sgn, 15'd0};          // flush to zero
    if (e >= 31) return {sgn, 5'h1F, 10'd0};     // overflow to Inf
    return {sgn, 5'(e), m[9:0]};
  endfunction

  function automatic logic [15:0] fp16_mul(logic [15:0] a, logic [15:0] b);
    logic        s;
    logic [4:0]  ea, eb;
    logic [10:0] ma, mb;
    logic [21:0] p;
    logic [13:0] sig;
    int          e;
    s  = a[15] ^ b[15];
    ea = a[14:10];
    eb = b[14:10];
    if ((ea == 5'h1F && a[9:0] != 0) || (eb == 5'h1F && b[9:0] != 0)) return FP16_QNAN;
    if (ea == 5'h1F || eb == 5'h1F) begin
      if (ea == 5'd0 || eb == 5'd0) return FP16_QNAN;  // Inf * 0
      return {s, 5'h1F, 10'd0};
    end
    if (ea == 5'd0 || eb == 5'd0) return {s, 15'd0};
    ma = {1'b1, a[9:0]};
    mb = {1'b1, b[9:0]};
    p  = ma * mb;                                 // in [2^20, 2^22)
    e  = int'(ea) + int'(eb) - 15;
    if (p[21]) begin
      sig = {p[21:9], |p[8:0]};
      e   = e + 1;
    end else begin
      sig = {p[20:8], |p[7:0]};
    end
    return fp16_pack(s, e, sig);
  endfunction

  function automatic logic [15:0] fp16_add(logic [15:0] a, logic [15:0] b);
    logic [15:0] x, y;
    logic [13:0] mx, my, sh, mask;
    logic [14:0] sum;
    logic        sticky;
    int          d, e;
    if ((a[14:10] == 5'h1F && a[9:0] != 0) || (b[14:10] == 5'h1F && b[9:0] != 0))
      return FP16_QNAN;
    if (a[14:10] == 5'h1F && b[14:10] == 5'h1F)
      return (a[15] == b[15]) ? a : FP16_QNAN;
    if (a[14:10] == 5'h1F) return a;
    if (b[14:10] == 5'h1F) return b;
    if (b[14:10] == 5'd0) return (a[14:10] == 5'd0) ? {a[15] & b[15], 15'd0} : a;
    if (a[14:10] == 5'd0) return b;
    // x is the operand of larger magnitude
    if (a[14:0] >= b[14:0]) begin
      x = a; y = b;
    end else begin
      x = b; y = a;
    end
    mx = {1'b1, x[9:0], 3'b000};
    my = {1'b1, y[9:0], 3'b000};
    d  = int'(x[14:10]) - int'(y[14:10]);
    if (d > 14) d = 14;
    // alignment shift as a log shifter of constant shifts, collecting sticky
    sh     = my;
    sticky = 1'b0;
    for (int s = 0; s < 4; s++) begin
      if (d[s]) begin
        mask   = ~(14'h3FFF << (1 << s));
        sticky = sticky | (|(sh & mask));
        sh     = sh >> (1 << s);
      end
    end
    sh[0]  = sh[0] | sticky;
    e      = int'(x[14:10]);
    if (x[15] == y[15]) begin
      sum = {1'b0, mx} + {1'b0, sh};
      if (sum[14]) begin
        sum = {1'b0, sum[14:2], sum[1] | sum[0]};
        e   = e + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, sh};
      if (sum == 0) return 16'h0000;
      for (int i = 0; i < 14; i++) begin
        if (!sum[13]) begin
          sum = sum << 1;
          e   = e - 1;
        end
      end
    end
    return fp16_pack(x[15], e, sum[13:0]);
  endfunction

endpackage
