// mac_fp16: 8-stage pipelined IEEE half-precision multiply / add /
// multiply-accumulate.
//
// Same role and interface as mac_int8, for fp16 data. The architecture gives
// the depth (8 stages for fp16) and the three modes; the stage split is this
// design's choice:
//   stage 1     operand registers
//   stage 2     rounded product fp16_mul(a, b) (or sum fp16_add(a, b))
//   stages 3-7  retiming registers (the multiplier can be spread over them)
//   stage 8     accumulator: acc <= first ? r : fp16_add(acc, r) in MAC mode
// The accumulation loop closes inside stage 8 so that one product per cycle
// can be accumulated into the same register. Arithmetic is round to nearest
// even with subnormals flushed to zero (see hamamu_pkg); the accumulator is
// fp16, the product is rounded to fp16 before it is accumulated.
//
// Timing: an input with in_valid in cycle t appears in `acc` after eight
// clock edges. out_valid/out_last are registered with acc.
module mac_fp16
  import hamamu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  mac_op_e     op,
  input  logic        first,
  input  logic        last,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] acc,
  output logic        out_valid,
  output logic        out_last
);

  localparam int unsigned NDLY = 6;  // stages 2..7 carry the rounded result

  typedef struct packed {
    logic        valid;
    logic        first;
    logic        last;
    mac_op_e     op;
    logic [15:0] r;
  } pipe_t;

  logic        s1_valid, s1_first, s1_last;
  mac_op_e     s1_op;
  logic [15:0] s1_a, s1_b;
  pipe_t       dly [NDLY];
  pipe_t       s2_next;

  always_comb begin
    s2_next.valid = s1_valid;
    s2_next.first = s1_first;
    s2_next.last  = s1_last;
    s2_next.op    = s1_op;
    s2_next.r     = (s1_op == OP_ADD) ? fp16_add(s1_a, s1_b) : fp16_mul(s1_a, s1_b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_first  <= 1'b0;
      s1_last   <= 1'b0;
      s1_op     <= OP_MAC;
      s1_a      <= '0;
      s1_b      <= '0;
      for (int i = 0; i < NDLY; i++) dly[i] <= '{valid: 1'b0, first: 1'b0, last: 1'b0, op: OP_MAC, r: '0};
      acc       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      s1_first <= first;
      s1_last  <= last;
      s1_op    <= op;
      s1_a     <= a;
      s1_b     <= b;
      dly[0]   <= s2_next;
      for (int i = 1; i < NDLY; i++) dly[i] <= dly[i-1];
      out_valid <= dly[NDLY-1].valid;
      out_last  <= dly[NDLY-1].valid & dly[NDLY-1].last;
      if (dly[NDLY-1].valid) begin
        if (dly[NDLY-1].op == OP_MAC && !dly[NDLY-1].first)
          acc <= fp16_add(acc, dly[NDLY-1].r);
        else
          acc <= dly[NDLY-1].r;
      end
    end
  end

endmodule
