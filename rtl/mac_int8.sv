// mac_int8: 3-stage pipelined signed 8-bit multiply / add / multiply-accumulate.
//
// This is the arithmetic unit shared by the DSP slice and by every processing
// element of a hard matmul. The architecture fixes only that it has three
// modes (multiplier, adder, MAC) and that the int8 version is 3 pipeline
// stages deep; the split of the stages is this design's choice:
//   stage 1  operand registers (a, b, op and flags)
//   stage 2  product a*b (or sum a+b), sign-extended to 32 bits
//   stage 3  accumulator: MAC mode adds stage 2 to the accumulator, or loads
//            it when the element carries `first`; MUL/ADD modes load it.
// Because the accumulate loop closes inside stage 3, a new product can be
// accumulated every cycle into the same accumulator.
//
// Timing: an input presented with in_valid in cycle t is reflected in `acc`
// after the clock edge ending cycle t+2 (three edges). out_valid and out_last
// are registered alongside acc: out_last marks the accumulator value that
// includes the element flagged `last`. acc holds its value until the next
// valid input reaches stage 3.
module mac_int8
  import hamamu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  mac_op_e     op,
  input  logic        first,
  input  logic        last,
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [31:0] acc,
  output logic        out_valid,
  output logic        out_last
);

  logic        s1_valid, s1_first, s1_last;
  mac_op_e     s1_op;
  logic [7:0]  s1_a, s1_b;
  logic        s2_valid, s2_first, s2_last;
  mac_op_e     s2_op;
  logic [31:0] s2_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_first  <= 1'b0;
      s1_last   <= 1'b0;
      s1_op     <= OP_MAC;
      s1_a      <= '0;
      s1_b      <= '0;
      s2_valid  <= 1'b0;
      s2_first  <= 1'b0;
      s2_last   <= 1'b0;
      s2_op     <= OP_MAC;
      s2_r      <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      // stage 1
      s1_valid <= in_valid;
      s1_first <= first;
      s1_last  <= last;
      s1_op    <= op;
      s1_a     <= a;
      s1_b     <= b;
      // stage 2
      s2_valid <= s1_valid;
      s2_first <= s1_first;
      s2_last  <= s1_last;
      s2_op    <= s1_op;
      if (s1_op == OP_ADD)
        s2_r <= 32'(signed'({s1_a[7], s1_a}) + signed'({s1_b[7], s1_b}));
      else
        s2_r <= 32'(signed'(s1_a) * signed'(s1_b));
      // stage 3
      out_valid <= s2_valid;
      out_last  <= s2_valid & s2_last;
      if (s2_valid) begin
        if (s2_op == OP_MAC && !s2_first) acc <= acc + s2_r;
        else                              acc <= s2_r;
      end
    end
  end

endmodule
