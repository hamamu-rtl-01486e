// dsp_slice: DSP slice of the fabric, with multiplier, adder and MAC modes.
//
// The slice is built around the same pipelined MAC that sits in every PE of a
// hard matmul (mac_int8: 3 stages, mac_fp16: 8 stages, selected by PREC), so
// that DSP-based and matmul-based designs share one arithmetic core. Its mode
// is a configuration cell written with cfg_we (reset: MAC mode):
//   OP_MUL  result = a*b
//   OP_ADD  result = a+b
//   OP_MAC  result = sum of a*b since the input flagged `first`
// Timing: the result of an input presented in cycle t appears after the
// MAC's pipeline depth in clock edges, with out_valid; out_last marks the
// result that includes the input flagged `last`. Only one precision per slice
// (this fabric builds int8 and fp16 variants separately).
module dsp_slice
  import hamamu_pkg::*;
#(
  parameter prec_e PREC = PREC_FP16,
  localparam int unsigned DW = data_w(PREC),
  localparam int unsigned AW = acc_w(PREC)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  mac_op_e       cfg_op,
  input  logic          in_valid,
  input  logic          first,
  input  logic          last,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [AW-1:0] result,
  output logic          out_valid,
  output logic          out_last
);

  mac_op_e mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      mode <= OP_MAC;
    else if (cfg_we) mode <= cfg_op;
  end

  if (PREC == PREC_INT8) begin : g_int8
    mac_int8 u_mac (
      .clk, .rst_n, .in_valid, .op(mode), .first, .last, .a, .b,
      .acc(result), .out_valid, .out_last
    );
  end else begin : g_fp16
    mac_fp16 u_mac (
      .clk, .rst_n, .in_valid, .op(mode), .first, .last, .a, .b,
      .acc(result), .out_valid, .out_last
    );
  end

endmodule
