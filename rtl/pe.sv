// pe: processing element of the systolic hard matmul (output stationary).
//
// Elements of matrix A enter from the left and leave to the right; elements
// of matrix B enter from the top and leave at the bottom, one register per PE
// in each direction. Each cycle the PE feeds the pair (a, b) it receives into
// its pipelined MAC, whose accumulator is the stationary result C[i][j]: it
// stays in the PE until the accumulation completes, then the core shifts it
// out along the row. The MAC is mac_int8 or mac_fp16, selected by PREC.
//
// Control travels with the data: each A element carries aflags_t
// {valid, first, last}. `first` restarts the accumulation, `last` marks the
// final term; `done` pulses (registered, MAC latency after the last term
// entered) when `acc` holds the finished dot product. The B stream carries
// only a valid bit; the systolic schedule makes it coincide with A's, which an
// assertion checks. The flag scheme is this design's choice.
//
// Timing: a_out/af_out/b_out/b_vout are the inputs delayed by one cycle.
module pe
  import hamamu_pkg::*;
#(
  parameter prec_e PREC = PREC_FP16,
  localparam int unsigned DW = data_w(PREC),
  localparam int unsigned AW = acc_w(PREC)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] a_in,
  input  aflags_t       af_in,
  input  logic [DW-1:0] b_in,
  input  logic          b_vin,
  output logic [DW-1:0] a_out,
  output aflags_t       af_out,
  output logic [DW-1:0] b_out,
  output logic          b_vout,
  output logic [AW-1:0] acc,
  output logic          done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out  <= '0;
      af_out <= '0;
      b_out  <= '0;
      b_vout <= 1'b0;
    end else begin
      a_out  <= a_in;
      af_out <= af_in;
      b_out  <= b_in;
      b_vout <= b_vin;
    end
  end

  if (PREC == PREC_INT8) begin : g_int8
    mac_int8 u_mac (
      .clk, .rst_n,
      .in_valid (af_in.valid),
      .op       (OP_MAC),
      .first    (af_in.first),
      .last     (af_in.last),
      .a        (a_in),
      .b        (b_in),
      .acc      (acc),
      .out_valid(),
      .out_last (done)
    );
  end else begin : g_fp16
    mac_fp16 u_mac (
      .clk, .rst_n,
      .in_valid (af_in.valid),
      .op       (OP_MAC),
      .first    (af_in.first),
      .last     (af_in.last),
      .a        (a_in),
      .b        (b_in),
      .acc      (acc),
      .out_valid(),
      .out_last (done)
    );
  end

  // The A and B elements of one product must arrive together.
  a_b_aligned: assert property (@(posedge clk) disable iff (!rst_n) af_in.valid == b_vin);

endmodule
