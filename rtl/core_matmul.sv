// core_matmul: the 4x4x4 systolic core of a building-block matmul.
//
// A DxD grid of output-stationary PEs (D = 4). Row i receives the A lanes
// a_in[i] (element A[i][k] with its flags) from the left and column j
// receives the B lane b_in[j] (element B[k][j]) from the top; both are
// expected already skewed, lane i/j delayed by i/j cycles, which the input
// data setup circuit (or an upstream matmul in neighbor mode) provides. A and
// B leave unchanged, one cycle per PE later, at the right edge (a_out) and the
// bottom edge (b_out), ready for a neighboring matmul.
//
// Output: when the last PE of row i finishes (its `done`), the row's four
// results are copied into a shift register that then moves them right, one
// per cycle, out of c_out[i]: columns D-1, D-2, ..., 0 in four consecutive
// cycles flagged by c_valid[i]. Rows finish one cycle apart, so c_valid[i+1]
// trails c_valid[i] by one cycle. The shift-out order and the copy into a
// separate shift register are this design's choice; the architecture states
// that results stay in the PEs and are shifted out along the rows.
//
// A new operation may start only after the previous one has been shifted out
// (no overlap of operations inside one core).
module core_matmul
  import hamamu_pkg::*;
#(
  parameter prec_e PREC = PREC_FP16,
  localparam int unsigned D  = MATMUL_DIM,
  localparam int unsigned DW = data_w(PREC),
  localparam int unsigned AW = acc_w(PREC)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] a_in   [D],
  input  aflags_t       af_in  [D],
  input  logic [DW-1:0] b_in   [D],
  input  logic          b_vin  [D],
  output logic [DW-1:0] a_out  [D],
  output aflags_t       af_out [D],
  output logic [DW-1:0] b_out  [D],
  output logic          b_vout [D],
  output logic [AW-1:0] c_out  [D],
  output logic          c_valid[D]
);

  // Horizontal (A) and vertical (B) links; index D is the far edge.
  logic [DW-1:0] ah  [D][D+1];
  aflags_t       afh [D][D+1];
  logic [DW-1:0] bv  [D+1][D];
  logic          bvv [D+1][D];
  logic [AW-1:0] acc [D][D];
  logic          done[D][D];

  for (genvar i = 0; i < D; i++) begin : g_edge
    assign ah[i][0]  = a_in[i];
    assign afh[i][0] = af_in[i];
    assign a_out[i]  = ah[i][D];
    assign af_out[i] = afh[i][D];
    assign bv[0][i]  = b_in[i];
    assign bvv[0][i] = b_vin[i];
    assign b_out[i]  = bv[D][i];
    assign b_vout[i] = bvv[D][i];
  end

  for (genvar i = 0; i < D; i++) begin : g_row
    for (genvar j = 0; j < D; j++) begin : g_col
      pe #(.PREC(PREC)) u_pe (
        .clk, .rst_n,
        .a_in  (ah[i][j]),
        .af_in (afh[i][j]),
        .b_in  (bv[i][j]),
        .b_vin (bvv[i][j]),
        .a_out (ah[i][j+1]),
        .af_out(afh[i][j+1]),
        .b_out (bv[i+1][j]),
        .b_vout(bvv[i+1][j]),
        .acc   (acc[i][j]),
        .done  (done[i][j])
      );
    end
  end

  // Per-row output shift registers.
  logic [AW-1:0] sreg[D][D];
  logic [2:0]    left[D];     // elements still to shift out

  for (genvar i = 0; i < D; i++) begin : g_out
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        left[i] <= '0;
        for (int j = 0; j < D; j++) sreg[i][j] <= '0;
      end else if (done[i][D-1]) begin
        left[i] <= 3'(D);
        for (int j = 0; j < D; j++) sreg[i][j] <= acc[i][j];
      end else if (left[i] != 0) begin
        left[i] <= left[i] - 3'd1;
        for (int j = D - 1; j > 0; j--) sreg[i][j] <= sreg[i][j-1];
        sreg[i][0] <= '0;
      end
    end
    assign c_out[i]   = sreg[i][D-1];
    assign c_valid[i] = (left[i] != 0);
  end

endmodule
