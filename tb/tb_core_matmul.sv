// tb_core_matmul: self-checking testbench of the 4x4 systolic core (fp16).
//
// Feeds random 4xK and Kx4 fp16 matrices, lane i of A and lane j of B
// delayed by i and j cycles as the input setup would, for several values of
// K and with a gap between operations. Checks every element of the 4x4
// result against the reference (products and partial sums rounded to fp16 in
// k order), the shift-out order (columns 3,2,1,0), and the cycle at which
// row i starts to emit: t0 + K + i + 3 + P with P = 8, where t0 is the cycle
// in which lane 0 carries k = 0.
module tb_core_matmul;
  import hamamu_pkg::*;
  import tb_fp16_pkg::*;

  localparam int D = 4;
  localparam int P = 8;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] a_in[D], b_in[D], a_out[D], b_out[D], c_out[D];
  aflags_t     af_in[D], af_out[D];
  logic        b_vin[D], b_vout[D], c_valid[D];
  int          checks = 0, failures = 0, cyc = 0;

  core_matmul #(.PREC(PREC_FP16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] A[D][64], B[64][D], C[D][D];
  int          K, t0;
  int          nout[D];

  // output monitor
  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < D; i++) begin
        if (c_valid[i]) begin
          int j;
          j = D - 1 - nout[i];
          checks++;
          if (!same(c_out[i], C[i][j])) begin
            failures++;
            $display("FAIL C[%0d][%0d] got %h expected %h", i, j, c_out[i], C[i][j]);
          end
          if (nout[i] == 0) begin
            checks++;
            if (cyc != t0 + K + i + 3 + P) begin
              failures++;
              $display("FAIL row %0d starts at %0d, expected %0d", i, cyc, t0 + K + i + 3 + P);
            end
          end
          nout[i]++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < D; i++) begin
      a_in[i] = '0; b_in[i] = '0; af_in[i] = '0; b_vin[i] = 1'b0; nout[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (A[i, k]) A[i][k] = '0;
    foreach (B[k, j]) B[k][j] = '0;
    for (int run = 0; run < 6; run++) begin
      int kl[6] = '{4, 1, 7, 16, 2, 33};
      K = kl[run];
      for (int i = 0; i < D; i++)
        for (int k = 0; k < K; k++) begin
          A[i][k] = rand_fp16(10, 19);
          B[k][i] = rand_fp16(10, 19);
        end
      for (int i = 0; i < D; i++)
        for (int j = 0; j < D; j++)
          for (int k = 0; k < K; k++)
            C[i][j] = (k == 0) ? mul(A[i][k], B[k][j]) : add(C[i][j], mul(A[i][k], B[k][j]));
      for (int i = 0; i < D; i++) nout[i] = 0;
      @(negedge clk);
      t0 = cyc;
      for (int t = 0; t < K + D; t++) begin
        for (int l = 0; l < D; l++) begin
          int k;
          k = t - l;
          if (k >= 0 && k < K) begin
            a_in[l]  = A[l][k];
            af_in[l] = '{valid: 1'b1, first: k == 0, last: k == K - 1};
            b_in[l]  = B[k][l];
            b_vin[l] = 1'b1;
          end else begin
            a_in[l]  = 16'($urandom);
            af_in[l] = '0;
            b_in[l]  = 16'($urandom);
            b_vin[l] = 1'b0;
          end
        end
        @(negedge clk);
      end
      repeat (P + 2 * D + 2) @(negedge clk);
      for (int i = 0; i < D; i++) begin
        checks++;
        if (nout[i] != D) begin
          failures++;
          $display("FAIL row %0d emitted %0d results", i, nout[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
