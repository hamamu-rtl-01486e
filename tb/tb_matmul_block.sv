// tb_matmul_block: self-checking testbench of the building-block matmul
// (int8 build).
//
// Two blocks side by side form a 4 x 8 x K multiplier: block 0 reads A and
// its B slice from memory; block 1 takes A from block 0 in neighbor mode,
// reads its own B slice (position col_pos = 1) and chains block 0's C through
// its output mux. Testbench RAMs (one cycle read latency) hold A column-major
// and B row-major. For several K the testbench checks all 32 results leaving
// block 1 against integer reference arithmetic, the order of the C stream,
// and the cycle at which row i of block 0 starts to emit:
// t + K + i + 6 + P (P = 3) for start in cycle t. It also runs block 0 alone
// in memory mode after reconfiguring block 1 to ignore its neighbor, and
// checks that nothing of block 0 then leaves block 1.
module tb_matmul_block;
  import hamamu_pkg::*;

  localparam int D = 4, P = 3, DW = 8, AW = 32;

  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0, start = 1'b0;
  blk_cfg_t cfg0, cfg1;
  logic [8:0] k_len = 9'd4;
  int checks = 0, failures = 0, cyc = 0;

  // block 0 / block 1 ports
  logic busy0, busy1;
  logic a_en0, b_en0, a_en1, b_en1;
  logic [8:0] a_ad0, b_ad0, a_ad1, b_ad1;
  logic [D*DW-1:0] a_rd0, b_rd0, b_rd1;
  logic [DW-1:0] zd[D], a_o0[D], b_o0[D], a_o1[D], b_o1[D];
  aflags_t zf[D], af_o0[D], af_o1[D];
  logic zv[D], bv_o0[D], bv_o1[D], cv_o0[D], cv_o1[D];
  logic [AW-1:0] zc[D], c_o0[D], c_o1[D];

  matmul_block #(.PREC(PREC_INT8), .ADDR_W(9)) u0 (
    .clk, .rst_n, .cfg_we, .cfg(cfg0), .start, .k_len, .busy(busy0),
    .a_rd_en(a_en0), .a_rd_addr(a_ad0), .a_rd_data(a_rd0),
    .b_rd_en(b_en0), .b_rd_addr(b_ad0), .b_rd_data(b_rd0),
    .a_nbr(zd), .af_nbr(zf), .b_nbr(zd), .bv_nbr(zv), .c_nbr(zc), .cv_nbr(zv),
    .a_out(a_o0), .af_out(af_o0), .b_out(b_o0), .bv_out(bv_o0), .c_out(c_o0), .cv_out(cv_o0));

  matmul_block #(.PREC(PREC_INT8), .ADDR_W(9)) u1 (
    .clk, .rst_n, .cfg_we, .cfg(cfg1), .start, .k_len, .busy(busy1),
    .a_rd_en(a_en1), .a_rd_addr(a_ad1), .a_rd_data('0),
    .b_rd_en(b_en1), .b_rd_addr(b_ad1), .b_rd_data(b_rd1),
    .a_nbr(a_o0), .af_nbr(af_o0), .b_nbr(zd), .bv_nbr(zv), .c_nbr(c_o0), .cv_nbr(cv_o0),
    .a_out(a_o1), .af_out(af_o1), .b_out(b_o1), .bv_out(bv_o1), .c_out(c_o1), .cv_out(cv_o1));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [7:0] A[D][64], B[64][2*D];
  int C[D][2*D];
  logic [D*DW-1:0] amem[64], bmem0[64], bmem1[64];

  always @(posedge clk) begin
    if (a_en0) a_rd0 <= amem[a_ad0];
    if (b_en0) b_rd0 <= bmem0[b_ad0];
    if (b_en1) b_rd1 <= bmem1[b_ad1];
  end

  int K, t_start, ncols, nout[D];
  bit watch_row0;
  bit prev_cv0[D] = '{default: 1'b0};

  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < D; i++) begin
        if (cv_o1[i]) begin
          int j;
          j = nout[i] ^ 3;
          checks++;
          if (int'(c_o1[i]) != C[i][j]) begin
            failures++;
            $display("FAIL C[%0d][%0d] = %0d expected %0d", i, j, int'(c_o1[i]), C[i][j]);
          end
          nout[i]++;
        end
        if (watch_row0 && cv_o0[i] && !prev_cv0[i]) begin
          checks++;
          if (cyc != t_start + K + i + 6 + P) begin
            failures++;
            $display("FAIL row %0d starts at %0d, expected %0d", i, cyc, t_start + K + i + 6 + P);
          end
        end
        prev_cv0[i] = cv_o0[i];
      end
    end
  end

  task automatic run_op(int kk, int cols);
    K = kk;
    ncols = cols;
    k_len = 9'(K);
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < D; i++) A[i][k] = 8'($urandom);
      for (int j = 0; j < 2 * D; j++) B[k][j] = 8'($urandom);
      for (int i = 0; i < D; i++) begin
        amem[k][i*DW +: DW]  = A[i][k];
        bmem0[k][i*DW +: DW] = B[k][i];
        bmem1[k][i*DW +: DW] = B[k][D+i];
      end
    end
    for (int i = 0; i < D; i++)
      for (int j = 0; j < 2 * D; j++) begin
        C[i][j] = 0;
        for (int k = 0; k < K; k++) C[i][j] += int'(A[i][k]) * int'(B[k][j]);
      end
    for (int i = 0; i < D; i++) nout[i] = 0;
    @(negedge clk);
    start = 1'b1;
    t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    repeat (K + 2 * D + P + 20) @(negedge clk);
    for (int i = 0; i < D; i++) begin
      checks++;
      if (nout[i] != ncols) begin
        failures++;
        $display("FAIL row %0d emitted %0d of %0d", i, nout[i], ncols);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin zd[i] = '0; zf[i] = '0; zv[i] = 1'b0; zc[i] = '0; end
    watch_row0 = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // composed 4 x 8 x K
    cfg0 = '{a_nbr: 1'b0, b_nbr: 1'b0, c_chain: 1'b0, row_pos: 4'd0, col_pos: 4'd0};
    cfg1 = '{a_nbr: 1'b1, b_nbr: 1'b0, c_chain: 1'b1, row_pos: 4'd0, col_pos: 4'd1};
    @(negedge clk); cfg_we = 1'b1; @(negedge clk); cfg_we = 1'b0;
    run_op(4, 8);
    run_op(1, 8);
    run_op(13, 8);
    run_op(40, 8);
    // block 1 reconfigured as a lone block: A in memory mode (its RAM reads zero), no C chain
    cfg1 = '{a_nbr: 1'b0, b_nbr: 1'b0, c_chain: 1'b0, row_pos: 4'd0, col_pos: 4'd0};
    @(negedge clk); cfg_we = 1'b1; @(negedge clk); cfg_we = 1'b0;
    // block 1 now multiplies a zero A: its 16 outputs are 0, block 0's are blocked
    for (int i = 0; i < D; i++) nout[i] = 0;
    K = 6;
    k_len = 9'(K);
    for (int i = 0; i < D; i++) for (int j = 0; j < 2 * D; j++) C[i][j] = 0;
    @(negedge clk); start = 1'b1; t_start = cyc; @(negedge clk); start = 1'b0;
    repeat (K + 2 * D + P + 20) @(negedge clk);
    for (int i = 0; i < D; i++) begin
      checks++;
      if (nout[i] != D) begin
        failures++;
        $display("FAIL row %0d emitted %0d of %0d without chaining", i, nout[i], D);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
