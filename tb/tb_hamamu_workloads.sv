// tb_hamamu_workloads: the square multiplications used to evaluate the
// architecture, run on a larger composed array.
//
// A hamamu_top of 4x4 fp16 blocks (a 16x16xK systolic multiplier) runs the
// MxMxM problems M = 16 (the 16x16x16 composition of sixteen 4x4x4 blocks),
// 8 and 13 (a size that does not divide into 4x4x4 blocks) one after the
// other, without reconfiguration: the unused rows of A and columns of B are
// zero, so the extra results must come out as zero. The larger evaluated
// sizes (24 to 64, and 35) need the same array with more blocks; they are
// left out only to keep the simulation build short. Every element of C is
// checked against the real-valued fp16 reference, and the last C write must
// come t + K + 4*TR + 4*TC + P + 4 cycles after start (K = M, P = 8). Also
// counts how many blocks took A and B from their neighbours, and fails if
// that never happened.
module tb_hamamu_workloads;
  import hamamu_pkg::*;
  import tb_fp16_pkg::*;

  localparam int TR = 4, TC = 4, D = 4, P = 8, NR = TR * D, NC = TC * D;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  logic cfg_we = 1'b0, start = 1'b0, busy, done;
  blk_cfg_t cfg[TR][TC];
  logic [8:0] k_len = 9'd8;
  logic a_wr_en[TR], b_wr_en[TC], c_rd_en[TR];
  logic [8:0] a_wr_addr[TR], b_wr_addr[TC], c_rd_addr[TR];
  logic [63:0] a_wr_data[TR], b_wr_data[TC], c_rd_data[TR];
  logic dsp_cfg_we[1], dsp_valid[1], dsp_first[1], dsp_last[1], dsp_ovalid[1], dsp_olast[1];
  mac_op_e dsp_cfg_op[1];
  logic [15:0] dsp_a[1], dsp_b[1], dsp_result[1];
  int checks = 0, failures = 0, cyc = 0;

  hamamu_top #(.PREC(PREC_FP16), .TR(TR), .TC(TC), .N_DSP(1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_wr, n_nbr = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_row_ram[TR-1].c_wr_en) last_wr = cyc;
    if (dut.g_r[TR-1].g_c[TC-1].u_blk.core_af[0].valid && dut.g_r[TR-1].g_c[TC-1].u_blk.core_bv[0]) n_nbr++;
  end

  logic [15:0] A[NR][64], B[64][NC], C[NR][NC];

  task automatic run(int M);
    int t_start, nbad;
    nbad = 0;
    foreach (A[i, k]) A[i][k] = (i < M && k < M) ? rand_fp16(11, 18) : 16'h0000;
    foreach (B[k, j]) B[k][j] = (j < M && k < M) ? rand_fp16(11, 18) : 16'h0000;
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NC; j++)
        for (int k = 0; k < M; k++)
          C[i][j] = (k == 0) ? mul(A[i][k], B[k][j]) : add(C[i][j], mul(A[i][k], B[k][j]));
    for (int k = 0; k < M; k++) begin
      @(negedge clk);
      for (int r = 0; r < TR; r++) begin
        a_wr_en[r] = 1'b1; a_wr_addr[r] = 9'(k);
        for (int i = 0; i < D; i++) a_wr_data[r][16*i +: 16] = A[D*r+i][k];
      end
      for (int c = 0; c < TC; c++) begin
        b_wr_en[c] = 1'b1; b_wr_addr[c] = 9'(k);
        for (int j = 0; j < D; j++) b_wr_data[c][16*j +: 16] = B[k][D*c+j];
      end
    end
    @(negedge clk);
    for (int r = 0; r < TR; r++) a_wr_en[r] = 1'b0;
    for (int c = 0; c < TC; c++) b_wr_en[c] = 1'b0;
    k_len = 9'(M);
    @(negedge clk);
    start = 1'b1;
    t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (last_wr != t_start + M + 4 * TR + 4 * TC + P + 4) begin
      failures++;
      $display("FAIL M=%0d: last C write at +%0d", M, last_wr - t_start);
    end
    for (int j = 0; j < NC; j++) begin
      @(negedge clk);
      for (int r = 0; r < TR; r++) begin c_rd_en[r] = 1'b1; c_rd_addr[r] = 9'(j); end
      @(negedge clk);
      for (int r = 0; r < TR; r++) begin
        c_rd_en[r] = 1'b0;
        for (int i = 0; i < D; i++) begin
          checks++;
          if (!same(c_rd_data[r][16*i +: 16], C[D*r+i][j])) begin
            failures++;
            nbad++;
            if (nbad < 5) $display("FAIL M=%0d C[%0d][%0d] = %h expected %h", M, D*r+i, j,
                                   c_rd_data[r][16*i +: 16], C[D*r+i][j]);
          end
        end
      end
    end
    $display("workload %0dx%0dx%0d: %0d cycles from start to last C write, %0d mismatches",
             M, M, M, last_wr - t_start, nbad);
  endtask

  initial begin
    for (int r = 0; r < TR; r++) begin
      a_wr_en[r] = 1'b0; a_wr_addr[r] = '0; a_wr_data[r] = '0;
      c_rd_en[r] = 1'b0; c_rd_addr[r] = '0;
    end
    for (int c = 0; c < TC; c++) begin
      b_wr_en[c] = 1'b0; b_wr_addr[c] = '0; b_wr_data[c] = '0;
    end
    dsp_cfg_we[0] = 1'b0; dsp_cfg_op[0] = OP_MAC; dsp_valid[0] = 1'b0;
    dsp_first[0] = 1'b0; dsp_last[0] = 1'b0; dsp_a[0] = '0; dsp_b[0] = '0;
    for (int r = 0; r < TR; r++)
      for (int c = 0; c < TC; c++)
        cfg[r][c] = '{a_nbr: c > 0, b_nbr: r > 0, c_chain: c > 0,
                      row_pos: 4'(r), col_pos: 4'(c)};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); cfg_we = 1'b1;
    @(negedge clk); cfg_we = 1'b0;
    run(16);
    run(8);
    run(13);
    checks++;
    if (n_nbr == 0) begin
      failures++;
      $display("FAIL the far corner block never received data from its neighbours");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
