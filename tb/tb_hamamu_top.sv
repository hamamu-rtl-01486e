// tb_hamamu_top: end-to-end testbench of the Hamamu region at its default
// size: four fp16 4x4x4 hard matmuls composed into an 8x8xK systolic
// multiplier, with its edge RAMs and two DSP slices.
//
// The testbench configures the blocks (left column: A from memory, top row:
// B from memory, everything else from the neighbor, C chained to the right
// edge), writes random fp16 A and B through the fabric-side RAM ports,
// pulses start, waits for done and reads C back through the C RAM ports.
// Every element is compared with the real-valued fp16 reference (products
// and running sums rounded to fp16 in k order). The cycle of the last C write
// must be t + K + 4*TR + 4*TC + P + 4 for start in cycle t (P = 8). It runs
// K = 8 (the 8x8x8 multiply) and K = 8 + a random 1..40.
// It counts how often each mechanism was used, and fails if one never was:
// memory-mode reads of A and B, A and B arriving over neighbor links, C of a
// left block passed through a right block's output mux, accumulator restarts,
// and the DSP slices' multiplier, adder and MAC modes.
module tb_hamamu_top;
  import hamamu_pkg::*;
  import tb_fp16_pkg::*;

  localparam int TR = 2, TC = 2, D = 4, P = 8, NR = TR * D, NC = TC * D;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // asynchronous reset before the first clock edge
  logic cfg_we = 1'b0, start = 1'b0, busy, done;
  blk_cfg_t cfg[TR][TC];
  logic [8:0] k_len = 9'd8;
  logic a_wr_en[TR], b_wr_en[TC], c_rd_en[TR];
  logic [8:0] a_wr_addr[TR], b_wr_addr[TC], c_rd_addr[TR];
  logic [63:0] a_wr_data[TR], b_wr_data[TC], c_rd_data[TR];
  logic dsp_cfg_we[2], dsp_valid[2], dsp_first[2], dsp_last[2], dsp_ovalid[2], dsp_olast[2];
  mac_op_e dsp_cfg_op[2];
  logic [15:0] dsp_a[2], dsp_b[2], dsp_result[2];
  int checks = 0, failures = 0, cyc = 0;

  hamamu_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_mem_a = 0, n_mem_b = 0, n_nbr_a = 0, n_nbr_b = 0, n_cpass = 0, n_restart = 0;
  int n_dsp_mul = 0, n_dsp_add = 0, n_dsp_mac = 0;
  int last_wr;

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < TR; r++) if (dut.a_rd_en[r]) n_mem_a++;
    for (int c = 0; c < TC; c++) if (dut.b_rd_en[c]) n_mem_b++;
    if (dut.g_r[0].g_c[1].u_blk.core_af[0].valid) n_nbr_a++;
    if (dut.g_r[1].g_c[0].u_blk.core_bv[0]) n_nbr_b++;
    if (dut.g_r[0].g_c[1].u_blk.cv_pass[0] && dut.g_r[0].g_c[1].u_blk.cv_out[0]) n_cpass++;
    if (dut.g_r[1].g_c[1].u_blk.core_af[3].valid && dut.g_r[1].g_c[1].u_blk.core_af[3].first) n_restart++;
    if (dut.g_row_ram[TR-1].c_wr_en) last_wr = cyc;
  end

  // ------------------------------------------------------------ matrices
  logic [15:0] A[NR][64], B[64][NC], C[NR][NC];

  task automatic load_and_run(int K);
    int t_start;
    for (int i = 0; i < NR; i++) for (int k = 0; k < K; k++) A[i][k] = rand_fp16(10, 19);
    for (int k = 0; k < K; k++) for (int j = 0; j < NC; j++) B[k][j] = rand_fp16(10, 19);
    for (int i = 0; i < NR; i++)
      for (int j = 0; j < NC; j++)
        for (int k = 0; k < K; k++)
          C[i][j] = (k == 0) ? mul(A[i][k], B[k][j]) : add(C[i][j], mul(A[i][k], B[k][j]));
    // write A (column-major per tile row) and B (row-major per tile column)
    for (int k = 0; k < K; k++) begin
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
    k_len = 9'(K);
    @(negedge clk);
    start = 1'b1;
    t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (last_wr != t_start + K + 4 * TR + 4 * TC + P + 4) begin
      failures++;
      $display("FAIL K=%0d: last C write at +%0d, expected +%0d", K, last_wr - t_start,
               K + 4 * TR + 4 * TC + P + 4);
    end
    // read C back
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
            $display("FAIL K=%0d C[%0d][%0d] = %h expected %h", K, D*r+i, j,
                     c_rd_data[r][16*i +: 16], C[D*r+i][j]);
          end
        end
      end
    end
  endtask

  // ------------------------------------------------------------ DSP slices
  task automatic dsp_test();
    mac_op_e ops[3] = '{OP_MUL, OP_ADD, OP_MAC};
    foreach (ops[m]) begin
      logic [15:0] x[3], y[3], e;
      int n;
      @(negedge clk);
      dsp_cfg_we[0] = 1'b1; dsp_cfg_op[0] = ops[m];
      @(negedge clk);
      dsp_cfg_we[0] = 1'b0;
      n = (ops[m] == OP_MAC) ? 3 : 1;
      for (int i = 0; i < n; i++) begin
        x[i] = rand_fp16(12, 17); y[i] = rand_fp16(12, 17);
        e = (ops[m] == OP_ADD) ? add(x[i], y[i])
          : (i == 0) ? mul(x[i], y[i]) : add(e, mul(x[i], y[i]));
        dsp_valid[0] = 1'b1; dsp_first[0] = (i == 0); dsp_last[0] = (i == n - 1);
        dsp_a[0] = x[i]; dsp_b[0] = y[i];
        @(negedge clk);
      end
      dsp_valid[0] = 1'b0;
      while (!dsp_olast[0]) @(negedge clk);
      checks++;
      if (!same(dsp_result[0], e)) begin
        failures++;
        $display("FAIL DSP mode %s: %h expected %h", ops[m].name(), dsp_result[0], e);
      end else begin
        case (ops[m])
          OP_MUL: n_dsp_mul++;
          OP_ADD: n_dsp_add++;
          default: n_dsp_mac++;
        endcase
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    for (int r = 0; r < TR; r++) begin
      a_wr_en[r] = 1'b0; a_wr_addr[r] = '0; a_wr_data[r] = '0;
      c_rd_en[r] = 1'b0; c_rd_addr[r] = '0;
    end
    for (int c = 0; c < TC; c++) begin
      b_wr_en[c] = 1'b0; b_wr_addr[c] = '0; b_wr_data[c] = '0;
    end
    for (int s = 0; s < 2; s++) begin
      dsp_cfg_we[s] = 1'b0; dsp_cfg_op[s] = OP_MAC; dsp_valid[s] = 1'b0;
      dsp_first[s] = 1'b0; dsp_last[s] = 1'b0; dsp_a[s] = '0; dsp_b[s] = '0;
    end
    for (int r = 0; r < TR; r++)
      for (int c = 0; c < TC; c++)
        cfg[r][c] = '{a_nbr: c > 0, b_nbr: r > 0, c_chain: c > 0,
                      row_pos: 4'(r), col_pos: 4'(c)};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); cfg_we = 1'b1;
    @(negedge clk); cfg_we = 1'b0;
    load_and_run(8);
    load_and_run(8 + 1 + int'($urandom % 40));
    dsp_test();
    need("A read in memory mode", n_mem_a);
    need("B read in memory mode", n_mem_b);
    need("A from neighbor (direct link)", n_nbr_a);
    need("B from neighbor (direct link)", n_nbr_b);
    need("C passed through output mux", n_cpass);
    need("accumulator restart", n_restart);
    need("DSP multiplier mode", n_dsp_mul);
    need("DSP adder mode", n_dsp_add);
    need("DSP MAC mode", n_dsp_mac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
