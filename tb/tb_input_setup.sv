// tb_input_setup: self-checking testbench of the input data setup circuit.
//
// A testbench RAM (one cycle read latency) holds random words. For random
// K and edge position pos, the testbench pulses start and checks: the first
// read comes 2+4*pos cycles after start, addresses run 0..K-1 one per cycle,
// lane l delivers element k of word k at (first read)+1+k+l with flags
// {valid, first = (k==0), last = (k==K-1)}, nothing else is flagged valid,
// busy covers the operation, and a start pulse while busy is ignored.
module tb_input_setup;
  import hamamu_pkg::*;

  localparam int D = 4;
  localparam int DW = 16;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [8:0]    k_len = 9'd1, rd_addr;
  logic [3:0]    pos = '0;
  logic          busy, rd_en;
  logic [D*DW-1:0] rd_data;
  logic [DW-1:0] lane_data[D];
  aflags_t       lane_flags[D];
  int            checks = 0, failures = 0, cyc = 0;

  input_setup #(.PREC(PREC_FP16), .ADDR_W(9)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [D*DW-1:0] mem[512];
  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_start, t_read, nread, K;
  int nvalid[D];

  always @(negedge clk) begin
    if (rst_n) begin
      if (rd_en) begin
        if (nread == 0) begin
          t_read = cyc;
          checks++;
          if (cyc != t_start + 2 + 4 * int'(pos)) begin
            failures++;
            $display("FAIL first read at %0d, start at %0d pos %0d", cyc, t_start, pos);
          end
        end
        checks++;
        if (int'(rd_addr) != nread) begin
          failures++;
          $display("FAIL address %0d expected %0d", rd_addr, nread);
        end
        nread++;
      end
      for (int l = 0; l < D; l++) begin
        if (lane_flags[l].valid) begin
          int k;
          k = cyc - t_read - 1 - l;
          checks++;
          if (k != nvalid[l] || lane_data[l] != mem[k][l*DW +: DW] ||
              lane_flags[l].first != (k == 0) || lane_flags[l].last != (k == K - 1)) begin
            failures++;
            $display("FAIL lane %0d at %0d: k=%0d", l, cyc, k);
          end
          nvalid[l]++;
        end
      end
    end
  end

  initial begin
    foreach (mem[i]) mem[i] = {$urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      K = (run == 0) ? 1 : 1 + int'($urandom % 40);
      k_len = 9'(K);
      pos = 4'($urandom % 4);
      nread = 0;
      for (int l = 0; l < D; l++) nvalid[l] = 0;
      @(negedge clk);
      start = 1'b1;
      t_start = cyc;
      @(negedge clk);
      start = 1'b0;
      @(negedge clk);
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL not busy");
      end
      start = 1'b1;              // must be ignored
      @(negedge clk);
      start = 1'b0;
      repeat (4 * int'(pos) + K + D + 4) @(negedge clk);
      checks++;
      if (busy || nread != K) begin
        failures++;
        $display("FAIL run %0d: busy=%0b reads=%0d K=%0d", run, busy, nread, K);
      end
      for (int l = 0; l < D; l++) begin
        checks++;
        if (nvalid[l] != K) begin
          failures++;
          $display("FAIL lane %0d delivered %0d of %0d", l, nvalid[l], K);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
