// tb_output_interface: self-checking testbench of the C output interface.
//
// Drives four row streams the way the last matmul of a row emits them: row
// i+1 one cycle after row i, 4*T results per row in the order of the output
// chain (columns 3,2,1,0, then 7,6,5,4, ...). Checks that each write carries
// one whole column of the four rows at the right address, that the writes are
// consecutive cycles starting 3 cycles after row 0 starts, and that done rises
// after the last column and clears on start.
module tb_output_interface;
  import hamamu_pkg::*;

  localparam int D = 4;
  localparam int AW = 32;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0]    n_cols = 8'd4, wr_addr;
  logic [AW-1:0] c_in[D];
  logic          c_vin[D];
  logic          wr_en, done;
  logic [D*AW-1:0] wr_data;
  int            checks = 0, failures = 0, cyc = 0;

  output_interface #(.PREC(PREC_INT8), .ADDR_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] val(int run, int i, int col);
    return AW'(run * 100000 + i * 1000 + col);
  endfunction

  int run, t1, nwr, ncols;

  always @(negedge clk) begin
    if (rst_n && wr_en) begin
      checks++;
      if (int'(wr_addr) != (nwr ^ 3) || cyc != t1 + 3 + nwr) begin
        failures++;
        $display("FAIL write %0d: addr %0d at %0d", nwr, wr_addr, cyc);
      end
      for (int i = 0; i < D; i++) begin
        checks++;
        if (wr_data[i*AW +: AW] != val(run, i, int'(wr_addr))) begin
          failures++;
          $display("FAIL row %0d col %0d data %0d", i, wr_addr, wr_data[i*AW +: AW]);
        end
      end
      nwr++;
    end
  end

  initial begin
    for (int i = 0; i < D; i++) begin c_in[i] = '0; c_vin[i] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (run = 0; run < 8; run++) begin
      ncols = 4 * (1 + int'($urandom % 8));
      n_cols = 8'(ncols);
      nwr = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      checks++;
      if (done) begin failures++; $display("FAIL done not cleared"); end
      repeat (2) @(negedge clk);
      t1 = cyc;
      for (int t = 0; t < ncols + D; t++) begin
        for (int i = 0; i < D; i++) begin
          int s;
          s = t - i;
          c_vin[i] = (s >= 0 && s < ncols);
          c_in[i]  = c_vin[i] ? val(run, i, s ^ 3) : AW'($urandom);
        end
        @(negedge clk);
        checks++;
        if (done != (t >= ncols + 2)) begin
          failures++;
          $display("FAIL done=%0b at t=%0d", done, t);
        end
      end
      for (int i = 0; i < D; i++) c_vin[i] = 1'b0;
      repeat (4) @(negedge clk);
      checks++;
      if (nwr != ncols || !done) begin
        failures++;
        $display("FAIL %0d writes of %0d, done=%0b", nwr, ncols, done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
