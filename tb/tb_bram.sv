// tb_bram: self-checking testbench of the 20 Kbit block RAM (64-bit mode).
//
// Checks the configured depth (20480/64 = 320 words), then does random writes
// and reads against a testbench copy of the contents: read data must appear
// the cycle after rd_en, hold while rd_en is low, and a read of the address
// being written must return the old word.
module tb_bram;
  localparam int W = 64;
  localparam int DEP = 20480 / W;

  logic         clk = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [8:0]   wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  int           checks = 0, failures = 0;
  logic [W-1:0] model[DEP];
  logic [W-1:0] expd;
  bit           have_exp = 1'b0;

  bram #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.DEPTH != DEP) begin failures++; $display("FAIL depth %0d", dut.DEPTH); end
    // fill
    for (int i = 0; i < DEP; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 9'(i); wr_data = {$urandom, $urandom};
      model[i] = wr_data;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (have_exp) begin
        checks++;
        if (rd_data !== expd) begin
          failures++;
          $display("FAIL read %h expected %h", rd_data, expd);
        end
      end
      wr_en   = 1'($urandom);
      wr_addr = 9'($urandom % DEP);
      wr_data = {$urandom, $urandom};
      rd_en   = 1'($urandom);
      rd_addr = (n % 5 == 0) ? wr_addr : 9'($urandom % DEP);
      if (rd_en) begin
        expd = model[rd_addr];
        have_exp = 1'b1;
      end
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
