// tb_direct_link: self-checking testbench of a programmable direct link.
//
// Checks that the link is open after reset (output all zeros), that writing
// its configuration cell closes or opens it, that the cell keeps its value
// while cfg_we is low, and that a closed link passes random data unchanged
// in the same cycle.
module tb_direct_link;
  logic        clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0, cfg_en = 1'b0, en;
  logic [39:0] din = '0, dout;
  int          checks = 0, failures = 0;
  bit          exp_en;

  direct_link #(.W(40)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_en = 1'b0;
    for (int n = 0; n < 300; n++) begin
      cfg_we = ($urandom % 8 == 0);
      cfg_en = 1'($urandom);
      din    = {8'($urandom), $urandom};
      #1;
      checks++;
      if (en != exp_en || dout != (exp_en ? din : 40'd0)) begin
        failures++;
        $display("FAIL en=%0b dout=%h din=%h", en, dout, din);
      end
      @(negedge clk);
      if (cfg_we) exp_en = cfg_en;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
