// tb_mac_fp16: self-checking testbench of the 8-stage fp16 MAC.
//
// Runs dot products of random length in MAC mode, and single products and sums
// in MUL and ADD modes, back to back. Every result is compared with the
// real-valued reference model (each product rounded to fp16, then each partial
// sum rounded), and the latency from the `last` input to `out_last` must be
// exactly 8 cycles. Also checks exact rounding corner cases of fp16_add.
module tb_mac_fp16;
  import hamamu_pkg::*;
  import tb_fp16_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, first = 1'b0, last = 1'b0;
  mac_op_e     op = OP_MAC;
  logic [15:0] a = '0, b = '0, acc;
  logic        out_valid, out_last;
  int          checks = 0, failures = 0;
  int          cyc = 0;

  mac_fp16 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, queued in order of their `last` input
  logic [15:0] exp_q[$];
  int          t_q[$];

  always @(negedge clk) begin
    if (rst_n && out_last) begin
      logic [15:0] e;
      int t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (!same(acc, e)) begin
        failures++;
        $display("FAIL value: got %h expected %h", acc, e);
      end
      checks++;
      if (cyc - t != 8) begin
        failures++;
        $display("FAIL latency %0d", cyc - t);
      end
    end
  end

  task automatic drive(mac_op_e o, bit f, bit l, logic [15:0] x, logic [15:0] y);
    @(negedge clk);
    in_valid = 1'b1; op = o; first = f; last = l; a = x; b = y;
    if (l) t_q.push_back(cyc);
  endtask

  initial begin
    logic [15:0] s, x, y;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // fp16_add corner cases against the reference
    begin
      logic [15:0] pa[6] = '{16'h3C00, 16'h3C00, 16'h7BFF, 16'h3C01, 16'hBC00, 16'h0400};
      logic [15:0] pb[6] = '{16'h1000, 16'h3C00, 16'h7BFF, 16'hBC00, 16'h3C00, 16'h8401};
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (!same(fp16_add(pa[i], pb[i]), add(pa[i], pb[i]))) begin
          failures++;
          $display("FAIL add %h+%h: %h vs %h", pa[i], pb[i], fp16_add(pa[i], pb[i]), add(pa[i], pb[i]));
        end
      end
    end
    for (int n = 0; n < 200; n++) begin
      int k, mode;
      mode = int'($urandom % 4);
      if (mode == 0) begin
        x = rand_fp16(8, 22); y = rand_fp16(8, 22);
        exp_q.push_back(mul(x, y));
        drive(OP_MUL, 1'b1, 1'b1, x, y);
      end else if (mode == 1) begin
        x = rand_fp16(8, 22); y = rand_fp16(8, 22);
        exp_q.push_back(add(x, y));
        drive(OP_ADD, 1'b1, 1'b1, x, y);
      end else begin
        k = 1 + int'($urandom % 12);
        s = '0;
        for (int i = 0; i < k; i++) begin
          x = rand_fp16(10, 20); y = rand_fp16(10, 20);
          s = (i == 0) ? mul(x, y) : add(s, mul(x, y));
          if (i == k - 1) exp_q.push_back(s);
          drive(OP_MAC, i == 0, i == k - 1, x, y);
        end
      end
      if ($urandom % 4 == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
