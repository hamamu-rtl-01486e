// tb_mac_int8: self-checking testbench of the 3-stage int8 MAC.
//
// Runs random dot products (MAC mode) and single products and sums (MUL, ADD
// modes) back to back, compares each result with integer arithmetic done in
// the testbench, and checks that `out_last` follows the `last` input by
// exactly 3 cycles.
module tb_mac_int8;
  import hamamu_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, first = 1'b0, last = 1'b0;
  mac_op_e     op = OP_MAC;
  logic [7:0]  a = '0, b = '0;
  logic [31:0] acc;
  logic        out_valid, out_last;
  int          checks = 0, failures = 0;
  int          cyc = 0;

  mac_int8 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];
  int t_q[$];

  always @(negedge clk) begin
    if (rst_n && out_last) begin
      int e, t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (int'(acc) != e) begin
        failures++;
        $display("FAIL value: got %0d expected %0d", int'(acc), e);
      end
      checks++;
      if (cyc - t != 3) begin
        failures++;
        $display("FAIL latency %0d", cyc - t);
      end
    end
  end

  task automatic drive(mac_op_e o, bit f, bit l, logic [7:0] x, logic [7:0] y);
    @(negedge clk);
    in_valid = 1'b1; op = o; first = f; last = l; a = x; b = y;
    if (l) t_q.push_back(cyc);
  endtask

  initial begin
    logic [7:0] x, y;
    int s;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int k, mode;
      mode = int'($urandom % 4);
      x = 8'($urandom); y = 8'($urandom);
      if (n == 0) begin x = 8'h80; y = 8'h80; end   // -128 * -128
      if (mode == 0) begin
        exp_q.push_back(int'(signed'(x)) * int'(signed'(y)));
        drive(OP_MUL, 1'b1, 1'b1, x, y);
      end else if (mode == 1) begin
        exp_q.push_back(int'(signed'(x)) + int'(signed'(y)));
        drive(OP_ADD, 1'b1, 1'b1, x, y);
      end else begin
        k = 1 + int'($urandom % 40);
        s = 0;
        for (int i = 0; i < k; i++) begin
          if (i > 0) begin x = 8'($urandom); y = 8'($urandom); end
          s += int'(signed'(x)) * int'(signed'(y));
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
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
