// tb_pe: self-checking testbench of one processing element (int8 build).
//
// Streams random dot products of random length through the PE, with idle
// cycles in between, and checks: the accumulated value when `done` pulses,
// `done` exactly P = 3 cycles after the last term, and that A, its flags and
// B are forwarded unchanged one cycle later.
module tb_pe;
  import hamamu_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  a_in = '0, b_in = '0, a_out, b_out;
  aflags_t     af_in = '0, af_out;
  logic        b_vin = 1'b0, b_vout, done;
  logic [31:0] acc;
  int          checks = 0, failures = 0, cyc = 0;

  pe #(.PREC(PREC_INT8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int      exp_q[$], t_q[$];
  logic [7:0] pa, pb;
  aflags_t pf;
  logic    pv;

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (a_out != pa || b_out != pb || af_out != pf || b_vout != pv) begin
        failures++;
        $display("FAIL forwarding");
      end
      if (done) begin
        int e, t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        checks += 2;
        if (int'(acc) != e) begin
          failures++;
          $display("FAIL acc %0d expected %0d", int'(acc), e);
        end
        if (cyc - t != 3) begin
          failures++;
          $display("FAIL done latency %0d", cyc - t);
        end
      end
      pa = a_in; pb = b_in; pf = af_in; pv = b_vin;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    pa = a_in; pb = b_in; pf = af_in; pv = b_vin;
    for (int n = 0; n < 100; n++) begin
      int k, s;
      k = 1 + int'($urandom % 20);
      s = 0;
      for (int i = 0; i < k; i++) begin
        a_in  = 8'($urandom);
        b_in  = 8'($urandom);
        af_in = '{valid: 1'b1, first: i == 0, last: i == k - 1};
        b_vin = 1'b1;
        s += int'(signed'(a_in)) * int'(signed'(b_in));
        if (i == k - 1) begin
          exp_q.push_back(s);
          t_q.push_back(cyc);
        end
        @(negedge clk);
      end
      for (int g = int'($urandom % 3); g > 0; g--) begin
        a_in = 8'($urandom); b_in = 8'($urandom); af_in = '0; b_vin = 1'b0;
        @(negedge clk);
      end
    end
    a_in = '0; b_in = '0; af_in = '0; b_vin = 1'b0;
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
