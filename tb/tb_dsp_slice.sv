// tb_dsp_slice: self-checking testbench of the DSP slice (fp16 and int8).
//
// Instantiates one slice of each precision. For each, configures the mode
// cell to multiplier, adder and MAC mode in turn and checks results against
// reference arithmetic (exact integers for int8, the real-valued fp16
// reference for fp16), with the pipeline depth of each (3 and 8 cycles).
module tb_dsp_slice;
  import hamamu_pkg::*;
  import tb_fp16_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cfg_we = 1'b0;
  mac_op_e     cfg_op = OP_MAC;
  logic        in_valid = 1'b0, first = 1'b0, last = 1'b0;
  logic [15:0] ah = '0, bh = '0, rh;
  logic [7:0]  ai = '0, bi = '0;
  logic [31:0] ri;
  logic        vh, lh, vi, li;
  int          checks = 0, failures = 0, cyc = 0;

  dsp_slice #(.PREC(PREC_FP16)) u_h (.clk, .rst_n, .cfg_we, .cfg_op, .in_valid, .first, .last,
    .a(ah), .b(bh), .result(rh), .out_valid(vh), .out_last(lh));
  dsp_slice #(.PREC(PREC_INT8)) u_i (.clk, .rst_n, .cfg_we, .cfg_op, .in_valid, .first, .last,
    .a(ai), .b(bi), .result(ri), .out_valid(vi), .out_last(li));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] eh_q[$];
  int          ei_q[$], th_q[$], ti_q[$];

  always @(negedge clk) begin
    if (rst_n && lh) begin
      logic [15:0] e;
      int t;
      e = eh_q.pop_front(); t = th_q.pop_front();
      checks += 2;
      if (!same(rh, e)) begin failures++; $display("FAIL fp16 %h expected %h", rh, e); end
      if (cyc - t != 8) begin failures++; $display("FAIL fp16 latency %0d", cyc - t); end
    end
    if (rst_n && li) begin
      int e, t;
      e = ei_q.pop_front(); t = ti_q.pop_front();
      checks += 2;
      if (int'(ri) != e) begin failures++; $display("FAIL int8 %0d expected %0d", int'(ri), e); end
      if (cyc - t != 3) begin failures++; $display("FAIL int8 latency %0d", cyc - t); end
    end
  end

  initial begin
    mac_op_e ops[3] = '{OP_MUL, OP_ADD, OP_MAC};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (ops[m]) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_op = ops[m];
      @(negedge clk);
      cfg_we = 1'b0;
      for (int n = 0; n < 40; n++) begin
        int k, si;
        logic [15:0] sh;
        k = (ops[m] == OP_MAC) ? 1 + int'($urandom % 10) : 1;
        si = 0; sh = '0;
        for (int i = 0; i < k; i++) begin
          ah = rand_fp16(10, 19); bh = rand_fp16(10, 19);
          ai = 8'($urandom);      bi = 8'($urandom);
          in_valid = 1'b1; first = (i == 0); last = (i == k - 1);
          case (ops[m])
            OP_MUL: begin sh = mul(ah, bh); si = int'(signed'(ai)) * int'(signed'(bi)); end
            OP_ADD: begin sh = add(ah, bh); si = int'(signed'(ai)) + int'(signed'(bi)); end
            default: begin
              sh = (i == 0) ? mul(ah, bh) : add(sh, mul(ah, bh));
              si += int'(signed'(ai)) * int'(signed'(bi));
            end
          endcase
          if (last) begin
            eh_q.push_back(sh); ei_q.push_back(si);
            th_q.push_back(cyc); ti_q.push_back(cyc);
          end
          @(negedge clk);
        end
        in_valid = 1'b0;
      end
      repeat (10) @(negedge clk);
    end
    checks++;
    if (eh_q.size() != 0 || ei_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
