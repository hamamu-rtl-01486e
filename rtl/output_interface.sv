// output_interface: output interface circuit that writes matrix C to a RAM.
//
// The last matmul of a row of composed matmuls emits its four row streams
// c_in[0..3]: each row delivers its results one per cycle (columns in the
// order 3,2,1,0 of each 4-wide block, the blocks from left to right, as the
// output chain passes them on), and row i+1 trails row i by one cycle. This
// circuit removes that skew (row i is delayed by 3-i cycles) so that one
// column of the 4-row slice of C is complete each cycle, and writes it as one
// RAM word at the column's index: C is stored column-major, word = column.
// The stream position s maps to column s with its two low bits inverted.
//
// Interface: `start` (pulse) clears the column counter and `done`; `done`
// rises, and stays high, the cycle after the n_cols-th column is written.
// wr_en/wr_addr/wr_data form a one-cycle write port. The de-skew, the order
// and the layout of C are this design's choice.
module output_interface
  import hamamu_pkg::*;
#(
  parameter prec_e       PREC   = PREC_FP16,
  parameter int unsigned ADDR_W = 8,
  localparam int unsigned D  = MATMUL_DIM,
  localparam int unsigned AW = acc_w(PREC)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] n_cols,
  input  logic [AW-1:0]     c_in   [D],
  input  logic              c_vin  [D],
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [D*AW-1:0]   wr_data,
  output logic              done
);

  logic [AW-1:0] row_d[D];
  logic          row_v[D];

  for (genvar i = 0; i < D; i++) begin : g_row
    localparam int unsigned DL = D - 1 - i;
    if (DL == 0) begin : g_direct
      assign row_d[i] = c_in[i];
      assign row_v[i] = c_vin[i];
    end else begin : g_delay
      logic [AW-1:0] dq[DL];
      logic          vq[DL];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int s = 0; s < DL; s++) begin
            dq[s] <= '0;
            vq[s] <= 1'b0;
          end
        end else begin
          dq[0] <= c_in[i];
          vq[0] <= c_vin[i];
          for (int s = 1; s < DL; s++) begin
            dq[s] <= dq[s-1];
            vq[s] <= vq[s-1];
          end
        end
      end
      assign row_d[i] = dq[DL-1];
      assign row_v[i] = vq[DL-1];
    end
  end

  logic [ADDR_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      done <= 1'b0;
    end else if (start) begin
      cnt  <= '0;
      done <= 1'b0;
    end else if (row_v[0]) begin
      cnt <= cnt + 1'b1;
      if (cnt == n_cols - 1'b1) done <= 1'b1;
    end
  end

  always_comb begin
    wr_en   = row_v[0];
    wr_addr = cnt ^ ADDR_W'(D - 1);
    for (int i = 0; i < D; i++) wr_data[i*AW +: AW] = row_d[i];
  end

  // After de-skew the four rows of one column arrive together.
  rows_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    row_v[0] == row_v[D-1]);

endmodule
