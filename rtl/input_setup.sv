// input_setup: input data setup circuit of a building-block matmul.
//
// In memory mode a matmul fetches its operands from an adjacent block RAM:
// matrix A is stored column-major (RAM word k = column k, A[0..3][k]) and
// matrix B row-major (word k = row k, B[k][0..3]), so one read per cycle
// delivers the four elements that enter the array together. This circuit
// generates the read addresses 0..k_len-1 after `start`, tags each element
// with {valid, first, last}, and skews the lanes: lane l is delayed by l
// cycles, so that A[i][k] meets B[k][j] in PE(i,j) at the same cycle.
//
// In a composed (larger) multiplier the matmuls on the top and left edges all
// read from memory at once, and a block at position `pos` along its edge must
// start 4*pos cycles later so the composed array keeps one global skew; the
// block's configuration supplies pos. The wait, the address order and the
// flag scheme are this design's choice.
//
// Interface: start is a one-cycle pulse, ignored while busy. RAM reads have
// one cycle of latency (rd_en/rd_addr in cycle t, rd_data in cycle t+1).
// Timing: with start high in cycle t the first read is issued in cycle
// t+2+4*pos; lane l carries
// element k at (first read cycle) + 1 + k + l.
module input_setup
  import hamamu_pkg::*;
#(
  parameter prec_e       PREC   = PREC_FP16,
  parameter int unsigned ADDR_W = 9,
  localparam int unsigned D  = MATMUL_DIM,
  localparam int unsigned DW = data_w(PREC)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] k_len,     // number of elements per lane (K), >= 1
  input  logic [3:0]        pos,       // position along the edge of a composed array
  output logic              busy,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [D*DW-1:0]   rd_data,
  output logic [DW-1:0]     lane_data [D],
  output aflags_t           lane_flags[D]
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_STREAM} state_e;

  state_e            state;
  logic [5:0]        wait_cnt;
  logic [ADDR_W-1:0] k;
  aflags_t           rd_flags;   // flags of the word arriving from RAM

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      wait_cnt <= '0;
      k        <= '0;
      rd_flags <= '0;
    end else begin
      rd_flags       <= '0;
      case (state)
        S_IDLE: if (start) begin
          wait_cnt <= {pos, 2'b00};
          k        <= '0;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          if (wait_cnt == 0) state <= S_STREAM;
          else               wait_cnt <= wait_cnt - 6'd1;
        end
        S_STREAM: begin
          rd_flags.valid <= 1'b1;
          rd_flags.first <= (k == 0);
          rd_flags.last  <= (k == k_len - 1'b1);
          k              <= k + 1'b1;
          if (k == k_len - 1'b1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign rd_en   = (state == S_STREAM);
  assign rd_addr = k;

  // Lane skew: lane l passes through l registers.
  for (genvar l = 0; l < D; l++) begin : g_lane
    if (l == 0) begin : g_direct
      assign lane_data[l]  = rd_data[DW-1:0];
      assign lane_flags[l] = rd_flags;
    end else begin : g_delay
      logic [DW-1:0] dq[l];
      aflags_t       fq[l];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int s = 0; s < l; s++) begin
            dq[s] <= '0;
            fq[s] <= '0;
          end
        end else begin
          dq[0] <= rd_data[l*DW +: DW];
          fq[0] <= rd_flags;
          for (int s = 1; s < l; s++) begin
            dq[s] <= dq[s-1];
            fq[s] <= fq[s-1];
          end
        end
      end
      assign lane_data[l]  = dq[l-1];
      assign lane_flags[l] = fq[l-1];
    end
  end

endmodule
