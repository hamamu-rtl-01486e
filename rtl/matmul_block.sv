// matmul_block: hard 4x4x4 building-block matrix multiplier of the fabric.
//
// The block multiplies a 4xK slice of A by a Kx4 slice of B into a 4x4 tile
// of C on a 4x4 systolic core (core_matmul). Around the core sit the muxes
// that let neighboring blocks compose a larger systolic multiplier:
//   A input  memory mode: from the block's own input setup, reading an
//            adjacent RAM; neighbor mode: from the left neighbor's a_out over
//            a programmable direct link.
//   B input  the same, from the top neighbor.
//   C output the core's row streams, or, while the core is not emitting and
//            c_chain is set, the left neighbor's C streams passed through, so
//            the rightmost block of a row delivers the whole row of tiles.
// Blocks on the top/left edge of a composed multiplier run in memory mode,
// the others in neighbor mode; A and B leave at the right and bottom edges
// unchanged so the next block sees exactly what a PE would.
//
// Configuration (cfg_we, cfg: blk_cfg_t) is written once, before use, and
// sets the mux selects, the direct-link switches and the block's position
// (row_pos/col_pos) used to delay its memory-mode stream. The input setup
// circuits start on `start` (ignored for an input in neighbor mode) and read
// k_len words. Timing: a lone block in memory mode with start in cycle t
// reads word k in cycle t+2+k; PE(i,j) sees term k in cycle t+3+k+i+j, the
// MAC finishes its last term P cycles later (P = 3 int8, 8 fp16) and row i
// emits its 4 results in the 4 cycles after t+K+i+5+P.
// What the blocks' muxes and data paths are follows the architecture; the
// flags, the position delay and the pass-through priority are this design's.
module matmul_block
  import hamamu_pkg::*;
#(
  parameter prec_e       PREC   = PREC_FP16,
  parameter int unsigned ADDR_W = 9,
  localparam int unsigned D  = MATMUL_DIM,
  localparam int unsigned DW = data_w(PREC),
  localparam int unsigned AW = acc_w(PREC),
  localparam int unsigned FW = $bits(aflags_t)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_we,
  input  blk_cfg_t          cfg,
  // operation control
  input  logic              start,
  input  logic [ADDR_W-1:0] k_len,
  output logic              busy,
  // memory-mode RAM read ports (A column-major, B row-major)
  output logic              a_rd_en,
  output logic [ADDR_W-1:0] a_rd_addr,
  input  logic [D*DW-1:0]   a_rd_data,
  output logic              b_rd_en,
  output logic [ADDR_W-1:0] b_rd_addr,
  input  logic [D*DW-1:0]   b_rd_data,
  // neighbor-mode inputs (left neighbor: A and C, top neighbor: B)
  input  logic [DW-1:0]     a_nbr    [D],
  input  aflags_t           af_nbr   [D],
  input  logic [DW-1:0]     b_nbr    [D],
  input  logic              bv_nbr   [D],
  input  logic [AW-1:0]     c_nbr    [D],
  input  logic              cv_nbr   [D],
  // outputs toward the right and bottom neighbors
  output logic [DW-1:0]     a_out    [D],
  output aflags_t           af_out   [D],
  output logic [DW-1:0]     b_out    [D],
  output logic              bv_out   [D],
  output logic [AW-1:0]     c_out    [D],
  output logic              cv_out   [D]
);

  blk_cfg_t cfg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg_q <= '0;
    else if (cfg_we) cfg_q <= cfg;
  end

  // ---------------------------------------------------------------- direct links
  logic [D*(DW+FW)-1:0] a_link_in, a_link_out;
  logic [D*(DW+1)-1:0]  b_link_in, b_link_out;
  logic [D*(AW+1)-1:0]  c_link_in, c_link_out;
  logic                 a_link_en, b_link_en, c_link_en;

  always_comb begin
    for (int i = 0; i < D; i++) begin
      a_link_in[i*(DW+FW) +: DW+FW] = {a_nbr[i], af_nbr[i]};
      b_link_in[i*(DW+1)  +: DW+1]  = {b_nbr[i], bv_nbr[i]};
      c_link_in[i*(AW+1)  +: AW+1]  = {c_nbr[i], cv_nbr[i]};
    end
  end

  direct_link #(.W(D*(DW+FW))) u_link_a (
    .clk, .rst_n, .cfg_we, .cfg_en(cfg.a_nbr), .en(a_link_en),
    .din(a_link_in), .dout(a_link_out)
  );
  direct_link #(.W(D*(DW+1))) u_link_b (
    .clk, .rst_n, .cfg_we, .cfg_en(cfg.b_nbr), .en(b_link_en),
    .din(b_link_in), .dout(b_link_out)
  );
  direct_link #(.W(D*(AW+1))) u_link_c (
    .clk, .rst_n, .cfg_we, .cfg_en(cfg.c_chain), .en(c_link_en),
    .din(c_link_in), .dout(c_link_out)
  );

  // ---------------------------------------------------------------- input setup
  logic          a_busy, b_busy;
  logic [DW-1:0] a_mem  [D];
  aflags_t       af_mem [D];
  logic [DW-1:0] b_mem  [D];
  aflags_t       bf_mem [D];

  input_setup #(.PREC(PREC), .ADDR_W(ADDR_W)) u_setup_a (
    .clk, .rst_n,
    .start     (start & ~cfg_q.a_nbr),
    .k_len,
    .pos       (cfg_q.row_pos),
    .busy      (a_busy),
    .rd_en     (a_rd_en),
    .rd_addr   (a_rd_addr),
    .rd_data   (a_rd_data),
    .lane_data (a_mem),
    .lane_flags(af_mem)
  );

  input_setup #(.PREC(PREC), .ADDR_W(ADDR_W)) u_setup_b (
    .clk, .rst_n,
    .start     (start & ~cfg_q.b_nbr),
    .k_len,
    .pos       (cfg_q.col_pos),
    .busy      (b_busy),
    .rd_en     (b_rd_en),
    .rd_addr   (b_rd_addr),
    .rd_data   (b_rd_data),
    .lane_data (b_mem),
    .lane_flags(bf_mem)
  );

  assign busy = a_busy | b_busy;

  // ---------------------------------------------------------------- input muxes
  logic [DW-1:0] core_a  [D];
  aflags_t       core_af [D];
  logic [DW-1:0] core_b  [D];
  logic          core_bv [D];

  always_comb begin
    for (int i = 0; i < D; i++) begin
      if (cfg_q.a_nbr) {core_a[i], core_af[i]} = a_link_out[i*(DW+FW) +: DW+FW];
      else             {core_a[i], core_af[i]} = {a_mem[i], af_mem[i]};
      if (cfg_q.b_nbr) {core_b[i], core_bv[i]} = b_link_out[i*(DW+1) +: DW+1];
      else             {core_b[i], core_bv[i]} = {b_mem[i], bf_mem[i].valid};
    end
  end

  // ---------------------------------------------------------------- core
  logic [AW-1:0] core_c  [D];
  logic          core_cv [D];

  core_matmul #(.PREC(PREC)) u_core (
    .clk, .rst_n,
    .a_in   (core_a),
    .af_in  (core_af),
    .b_in   (core_b),
    .b_vin  (core_bv),
    .a_out  (a_out),
    .af_out (af_out),
    .b_out  (b_out),
    .b_vout (bv_out),
    .c_out  (core_c),
    .c_valid(core_cv)
  );

  // ---------------------------------------------------------------- output mux
  logic [AW-1:0] c_pass  [D];
  logic          cv_pass [D];

  always_comb begin
    for (int i = 0; i < D; i++) begin
      {c_pass[i], cv_pass[i]} = c_link_out[i*(AW+1) +: AW+1];
      if (core_cv[i]) begin
        c_out[i]  = core_c[i];
        cv_out[i] = 1'b1;
      end else begin
        c_out[i]  = c_pass[i];
        cv_out[i] = cv_pass[i];
      end
    end
  end

  // The neighbor's C stream must never collide with the block's own.
  for (genvar i = 0; i < D; i++) begin : g_chk
    no_c_collision: assert property (@(posedge clk) disable iff (!rst_n)
      !(core_cv[i] && cv_pass[i]));
  end

  // The mux selects and the link switches hold the same configuration.
  link_matches_cfg: assert property (@(posedge clk) disable iff (!rst_n)
    a_link_en == cfg_q.a_nbr && b_link_en == cfg_q.b_nbr && c_link_en == cfg_q.c_chain);

endmodule
