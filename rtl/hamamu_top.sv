// hamamu_top: a region of a Hamamu FPGA: hard matmuls composed systolically,
// their edge block RAMs, and a column of DSP slices.
//
// TR x TC building-block matmuls (4x4x4 each, default 2x2) are joined by
// programmable direct interconnect into one (4*TR) x (4*TC) x K systolic
// multiplier, the composition drawn for an 8x8x8 multiply from four 4x4x4
// blocks. Each tile row r has a block RAM holding its 4xK slice of A
// (column-major, word k = A[4r..4r+3][k]) on its left edge and a block RAM
// receiving its 4-row slice of C (column-major, word j = C[4r..4r+3][j]) on
// its right edge; each tile column c has a block RAM holding its Kx4 slice of
// B (row-major, word k = B[k][4c..4c+3]) on its top edge. The RAM write and
// read ports that face the general fabric are brought out as ports: in a
// device they are driven by soft logic.
//
// Configuration (cfg_we with one blk_cfg_t per block) sets which inputs run in
// memory or neighbor mode, which links are switched on and each block's
// position; for the composed multiplier the left column reads A from memory,
// the top row reads B from memory, every other input takes its neighbor, and
// every block except the left column chains C. `start` launches one
// multiplication of K = k_len; `done` rises when every C RAM has received its
// 4*TC columns. Timing for the composed configuration: with start in cycle t,
// the RAMs are first read in cycle t+2 and the last column of C is written in
// cycle t + K + 4*TR + 4*TC + P + 4 (P = MAC depth: 8 fp16, 3 int8); done is
// high from the next cycle. For a lone block (TR = TC = 1) and K = 4 that is
// 4*4 - 2 + P cycles from the first read to the last write.
//
// The DSP slices (N_DSP) stand beside the matmuls and only share the clock;
// their ports are brought out. PREC selects int8 or fp16 for everything.
module hamamu_top
  import hamamu_pkg::*;
#(
  parameter prec_e       PREC  = PREC_FP16,
  parameter int unsigned TR    = 2,
  parameter int unsigned TC    = 2,
  parameter int unsigned N_DSP = 2,
  localparam int unsigned D      = MATMUL_DIM,
  localparam int unsigned DW     = data_w(PREC),
  localparam int unsigned AW     = acc_w(PREC),
  localparam int unsigned AB_W   = D * DW,             // A/B RAM word
  localparam int unsigned C_W    = D * AW,             // C RAM word
  localparam int unsigned AB_AW  = $clog2(20480 / AB_W),
  localparam int unsigned C_AW   = $clog2(20480 / C_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic             cfg_we,
  input  blk_cfg_t         cfg      [TR][TC],
  // operation
  input  logic             start,
  input  logic [AB_AW-1:0] k_len,
  output logic             busy,
  output logic             done,
  // A RAMs (one per tile row), fabric-side write ports
  input  logic             a_wr_en  [TR],
  input  logic [AB_AW-1:0] a_wr_addr[TR],
  input  logic [AB_W-1:0]  a_wr_data[TR],
  // B RAMs (one per tile column), fabric-side write ports
  input  logic             b_wr_en  [TC],
  input  logic [AB_AW-1:0] b_wr_addr[TC],
  input  logic [AB_W-1:0]  b_wr_data[TC],
  // C RAMs (one per tile row), fabric-side read ports
  input  logic             c_rd_en  [TR],
  input  logic [C_AW-1:0]  c_rd_addr[TR],
  output logic [C_W-1:0]   c_rd_data[TR],
  // DSP slices
  input  logic             dsp_cfg_we[N_DSP],
  input  mac_op_e          dsp_cfg_op[N_DSP],
  input  logic             dsp_valid [N_DSP],
  input  logic             dsp_first [N_DSP],
  input  logic             dsp_last  [N_DSP],
  input  logic [DW-1:0]    dsp_a     [N_DSP],
  input  logic [DW-1:0]    dsp_b     [N_DSP],
  output logic [AW-1:0]    dsp_result[N_DSP],
  output logic             dsp_ovalid[N_DSP],
  output logic             dsp_olast [N_DSP]
);

  logic          blk_busy[TR][TC];

  // Edge RAM read ports.
  logic             a_rd_en  [TR];
  logic [AB_AW-1:0] a_rd_addr[TR];
  logic [AB_W-1:0]  a_rd_data[TR];
  logic             b_rd_en  [TC];
  logic [AB_AW-1:0] b_rd_addr[TC];
  logic [AB_W-1:0]  b_rd_data[TC];

  for (genvar r = 0; r < TR; r++) begin : g_r
    for (genvar c = 0; c < TC; c++) begin : g_c
      logic [DW-1:0]    a_n [D];
      aflags_t          af_n[D];
      logic [DW-1:0]    b_n [D];
      logic             bv_n[D];
      logic [AW-1:0]    c_n [D];
      logic             cv_n[D];
      logic             ard_en, brd_en;
      logic [AB_AW-1:0] ard_addr, brd_addr;
      logic [AB_W-1:0]  ard_data, brd_data;
      // block outputs toward the right / bottom neighbors
      logic [DW-1:0]    a_o [D];
      aflags_t          af_o[D];
      logic [DW-1:0]    b_o [D];
      logic             bv_o[D];
      logic [AW-1:0]    c_o [D];
      logic             cv_o[D];

      for (genvar i = 0; i < D; i++) begin : g_nbr
        if (c > 0) begin : g_left
          assign a_n[i]  = g_r[r].g_c[c-1].a_o[i];
          assign af_n[i] = g_r[r].g_c[c-1].af_o[i];
          assign c_n[i]  = g_r[r].g_c[c-1].c_o[i];
          assign cv_n[i] = g_r[r].g_c[c-1].cv_o[i];
        end else begin : g_left_edge
          assign a_n[i]  = '0;
          assign af_n[i] = '0;
          assign c_n[i]  = '0;
          assign cv_n[i] = 1'b0;
        end
        if (r > 0) begin : g_top
          assign b_n[i]  = g_r[r-1].g_c[c].b_o[i];
          assign bv_n[i] = g_r[r-1].g_c[c].bv_o[i];
        end else begin : g_top_edge
          assign b_n[i]  = '0;
          assign bv_n[i] = 1'b0;
        end
      end

      // Only edge blocks have a RAM beside them.
      if (c == 0) begin : g_a_ram
        assign a_rd_en[r]   = ard_en;
        assign a_rd_addr[r] = ard_addr;
        assign ard_data     = a_rd_data[r];
      end else begin : g_a_none
        assign ard_data = '0;
      end
      if (r == 0) begin : g_b_ram
        assign b_rd_en[c]   = brd_en;
        assign b_rd_addr[c] = brd_addr;
        assign brd_data     = b_rd_data[c];
      end else begin : g_b_none
        assign brd_data = '0;
      end

      matmul_block #(.PREC(PREC), .ADDR_W(AB_AW)) u_blk (
        .clk, .rst_n,
        .cfg_we,
        .cfg      (cfg[r][c]),
        .start,
        .k_len,
        .busy     (blk_busy[r][c]),
        .a_rd_en  (ard_en),
        .a_rd_addr(ard_addr),
        .a_rd_data(ard_data),
        .b_rd_en  (brd_en),
        .b_rd_addr(brd_addr),
        .b_rd_data(brd_data),
        .a_nbr    (a_n),
        .af_nbr   (af_n),
        .b_nbr    (b_n),
        .bv_nbr   (bv_n),
        .c_nbr    (c_n),
        .cv_nbr   (cv_n),
        .a_out    (a_o),
        .af_out   (af_o),
        .b_out    (b_o),
        .bv_out   (bv_o),
        .c_out    (c_o),
        .cv_out   (cv_o)
      );
    end
  end

  // ---------------------------------------------------------------- edge RAMs
  logic row_done[TR];

  for (genvar r = 0; r < TR; r++) begin : g_row_ram
    logic             c_wr_en;
    logic [C_AW-1:0]  c_wr_addr;
    logic [C_W-1:0]   c_wr_data;

    bram #(.WIDTH(AB_W)) u_a_ram (
      .clk,
      .wr_en  (a_wr_en[r]),
      .wr_addr(a_wr_addr[r]),
      .wr_data(a_wr_data[r]),
      .rd_en  (a_rd_en[r]),
      .rd_addr(a_rd_addr[r]),
      .rd_data(a_rd_data[r])
    );

    output_interface #(.PREC(PREC), .ADDR_W(C_AW)) u_out (
      .clk, .rst_n,
      .start,
      .n_cols (C_AW'(D * TC)),
      .c_in   (g_r[r].g_c[TC-1].c_o),
      .c_vin  (g_r[r].g_c[TC-1].cv_o),
      .wr_en  (c_wr_en),
      .wr_addr(c_wr_addr),
      .wr_data(c_wr_data),
      .done   (row_done[r])
    );

    bram #(.WIDTH(C_W)) u_c_ram (
      .clk,
      .wr_en  (c_wr_en),
      .wr_addr(c_wr_addr),
      .wr_data(c_wr_data),
      .rd_en  (c_rd_en[r]),
      .rd_addr(c_rd_addr[r]),
      .rd_data(c_rd_data[r])
    );
  end

  for (genvar c = 0; c < TC; c++) begin : g_col_ram
    bram #(.WIDTH(AB_W)) u_b_ram (
      .clk,
      .wr_en  (b_wr_en[c]),
      .wr_addr(b_wr_addr[c]),
      .wr_data(b_wr_data[c]),
      .rd_en  (b_rd_en[c]),
      .rd_addr(b_rd_addr[c]),
      .rd_data(b_rd_data[c])
    );
  end

  always_comb begin
    busy = 1'b0;
    for (int r = 0; r < TR; r++)
      for (int c = 0; c < TC; c++) busy |= blk_busy[r][c];
    done = 1'b1;
    for (int r = 0; r < TR; r++) done &= row_done[r];
  end

  // ---------------------------------------------------------------- DSP column
  for (genvar s = 0; s < N_DSP; s++) begin : g_dsp
    dsp_slice #(.PREC(PREC)) u_dsp (
      .clk, .rst_n,
      .cfg_we   (dsp_cfg_we[s]),
      .cfg_op   (dsp_cfg_op[s]),
      .in_valid (dsp_valid[s]),
      .first    (dsp_first[s]),
      .last     (dsp_last[s]),
      .a        (dsp_a[s]),
      .b        (dsp_b[s]),
      .result   (dsp_result[s]),
      .out_valid(dsp_ovalid[s]),
      .out_last (dsp_olast[s])
    );
  end

endmodule
