// bram: embedded block RAM of the FPGA fabric, 20 Kbit.
//
// The fabric's RAM blocks hold 20 Kbit and can be configured for several
// depth/width combinations; here the width is a parameter fixed at build
// (configuration) time and the depth follows as 20480/WIDTH words. This model
// is the simple dual-port mode: one synchronous write port and one read port
// with one cycle of read latency (rd_en/rd_addr in cycle t, rd_data valid in
// cycle t+1, held otherwise). A read of the address being written returns the
// old word. The single-port mode and byte enables are not modelled. The
// hard matmuls use these blocks to hold A (column-major), B (row-major) and
// C (column-major).
module bram #(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned BITS   = 20480,
  parameter int unsigned DEPTH  = BITS / WIDTH,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < ADDR_W'(DEPTH)) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  // Reads stay inside the configured depth.
  rd_in_range: assert property (@(posedge clk) rd_en |-> rd_addr < ADDR_W'(DEPTH));

endmodule
