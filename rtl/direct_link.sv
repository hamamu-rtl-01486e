// direct_link: one programmable direct interconnect between two neighboring
// hard matmuls.
//
// Physically a longer wire segment with a single switch (pass transistor or
// transmission gate) whose gate is driven by one configuration SRAM cell, set
// when the FPGA is configured. Here the cell is a flip-flop written with
// cfg_we, cleared by reset (link open), and the switch is an AND gate: with
// the cell set `dout` follows `din`, otherwise it reads as all zeros, the
// value a neighbor sees from an open link (this design's choice; a real open
// switch leaves the wire floating). The link is combinational from din to
// dout: neighboring matmuls connect with the same timing as neighboring PEs.
module direct_link #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_we,
  input  logic         cfg_en,
  output logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      en <= 1'b0;
    else if (cfg_we) en <= cfg_en;
  end

  assign dout = din & {W{en}};

endmodule
