// global_buffer: the chip's on-chip SRAM buffer between the host/DRAM side and the tiles.
//
// DEPTH words of WIDTH bits (default 32768 x 512 bits = 2 MB), one write port and one read port.
// A write lands at the clock edge; a read issued with rd_en returns rd_data with rd_valid one
// cycle later. A read and a write to the same address in one cycle return the old word.
// The 2 MB capacity follows the documented configuration; the word width (one tile bus word),
// the port structure and the one-cycle read latency are this design's choices.
module global_buffer #(
  parameter int unsigned DEPTH = cim_pkg::GB_DEPTH,
  parameter int unsigned WIDTH = cim_pkg::TILE_BUS_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [WIDTH-1:0]  rd_data,
  output logic              rd_valid
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

endmodule
