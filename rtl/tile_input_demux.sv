// tile_input_demux: two-stage demultiplexer from the tile bus to the PE buffers.
//
// Stage 1 (1-to-CELL_BITS, TileBusWidth wide): a log2(CELL_BITS) decoder of addr picks which cell
// bit-plane the current bus word belongs to. Stage 2 (1-to-(COL_SA*N_PE), TileBusWidth*CELL_BITS
// wide): sel is an arbitrary mask of destinations, destination d = p*COL_SA + j being the
// column-subarray j of PE p, so one word can be sent to any set of subarray columns in any PEs.
// For weights, addr and sel choose bit-plane and subarray columns; for inputs, addr = 0 and the
// bit for column 0 of each wanted PE is set, so the word lands in slot 0 of those PEs.
// Output: per PE, a slot write enable (slot j*CELL_BITS + c) and the data, zero for PEs not
// selected. Purely combinational; the PE buffers register the word.
// The two stages and their widths follow the documented tile input bus; the slot numbering is
// this design's choice.
module tile_input_demux #(
  parameter int unsigned BUS_W     = 512,
  parameter int unsigned CELL_BITS = 4,
  parameter int unsigned COL_SA    = 4,
  parameter int unsigned N_PE      = 9,
  localparam int unsigned SLOTS    = CELL_BITS * COL_SA,
  localparam int unsigned N_DEST   = COL_SA * N_PE,
  localparam int unsigned AW       = $clog2(CELL_BITS > 1 ? CELL_BITS : 2)
) (
  input  logic                             valid,
  input  logic [BUS_W-1:0]                 data,
  input  logic [AW-1:0]                    addr,
  input  logic [N_DEST-1:0]                sel,
  output logic [N_PE-1:0][SLOTS-1:0]       pe_wr_en,
  output logic [N_PE-1:0][BUS_W-1:0]       pe_wr_data
);
  // stage 1: cell-bit decoder and demux
  logic [CELL_BITS-1:0]             cb_en;
  logic [CELL_BITS-1:0][BUS_W-1:0]  cb_bus;

  always_comb begin
    for (int c = 0; c < CELL_BITS; c++) begin
      cb_en[c]  = valid && (int'(addr) == c);
      cb_bus[c] = cb_en[c] ? data : '0;
    end
  end

  // stage 2: destination demux, one CELL_BITS*BUS_W wide branch per (PE, column-subarray)
  always_comb begin
    for (int p = 0; p < N_PE; p++) begin
      pe_wr_data[p] = '0;
      for (int j = 0; j < COL_SA; j++)
        for (int c = 0; c < CELL_BITS; c++) begin
          pe_wr_en[p][j*CELL_BITS + c] = sel[p*COL_SA + j] && cb_en[c];
          if (sel[p*COL_SA + j]) pe_wr_data[p] |= cb_bus[c];
        end
    end
  end

endmodule
