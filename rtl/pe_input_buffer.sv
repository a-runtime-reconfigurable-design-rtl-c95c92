// pe_input_buffer: the last-level input buffer of a processing element.
//
// It holds SLOTS words of SLOT_W bits (default 16 x 512 = 128x4x4x4 bits), enough for one row of
// weights of every subarray of the PE, which is what row-by-row programming consumes in one step.
// Slot s = j*CELL_BITS + c holds bit c of the cells of column-subarray j, laid out as
// [row-subarray][column]. For inputs only slot 0 is used: one input bit-plane of
// SA_ROWS x ROW_SA bits, which the PE drives onto the read-select lines.
// Interface: wr_en is one enable per slot (several may be set; all take wr_data). Writes land at
// the clock edge; data shows every slot concatenated, slot 0 in the low bits.
// The capacity follows the documented buffer size; the slot layout is this design's choice.
module pe_input_buffer #(
  parameter int unsigned SLOT_W = 512,
  parameter int unsigned SLOTS  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [SLOTS-1:0]         wr_en,
  input  logic [SLOT_W-1:0]        wr_data,
  output logic [SLOTS*SLOT_W-1:0]  data
);
  logic [SLOTS-1:0][SLOT_W-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0;
    end else begin
      for (int s = 0; s < SLOTS; s++)
        if (wr_en[s]) mem[s] <= wr_data;
    end
  end

  assign data = mem;

endmodule
