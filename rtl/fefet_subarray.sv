// fefet_subarray: behavioural model of one FeFET synaptic subarray with its periphery.
//
// This is a model of an analog/mixed-signal macro, not synthesizable logic. It stands for a
// ROWS x COLS array of FeFET cells holding CELL_BITS bits each, the WL/RS and BL switch
// matrices, the column multiplexer with its decoder and the shared ADCs.
//
// Programming (prog_en): one row at a time, as the FeFET array requires; prog_row selects the
// word line and bl carries the new value of every cell of that row as CELL_BITS bit-planes:
// bit b of the level of cell c is bl[b][c].
// Compute (rd_en): all word lines are on and rs[r] is the read voltage (one input bit) of row r.
// Each column current is the sum over rows of rs[r] * G[r][c], with the conductance taken equal
// to the stored level. COLS/COL_MUX ADCs share the columns through the multiplexer: in column
// group col_sel, ADC k converts column col_sel*(COLS/COL_MUX)+k, so a group is a run of adjacent
// columns. The ADC is linear with step ADC_STEP and saturates at 2^ADC_BITS-1.
// Timing: adc_out is registered, valid the cycle after rd_en.
//
// The 128x128 size, 4 bits per cell and the 5-bit ADC follow the evaluated configuration. The
// multiplexing ratio, the column-to-ADC order and the ADC transfer curve (step 60, i.e. full
// scale 128*15 over 32 levels) are this model's own choices.
module fefet_subarray #(
  parameter int unsigned ROWS      = 128,
  parameter int unsigned COLS      = 128,
  parameter int unsigned CELL_BITS = 4,
  parameter int unsigned ADC_BITS  = 5,
  parameter int unsigned COL_MUX   = 8,
  parameter int unsigned ADC_STEP  = 60
) (
  input  logic                                  clk,
  // programming: BL side
  input  logic                                  prog_en,
  input  logic [$clog2(ROWS)-1:0]               prog_row,
  input  logic [CELL_BITS-1:0][COLS-1:0]        bl,
  // compute: RS side
  input  logic                                  rd_en,
  input  logic [ROWS-1:0]                       rs,
  input  logic [$clog2(COL_MUX > 1 ? COL_MUX : 2)-1:0] col_sel,
  output logic [COLS/COL_MUX-1:0][ADC_BITS-1:0] adc_out
);
  localparam int unsigned N_ADC   = COLS / COL_MUX;
  localparam int unsigned ADC_MAX = (1 << ADC_BITS) - 1;

  logic [CELL_BITS-1:0] level [ROWS][COLS];

  // Fresh array: all cells at the lowest conductance level.
  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        level[r][c] = '0;
  end

  always @(posedge clk) begin
    if (prog_en) begin
      for (int c = 0; c < COLS; c++)
        for (int b = 0; b < CELL_BITS; b++)
          level[prog_row][c][b] <= bl[b][c];
    end
  end

  always @(posedge clk) begin
    if (rd_en) begin
      for (int k = 0; k < N_ADC; k++) begin
        logic [$clog2(COLS)-1:0] col;
        int unsigned isum;
        int unsigned code;
        col  = $clog2(COLS)'(int'(col_sel) * N_ADC + k);
        isum = 0;
        for (int r = 0; r < ROWS; r++)
          if (rs[r]) isum += 32'(level[r][col]);
        code = isum / ADC_STEP;
        adc_out[k] <= (code > ADC_MAX) ? ADC_BITS'(ADC_MAX) : ADC_BITS'(code);
      end
    end
  end

endmodule
