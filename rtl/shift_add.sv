// shift_add: the adder and shift register behind the ADCs of one subarray.
//
// Inputs arrive bit-serially: in each enabled cycle every ADC code is shifted left by the
// significance of the input bit being applied (bit_idx) and added to that ADC's accumulator;
// clear starts a new sum. A weight of W_BITS is spread over CELLS_PER_W adjacent columns, cell c
// holding weight bits [c*CELL_BITS +: CELL_BITS]; psum combines those column sums with shifts of
// CELL_BITS per cell, giving one partial dot-product per weight column.
// Interface: adc_in/en/clear/bit_idx in one cycle; accumulators update at the clock edge and psum
// is a combinational function of them.
// Shift-add for multi-bit inputs and weights is part of the documented subarray periphery; the
// bit-serial order, the cell order inside a weight and the widths are this design's choices.
module shift_add #(
  parameter int unsigned N_ADC       = 16,
  parameter int unsigned ADC_BITS    = 5,
  parameter int unsigned IN_BITS     = 8,
  parameter int unsigned CELL_BITS   = 4,
  parameter int unsigned CELLS_PER_W = 2,
  parameter int unsigned ACC_W       = ADC_BITS + IN_BITS,
  parameter int unsigned OUT_W       = ACC_W + CELL_BITS * (CELLS_PER_W - 1) + 1
) (
  input  logic                                             clk,
  input  logic                                             rst_n,
  input  logic                                             en,
  input  logic                                             clear,
  input  logic [$clog2(IN_BITS)-1:0]                       bit_idx,
  input  logic [N_ADC-1:0][ADC_BITS-1:0]                   adc_in,
  output logic [N_ADC/CELLS_PER_W-1:0][OUT_W-1:0]          psum
);
  localparam int unsigned N_W = N_ADC / CELLS_PER_W;

  logic [N_ADC-1:0][ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      for (int k = 0; k < N_ADC; k++)
        acc[k] <= (clear ? ACC_W'(0) : acc[k]) + (ACC_W'(adc_in[k]) << bit_idx);
    end
  end

  always_comb begin
    for (int w = 0; w < N_W; w++) begin
      psum[w] = '0;
      for (int c = 0; c < CELLS_PER_W; c++)
        psum[w] += OUT_W'(acc[w*CELLS_PER_W + c]) << (c * CELL_BITS);
    end
  end

endmodule
