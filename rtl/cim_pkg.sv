// cim_pkg: shared sizes and types of the reconfigurable compute-in-memory accelerator.
//
// The hierarchy is chip -> tile -> processing element (PE) -> synaptic subarray. The default
// sizes below are the evaluated configuration: 128x128 FeFET subarrays holding 4 bits per cell,
// 5-bit ADCs, 4x4 subarrays per PE, 3x3 PEs per tile, 8-bit weights and activations, a 2 MB
// global buffer and 49 tiles. The column multiplexing ratio (8 columns per ADC), the 7x7 tile
// grid and the accumulator widths are this design's own choices.
package cim_pkg;

  // Synaptic subarray
  localparam int unsigned SA_ROWS   = 128;
  localparam int unsigned SA_COLS   = 128;
  localparam int unsigned CELL_BITS = 4;
  localparam int unsigned ADC_BITS  = 5;
  localparam int unsigned COL_MUX   = 8;   // columns sharing one ADC
  // Data precision
  localparam int unsigned IN_BITS   = 8;
  localparam int unsigned W_BITS    = 8;
  localparam int unsigned CELLS_PER_W = W_BITS / CELL_BITS;
  // PE: ROW_SA x COL_SA subarrays
  localparam int unsigned PE_ROW_SA = 4;
  localparam int unsigned PE_COL_SA = 4;
  // Tile: 3x3 PEs
  localparam int unsigned TILE_PES  = 9;
  // Chip: tile grid
  localparam int unsigned CHIP_TROWS = 7;
  localparam int unsigned CHIP_TCOLS = 7;
  // Bus widths
  localparam int unsigned IN_BUS_W   = SA_ROWS * PE_ROW_SA;                         // 512
  localparam int unsigned W_BUS_W    = IN_BUS_W * CELL_BITS * PE_COL_SA;            // 8192
  localparam int unsigned TILE_BUS_W = IN_BUS_W;                                    // 512
  // Global buffer: 2 MB of TILE_BUS_W-bit words
  localparam int unsigned GB_DEPTH   = (2 * 1024 * 1024 * 8) / TILE_BUS_W;          // 32768
  // Output side widths
  localparam int unsigned PSUM_W = 24;   // PE and tile partial sums
  localparam int unsigned GACC_W = 24;   // global accumulator precision
  localparam int unsigned ACT_W  = 8;    // activations written back

  typedef enum logic [1:0] {
    PE_NOP     = 2'd0,
    PE_PROGRAM = 2'd1,   // write the PE buffer into one row of every subarray (BL bus)
    PE_MAC     = 2'd2    // read all subarrays with one input bit-plane (RS bus)
  } pe_op_e;

  typedef enum logic {
    ACT_RELU    = 1'b0,
    ACT_SIGMOID = 1'b1
  } act_mode_e;

  typedef enum logic {
    POOL_MAX = 1'b0,
    POOL_AVG = 1'b1
  } pool_mode_e;

  // A reconfigurable adder tree with n inputs is a full binary tree over the largest power of
  // two p <= n, then one node per remaining input: (p - 1) + (n - p) = n - 1 nodes.
  function automatic int unsigned tree_pow2(int unsigned n);
    int unsigned p = 1;
    while (p * 2 <= n) p = p * 2;
    return p;
  endfunction

endpackage
