// cim_chip: runtime-reconfigurable compute-in-memory CNN accelerator, chip level.
//
// A TROWS x TCOLS grid of tiles (each 3x3 PEs of 4x4 FeFET subarrays) sits around a global
// buffer, a global accumulator and the activation and pooling units. The same silicon runs
// different networks because every level can be re-steered at run time: the tile input
// demultiplexers send inputs or weights to any PE column-subarrays, weights can be reprogrammed
// row by row (weight reloading), the tile accumulators sum any subset of PEs, and the global
// accumulator adds any tiles of a tile row per tree input, with feedback for longer sums.
//
// The chip is driven by a host through command ports, one step per cycle; there is no on-chip
// sequencer. Command groups (all may be issued in the same cycle as long as they do not depend
// on each other):
//   host_wr_*   write a word into the global buffer (from the DRAM side).
//   xfer_*      read global buffer word xfer_gb_addr and, one cycle later, drive it on the
//               input bus of every tile in xfer_tile_mask, demultiplexed by xfer_cb_addr /
//               xfer_sel (see tile_input_demux). Weights and input bit-planes share this path.
//   pe_*        PE command (program a row / MAC one input bit) to the PEs in pe_mask of the
//               tiles in pe_tile_mask. pe_done pulses when a MAC result was stored.
//   tacc_*      tile accumulation of column group tacc_grp in the tiles of tacc_mask, with
//               each tile's adder tree set by tile_bp_sel.
//   gacc_*      global accumulation: every tile shows group gacc_grp of its output buffer; trees
//               in gacc_en load their sums (mux and bypass selects, truncation shift).
//   post_*      take the register of tree post_tree through activation and pooling; a finished
//               pooling window is written to global buffer word post_wb_addr (lanes of ACT_W bits
//               from bit 0, rest zero) and shown on res_valid/res_data.
// Timing: global buffer reads take one cycle; PE latencies are given in pe; tile and global
// accumulation take effect at the clock edge of their command; a result appears one cycle after
// the post command that completes a pooling window.
// Tile, PE, subarray sizes, bus widths, buffer size and the functions of each unit follow the
// documented architecture. The command interface, the 7x7 tile grid standing for the 49-tile
// chip, and the write-back format are this design's choices. The interconnect (H-trees, global
// bus) is plain wiring here. A host write and a result write-back must not fall in one cycle.
module cim_chip #(
  parameter int unsigned SA_ROWS     = cim_pkg::SA_ROWS,
  parameter int unsigned SA_COLS     = cim_pkg::SA_COLS,
  parameter int unsigned CELL_BITS   = cim_pkg::CELL_BITS,
  parameter int unsigned ADC_BITS    = cim_pkg::ADC_BITS,
  parameter int unsigned COL_MUX     = cim_pkg::COL_MUX,
  parameter int unsigned ADC_STEP    = 60,
  parameter int unsigned IN_BITS     = cim_pkg::IN_BITS,
  parameter int unsigned CELLS_PER_W = cim_pkg::CELLS_PER_W,
  parameter int unsigned ROW_SA      = cim_pkg::PE_ROW_SA,
  parameter int unsigned COL_SA      = cim_pkg::PE_COL_SA,
  parameter int unsigned N_PE        = cim_pkg::TILE_PES,
  parameter int unsigned TROWS       = cim_pkg::CHIP_TROWS,
  parameter int unsigned TCOLS       = cim_pkg::CHIP_TCOLS,
  parameter int unsigned GB_DEPTH    = cim_pkg::GB_DEPTH,
  parameter int unsigned PSUM_W      = cim_pkg::PSUM_W,
  parameter int unsigned GACC_W      = cim_pkg::GACC_W,
  parameter int unsigned ACT_W       = cim_pkg::ACT_W,
  localparam int unsigned NT         = TROWS * TCOLS,
  localparam int unsigned BUS_W      = SA_ROWS * ROW_SA,
  localparam int unsigned LANES      = COL_SA * (SA_COLS / COL_MUX / CELLS_PER_W),
  localparam int unsigned GW         = $clog2(COL_MUX > 1 ? COL_MUX : 2),
  localparam int unsigned CBW        = $clog2(CELL_BITS > 1 ? CELL_BITS : 2),
  localparam int unsigned GBA        = $clog2(GB_DEPTH),
  localparam int unsigned MSW        = $clog2(TCOLS + 1),
  localparam int unsigned TW         = $clog2(TROWS > 1 ? TROWS : 2)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // host side of the global buffer
  input  logic                                   host_wr_en,
  input  logic [GBA-1:0]                         host_wr_addr,
  input  logic [BUS_W-1:0]                       host_wr_data,
  // global buffer -> tiles
  input  logic                                   xfer_valid,
  input  logic [GBA-1:0]                         xfer_gb_addr,
  input  logic [NT-1:0]                          xfer_tile_mask,
  input  logic [CBW-1:0]                         xfer_cb_addr,
  input  logic [COL_SA*N_PE-1:0]                 xfer_sel,
  // PE commands
  input  logic                                   pe_valid,
  input  logic [NT-1:0]                          pe_tile_mask,
  input  logic [N_PE-1:0]                        pe_mask,
  input  cim_pkg::pe_op_e                        pe_op,
  input  logic [$clog2(SA_ROWS)-1:0]             pe_prog_row,
  input  logic [$clog2(IN_BITS)-1:0]             pe_bit_idx,
  input  logic [GW-1:0]                          pe_col_grp,
  input  logic                                   pe_clear,
  input  logic                                   pe_last,
  output logic                                   pe_done,
  // tile accumulation
  input  logic [NT-1:0]                          tacc_mask,
  input  logic [GW-1:0]                          tacc_grp,
  input  logic [NT-1:0][2*(N_PE-1)-1:0]          tile_bp_sel,
  // global accumulation
  input  logic [GW-1:0]                          gacc_grp,
  input  logic [TROWS-1:0]                       gacc_en,
  input  logic [TROWS-1:0][TROWS-1:0][MSW-1:0]   gacc_mux_sel,
  input  logic [TROWS-1:0][2*(TROWS-1)-1:0]      gacc_bp_sel,
  input  logic [4:0]                             gacc_trunc,
  // activation, pooling and write-back
  input  logic                                   post_valid,
  input  logic [TW-1:0]                          post_tree,
  input  cim_pkg::act_mode_e                     act_mode,
  input  logic [4:0]                             act_shift,
  input  cim_pkg::pool_mode_e                    pool_mode,
  input  logic [2:0]                             pool_win_log2,
  input  logic [GBA-1:0]                         post_wb_addr,
  output logic                                   res_valid,
  output logic [LANES-1:0][ACT_W-1:0]            res_data
);
  // ---------------------------------------------------------------- global buffer
  logic             gb_wr_en;
  logic [GBA-1:0]   gb_wr_addr;
  logic [BUS_W-1:0] gb_wr_data;
  logic [BUS_W-1:0] gb_rd_data;
  logic             gb_rd_valid;
  logic [GBA-1:0]   wb_addr_q;

  always_comb begin
    if (res_valid) begin
      gb_wr_en   = 1'b1;
      gb_wr_addr = wb_addr_q;
      gb_wr_data = BUS_W'(res_data);
    end else begin
      gb_wr_en   = host_wr_en;
      gb_wr_addr = host_wr_addr;
      gb_wr_data = host_wr_data;
    end
  end

  global_buffer #(.DEPTH(GB_DEPTH), .WIDTH(BUS_W)) u_gb (
    .clk, .rst_n, .wr_en(gb_wr_en), .wr_addr(gb_wr_addr), .wr_data(gb_wr_data),
    .rd_en(xfer_valid), .rd_addr(xfer_gb_addr), .rd_data(gb_rd_data), .rd_valid(gb_rd_valid)
  );

  // transfer sideband, delayed to meet the buffer read data
  logic [NT-1:0]            xq_mask;
  logic [CBW-1:0]           xq_cb;
  logic [COL_SA*N_PE-1:0]   xq_sel;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xq_mask <= '0; xq_cb <= '0; xq_sel <= '0;
    end else begin
      xq_mask <= xfer_tile_mask; xq_cb <= xfer_cb_addr; xq_sel <= xfer_sel;
    end
  end

  // ---------------------------------------------------------------- tiles
  logic [TROWS-1:0][TCOLS-1:0][LANES-1:0][PSUM_W-1:0] tile_out;
  logic [NT-1:0]                                      tile_done;

  for (genvar r = 0; r < TROWS; r++) begin : g_trow
    for (genvar c = 0; c < TCOLS; c++) begin : g_tcol
      localparam int unsigned T = r * TCOLS + c;
      tile #(
        .SA_ROWS(SA_ROWS), .SA_COLS(SA_COLS), .CELL_BITS(CELL_BITS), .ADC_BITS(ADC_BITS),
        .COL_MUX(COL_MUX), .ADC_STEP(ADC_STEP), .IN_BITS(IN_BITS), .CELLS_PER_W(CELLS_PER_W),
        .ROW_SA(ROW_SA), .COL_SA(COL_SA), .N_PE(N_PE), .PSUM_W(PSUM_W)
      ) u_tile (
        .clk, .rst_n,
        .in_valid(gb_rd_valid && xq_mask[T]), .in_data(gb_rd_data), .in_addr(xq_cb),
        .in_sel(xq_sel),
        .pe_mask, .op_valid(pe_valid && pe_tile_mask[T]), .op(pe_op), .prog_row(pe_prog_row),
        .bit_idx(pe_bit_idx), .col_grp(pe_col_grp), .clear(pe_clear), .last(pe_last),
        .pe_done(tile_done[T]),
        .acc_en(tacc_mask[T]), .acc_grp(tacc_grp), .bp_sel(tile_bp_sel[T]),
        .rd_grp(gacc_grp), .out_data(tile_out[r][c])
      );
    end
  end

  assign pe_done = |tile_done;

  // ---------------------------------------------------------------- global accumulation
  logic [TROWS-1:0][LANES-1:0][GACC_W-1:0] gacc_out;

  global_accumulator #(
    .N_ROWS(TROWS), .N_COLS(TCOLS), .N_TREES(TROWS), .LANES(LANES), .IN_W(PSUM_W), .ACC_W(GACC_W)
  ) u_gacc (
    .clk, .rst_n, .tile_out, .mux_sel(gacc_mux_sel), .bp_sel(gacc_bp_sel),
    .trunc_shift(gacc_trunc), .acc_en(gacc_en), .acc_out(gacc_out)
  );

  // ---------------------------------------------------------------- activation and pooling
  logic [LANES-1:0][ACT_W-1:0] act_out;

  activation_unit #(.LANES(LANES), .IN_W(GACC_W), .OUT_W(ACT_W)) u_act (
    .mode(act_mode), .shift(act_shift), .in(gacc_out[post_tree]), .out(act_out)
  );

  pooling_unit #(.LANES(LANES), .W(ACT_W), .MAX_LOG(4)) u_pool (
    .clk, .rst_n, .mode(pool_mode), .win_log2(pool_win_log2), .in_valid(post_valid),
    .in_data(act_out), .out_valid(res_valid), .out_data(res_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          wb_addr_q <= '0;
    else if (post_valid) wb_addr_q <= post_wb_addr;
  end

  a_no_wb_collision: assert property (@(posedge clk)
    !(res_valid && host_wr_en))
    else $error("host write collides with a result write-back");

endmodule
