// global_accumulator: accumulation of tile outputs across the chip.
//
// Tiles of one layer are placed column first; their outputs must be added when they hold
// different input rows of the layer (vertical accumulation) and kept apart when they hold
// different output columns (horizontal concatenation). The unit has N_TREES reconfigurable adder
// trees of N_ROWS inputs each. Input k of every tree comes from a multiplexer that picks one tile
// of tile row k (mux_sel = c selects tile (k, c)) or, with mux_sel = N_COLS, the registered output
// of adder tree k; the latter lets a sum run over more cycles than the tree has inputs. bp_sel
// configures each tree as in reconfig_adder_tree, so unused inputs are bypassed.
// Precision: the accumulators are ACC_W bits wide. Tile outputs are shifted right by trunc_shift
// (truncated) before they enter, so a layer needing many accumulation steps can keep within that
// width; sums wrap modulo 2^ACC_W.
// Timing: with acc_en[t] set, tree t's output register loads its sum at the clock edge; acc_out
// shows the registers. Everything else is combinational.
// The mux-per-input structure and its sources follow the documented global accumulation; the
// 7x7 default (the 49-tile chip), the select coding and truncation by shifting are this
// design's choices.
module global_accumulator #(
  parameter int unsigned N_ROWS  = cim_pkg::CHIP_TROWS,
  parameter int unsigned N_COLS  = cim_pkg::CHIP_TCOLS,
  parameter int unsigned N_TREES = cim_pkg::CHIP_TROWS,
  parameter int unsigned LANES   = 32,
  parameter int unsigned IN_W    = cim_pkg::PSUM_W,
  parameter int unsigned ACC_W   = cim_pkg::GACC_W,
  localparam int unsigned SW     = $clog2(N_COLS + 1),
  localparam int unsigned NODES  = N_ROWS - 1
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic [N_ROWS-1:0][N_COLS-1:0][LANES-1:0][IN_W-1:0] tile_out,
  input  logic [N_TREES-1:0][N_ROWS-1:0][SW-1:0]        mux_sel,
  input  logic [N_TREES-1:0][2*NODES-1:0]               bp_sel,
  input  logic [4:0]                                    trunc_shift,
  input  logic [N_TREES-1:0]                            acc_en,
  output logic [N_TREES-1:0][LANES-1:0][ACC_W-1:0]      acc_out
);
  logic [N_TREES-1:0][LANES-1:0][ACC_W-1:0] acc_q;
  logic [N_TREES-1:0][LANES-1:0][ACC_W-1:0] tree_res;

  for (genvar t = 0; t < N_TREES; t++) begin : g_tree
    logic [N_ROWS-1:0][LANES-1:0][ACC_W-1:0] sel_in;

    // input multiplexers: tile (k, mux_sel) or the output of tree k
    always_comb begin
      for (int k = 0; k < N_ROWS; k++)
        for (int l = 0; l < LANES; l++) begin
          if (int'(mux_sel[t][k]) < N_COLS)
            sel_in[k][l] = ACC_W'(tile_out[k][mux_sel[t][k]][l] >> trunc_shift);
          else if (k < N_TREES)
            sel_in[k][l] = acc_q[k][l];
          else
            sel_in[k][l] = '0;
        end
    end

    for (genvar l = 0; l < LANES; l++) begin : g_lane
      logic [N_ROWS-1:0][ACC_W-1:0] lane_in;
      always_comb
        for (int k = 0; k < N_ROWS; k++) lane_in[k] = sel_in[k][l];
      reconfig_adder_tree #(.N_IN(N_ROWS), .WIDTH(ACC_W)) u_tree (
        .in(lane_in), .bp_sel(bp_sel[t]), .out(tree_res[t][l])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
    end else begin
      for (int t = 0; t < N_TREES; t++)
        if (acc_en[t]) acc_q[t] <= tree_res[t];
    end
  end

  assign acc_out = acc_q;

endmodule
