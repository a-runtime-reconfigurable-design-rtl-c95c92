// tile: N_PE processing elements with their input demultiplexer, reconfigurable accumulator and
// tile output buffer.
//
// Input side: a TILE_BUS_W word (in_valid/in_data) is steered by tile_input_demux into the PE
// buffers chosen by in_addr (cell bit-plane) and in_sel (PE column-subarrays).
// Compute: a PE command (op_valid/op/...) is applied to every PE whose pe_mask bit is set, so
// PEs holding different parts of a layer work in lock step.
// Output side: acc_en takes column group acc_grp from every PE output buffer and feeds each lane
// through a reconfigurable adder tree (bp_sel, shared by all lanes; PE p is tree input p), so any
// subset of the PEs can be summed, as the tile-level mapping of different kernel sizes needs. The
// result is written into the tile output buffer at the end of the cycle. out_data shows group
// rd_grp of that buffer combinationally. pe_done pulses when a masked PE stored a MAC result.
// The tile's contents and the bypassable tree follow the documented tile; the command interface
// and the buffering per column group are this design's choices.
module tile #(
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
  parameter int unsigned PSUM_W      = cim_pkg::PSUM_W,
  localparam int unsigned BUS_W      = SA_ROWS * ROW_SA,
  localparam int unsigned LANES      = COL_SA * (SA_COLS / COL_MUX / CELLS_PER_W),
  localparam int unsigned GW         = $clog2(COL_MUX > 1 ? COL_MUX : 2),
  localparam int unsigned AW         = $clog2(CELL_BITS > 1 ? CELL_BITS : 2)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // tile input bus
  input  logic                          in_valid,
  input  logic [BUS_W-1:0]              in_data,
  input  logic [AW-1:0]                 in_addr,
  input  logic [COL_SA*N_PE-1:0]        in_sel,
  // PE command
  input  logic [N_PE-1:0]               pe_mask,
  input  logic                          op_valid,
  input  cim_pkg::pe_op_e               op,
  input  logic [$clog2(SA_ROWS)-1:0]    prog_row,
  input  logic [$clog2(IN_BITS)-1:0]    bit_idx,
  input  logic [GW-1:0]                 col_grp,
  input  logic                          clear,
  input  logic                          last,
  output logic                          pe_done,
  // tile accumulation
  input  logic                          acc_en,
  input  logic [GW-1:0]                 acc_grp,
  input  logic [2*(N_PE-1)-1:0]         bp_sel,
  // tile output buffer
  input  logic [GW-1:0]                 rd_grp,
  output logic [LANES-1:0][PSUM_W-1:0]  out_data
);
  localparam int unsigned SLOTS = CELL_BITS * COL_SA;

  logic [N_PE-1:0][SLOTS-1:0]          wr_en;
  logic [N_PE-1:0][BUS_W-1:0]          wr_data;
  logic [N_PE-1:0][LANES-1:0][PSUM_W-1:0] pe_out;
  logic [N_PE-1:0]                     pe_valid;

  tile_input_demux #(.BUS_W(BUS_W), .CELL_BITS(CELL_BITS), .COL_SA(COL_SA), .N_PE(N_PE)) u_demux (
    .valid(in_valid), .data(in_data), .addr(in_addr), .sel(in_sel),
    .pe_wr_en(wr_en), .pe_wr_data(wr_data)
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    pe #(
      .SA_ROWS(SA_ROWS), .SA_COLS(SA_COLS), .CELL_BITS(CELL_BITS), .ADC_BITS(ADC_BITS),
      .COL_MUX(COL_MUX), .ADC_STEP(ADC_STEP), .IN_BITS(IN_BITS), .CELLS_PER_W(CELLS_PER_W),
      .ROW_SA(ROW_SA), .COL_SA(COL_SA), .PSUM_W(PSUM_W)
    ) u_pe (
      .clk, .rst_n,
      .buf_wr_en(wr_en[p]), .buf_wr_data(wr_data[p]),
      .op_valid(op_valid && pe_mask[p]), .op, .prog_row, .bit_idx, .col_grp, .clear, .last,
      .rd_grp(acc_grp), .psum_out(pe_out[p]), .psum_valid(pe_valid[p])
    );
  end

  assign pe_done = |pe_valid;

  // reconfigurable accumulation, one tree per lane
  logic [LANES-1:0][PSUM_W-1:0] acc_sum;
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [N_PE-1:0][PSUM_W-1:0] tree_in;
    always_comb
      for (int p = 0; p < N_PE; p++) tree_in[p] = pe_out[p][l];
    reconfig_adder_tree #(.N_IN(N_PE), .WIDTH(PSUM_W)) u_tree (
      .in(tree_in), .bp_sel, .out(acc_sum[l])
    );
  end

  // tile output buffer
  logic [COL_MUX-1:0][LANES-1:0][PSUM_W-1:0] out_buf;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      out_buf <= '0;
    else if (acc_en) out_buf[acc_grp] <= acc_sum;
  end

  assign out_data = out_buf[rd_grp];

endmodule
