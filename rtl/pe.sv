// pe: processing element made of ROW_SA x COL_SA FeFET subarrays.
//
// The PE buffer receives words from the tile demultiplexer. A PE_PROGRAM command switches the
// bus select to the weight bus and writes the buffer into row prog_row of all subarrays at once
// (subarray (i,j) gets, for each of its columns, the CELL_BITS bit-planes of slots
// j*CELL_BITS..j*CELL_BITS+CELL_BITS-1, bits [i*SA_ROWS +: SA_ROWS]). A PE_MAC command applies the
// input bit-plane held in slot 0 to the read-select lines (row-subarray i gets bits
// [i*SA_ROWS +: SA_ROWS], shared by all subarrays of that row), converts column group col_grp in
// every subarray and lets the shift-adders accumulate bit bit_idx (clear on the first bit). The
// PE adder tree then adds the ROW_SA subarrays of each subarray column, since the input
// channels are spread over rows. With last set, the result is stored in the PE output buffer.
//
// Lanes: a column group yields LANES = COL_SA * (SA_COLS/COL_MUX/CELLS_PER_W) weight columns.
// Lane j*NW+w of group g is weight column j*(SA_COLS/CELLS_PER_W) + g*NW + w of the PE, where
// NW = SA_COLS/COL_MUX/CELLS_PER_W.
// Timing: a MAC command issued in cycle t is converted in t+1, accumulated at the end of t+1 and,
// if last, stored at the end of t+2; psum_valid pulses in t+3. psum_out shows group rd_grp of the
// output buffer combinationally. A full 8-bit input vector in one group takes IN_BITS commands.
// Subarrays must be square (SA_ROWS = SA_COLS), as in the documented 128x128 case.
// The subarray count, sizes and the buffer/bus structure follow the documented PE; the command
// interface, the column-group schedule and the pipeline are this design's choices.
module pe #(
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
  parameter int unsigned PSUM_W      = cim_pkg::PSUM_W,
  localparam int unsigned BUS_W      = SA_ROWS * ROW_SA,
  localparam int unsigned SLOTS      = CELL_BITS * COL_SA,
  localparam int unsigned N_ADC      = SA_COLS / COL_MUX,
  localparam int unsigned NW         = N_ADC / CELLS_PER_W,
  localparam int unsigned LANES      = COL_SA * NW,
  localparam int unsigned GW         = $clog2(COL_MUX > 1 ? COL_MUX : 2)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // PE buffer write port (from the tile demultiplexer)
  input  logic [SLOTS-1:0]                  buf_wr_en,
  input  logic [BUS_W-1:0]                  buf_wr_data,
  // command
  input  logic                              op_valid,
  input  cim_pkg::pe_op_e                            op,
  input  logic [$clog2(SA_ROWS)-1:0]        prog_row,
  input  logic [$clog2(IN_BITS)-1:0]        bit_idx,
  input  logic [GW-1:0]                     col_grp,
  input  logic                              clear,
  input  logic                              last,
  // output buffer
  input  logic [GW-1:0]                     rd_grp,
  output logic [LANES-1:0][PSUM_W-1:0]      psum_out,
  output logic                              psum_valid
);
  localparam int unsigned SA_PSUM_W = ADC_BITS + IN_BITS + CELL_BITS * (CELLS_PER_W - 1) + 1;

  logic [SLOTS*BUS_W-1:0]       buf_data;
  logic [BUS_W-1:0]             rs_bus;
  logic [SLOTS*BUS_W-1:0]       bl_bus;
  logic                         do_prog, do_mac;

  // A buffer slot is one bus word of SA_ROWS*ROW_SA bits; as bit-plane of a weight row it holds
  // SA_COLS*ROW_SA cells, so the subarrays must be square.
  if (SA_ROWS != SA_COLS) begin : g_bad_size
    $error("pe: SA_ROWS must equal SA_COLS");
  end

  assign do_prog = op_valid && (op == cim_pkg::PE_PROGRAM);
  assign do_mac  = op_valid && (op == cim_pkg::PE_MAC);

  pe_input_buffer #(.SLOT_W(BUS_W), .SLOTS(SLOTS)) u_buf (
    .clk, .rst_n, .wr_en(buf_wr_en), .wr_data(buf_wr_data), .data(buf_data)
  );

  pe_bus_select #(.IN_BUS_W(BUS_W), .W_BUS_W(SLOTS*BUS_W)) u_sel (
    .weight_sel(do_prog), .buf_data, .rs(rs_bus), .bl(bl_bus)
  );

  // stage 1 / stage 2 control
  logic                         s1_valid, s1_clear, s1_last;
  logic [$clog2(IN_BITS)-1:0]   s1_bit;
  logic [GW-1:0]                s1_grp;
  logic                         s2_last;
  logic [GW-1:0]                s2_grp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_clear <= 1'b0; s1_last <= 1'b0; s1_bit <= '0; s1_grp <= '0;
      s2_last <= 1'b0;  s2_grp <= '0;
    end else begin
      s1_valid <= do_mac;
      s1_clear <= clear;
      s1_last  <= do_mac && last;
      s1_bit   <= bit_idx;
      s1_grp   <= col_grp;
      s2_last  <= s1_valid && s1_last;
      s2_grp   <= s1_grp;
    end
  end

  logic [ROW_SA-1:0][COL_SA-1:0][NW-1:0][SA_PSUM_W-1:0] sa_psum;

  for (genvar i = 0; i < ROW_SA; i++) begin : g_row
    for (genvar j = 0; j < COL_SA; j++) begin : g_col
      logic [CELL_BITS-1:0][SA_COLS-1:0] bl_sa;
      logic [N_ADC-1:0][ADC_BITS-1:0]    adc;

      for (genvar b = 0; b < CELL_BITS; b++) begin : g_plane
        assign bl_sa[b] = bl_bus[(j*CELL_BITS + b)*BUS_W + i*SA_COLS +: SA_COLS];
      end

      fefet_subarray #(
        .ROWS(SA_ROWS), .COLS(SA_COLS), .CELL_BITS(CELL_BITS), .ADC_BITS(ADC_BITS),
        .COL_MUX(COL_MUX), .ADC_STEP(ADC_STEP)
      ) u_sa (
        .clk, .prog_en(do_prog), .prog_row, .bl(bl_sa),
        .rd_en(do_mac), .rs(rs_bus[i*SA_ROWS +: SA_ROWS]), .col_sel(col_grp), .adc_out(adc)
      );

      shift_add #(
        .N_ADC(N_ADC), .ADC_BITS(ADC_BITS), .IN_BITS(IN_BITS), .CELL_BITS(CELL_BITS),
        .CELLS_PER_W(CELLS_PER_W), .OUT_W(SA_PSUM_W)
      ) u_sha (
        .clk, .rst_n, .en(s1_valid), .clear(s1_clear), .bit_idx(s1_bit), .adc_in(adc),
        .psum(sa_psum[i][j])
      );
    end
  end

  // PE adder tree: sum the row-subarrays of each column
  logic [LANES-1:0][PSUM_W-1:0] tree_sum;
  always_comb begin
    for (int j = 0; j < COL_SA; j++)
      for (int w = 0; w < NW; w++) begin
        tree_sum[j*NW + w] = '0;
        for (int i = 0; i < ROW_SA; i++)
          tree_sum[j*NW + w] += PSUM_W'(sa_psum[i][j][w]);
      end
  end

  // PE output buffer
  logic [COL_MUX-1:0][LANES-1:0][PSUM_W-1:0] out_buf;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_buf    <= '0;
      psum_valid <= 1'b0;
    end else begin
      psum_valid <= s2_last;
      if (s2_last) out_buf[s2_grp] <= tree_sum;
    end
  end

  assign psum_out = out_buf[rd_grp];

endmodule
