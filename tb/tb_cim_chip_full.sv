// tb_cim_chip_full: one complete operation on the chip at its full default size (49 tiles of
// 3x3 PEs of 4x4 subarrays of 128x128 cells, 2 MB global buffer).
//
// Random 8-bit weights are programmed, row by row, into all 16 subarrays of PE 1 of tile (0,0)
// through the global buffer, the tile bus and the PE buffer. One random 8-bit input vector of
// 512 elements is applied bit-serially to column group 0. The tile accumulator passes PE 1
// alone, global tree 0 passes tile (0,0), ReLU rescales and the result is written back to the
// global buffer. The expected 32 outputs are computed here, including the 5-bit ADC
// quantisation of every subarray column (step 60, saturating at 31) before the shift-add.
module tb_cim_chip_full;
  import cim_pkg::*;
  localparam int R = 128, C = 128, CB = 4, RSA = 4, CSA = 4, NP = 9, NT = 49;
  localparam int NADC = 16, NW = 8, LANES = 32, BW = 512, STEP = 60, SH = 6;

  logic clk = 0, rst_n = 0;
  logic host_wr_en = 0;
  logic [14:0] host_wr_addr = '0;
  logic [BW-1:0] host_wr_data = '0;
  logic xfer_valid = 0;
  logic [14:0] xfer_gb_addr = '0;
  logic [NT-1:0] xfer_tile_mask = '0;
  logic [1:0] xfer_cb_addr = '0;
  logic [CSA*NP-1:0] xfer_sel = '0;
  logic pe_valid = 0;
  logic [NT-1:0] pe_tile_mask = '0;
  logic [NP-1:0] pe_mask = '0;
  pe_op_e pe_op = PE_NOP;
  logic [6:0] pe_prog_row = '0;
  logic [2:0] pe_bit_idx = '0, pe_col_grp = '0, tacc_grp = '0, gacc_grp = '0;
  logic pe_clear = 0, pe_last = 0, pe_done;
  logic [NT-1:0] tacc_mask = '0;
  logic [NT-1:0][15:0] tile_bp_sel = '0;
  logic [6:0] gacc_en = '0;
  logic [6:0][6:0][2:0] gacc_mux_sel = '0;
  logic [6:0][11:0] gacc_bp_sel = '0;
  logic [4:0] gacc_trunc = '0;
  logic post_valid = 0;
  logic [2:0] post_tree = '0;
  act_mode_e act_mode = ACT_RELU;
  logic [4:0] act_shift = '0;
  pool_mode_e pool_mode = POOL_MAX;
  logic [2:0] pool_win_log2 = '0;
  logic [14:0] post_wb_addr = '0;
  logic res_valid;
  logic [LANES-1:0][7:0] res_data;

  int checks = 0, failures = 0;
  logic [3:0] lvl [RSA][CSA][R][NADC];   // levels of the 16 columns of group 0 in each subarray
  logic [7:0] x [RSA*R];
  int cyc = 0;

  cim_chip dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_word(logic [BW-1:0] word, int cb, logic [CSA*NP-1:0] sel);
    host_wr_en = 1; host_wr_addr = 15'd100; host_wr_data = word;
    @(negedge clk);
    host_wr_en = 0;
    xfer_valid = 1; xfer_gb_addr = 15'd100; xfer_tile_mask = NT'(1);
    xfer_cb_addr = 2'(cb); xfer_sel = sel;
    @(negedge clk);
    xfer_valid = 0;
  endtask

  initial begin
    int t0, t_prog, t_mac;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // weights: levels of group-0 columns random, other columns zero
    for (int i = 0; i < RSA; i++)
      for (int j = 0; j < CSA; j++)
        for (int r = 0; r < R; r++)
          for (int k = 0; k < NADC; k++) lvl[i][j][r][k] = 4'($urandom);
    for (int r = 0; r < RSA*R; r++) x[r] = 8'($urandom);
    t0 = cyc;
    for (int r = 0; r < R; r++) begin
      for (int j = 0; j < CSA; j++)
        for (int c = 0; c < CB; c++) begin
          logic [BW-1:0] word;
          word = '0;
          for (int i = 0; i < RSA; i++)
            for (int k = 0; k < NADC; k++) word[i*C + k] = lvl[i][j][r][k][c];
          send_word(word, c, (CSA*NP)'(1) << j);
        end
      @(negedge clk);
      pe_valid = 1; pe_tile_mask = NT'(1); pe_mask = NP'(1); pe_op = PE_PROGRAM; pe_prog_row = 7'(r);
      @(negedge clk);
      pe_valid = 0; pe_op = PE_NOP;
    end
    t_prog = cyc - t0;
    $display("programmed 128 rows of 16 subarrays in %0d cycles", t_prog);
    t0 = cyc;
    for (int b = 0; b < 8; b++) begin
      logic [BW-1:0] plane;
      for (int r = 0; r < RSA*R; r++) plane[r] = x[r][b];
      send_word(plane, 0, (CSA*NP)'(1));
      pe_valid = 1; pe_tile_mask = NT'(1); pe_mask = NP'(1); pe_op = PE_MAC;
      pe_bit_idx = 3'(b); pe_col_grp = '0; pe_clear = (b == 0); pe_last = (b == 7);
      @(negedge clk);
      pe_valid = 0; pe_op = PE_NOP; pe_clear = 0; pe_last = 0;
    end
    while (!pe_done) @(negedge clk);
    t_mac = cyc - t0;
    $display("8-bit input vector through column group 0 in %0d cycles", t_mac);
    // tile: PE 1 alone (all bypass selects 0); global tree 0: tile (0,0) alone
    tile_bp_sel = '0; tacc_mask = NT'(1); tacc_grp = '0;
    @(negedge clk);
    tacc_mask = '0;
    gacc_grp = '0; gacc_mux_sel = '0; gacc_bp_sel = '0; gacc_en = 7'b1;
    @(negedge clk);
    gacc_en = '0;
    post_valid = 1; post_tree = '0; act_mode = ACT_RELU; act_shift = 5'(SH); pool_win_log2 = '0;
    post_wb_addr = 15'd200;
    @(negedge clk);
    post_valid = 0;
    checks++;
    if (!res_valid) begin failures++; $display("no result"); end
    for (int j = 0; j < CSA; j++)
      for (int w = 0; w < NW; w++) begin
        longint sum, e;
        sum = 0;
        for (int i = 0; i < RSA; i++) begin
          longint acc [2];
          for (int c = 0; c < 2; c++) begin
            acc[c] = 0;
            for (int b = 0; b < 8; b++) begin
              int cs, code;
              cs = 0;
              for (int r = 0; r < R; r++) if (x[i*R + r][b]) cs += int'(lvl[i][j][r][2*w + c]);
              code = cs / STEP; if (code > 31) code = 31;
              acc[c] += longint'(code) << b;
            end
          end
          sum += acc[0] + (acc[1] << 4);
        end
        e = sum >> SH; if (e > 255) e = 255;
        checks++;
        if (longint'(res_data[j*NW + w]) != e) begin
          failures++; $display("lane %0d got %0d exp %0d (sum %0d)", j*NW+w, res_data[j*NW+w], e, sum);
        end
      end
    @(negedge clk);
    checks++;
    if (dut.u_gb.mem[200][LANES*8-1:0] != res_data) begin failures++; $display("write-back wrong"); end
    // programming cost: 16 bus words and one program step per row
    checks++;
    if (t_prog != R * (CSA*CB*2 + 2)) begin failures++; $display("programming took %0d cycles", t_prog); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
