// tb_cim_chip: end-to-end run of a reduced chip (2x2 tiles; PEs of 2x2 subarrays of 16x16
// cells, column mux 2, exact ADC; 256-word global buffer).
//
// A fully connected layer of 128 inputs and 16 outputs is split over two tiles of one tile
// column (vertical accumulation): tile (0,0) holds input rows 0..63 in PEs 1 and 2, tile (1,0)
// rows 64..127. Weights and input bit-planes go host -> global buffer -> tile demux -> PE
// buffer. The tile accumulators add their two PEs (bypassing the other seven), the global
// accumulator adds the two tiles in one step (tree 0) and in two steps through the feedback
// input (tree 1), and once with truncation. Results pass through ReLU and sigmoid, max and
// average pooling and are written back to the global buffer. The whole layer is then
// reprogrammed with new weights (weight reloading) and run again.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_cim_chip;
  import cim_pkg::*;
  localparam int R = 16, C = 16, CB = 4, MUX = 2, RSA = 2, CSA = 2, NP = 9;
  localparam int TR = 2, TC = 2, NT = TR * TC, GBD = 256;
  localparam int NADC = C / MUX, NW = NADC / 2, LANES = CSA * NW;
  localparam int BW = R * RSA, PROWS = R * RSA, PCOLS = CSA * C / 2;
  localparam int NIN = 4 * PROWS;

  logic clk = 0, rst_n = 0;
  logic host_wr_en = 0;
  logic [7:0] host_wr_addr = '0;
  logic [BW-1:0] host_wr_data = '0;
  logic xfer_valid = 0;
  logic [7:0] xfer_gb_addr = '0;
  logic [NT-1:0] xfer_tile_mask = '0;
  logic [1:0] xfer_cb_addr = '0;
  logic [CSA*NP-1:0] xfer_sel = '0;
  logic pe_valid = 0;
  logic [NT-1:0] pe_tile_mask = '0;
  logic [NP-1:0] pe_mask = '0;
  pe_op_e pe_op = PE_NOP;
  logic [3:0] pe_prog_row = '0;
  logic [2:0] pe_bit_idx = '0;
  logic [0:0] pe_col_grp = '0, tacc_grp = '0, gacc_grp = '0;
  logic pe_clear = 0, pe_last = 0, pe_done;
  logic [NT-1:0] tacc_mask = '0;
  logic [NT-1:0][15:0] tile_bp_sel = '0;
  logic [TR-1:0] gacc_en = '0;
  logic [TR-1:0][TR-1:0][1:0] gacc_mux_sel = '0;
  logic [TR-1:0][1:0] gacc_bp_sel = '0;
  logic [4:0] gacc_trunc = '0;
  logic post_valid = 0;
  logic [0:0] post_tree = '0;
  act_mode_e act_mode = ACT_RELU;
  logic [4:0] act_shift = '0;
  pool_mode_e pool_mode = POOL_MAX;
  logic [2:0] pool_win_log2 = '0;
  logic [7:0] post_wb_addr = '0;
  logic res_valid;
  logic [LANES-1:0][7:0] res_data;

  int checks = 0, failures = 0;
  int wt [NIN][PCOLS];
  int x [NIN];
  int part [2][MUX][LANES];          // [tile row][group][lane] expected tile sums
  // mechanism counters
  int n_prog = 0, n_reload = 0, n_xfer_w = 0, n_xfer_in = 0, n_mac = 0, n_tacc = 0;
  int n_gacc_1step = 0, n_gacc_fb = 0, n_trunc = 0, n_relu = 0, n_sigm = 0;
  int n_maxpool = 0, n_avgpool = 0, n_wb = 0;

  cim_chip #(.SA_ROWS(R), .SA_COLS(C), .CELL_BITS(CB), .ADC_BITS(8), .COL_MUX(MUX), .ADC_STEP(1),
             .ROW_SA(RSA), .COL_SA(CSA), .N_PE(NP), .TROWS(TR), .TCOLS(TC), .GB_DEPTH(GBD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tile t (0 -> (0,0), 2 -> (1,0)), PE p (0 or 1) holds input rows base(t,p) ..
  function automatic int row_base(int trow, int p);
    return (trow * 2 + p) * PROWS;
  endfunction

  function automatic int cell_level(int base, int i, int j, int r, int col);
    int g, k, wcol;
    g = col / NADC; k = col % NADC;
    wcol = j * (C / 2) + g * NW + k / 2;
    return (wt[base + i*R + r][wcol] >> (CB * (k % 2))) & 15;
  endfunction

  // host writes a word into the buffer, then it is sent to one tile
  task automatic send_word(logic [BW-1:0] word, int tile_idx, int cb, logic [CSA*NP-1:0] sel);
    host_wr_en = 1; host_wr_addr = 8'd7; host_wr_data = word;
    @(negedge clk);
    host_wr_en = 0;
    xfer_valid = 1; xfer_gb_addr = 8'd7; xfer_tile_mask = NT'(1) << tile_idx;
    xfer_cb_addr = 2'(cb); xfer_sel = sel;
    @(negedge clk);
    xfer_valid = 0;
  endtask

  task automatic load_weights();
    for (int trow = 0; trow < 2; trow++)
      for (int p = 0; p < 2; p++)
        for (int r = 0; r < R; r++) begin
          for (int j = 0; j < CSA; j++)
            for (int c = 0; c < CB; c++) begin
              logic [BW-1:0] word;
              for (int i = 0; i < RSA; i++)
                for (int col = 0; col < C; col++)
                  word[i*C + col] = 1'((cell_level(row_base(trow, p), i, j, r, col) >> c) & 1);
              send_word(word, trow * TC, c, (CSA*NP)'(1) << (p*CSA + j));
              n_xfer_w++;
            end
          @(negedge clk);   // let the last word land in the PE buffer
          pe_valid = 1; pe_tile_mask = NT'(1) << (trow * TC); pe_mask = NP'(1) << p;
          pe_op = PE_PROGRAM; pe_prog_row = 4'(r);
          @(negedge clk);
          pe_valid = 0; pe_op = PE_NOP;
          n_prog++;
        end
  endtask

  task automatic run_layer();
    for (int g = 0; g < MUX; g++)
      for (int b = 0; b < 8; b++) begin
        for (int trow = 0; trow < 2; trow++)
          for (int p = 0; p < 2; p++) begin
            logic [BW-1:0] plane;
            for (int r = 0; r < PROWS; r++) plane[r] = 1'((x[row_base(trow, p) + r] >> b) & 1);
            send_word(plane, trow * TC, 0, (CSA*NP)'(1) << (p*CSA));
            n_xfer_in++;
          end
        @(negedge clk);
        pe_valid = 1; pe_tile_mask = NT'(1) | (NT'(1) << TC); pe_mask = NP'(3);
        pe_op = PE_MAC; pe_bit_idx = 3'(b); pe_col_grp = 1'(g); pe_clear = (b == 0); pe_last = (b == 7);
        @(negedge clk);
        pe_valid = 0; pe_op = PE_NOP; pe_clear = 0; pe_last = 0;
        n_mac++;
      end
    repeat (4) @(negedge clk);
    // tile accumulation: PE 1 + PE 2 in both tiles, other PEs bypassed
    for (int g = 0; g < MUX; g++) begin
      tile_bp_sel = '0; tile_bp_sel[0] = 16'h0001; tile_bp_sel[TC] = 16'h0001;
      tacc_mask = NT'(1) | (NT'(1) << TC); tacc_grp = 1'(g);
      @(negedge clk);
      tacc_mask = '0;
      n_tacc++;
    end
    // expected partial sums of each tile
    for (int trow = 0; trow < 2; trow++)
      for (int g = 0; g < MUX; g++)
        for (int l = 0; l < LANES; l++) begin
          int wc;
          wc = (l / NW) * (C / 2) + g * NW + (l % NW);
          part[trow][g][l] = 0;
          for (int r = 0; r < 2 * PROWS; r++)
            part[trow][g][l] += x[trow * 2 * PROWS + r] * wt[trow * 2 * PROWS + r][wc];
        end
  endtask

  // global accumulation of group g: tree 0 in one step, tree 1 in two steps via feedback
  task automatic global_acc(int g, int trunc);
    gacc_grp = 1'(g); gacc_trunc = 5'(trunc);
    gacc_mux_sel[0][0] = 2'd0; gacc_mux_sel[0][1] = 2'd0; gacc_bp_sel[0] = 2'b01;
    gacc_mux_sel[1][1] = 2'd0; gacc_bp_sel[1] = 2'b10;           // tile (1,0) alone
    gacc_en = 2'b11;
    @(negedge clk);
    n_gacc_1step++;
    gacc_mux_sel[1][0] = 2'd0; gacc_mux_sel[1][1] = 2'(TC); gacc_bp_sel[1] = 2'b01;  // + feedback
    gacc_en = 2'b10;
    @(negedge clk);
    gacc_en = '0;
    n_gacc_fb++;
    if (trunc != 0) n_trunc++;
    for (int t = 0; t < 2; t++)
      for (int l = 0; l < LANES; l++) begin
        int e;
        e = (part[0][g][l] >> trunc) + (part[1][g][l] >> trunc);
        checks++;
        if (int'(dut.gacc_out[t][l]) != e) begin
          failures++; $display("gacc tree %0d g %0d lane %0d got %0d exp %0d", t, g, l, dut.gacc_out[t][l], e);
        end
      end
  endtask

  function automatic int relu_ref(int v, int sh);
    int t;
    t = v >>> sh;
    return t < 0 ? 0 : (t > 255 ? 255 : t);
  endfunction

  function automatic int sigm_ref(int v, int sh);
    real a, y;
    a = real'(v >>> sh) / 16.0;
    if (a >= 5.0)        y = 1.0;
    else if (a >= 2.375) y = 0.03125 * a + 0.84375;
    else if (a >= 1.0)   y = 0.125 * a + 0.625;
    else                 y = 0.25 * a + 0.5;
    return (y >= 255.0 / 256.0) ? 255 : int'($floor(y * 256.0));
  endfunction

  task automatic post(int tree, act_mode_e m, int sh, pool_mode_e pm, int lg, int wb);
    post_valid = 1; post_tree = 1'(tree); act_mode = m; act_shift = 5'(sh);
    pool_mode = pm; pool_win_log2 = 3'(lg); post_wb_addr = 8'(wb);
    @(negedge clk);
    post_valid = 0;
  endtask

  task automatic check_res(int exp_v [LANES], int wb, string what);
    checks++;
    if (!res_valid) begin failures++; $display("%s: no result", what); end
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (int'(res_data[l]) != exp_v[l]) begin
        failures++; $display("%s lane %0d got %0d exp %0d", what, l, res_data[l], exp_v[l]);
      end
    end
    @(negedge clk);
    checks++;
    if (dut.u_gb.mem[wb] != BW'(res_data)) begin failures++; $display("%s: write-back", what); end
    else n_wb++;
  endtask

  task automatic post_process(int sh);
    int e [LANES];
    int a [LANES];
    // ReLU, no pooling, group 0 from tree 0
    global_acc(0, 0);
    post(0, ACT_RELU, sh, POOL_MAX, 0, 20);
    for (int l = 0; l < LANES; l++) e[l] = relu_ref(part[0][0][l] + part[1][0][l], sh);
    check_res(e, 20, "relu");
    n_relu++;
    // sigmoid from tree 1
    post(1, ACT_SIGMOID, sh + 8, POOL_MAX, 0, 21);
    for (int l = 0; l < LANES; l++) e[l] = sigm_ref(part[0][0][l] + part[1][0][l], sh + 8);
    check_res(e, 21, "sigmoid");
    n_sigm++;
    // max and average pooling over the two column groups (window of 2)
    for (int l = 0; l < LANES; l++) a[l] = relu_ref(part[0][0][l] + part[1][0][l], sh);
    post(0, ACT_RELU, sh, POOL_MAX, 1, 22);
    checks++; if (res_valid) begin failures++; $display("pool window ended early"); end
    global_acc(1, 0);
    post(0, ACT_RELU, sh, POOL_MAX, 1, 22);
    for (int l = 0; l < LANES; l++) begin
      int b;
      b = relu_ref(part[0][1][l] + part[1][1][l], sh);
      e[l] = a[l] > b ? a[l] : b;
    end
    check_res(e, 22, "maxpool");
    n_maxpool++;
    global_acc(0, 0);
    post(0, ACT_RELU, sh, POOL_AVG, 1, 23);
    global_acc(1, 2);
    post(0, ACT_RELU, sh, POOL_AVG, 1, 23);
    for (int l = 0; l < LANES; l++) begin
      int b;
      b = relu_ref((part[0][1][l] >> 2) + (part[1][1][l] >> 2), sh);
      e[l] = (a[l] + b) / 2;
    end
    check_res(e, 23, "avgpool");
    n_avgpool++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int model = 0; model < 2; model++) begin
      for (int r = 0; r < NIN; r++)
        for (int c = 0; c < PCOLS; c++) wt[r][c] = int'($urandom_range(0, 255));
      if (model > 0) n_reload++;
      load_weights();
      for (int v = 0; v < 2; v++) begin
        for (int r = 0; r < NIN; r++) x[r] = int'($urandom_range(0, 255));
        run_layer();
        post_process(13 + v);
      end
    end
    $display("programmed rows %0d, reloads %0d, weight words %0d, input words %0d, MAC steps %0d",
             n_prog, n_reload, n_xfer_w, n_xfer_in, n_mac);
    $display("tile accumulations %0d, global 1-step %0d, feedback %0d, truncations %0d",
             n_tacc, n_gacc_1step, n_gacc_fb, n_trunc);
    $display("relu %0d, sigmoid %0d, max pool %0d, avg pool %0d, write-backs %0d",
             n_relu, n_sigm, n_maxpool, n_avgpool, n_wb);
    begin
      int cnt [14];
      cnt = '{n_prog, n_reload, n_xfer_w, n_xfer_in, n_mac, n_tacc, n_gacc_1step, n_gacc_fb,
              n_trunc, n_relu, n_sigm, n_maxpool, n_avgpool, n_wb};
      foreach (cnt[k]) begin
        checks++;
        if (cnt[k] == 0) begin failures++; $display("mechanism %0d never exercised", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
