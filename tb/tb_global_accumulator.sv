// tb_global_accumulator: 3x3 tile grid, 3 trees of 3 inputs, 4 lanes. Checks tile selection
// through the input multiplexers, bypass, vertical accumulation of a tile column in one step,
// accumulation over several steps through the feedback input, and input truncation.
module tb_global_accumulator;
  localparam int NR = 3, NC = 3, NT = 3, L = 4, W = 16;
  logic clk = 0, rst_n = 0;
  logic [NR-1:0][NC-1:0][L-1:0][W-1:0] tile_out;
  logic [NT-1:0][NR-1:0][1:0] mux_sel = '0;
  logic [NT-1:0][3:0] bp_sel = '0;
  logic [4:0] trunc_shift = '0;
  logic [NT-1:0] acc_en = '0;
  logic [NT-1:0][L-1:0][W-1:0] acc_out;
  int checks = 0, failures = 0;

  global_accumulator #(.N_ROWS(NR), .N_COLS(NC), .N_TREES(NT), .LANES(L), .IN_W(W), .ACC_W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_tree(int t, int e [L], string what);
    for (int l = 0; l < L; l++) begin
      checks++;
      if (int'(acc_out[t][l]) != e[l] % (1 << W)) begin
        failures++;
        $display("%s tree %0d lane %0d: got %0d exp %0d", what, t, l, acc_out[t][l], e[l]);
      end
    end
  endtask

  initial begin
    int e [L];
    int run [L];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      int c;
      for (int r = 0; r < NR; r++)
        for (int cc = 0; cc < NC; cc++)
          for (int l = 0; l < L; l++) tile_out[r][cc][l] = W'($urandom_range(0, 5000));
      c = it % NC;
      // tree 0: vertical accumulation of tile column c: all three rows in one step
      for (int k = 0; k < NR; k++) mux_sel[0][k] = 2'(c);
      bp_sel[0] = 4'b0101;
      // tree 1: tile (1, c) alone, bypassed through to the output (lower input of node 0)
      mux_sel[1][1] = 2'(c); bp_sel[1] = 4'b0010;
      trunc_shift = '0;
      acc_en = 3'b011;
      @(negedge clk);
      acc_en = '0;
      for (int l = 0; l < L; l++) e[l] = int'(tile_out[0][c][l]) + int'(tile_out[1][c][l]) + int'(tile_out[2][c][l]);
      expect_tree(0, e, "column sum");
      for (int l = 0; l < L; l++) e[l] = int'(tile_out[1][c][l]);
      expect_tree(1, e, "bypass");
      // tree 1 keeps accumulating: input 1 is its own output, input 0 takes tiles of row 0
      for (int l = 0; l < L; l++) run[l] = int'(tile_out[1][c][l]);
      for (int step = 0; step < NC; step++) begin
        mux_sel[1][0] = 2'(step); mux_sel[1][1] = 2'(NC); bp_sel[1] = 4'b0001;
        acc_en = 3'b010;
        @(negedge clk);
        acc_en = '0;
        for (int l = 0; l < L; l++) run[l] += int'(tile_out[0][step][l]);
        expect_tree(1, run, "feedback");
      end
      // tree 2 with truncation by it%4 bits: tiles (0,c) and (2,(c+1)%3)
      trunc_shift = 5'(it % 4);
      mux_sel[2][0] = 2'(c); mux_sel[2][2] = 2'((c + 1) % NC); bp_sel[2] = 4'b0100;
      acc_en = 3'b100;
      @(negedge clk);
      acc_en = '0;
      for (int l = 0; l < L; l++)
        e[l] = (int'(tile_out[0][c][l]) >> (it % 4)) + (int'(tile_out[2][(c+1)%NC][l]) >> (it % 4));
      expect_tree(2, e, "truncate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
