// tb_tile: reduced tile (9 PEs of 2x2 subarrays of 16x16 cells, column mux 2, exact ADC).
// Programs different random weights into every PE through the tile input demultiplexer,
// broadcasts one input vector to all PEs, and checks the tile accumulator output for several
// bypass settings (all PEs, one PE, PEs 5..8, PEs 1..8) against directly computed dot products.
module tb_tile;
  import cim_pkg::*;
  localparam int R = 16, C = 16, CB = 4, MUX = 2, RSA = 2, CSA = 2, NP = 9;
  localparam int NADC = C / MUX, NW = NADC / 2, LANES = CSA * NW;
  localparam int BW = R * RSA, SLOTS = CB * CSA;
  localparam int PROWS = R * RSA, PCOLS = CSA * C / 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [BW-1:0] in_data = '0;
  logic [1:0] in_addr = '0;
  logic [CSA*NP-1:0] in_sel = '0;
  logic [NP-1:0] pe_mask = '0;
  logic op_valid = 0;
  pe_op_e op = PE_NOP;
  logic [3:0] prog_row = '0;
  logic [2:0] bit_idx = '0;
  logic [0:0] col_grp = '0, acc_grp = '0, rd_grp = '0;
  logic clear = 0, last = 0, pe_done, acc_en = 0;
  logic [15:0] bp_sel = '0;
  logic [LANES-1:0][23:0] out_data;
  int checks = 0, failures = 0;
  int wt [NP][PROWS][PCOLS];
  int x [PROWS];
  int done_cnt = 0;

  tile #(.SA_ROWS(R), .SA_COLS(C), .CELL_BITS(CB), .ADC_BITS(8), .COL_MUX(MUX), .ADC_STEP(1),
         .ROW_SA(RSA), .COL_SA(CSA), .N_PE(NP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && pe_done) done_cnt++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cell_level(int p, int i, int j, int r, int col);
    int g, k, wcol;
    g = col / NADC; k = col % NADC;
    wcol = j * (C / 2) + g * NW + k / 2;
    return (wt[p][i*R + r][wcol] >> (CB * (k % 2))) & 15;
  endfunction

  task automatic program_pe(int p);
    for (int r = 0; r < R; r++) begin
      for (int j = 0; j < CSA; j++)
        for (int c = 0; c < CB; c++) begin
          for (int i = 0; i < RSA; i++)
            for (int col = 0; col < C; col++)
              in_data[i*C + col] = 1'((cell_level(p, i, j, r, col) >> c) & 1);
          in_valid = 1; in_addr = 2'(c); in_sel = (CSA*NP)'(1) << (p*CSA + j);
          @(negedge clk);
        end
      in_valid = 0;
      pe_mask = NP'(1) << p; op_valid = 1; op = PE_PROGRAM; prog_row = 4'(r);
      @(negedge clk);
      op_valid = 0; op = PE_NOP;
    end
  endtask

  task automatic run_all(int g);
    for (int b = 0; b < 8; b++) begin
      for (int r = 0; r < PROWS; r++) in_data[r] = 1'((x[r] >> b) & 1);
      in_valid = 1; in_addr = 0;
      in_sel = '0; for (int p = 0; p < NP; p++) in_sel[p*CSA] = 1'b1;   // broadcast to all PEs
      @(negedge clk);
      in_valid = 0;
      pe_mask = '1; op_valid = 1; op = PE_MAC; bit_idx = 3'(b); col_grp = 1'(g);
      clear = (b == 0); last = (b == 7);
      @(negedge clk);
      op_valid = 0; op = PE_NOP; clear = 0; last = 0;
    end
    repeat (4) @(negedge clk);
  endtask

  function automatic int pe_dot(int p, int wc);
    int e = 0;
    for (int r = 0; r < PROWS; r++) e += x[r] * wt[p][r][wc];
    return e;
  endfunction

  task automatic check_acc(int g, logic [15:0] sel, logic [NP-1:0] which);
    bp_sel = sel; acc_en = 1; acc_grp = 1'(g);
    @(negedge clk);
    acc_en = 0; rd_grp = 1'(g); #1;
    for (int j = 0; j < CSA; j++)
      for (int w = 0; w < NW; w++) begin
        int e, wc;
        wc = j * (C / 2) + g * NW + w;
        e = 0;
        for (int p = 0; p < NP; p++) if (which[p]) e += pe_dot(p, wc);
        checks++;
        if (int'(out_data[j*NW + w]) != e) begin
          failures++;
          $display("sel %h col %0d: got %0d exp %0d", sel, wc, out_data[j*NW+w], e);
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++)
      for (int r = 0; r < PROWS; r++)
        for (int c = 0; c < PCOLS; c++) wt[p][r][c] = int'($urandom_range(0, 255));
    for (int p = 0; p < NP; p++) program_pe(p);
    for (int v = 0; v < 2; v++) begin
      for (int r = 0; r < PROWS; r++) x[r] = int'($urandom_range(0, 255));
      for (int g = 0; g < MUX; g++) run_all(g);
      for (int g = 0; g < MUX; g++) begin
        check_acc(g, 16'h5555, 9'h1ff);          // all nine PEs
        check_acc(g, 16'h0000, 9'h001);          // PE 1 only
        check_acc(g, 16'h2450, 9'h0f0);          // PEs 5..8
        check_acc(g, 16'h1555, 9'h0ff);          // PEs 1..8
      end
    end
    checks++;
    if (done_cnt != 2 * MUX) begin failures++; $display("pe_done count %0d", done_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
