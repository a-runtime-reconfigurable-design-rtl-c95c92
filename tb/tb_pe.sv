// tb_pe: programs random 8-bit weights into a reduced PE (2x2 subarrays of 16x16 cells, column
// mux 2, exact ADC), applies random 8-bit input vectors bit-serially and checks every weight
// column against the dot products computed directly, and the three-cycle result latency.
module tb_pe;
  import cim_pkg::*;
  localparam int R = 16, C = 16, CB = 4, MUX = 2, RSA = 2, CSA = 2;
  localparam int NADC = C / MUX, NW = NADC / 2, LANES = CSA * NW;
  localparam int BW = R * RSA, SLOTS = CB * CSA;
  localparam int PROWS = R * RSA, PCOLS = CSA * C / 2;

  logic clk = 0, rst_n = 0;
  logic [SLOTS-1:0] buf_wr_en = '0;
  logic [BW-1:0] buf_wr_data = '0;
  logic op_valid = 0;
  pe_op_e op = PE_NOP;
  logic [3:0] prog_row = '0;
  logic [2:0] bit_idx = '0;
  logic [0:0] col_grp = '0, rd_grp = '0;
  logic clear = 0, last = 0;
  logic [LANES-1:0][23:0] psum_out;
  logic psum_valid;
  int checks = 0, failures = 0;
  int wt [PROWS][PCOLS];
  int x [PROWS];

  pe #(.SA_ROWS(R), .SA_COLS(C), .CELL_BITS(CB), .ADC_BITS(8), .COL_MUX(MUX), .ADC_STEP(1),
       .ROW_SA(RSA), .COL_SA(CSA)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // level of the cell in subarray (i,j), row r, column col
  function automatic int cell_level(int i, int j, int r, int col);
    int g, k, wcol;
    g = col / NADC; k = col % NADC;
    wcol = j * (C / 2) + g * NW + k / 2;
    return (wt[i*R + r][wcol] >> (CB * (k % 2))) & 15;
  endfunction

  task automatic program_weights();
    for (int r = 0; r < R; r++) begin
      for (int j = 0; j < CSA; j++)
        for (int c = 0; c < CB; c++) begin
          logic [BW-1:0] word;
          for (int i = 0; i < RSA; i++)
            for (int col = 0; col < C; col++)
              word[i*C + col] = 1'((cell_level(i, j, r, col) >> c) & 1);
          buf_wr_en = SLOTS'(1) << (j*CB + c); buf_wr_data = word;
          @(negedge clk);
        end
      buf_wr_en = '0;
      op_valid = 1; op = PE_PROGRAM; prog_row = 4'(r);
      @(negedge clk);
      op_valid = 0; op = PE_NOP;
    end
  endtask

  task automatic run_group(int g);
    int t_last, lat;
    for (int b = 0; b < 8; b++) begin
      logic [BW-1:0] plane;
      for (int r = 0; r < PROWS; r++) plane[r] = 1'((x[r] >> b) & 1);
      buf_wr_en = SLOTS'(1); buf_wr_data = plane;
      @(negedge clk);
      buf_wr_en = '0;
      op_valid = 1; op = PE_MAC; bit_idx = 3'(b); col_grp = 1'(g); clear = (b == 0); last = (b == 7);
      @(negedge clk);
      op_valid = 0; op = PE_NOP; clear = 0; last = 0;
    end
    // the last MAC command was in the previous cycle; psum_valid is due 3 cycles after it
    lat = 1;
    while (!psum_valid && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("latency %0d, expected 3", lat); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < PROWS; r++)
        for (int c = 0; c < PCOLS; c++) wt[r][c] = (pass == 0 && r == 0) ? 255 : int'($urandom_range(0, 255));
      program_weights();
      for (int v = 0; v < 3; v++) begin
        for (int r = 0; r < PROWS; r++) x[r] = (v == 0) ? 255 : int'($urandom_range(0, 255));
        for (int g = 0; g < MUX; g++) run_group(g);
        for (int g = 0; g < MUX; g++) begin
          rd_grp = 1'(g); #1;
          for (int j = 0; j < CSA; j++)
            for (int w = 0; w < NW; w++) begin
              int e, wc;
              wc = j * (C / 2) + g * NW + w;
              e = 0;
              for (int r = 0; r < PROWS; r++) e += x[r] * wt[r][wc];
              checks++;
              if (int'(psum_out[j*NW + w]) != e) begin
                failures++;
                $display("pass %0d v %0d col %0d: got %0d exp %0d", pass, v, wc, psum_out[j*NW+w], e);
              end
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
