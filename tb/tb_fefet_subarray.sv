// tb_fefet_subarray: checks the subarray model's row programming, column sums, column
// multiplexing and ADC transfer curve on a 16x16 array with 2 column groups and ADC step 3.
// Expected codes are computed from an independent copy of the programmed levels.
module tb_fefet_subarray;
  localparam int ROWS = 16, COLS = 16, CB = 4, AB = 5, MUX = 2, STEP = 3;
  localparam int NADC = COLS / MUX;

  logic clk = 0;
  logic prog_en = 0, rd_en = 0;
  logic [$clog2(ROWS)-1:0] prog_row = '0;
  logic [CB-1:0][COLS-1:0] bl = '0;
  logic [ROWS-1:0] rs = '0;
  logic [0:0] col_sel = '0;
  logic [NADC-1:0][AB-1:0] adc_out;
  int checks = 0, failures = 0;
  int lv [ROWS][COLS];

  fefet_subarray #(.ROWS(ROWS), .COLS(COLS), .CELL_BITS(CB), .ADC_BITS(AB), .COL_MUX(MUX),
                   .ADC_STEP(STEP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        lv[r][c] = (r == 3) ? 15 : int'($urandom_range(0, 15));
        for (int b = 0; b < CB; b++) bl[b][c] = 1'((lv[r][c] >> b) & 1);
      end
      prog_en = 1; prog_row = 4'(r);
      @(negedge clk);
    end
    prog_en = 0;
    for (int t = 0; t < 40; t++) begin
      rs = (t == 0) ? '1 : 16'($urandom);
      for (int g = 0; g < MUX; g++) begin
        col_sel = 1'(g); rd_en = 1;
        @(negedge clk);
        rd_en = 0;
        for (int k = 0; k < NADC; k++) begin
          int s, e;
          s = 0;
          for (int r = 0; r < ROWS; r++) if (rs[r]) s += lv[r][g*NADC + k];
          e = s / STEP; if (e > 31) e = 31;
          checks++;
          if (int'(adc_out[k]) != e) begin
            failures++;
            $display("mismatch t=%0d g=%0d k=%0d got %0d exp %0d", t, g, k, adc_out[k], e);
          end
        end
      end
    end
    // an idle cycle must hold the last conversion
    begin
      logic [NADC-1:0][AB-1:0] held;
      held = adc_out; rs = ~rs; @(negedge clk);
      checks++; if (adc_out != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
