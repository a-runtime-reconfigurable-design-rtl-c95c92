// tb_shift_add: feeds random ADC codes bit-serially and checks the combined multi-bit
// input / multi-bit weight partial sums against sums computed directly.
module tb_shift_add;
  localparam int NADC = 8, AB = 5, IB = 8, CB = 4, CPW = 2;
  localparam int NW = NADC / CPW;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [2:0] bit_idx = '0;
  logic [NADC-1:0][AB-1:0] adc_in = '0;
  logic [NW-1:0][AB+IB+CB:0] psum;
  int checks = 0, failures = 0;
  longint exp_col [NADC];

  shift_add #(.N_ADC(NADC), .ADC_BITS(AB), .IN_BITS(IB), .CELL_BITS(CB), .CELLS_PER_W(CPW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int k = 0; k < NADC; k++) exp_col[k] = 0;
      for (int b = 0; b < IB; b++) begin
        en = 1; clear = (b == 0); bit_idx = 3'(b);
        for (int k = 0; k < NADC; k++) begin
          int v;
          v = (t == 0) ? 31 : int'($urandom_range(0, 31));
          adc_in[k] = AB'(v);
          exp_col[k] += longint'(v) * (longint'(1) << b);
        end
        @(negedge clk);
      end
      en = 0;
      // idle cycles keep the result
      adc_in = '1; @(negedge clk);
      for (int w = 0; w < NW; w++) begin
        longint e;
        e = exp_col[2*w] + exp_col[2*w+1] * 16;
        checks++;
        if (longint'(psum[w]) != e) begin
          failures++;
          $display("t=%0d w=%0d got %0d exp %0d", t, w, psum[w], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
