// tb_pooling_unit: streams random windows of 1, 2, 4 and 16 vectors and checks max and
// average results and that out_valid follows the last vector of each window by one cycle.
module tb_pooling_unit;
  import cim_pkg::*;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  pool_mode_e mode = POOL_MAX;
  logic [2:0] win_log2 = '0;
  logic in_valid = 0;
  logic [L-1:0][7:0] in_data = '0;
  logic out_valid;
  logic [L-1:0][7:0] out_data;
  int checks = 0, failures = 0;

  pooling_unit #(.LANES(L), .W(8), .MAX_LOG(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 80; it++) begin
      int lg, n, mx [L], sm [L];
      lg = (it % 4 == 3) ? 4 : it % 4;
      n = 1 << lg;
      mode = (it % 2) ? POOL_AVG : POOL_MAX;
      win_log2 = 3'(lg);
      for (int l = 0; l < L; l++) begin mx[l] = 0; sm[l] = 0; end
      for (int k = 0; k < n; k++) begin
        in_valid = 1;
        for (int l = 0; l < L; l++) begin
          int v;
          v = int'($urandom_range(0, 255));
          in_data[l] = 8'(v);
          if (v > mx[l]) mx[l] = v;
          sm[l] += v;
        end
        @(negedge clk);
        checks++;
        if (out_valid != (k == n - 1)) begin failures++; $display("out_valid wrong it %0d k %0d", it, k); end
        if (k % 3 == 1) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 0;
      for (int l = 0; l < L; l++) begin
        int e;
        e = (mode == POOL_MAX) ? mx[l] : sm[l] / n;
        checks++;
        if (int'(out_data[l]) != e) begin
          failures++; $display("it %0d lane %0d got %0d exp %0d", it, l, out_data[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
