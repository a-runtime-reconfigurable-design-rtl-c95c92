// tb_global_buffer: random writes and reads on a 64-word buffer, checking data against a
// model, the one-cycle read latency and read-before-write on a same-address collision.
module tb_global_buffer;
  localparam int D = 64, W = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0;
  logic [W-1:0] rd_data;
  logic rd_valid;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  global_buffer #(.DEPTH(D), .WIDTH(W)) dut (.*);

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
    for (int a = 0; a < D; a++) begin
      wr_en = 1; wr_addr = 6'(a); wr_data = {$urandom, $urandom}; model[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int it = 0; it < 500; it++) begin
      logic [W-1:0] exp_d;
      rd_en = 1; rd_addr = 6'($urandom);
      wr_en = 1'($urandom); wr_addr = (it % 5 == 0) ? rd_addr : 6'($urandom); wr_data = {$urandom, $urandom};
      exp_d = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (!rd_valid || rd_data != exp_d) begin failures++; $display("read mismatch it %0d", it); end
      if (it % 4 == 0) begin
        @(negedge clk);
        checks++; if (rd_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
