// tb_pe_input_buffer: writes random words into single and multiple slots and checks the
// buffer contents against a copy kept by the testbench.
module tb_pe_input_buffer;
  localparam int SW = 64, NS = 16;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] wr_en = '0;
  logic [SW-1:0] wr_data = '0;
  logic [NS*SW-1:0] data;
  logic [NS-1:0][SW-1:0] model;
  int checks = 0, failures = 0;

  pe_input_buffer #(.SLOT_W(SW), .SLOTS(NS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (data != '0) failures++;
    for (int t = 0; t < 200; t++) begin
      wr_en   = (t < 16) ? NS'(1) << t : NS'($urandom) & NS'($urandom);
      wr_data = {$urandom, $urandom};
      for (int s = 0; s < NS; s++) if (wr_en[s]) model[s] = wr_data;
      @(negedge clk);
      checks++;
      if (data != model) begin
        failures++;
        $display("mismatch at t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
