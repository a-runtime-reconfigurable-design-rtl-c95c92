// tb_pe_bus_select: checks that input mode drives only the read-select bus from the low buffer
// bits and weight mode drives only the bit-line bus from the whole buffer.
module tb_pe_bus_select;
  localparam int IW = 32, WW = 128;
  logic weight_sel;
  logic [WW-1:0] buf_data;
  logic [IW-1:0] rs;
  logic [WW-1:0] bl;
  int checks = 0, failures = 0;

  pe_bus_select #(.IN_BUS_W(IW), .W_BUS_W(WW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      buf_data   = {$urandom, $urandom, $urandom, $urandom};
      weight_sel = t[0];
      #1;
      checks++;
      if (weight_sel) begin
        if (bl != buf_data || rs != '0) failures++;
      end else begin
        if (rs != buf_data[IW-1:0] || bl != '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
