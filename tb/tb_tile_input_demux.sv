// tb_tile_input_demux: sends random words with random cell-bit addresses and destination
// masks and checks every PE slot enable and PE data bus.
module tb_tile_input_demux;
  localparam int BW = 32, CB = 4, CS = 4, NP = 9;
  localparam int SL = CB * CS;
  logic valid;
  logic [BW-1:0] data;
  logic [1:0] addr;
  logic [CS*NP-1:0] sel;
  logic [NP-1:0][SL-1:0] pe_wr_en;
  logic [NP-1:0][BW-1:0] pe_wr_data;
  int checks = 0, failures = 0;

  tile_input_demux #(.BUS_W(BW), .CELL_BITS(CB), .COL_SA(CS), .N_PE(NP)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      valid = (t % 7) != 3;
      data  = $urandom;
      addr  = 2'($urandom);
      sel   = (t < 36) ? (36'(1) << t) : {4'($urandom), $urandom};
      #1;
      for (int p = 0; p < NP; p++) begin
        logic any;
        any = 0;
        for (int j = 0; j < CS; j++) begin
          any |= sel[p*CS + j];
          for (int c = 0; c < CB; c++) begin
            checks++;
            if (pe_wr_en[p][j*CB + c] != (valid && sel[p*CS + j] && c == int'(addr))) begin
              failures++;
              $display("en mismatch t=%0d p=%0d j=%0d c=%0d", t, p, j, c);
            end
          end
        end
        if (any && valid) begin
          checks++;
          if (pe_wr_data[p] != data) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
