// tb_reconfig_adder_tree: checks the 9-input tile tree with the three select patterns
// documented for it (don't-care bits randomised), then random selects on the 9-input and
// 7-input trees against a node-by-node reference.
module tb_reconfig_adder_tree;
  localparam int W = 16;
  logic [8:0][W-1:0] in9;
  logic [15:0]       sel9;
  logic [W-1:0]      out9;
  logic [6:0][W-1:0] in7;
  logic [11:0]       sel7;
  logic [W-1:0]      out7;
  int checks = 0, failures = 0;

  reconfig_adder_tree #(.N_IN(9), .WIDTH(W)) dut9 (.in(in9), .bp_sel(sel9), .out(out9));
  reconfig_adder_tree #(.N_IN(7), .WIDTH(W)) dut7 (.in(in7), .bp_sel(sel7), .out(out7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pattern written left to right as bp_sel[0:15]; 'x' becomes a random bit
  function automatic logic [15:0] pat(string s);
    logic [15:0] v;
    for (int i = 0; i < 16; i++)
      v[i] = (s[i] == "x") ? 1'($urandom) : (s[i] == "1");
    return v;
  endfunction

  function automatic int node(int a, int b, logic add, logic low);
    return add ? a + b : (low ? b : a);
  endfunction

  // reference: nodes written out level by level
  function automatic int ref9(logic [8:0][W-1:0] x, logic [15:0] s);
    int n [8];
    for (int i = 0; i < 4; i++) n[i] = node(int'(x[2*i]), int'(x[2*i+1]), s[2*i], s[2*i+1]);
    n[4] = node(n[0], n[1], s[8], s[9]);
    n[5] = node(n[2], n[3], s[10], s[11]);
    n[6] = node(n[4], n[5], s[12], s[13]);
    n[7] = node(n[6], int'(x[8]), s[14], s[15]);
    return n[7] % (1 << W);
  endfunction

  function automatic int ref7(logic [6:0][W-1:0] x, logic [11:0] s);
    int n [6];
    n[0] = node(int'(x[0]), int'(x[1]), s[0], s[1]);
    n[1] = node(int'(x[2]), int'(x[3]), s[2], s[3]);
    n[2] = node(n[0], n[1], s[4], s[5]);
    n[3] = node(n[2], int'(x[4]), s[6], s[7]);
    n[4] = node(n[3], int'(x[5]), s[8], s[9]);
    n[5] = node(n[4], int'(x[6]), s[10], s[11]);
    return n[5] % (1 << W);
  endfunction

  initial begin
    for (int t = 0; t < 50; t++) begin
      int e;
      for (int i = 0; i < 9; i++) in9[i] = W'($urandom_range(0, 4000));
      // example 1: output = input 1
      sel9 = pat("00xxxxxx00xx0000"); #1;
      checks++; if (out9 != in9[0]) failures++;
      // example 2: output = inputs 1..8
      sel9 = pat("1x1x1x1x1x1x1x00"); #1;
      e = 0; for (int i = 0; i < 8; i++) e += int'(in9[i]);
      checks++; if (int'(out9) != e % (1 << W)) failures++;
      // example 3: output = inputs 5..8
      sel9 = pat("xxxx1x1xxx1x0100"); #1;
      e = 0; for (int i = 4; i < 8; i++) e += int'(in9[i]);
      checks++; if (int'(out9) != e % (1 << W)) begin
        failures++; $display("example 3: got %0d exp %0d", out9, e);
      end
      // all nine
      sel9 = 16'h5555; #1;
      e = 0; for (int i = 0; i < 9; i++) e += int'(in9[i]);
      checks++; if (int'(out9) != e % (1 << W)) failures++;
    end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 9; i++) in9[i] = W'($urandom);
      for (int i = 0; i < 7; i++) in7[i] = W'($urandom);
      sel9 = 16'($urandom); sel7 = 12'($urandom); #1;
      checks++; if (int'(out9) != ref9(in9, sel9)) failures++;
      checks++; if (int'(out7) != ref7(in7, sel7)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
