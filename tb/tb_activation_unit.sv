// tb_activation_unit: ReLU with rescaling and saturation, and the sigmoid curve against a
// real-valued evaluation of the same piecewise-linear approximation (within one LSB).
module tb_activation_unit;
  import cim_pkg::*;
  localparam int L = 8, IW = 24, OW = 8;
  act_mode_e mode;
  logic [4:0] shift;
  logic [L-1:0][IW-1:0] in;
  logic [L-1:0][OW-1:0] out;
  int checks = 0, failures = 0;

  activation_unit #(.LANES(L), .IN_W(IW), .OUT_W(OW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real plan(real v);
    real a, y;
    a = (v < 0) ? -v : v;
    if (a >= 5.0)        y = 1.0;
    else if (a >= 2.375) y = 0.03125 * a + 0.84375;
    else if (a >= 1.0)   y = 0.125 * a + 0.625;
    else                 y = 0.25 * a + 0.5;
    return (v < 0) ? 1.0 - y : y;
  endfunction

  initial begin
    for (int it = 0; it < 200; it++) begin
      int v [L];
      mode  = ACT_RELU;
      shift = 5'(it % 6);
      for (int l = 0; l < L; l++) begin
        v[l] = $signed($urandom_range(0, 4000)) - 2000;
        in[l] = IW'(v[l]);
      end
      #1;
      for (int l = 0; l < L; l++) begin
        int t, e;
        t = v[l] >>> (it % 6);
        e = (t < 0) ? 0 : (t > 255 ? 255 : t);
        checks++;
        if (int'(out[l]) != e) begin
          failures++; $display("relu in %0d sh %0d got %0d exp %0d", v[l], it % 6, out[l], e);
        end
      end
      mode = ACT_SIGMOID;
      shift = 5'(it % 3);
      for (int l = 0; l < L; l++) begin
        v[l] = $signed($urandom_range(0, 400)) - 200;
        in[l] = IW'(v[l]);
      end
      #1;
      for (int l = 0; l < L; l++) begin
        int t, e, d;
        t = v[l] >>> (it % 3);
        e = int'($floor(plan(real'(t) / 16.0) * 256.0));
        if (e > 255) e = 255;
        d = int'(out[l]) - e;
        checks++;
        if (d > 1 || d < -1) begin
          failures++; $display("sigmoid t %0d got %0d exp %0d", t, out[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
