// activation_unit: ReLU or sigmoid on a vector of accumulated sums.
//
// Each lane takes a signed IN_W-bit sum and first rescales it by an arithmetic right shift of
// shift bits, giving t. ReLU outputs max(0, t) saturated to OUT_W bits. Sigmoid reads t as a
// fixed-point number with 4 fraction bits and uses a piecewise-linear curve (four segments of
// slope 1/4, 1/8, 1/32 and 0 for |t| below 1, 2.375, 5 and above, mirrored for t < 0); in units
// of 1/256 the positive half is 4a+128, 2a+160, a/2+216 and 256 for a = |16t| in the four ranges.
// The result is clamped to 255 and then scaled to OUT_W bits. Combinational.
// Support of both ReLU and sigmoid follows the documented design; the rescaling, the
// number format and the sigmoid approximation are this design's choices.
module activation_unit #(
  parameter int unsigned LANES = 32,
  parameter int unsigned IN_W  = cim_pkg::GACC_W,
  parameter int unsigned OUT_W = cim_pkg::ACT_W
) (
  input  cim_pkg::act_mode_e                mode,
  input  logic [4:0]                        shift,
  input  logic [LANES-1:0][IN_W-1:0]        in,
  output logic [LANES-1:0][OUT_W-1:0]       out
);
  localparam int unsigned OUT_MAX = (1 << OUT_W) - 1;

  function automatic logic [8:0] sigmoid_pos(input logic [IN_W-1:0] a);
    // a = |t| in 1/16 units; result in 1/256 units, 128..256
    if (a >= IN_W'(80))      return 9'd256;
    else if (a >= IN_W'(38)) return 9'((32'(a) >> 1) + 216);
    else if (a >= IN_W'(16)) return 9'((32'(a) << 1) + 160);
    else                     return 9'((32'(a) << 2) + 128);
  endfunction

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [IN_W-1:0] t;
      logic        [IN_W-1:0] mag;
      logic        [8:0]      y;
      y   = '0;
      out[l] = '0;
      t   = $signed(in[l]) >>> shift;
      mag = t[IN_W-1] ? IN_W'(-t) : IN_W'(t);
      if (mode == cim_pkg::ACT_RELU) begin
        if (t[IN_W-1])                    out[l] = '0;
        else if (mag > IN_W'(OUT_MAX))    out[l] = OUT_W'(OUT_MAX);
        else                              out[l] = OUT_W'(mag);
      end else begin
        y = sigmoid_pos(mag);
        if (t[IN_W-1]) y = 9'd256 - y;
        if (y > 9'd255) y = 9'd255;
        out[l] = OUT_W'((32'(y) * OUT_MAX) / 255);
      end
    end
  end

endmodule
