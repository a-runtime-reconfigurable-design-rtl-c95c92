// pooling_unit: max or average pooling over a window of consecutive vectors.
//
// The host streams the 2^win_log2 activation vectors of one pooling window (for example the
// four positions of a 2x2 window) with in_valid; each lane keeps the running maximum or sum.
// On the last vector of the window the result (the maximum, or the sum shifted right by
// win_log2, i.e. the floor of the mean) is registered to out_data with out_valid for one cycle,
// and the unit starts a new window. win_log2 = 0 passes vectors through unpooled.
// Timing: out_valid follows the last input vector by one cycle.
// Support of max and average pooling follows the documented design; streaming by window and
// power-of-two windows are this design's choices.
module pooling_unit #(
  parameter int unsigned LANES   = 32,
  parameter int unsigned W       = cim_pkg::ACT_W,
  parameter int unsigned MAX_LOG = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  cim_pkg::pool_mode_e             mode,
  input  logic [$clog2(MAX_LOG+1)-1:0]    win_log2,
  input  logic                            in_valid,
  input  logic [LANES-1:0][W-1:0]         in_data,
  output logic                            out_valid,
  output logic [LANES-1:0][W-1:0]         out_data
);
  localparam int unsigned SUM_W = W + MAX_LOG;

  logic [MAX_LOG:0]                 cnt;
  logic [LANES-1:0][SUM_W-1:0]      acc;
  logic                             first, last_in;

  assign first   = (cnt == '0);
  assign last_in = (32'(cnt) + 1 == (32'(1) << win_log2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int l = 0; l < LANES; l++) begin
          logic [SUM_W-1:0] nxt;
          if (first)                              nxt = SUM_W'(in_data[l]);
          else if (mode == cim_pkg::POOL_MAX)     nxt = (SUM_W'(in_data[l]) > acc[l]) ? SUM_W'(in_data[l]) : acc[l];
          else                                    nxt = acc[l] + SUM_W'(in_data[l]);
          acc[l] <= nxt;
          if (last_in)
            out_data[l] <= (mode == cim_pkg::POOL_MAX) ? W'(nxt) : W'(nxt >> win_log2);
        end
        if (last_in) begin
          out_valid <= 1'b1;
          cnt       <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
