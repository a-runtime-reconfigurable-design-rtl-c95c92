// reconfig_adder_tree: adder tree in which every adder can be bypassed.
//
// Node n has two input demultiplexers and an output multiplexer controlled by bp_sel[2n] and
// bp_sel[2n+1]: with bp_sel[2n] = 1 the node outputs the sum of its two inputs; with bp_sel[2n] = 0
// it passes one input on, the upper one if bp_sel[2n+1] = 0 and the lower one if it is 1. When
// bypassed, the adder's inputs are held at zero, so it does not toggle. Any contiguous or
// scattered subset of inputs can thus be summed or routed to the output.
// Node numbering: a full binary tree over the first P inputs (P the largest power of two not
// above N_IN), numbered level by level from the inputs (nodes 0..P/2-1 take inputs 2n and 2n+1),
// then one node per remaining input, which adds the tree result (upper) and that input (lower).
// For N_IN = 9 this is the 8-node, 16-select tree of the tile accumulator: bp_sel = 0 selects
// input 0, and setting every even bit except the last (bp_sel[14] = 0, bp_sel[15] = 0) sums
// inputs 0..7. N_IN must be at least 2. Combinational, WIDTH-bit wrap-around adders.
// The node function and select coding follow the documented tile accumulator; the rule for
// input counts other than 9 is this design's choice.
module reconfig_adder_tree #(
  parameter int unsigned N_IN  = 9,
  parameter int unsigned WIDTH = 24,
  localparam int unsigned NODES = N_IN - 1
) (
  input  logic [N_IN-1:0][WIDTH-1:0]  in,
  input  logic [2*NODES-1:0]          bp_sel,
  output logic [WIDTH-1:0]            out
);
  localparam int unsigned P = cim_pkg::tree_pow2(N_IN);   // inputs of the full binary part

  logic [NODES-1:0][WIDTH-1:0] node_out;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    logic [WIDTH-1:0] up, lo, add_a, add_b;
    if (n < P / 2) begin : g_leaf
      assign up = in[2*n];
      assign lo = in[2*n + 1];
    end else if (n < P - 1) begin : g_inner
      assign up = node_out[2*(n - P/2)];
      assign lo = node_out[2*(n - P/2) + 1];
    end else begin : g_chain
      assign up = node_out[n - 1];
      assign lo = in[P + (n - (P - 1))];
    end
    always_comb begin
      // input demultiplexers: the adder sees data only when selected
      add_a = bp_sel[2*n] ? up : '0;
      add_b = bp_sel[2*n] ? lo : '0;
      // output multiplexer
      if (bp_sel[2*n])        node_out[n] = add_a + add_b;
      else if (bp_sel[2*n+1]) node_out[n] = lo;
      else                    node_out[n] = up;
    end
  end

  assign out = node_out[NODES-1];

endmodule
