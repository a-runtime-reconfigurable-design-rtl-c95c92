// pe_bus_select: the PE-level switch between the input bus and the weight bus.
//
// Inputs reach a subarray as read-select (RS) voltages and weights are programmed through the bit
// lines (BL), so the two cannot share wires. With weight_sel low the low IN_BUS_W bits of the PE
// buffer drive RS and BL is released (all zero); with weight_sel high the whole W_BUS_W-bit buffer
// drives BL and RS is held at zero. Purely combinational.
// Structure and bus widths follow the documented PE input bus (512-bit input bus, 8192-bit
// weight bus); driving the unselected bus to zero is this design's choice.
module pe_bus_select #(
  parameter int unsigned IN_BUS_W = cim_pkg::IN_BUS_W,
  parameter int unsigned W_BUS_W  = cim_pkg::W_BUS_W
) (
  input  logic                weight_sel,
  input  logic [W_BUS_W-1:0]  buf_data,
  output logic [IN_BUS_W-1:0] rs,
  output logic [W_BUS_W-1:0]  bl
);
  always_comb begin
    rs = '0;
    bl = '0;
    if (weight_sel) bl = buf_data;
    else            rs = buf_data[IN_BUS_W-1:0];
  end
endmodule
