// xy_routing: XY routing function of the switch control.
//
// Router and destination addresses are ADDR_W bits: the upper half is the X
// coordinate, the lower half the Y coordinate. The packet first travels
// along X (East when the destination X is larger, West when smaller), then
// along Y (North when larger, South when smaller), and leaves on the Local
// port at its destination. The output is the 3-bit port code East 0,
// West 1, North 2, South 3, Local 4. XY routing is the router's stated
// algorithm; the address layout and which way East and North point are
// this implementation's choice, the one used by the Hermes family.
//
// Purely combinational.
module xy_routing
  import babanoc_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic [ADDR_W-1:0] local_addr,
  input  logic [ADDR_W-1:0] dest_addr,
  output logic [PORT_W-1:0] port
);

  localparam int unsigned HW = ADDR_W / 2;

  logic [HW-1:0] lx, ly, dx, dy;

  assign lx = local_addr[ADDR_W-1 -: HW];
  assign ly = local_addr[HW-1:0];
  assign dx = dest_addr[ADDR_W-1 -: HW];
  assign dy = dest_addr[HW-1:0];

  always_comb begin
    if (dx > lx)      port = PORT_EAST;
    else if (dx < lx) port = PORT_WEST;
    else if (dy > ly) port = PORT_NORTH;
    else if (dy < ly) port = PORT_SOUTH;
    else              port = PORT_LOCAL;
  end

endmodule
