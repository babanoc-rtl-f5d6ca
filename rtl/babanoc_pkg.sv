// babanoc_pkg: constants and types shared by the router blocks.
//
// The router has five ports, numbered as in the Hermes family: East 0,
// West 1, North 2, South 3 and Local 4 (Local connects the attached IP
// core). Port identifiers travel on 3-bit channels between the switch
// control and the crossbar.
package babanoc_pkg;

  localparam int unsigned NPORTS = 5;
  localparam int unsigned PORT_W = 3;

  typedef enum logic [PORT_W-1:0] {
    PORT_EAST  = 3'd0,
    PORT_WEST  = 3'd1,
    PORT_NORTH = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_LOCAL = 3'd4
  } port_e;

endpackage
