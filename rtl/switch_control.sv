// switch_control: the router's shared routing unit.
//
// Three stages, as one handshake pipeline:
//   1. sc_arbiter serialises the address requests of the five input ports
//      into the CHOICE register (port id + destination address);
//   2. xy_routing turns the chosen address into an output port code;
//   3. the input port id is written into the port-select FIFO of that
//      output (five FIFOs, 3 bits wide, CTRL_FIFO_DEPTH places each).
// The head of each port-select FIFO is the CTRL channel of that output to
// the crossbar: it names the input port the output is bound to. The
// crossbar acknowledges it only when the packet's last flit has passed, so
// later requests for the same output queue up behind it in arrival order,
// which gives every requester its turn. The structure and the FIFO size
// follow the router description; the clocked channels are this
// implementation's rendering of the asynchronous ones.
//
// Interface: req_*, the five address channels; ctrl_*, the five CTRL
// channels. ROUTER_ADDR is this router's own address.
// Timing: a request granted on one edge is routed from the CHOICE register
// and enters the port-select FIFO on the next edge; it reaches the FIFO head
// CTRL_FIFO_DEPTH-1 edges after that.
// Reset: synchronous, active-low; all queues empty.
module switch_control
  import babanoc_pkg::*;
#(
  parameter int unsigned    ADDR_W          = 8,
  parameter int unsigned    CTRL_FIFO_DEPTH = 4,
  parameter logic [ADDR_W-1:0] ROUTER_ADDR  = {(ADDR_W/2)'(1), (ADDR_W/2)'(1)}
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              req_valid,
  output logic [NPORTS-1:0]              req_ready,
  input  logic [NPORTS-1:0][ADDR_W-1:0]  req_addr,
  output logic [NPORTS-1:0]              ctrl_valid,
  input  logic [NPORTS-1:0]              ctrl_ready,
  output logic [NPORTS-1:0][PORT_W-1:0]  ctrl_port
);

  logic              ch_valid, ch_ready;
  logic [PORT_W-1:0] ch_port;
  logic [ADDR_W-1:0] ch_addr;
  logic [PORT_W-1:0] route;

  logic [NPORTS-1:0] ps_valid, ps_ready;

  sc_arbiter #(.ADDR_W(ADDR_W)) u_arb (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_addr,
    .ch_valid, .ch_ready, .ch_port, .ch_addr
  );

  xy_routing #(.ADDR_W(ADDR_W)) u_route (
    .local_addr(ROUTER_ADDR),
    .dest_addr (ch_addr),
    .port      (route)
  );

  always_comb begin
    ps_valid = '0;
    ps_valid[route] = ch_valid;
  end
  assign ch_ready = ps_ready[route];

  for (genvar o = 0; o < NPORTS; o++) begin : g_port_select
    hs_fifo #(.WIDTH(PORT_W), .DEPTH(CTRL_FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .i_valid(ps_valid[o]),
      .i_ready(ps_ready[o]),
      .i_data (ch_port),
      .o_valid(ctrl_valid[o]),
      .o_ready(ctrl_ready[o]),
      .o_data (ctrl_port[o])
    );
  end

endmodule
