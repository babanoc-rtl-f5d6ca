// babarouter: five-port wormhole router of an asynchronous network-on-chip.
//
// Ports East 0, West 1, North 2, South 3 connect neighbouring routers of a
// 2-D mesh; Local 4 connects the IP core. Every input port has an input
// FIFO (hs_fifo, FIFO_DEPTH flits) followed by an IN CTRL block (in_ctrl)
// that frames packets. All IN CTRL blocks share one switch control, which
// arbitrates their address requests, routes them XY and queues, per output
// port, the input ports waiting for it. The crossbar binds each output to
// the input at the head of that queue and passes flits until the packet's
// EOP flit, then releases the output. Packets are wormhole-switched: a
// packet holds its output from the header to the last flit.
//
// The block structure, channel widths and packet format follow the router
// description, with its evaluated configuration as defaults (16-bit flits,
// 16-flit input buffers, 4-place port-select FIFOs). The router was designed
// as a clockless quasi-delay-insensitive circuit; here every handshake
// channel is a valid/ready channel on one clock (transfer on a rising edge
// with valid and ready high), which keeps the same order of events.
//
// PORTS says which ports exist (all five by default). Routers on the edge
// of a mesh have fewer; a missing input never accepts a flit, a missing
// output never offers one, and routing a packet to a missing output is a
// user error that an assertion reports.
//
// Packet format (FLIT_W = n bits per flit): header flit with the
// destination address in bits n/2-1:0 (upper half X, lower half Y), then a
// flit with the number of payload flits, then the payload flits.
// Reset: synchronous, active-low; the router is empty after reset.
module babarouter
  import babanoc_pkg::*;
#(
  parameter int unsigned FLIT_W          = 16,
  parameter int unsigned FIFO_DEPTH      = 16,
  parameter int unsigned CTRL_FIFO_DEPTH = 4,
  parameter logic [FLIT_W/2-1:0] ROUTER_ADDR = {(FLIT_W/4)'(1), (FLIT_W/4)'(1)},
  // ports this router has (bit p = port p); routers on the mesh border
  // leave out the ports that face outside
  parameter logic [NPORTS-1:0]   PORTS       = '1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              in_valid,
  output logic [NPORTS-1:0]              in_ready,
  input  logic [NPORTS-1:0][FLIT_W-1:0]  in_data,
  output logic [NPORTS-1:0]              out_valid,
  input  logic [NPORTS-1:0]              out_ready,
  output logic [NPORTS-1:0][FLIT_W-1:0]  out_data
);

  localparam int unsigned ADDR_W = FLIT_W / 2;

  // input FIFO -> IN CTRL
  logic [NPORTS-1:0]              f_valid, f_ready;
  logic [NPORTS-1:0][FLIT_W-1:0]  f_data;
  // IN CTRL -> switch control (ADDRESS)
  logic [NPORTS-1:0]              a_valid, a_ready;
  logic [NPORTS-1:0][ADDR_W-1:0]  a_data;
  // IN CTRL -> crossbar (DATA + EOP)
  logic [NPORTS-1:0]              x_valid, x_ready;
  logic [NPORTS-1:0][FLIT_W:0]    x_data;
  // switch control -> crossbar (CTRL)
  logic [NPORTS-1:0]              c_valid, c_ready;
  logic [NPORTS-1:0][PORT_W-1:0]  c_port;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    if (PORTS[p]) begin : g_port
      hs_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst_n,
        .i_valid(in_valid[p]), .i_ready(in_ready[p]), .i_data(in_data[p]),
        .o_valid(f_valid[p]),  .o_ready(f_ready[p]),  .o_data(f_data[p])
      );

      in_ctrl #(.FLIT_W(FLIT_W)) u_in_ctrl (
        .clk, .rst_n,
        .in_valid  (f_valid[p]), .in_ready  (f_ready[p]), .in_data  (f_data[p]),
        .addr_valid(a_valid[p]), .addr_ready(a_ready[p]), .addr_data(a_data[p]),
        .xb_valid  (x_valid[p]), .xb_ready  (x_ready[p]), .xb_data  (x_data[p])
      );
    end else begin : g_absent
      // no buffer: the input never accepts and never requests
      assign in_ready[p] = 1'b0;
      assign f_valid[p]  = 1'b0;
      assign f_ready[p]  = 1'b0;
      assign f_data[p]   = '0;
      assign a_valid[p]  = 1'b0;
      assign a_data[p]   = '0;
      assign x_valid[p]  = 1'b0;
      assign x_data[p]   = '0;
    end
  end

  switch_control #(
    .ADDR_W(ADDR_W), .CTRL_FIFO_DEPTH(CTRL_FIFO_DEPTH), .ROUTER_ADDR(ROUTER_ADDR)
  ) u_switch_control (
    .clk, .rst_n,
    .req_valid(a_valid), .req_ready(a_ready), .req_addr(a_data),
    .ctrl_valid(c_valid), .ctrl_ready(c_ready), .ctrl_port(c_port)
  );

  // an absent output never offers and never accepts a flit
  logic [NPORTS-1:0] xo_valid;
  assign out_valid = xo_valid & PORTS;

  crossbar #(.FLIT_W(FLIT_W)) u_crossbar (
    .clk, .rst_n,
    .in_valid(x_valid), .in_ready(x_ready), .in_data(x_data),
    .ctrl_valid(c_valid), .ctrl_ready(c_ready), .ctrl_port(c_port),
    .out_valid(xo_valid), .out_ready(out_ready & PORTS), .out_data
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    // a packet addressed beyond the mesh border would wait here forever
    if (!PORTS[p]) begin : g_absent
      a_no_route_out: assert property (@(posedge clk) disable iff (!rst_n) !c_valid[p]);
    end
    a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[p] && !out_ready[p] |=> out_valid[p] && $stable(out_data[p]));
  end

endmodule
