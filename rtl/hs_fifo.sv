// hs_fifo: handshake FIFO built from a chain of one-place registers.
//
// DEPTH hs_register stages are connected in series, each stage handing its
// word to the next over a valid/ready channel, so words ripple from the
// input to the output with no central control. This is the router's input
// buffer (one per port) and, at width 3 and depth 4, the port-select queue
// the switch control keeps for each output port. The structure (a series
// of registers, width and depth as parameters, one register when DEPTH is
// 1) follows the router description; the clocked channels are this
// implementation's rendering of the asynchronous ones.
//
// Interface: input channel i_*, output channel o_*. Latency from an empty
// FIFO: a word accepted on one edge is offered at the output DEPTH-1 edges
// later. Throughput: one word every two cycles.
// Reset: synchronous, active-low; empties every stage.
module hs_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             i_valid,
  output logic             i_ready,
  input  logic [WIDTH-1:0] i_data,
  output logic             o_valid,
  input  logic             o_ready,
  output logic [WIDTH-1:0] o_data
);

  if (DEPTH < 1) begin : g_bad_depth
    $error("hs_fifo: zero length fifo specified");
  end

  // Channel c[k] enters stage k; c[DEPTH] is the FIFO output.
  logic [DEPTH:0]            c_valid;
  logic [DEPTH:0]            c_ready;
  logic [DEPTH:0][WIDTH-1:0] c_data;

  assign c_valid[0] = i_valid;
  assign c_data[0]  = i_data;
  assign i_ready    = c_ready[0];

  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    hs_register #(.WIDTH(WIDTH)) u_reg (
      .clk    (clk),
      .rst_n  (rst_n),
      .i_valid(c_valid[k]),
      .i_ready(c_ready[k]),
      .i_data (c_data[k]),
      .o_valid(c_valid[k+1]),
      .o_ready(c_ready[k+1]),
      .o_data (c_data[k+1])
    );
  end

  assign o_valid        = c_valid[DEPTH];
  assign o_data         = c_data[DEPTH];
  assign c_ready[DEPTH] = o_ready;

endmodule
