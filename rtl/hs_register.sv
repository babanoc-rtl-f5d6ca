// hs_register: one-place handshake register.
//
// The basic storage element of the router. It repeats a two-step loop:
// take a word from the input channel into its storage, then hand that word
// to the output channel. While it holds a word it accepts no new one, so in
// a chain of these registers a word moves one place per cycle and the chain
// passes one word every two cycles. The sequential accept-then-emit
// behaviour follows the Balsa register the router is described with; the
// clocked valid/ready channels are this implementation's rendering of the
// asynchronous request/acknowledge channels.
//
// Interface: input channel i_valid/i_ready/i_data, output channel
// o_valid/o_ready/o_data. A transfer happens on a rising clock edge with
// valid and ready both high. i_ready depends only on the register state,
// never combinationally on o_ready.
// Reset: synchronous, active-low; empties the register.
module hs_register #(
  parameter int unsigned WIDTH = 16
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

  logic             full;
  logic [WIDTH-1:0] x;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= 1'b0;
      x    <= '0;
    end else if (!full) begin
      if (i_valid) begin
        full <= 1'b1;
        x    <= i_data;
      end
    end else if (o_ready) begin
      full <= 1'b0;
    end
  end

  assign i_ready = !full;
  assign o_valid = full;
  assign o_data  = x;

  // An offered word stays offered and unchanged until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    o_valid && !o_ready |=> o_valid && $stable(o_data));

endmodule
