// crossbar: binds output ports to input ports and moves packet flits.
//
// Each output port o has a CTRL channel from the switch control whose
// pending value is the input port currently bound to o. The crossbar's CTRL
// logic decodes these five bindings into a select for each input's DEMUX
// (which output its flits go to) and for each output's MERGE (which input it
// takes flits from). Flits are passed combinationally from the bound input
// to the output, without the EOP bit. When a flit with EOP = 1 is accepted
// by the output, the crossbar acknowledges that output's CTRL channel,
// which frees the output for the next binding in its queue. Bindings for
// different outputs are independent, so up to five packets cross at once.
//
// The DEMUX/CTRL/MERGE organisation and the release on EOP follow the router
// description. Making the whole path combinational (no flit storage in the
// crossbar), and allowing a path from a port back to itself, are this
// implementation's choices.
//
// Interface: in_* are the DATA + EOP channels (EOP in bit FLIT_W) from the
// five IN CTRL blocks; ctrl_* the CTRL channels; out_* the router outputs.
// An input bound to no output is held (in_ready low). The switch control
// never binds one input to two outputs at once; an assertion checks this.
module crossbar
  import babanoc_pkg::*;
#(
  parameter int unsigned FLIT_W = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              in_valid,
  output logic [NPORTS-1:0]              in_ready,
  input  logic [NPORTS-1:0][FLIT_W:0]    in_data,
  input  logic [NPORTS-1:0]              ctrl_valid,
  output logic [NPORTS-1:0]              ctrl_ready,
  input  logic [NPORTS-1:0][PORT_W-1:0]  ctrl_port,
  output logic [NPORTS-1:0]              out_valid,
  input  logic [NPORTS-1:0]              out_ready,
  output logic [NPORTS-1:0][FLIT_W-1:0]  out_data
);

  // bound[i][o]: input i is bound to output o (crossbar CTRL block).
  logic [NPORTS-1:0][NPORTS-1:0] bound;

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++)
        bound[i][o] = ctrl_valid[o] && (ctrl_port[o] == PORT_W'(i));
  end

  // MERGE per output: take the flit of the bound input.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o]  = 1'b0;
      out_data[o]   = '0;
      ctrl_ready[o] = 1'b0;
      for (int i = 0; i < NPORTS; i++) begin
        if (bound[i][o]) begin
          out_valid[o]  = in_valid[i];
          out_data[o]   = in_data[i][FLIT_W-1:0];
          ctrl_ready[o] = in_valid[i] && out_ready[o] && in_data[i][FLIT_W];
        end
      end
    end
  end

  // DEMUX per input: acknowledged by the output it is bound to.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      in_ready[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (bound[i][o]) in_ready[i] = out_ready[o];
    end
  end

  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    a_single_binding: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bound[i]));
  end

endmodule
