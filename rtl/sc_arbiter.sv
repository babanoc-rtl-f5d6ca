// sc_arbiter: arbitration stage of the switch control.
//
// All five input ports share one switch control, so their address requests
// must be serialised. The arbiter grants one pending request at a time and
// stores the choice (requesting port id and destination address, the
// (n/2)+3-bit CHOICE channel) in a one-place register; the granted request
// is acknowledged in the same cycle. The router description uses a
// first-come arbitration construct; in this clocked implementation requests
// can arrive in the same cycle, so ties are broken by a rotating priority
// that starts just after the port granted last.
//
// Interface: req_valid/req_ready/req_addr, one channel per input port;
// ch_valid/ch_ready/ch_port/ch_addr, the CHOICE channel. A new grant is
// made only while the CHOICE register is empty, so at most one request is
// granted every two cycles.
// Reset: synchronous, active-low; CHOICE register empty, priority at port 0.
module sc_arbiter
  import babanoc_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              req_valid,
  output logic [NPORTS-1:0]              req_ready,
  input  logic [NPORTS-1:0][ADDR_W-1:0]  req_addr,
  output logic                           ch_valid,
  input  logic                           ch_ready,
  output logic [PORT_W-1:0]              ch_port,
  output logic [ADDR_W-1:0]              ch_addr
);

  logic              full;
  logic [PORT_W-1:0] port_q;
  logic [ADDR_W-1:0] addr_q;
  logic [PORT_W-1:0] last_q;     // port granted last
  logic              grant;
  logic [PORT_W-1:0] win;

  // Rotating priority: search from the port after last_q.
  always_comb begin
    grant = 1'b0;
    win   = '0;
    for (int k = 1; k <= NPORTS; k++) begin
      logic [PORT_W-1:0] p;
      p = PORT_W'((int'(last_q) + k) % NPORTS);
      if (!grant && req_valid[p]) begin
        grant = 1'b1;
        win   = p;
      end
    end
  end

  always_comb begin
    req_ready = '0;
    if (!full && grant) req_ready[win] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full   <= 1'b0;
      port_q <= '0;
      addr_q <= '0;
      last_q <= PORT_W'(NPORTS - 1);
    end else if (!full) begin
      if (grant) begin
        full   <= 1'b1;
        port_q <= win;
        addr_q <= req_addr[win];
        last_q <= win;
      end
    end else if (ch_ready) begin
      full <= 1'b0;
    end
  end

  assign ch_valid = full;
  assign ch_port  = port_q;
  assign ch_addr  = addr_q;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_ready));

endmodule
