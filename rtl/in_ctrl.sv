// in_ctrl: packet framing at one router input (IN CTRL).
//
// A packet is a header flit whose lower half holds the destination address,
// a size flit giving the number of payload flits, and that many payload
// flits (possibly none). in_ctrl watches the flits leaving the input FIFO:
//   * for a header it first sends the destination address to the switch
//     control on the address channel (FLIT_W/2 bits), and only after that
//     handshake offers the header flit itself to the crossbar;
//   * it forwards the size flit, loads the size into a register and clears
//     its payload counter;
//   * it forwards each payload flit, counting them.
// Every flit goes to the crossbar with an end-of-packet (EOP) bit in bit
// FLIT_W of the crossbar channel. EOP is set on the last payload flit, or on
// the size flit when the size is zero. All of this follows the router
// description; that the size counts payload flits only, and the EOP on a
// zero-size flit, are this implementation's reading of it.
//
// Interface: in_* from the input FIFO, addr_* to the switch control, xb_* to
// the crossbar. in_ctrl holds no flit of its own: the FIFO's head flit is
// taken (in_ready) when the crossbar accepts it, so flits pass through in
// the same cycle. A header costs one extra cycle, for the address transfer.
// Reset: synchronous, active-low; returns to waiting for a header.
module in_ctrl #(
  parameter int unsigned FLIT_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // flits from the input FIFO
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [FLIT_W-1:0]   in_data,
  // destination address to the switch control
  output logic                addr_valid,
  input  logic                addr_ready,
  output logic [FLIT_W/2-1:0] addr_data,
  // flit plus EOP (bit FLIT_W) to the crossbar
  output logic                xb_valid,
  input  logic                xb_ready,
  output logic [FLIT_W:0]     xb_data
);

  typedef enum logic [1:0] {
    S_ADDR,     // header at the FIFO head: send its address
    S_HEADER,   // address sent: forward the header flit
    S_SIZE,     // forward the size flit, load the size
    S_PAYLOAD   // forward payload flits until the last
  } state_e;

  state_e            state;
  logic [FLIT_W-1:0] size_q;
  logic [FLIT_W-1:0] count_q;
  logic              eop;
  logic              xb_fire;

  always_comb begin
    unique case (state)
      S_SIZE:    eop = (in_data == '0);
      S_PAYLOAD: eop = (count_q + 1'b1 == size_q);
      default:   eop = 1'b0;
    endcase
  end

  assign addr_valid = (state == S_ADDR) && in_valid;
  assign addr_data  = in_data[FLIT_W/2-1:0];
  assign xb_valid   = (state != S_ADDR) && in_valid;
  assign xb_data    = {eop, in_data};
  assign in_ready   = (state != S_ADDR) && xb_ready;
  assign xb_fire    = xb_valid && xb_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_ADDR;
      size_q  <= '0;
      count_q <= '0;
    end else begin
      unique case (state)
        S_ADDR:   if (addr_valid && addr_ready) state <= S_HEADER;
        S_HEADER: if (xb_fire) state <= S_SIZE;
        S_SIZE:
          if (xb_fire) begin
            size_q  <= in_data;
            count_q <= '0;
            state   <= eop ? S_ADDR : S_PAYLOAD;
          end
        S_PAYLOAD:
          if (xb_fire) begin
            count_q <= count_q + 1'b1;
            if (eop) state <= S_ADDR;
          end
        default: state <= S_ADDR;
      endcase
    end
  end

  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    addr_valid && !addr_ready |=> addr_valid && $stable(addr_data));

endmodule
