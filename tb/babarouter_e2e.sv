// babarouter_e2e: end-to-end self-checking test of the router, for any
// flit width N of 8 or more and any input buffer depth.
//
// The router is at X = RX, Y = RY (upper and lower halves of its address).
//
// Phase 0 measures the header latency through the empty router (DEPTH + 5
// clock edges from input to output). Phase 1 sends random packets on all
// inputs at once: destinations in the 3x3 block of addresses around the
// router (so every output is used, and no packet leaves the mesh), payloads of 0 to 8 flits with
// some of 20 to 40 flits (longer than an input buffer), and random
// backpressure on the outputs. Phase 2, for a
// router with all five ports, sends one long packet from every input to a
// different output with all outputs ready, so five paths are open at once.
// For a border router (PORTS not all ones) only its own ports are driven.
//
// Every header carries its input port and a sequence number in its upper
// half. For every packet the testbench works out the output with its own
// XY model and keeps the packet in a queue per (input, output) pair; each
// output must deliver whole packets, unmixed, in order per pair. The
// testbench counts how often the router's mechanisms occur (arbitration
// between simultaneous requests, queued output requests, wormhole blocking,
// full input buffers, output backpressure, empty payloads, concurrent
// paths, use of every output) and fails a mechanism that never occurred.
// It also checks every cycle that no input port waits twice in the same
// output's request queue.
// Ends with a TB_RESULT line.
module babarouter_e2e #(
  parameter int unsigned N        = 16,  // flit width
  parameter int unsigned DEPTH    = 16,  // input buffer depth
  parameter bit          DEFAULTS = 1'b1, // instantiate the router with its own defaults
  parameter int unsigned RX       = 1,   // router X coordinate
  parameter int unsigned RY       = 1,   // router Y coordinate
  parameter logic [4:0]  PORTS    = '1   // ports the router has
);
  import babanoc_pkg::*;
  localparam int unsigned A = N / 2;     // address width
  localparam int unsigned H = N / 4;     // coordinate width
  localparam logic [A-1:0] RA = {H'(RX), H'(RY)};
  localparam bit ALL = (PORTS == 5'b11111);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0]        in_valid = '0, in_ready;
  logic [NPORTS-1:0][N-1:0] in_data = '0;
  logic [NPORTS-1:0]        out_valid, out_ready = '0;
  logic [NPORTS-1:0][N-1:0] out_data;

  if (DEFAULTS) begin : g_dut
    babarouter dut (.*);
  end else begin : g_dut
    babarouter #(.FLIT_W(N), .FIFO_DEPTH(DEPTH), .ROUTER_ADDR(RA), .PORTS(PORTS)) dut (.*);
  end

  int checks = 0, failures = 0;
  logic [N-1:0] sq[NPORTS][$];                 // flits each input still sends
  logic [N-1:0] exf[NPORTS][NPORTS][$];        // expected flits per (input, output)
  int           exl[NPORTS][NPORTS][$];        // expected packet lengths
  int           rx_rem[NPORTS], rx_src[NPORTS];
  logic [NPORTS-1:0] in_fired = '0;
  bit           rnd_ready = 1'b1;
  int           seq[NPORTS];
  int           sent_pkts = 0, rcvd_pkts = 0;

  // mechanism counters
  int m_arb = 0, m_queue = 0, m_block = 0, m_in_full = 0, m_out_stall = 0;
  int m_empty = 0, m_conc2 = 0, m_conc5 = 0, m_choice_wait = 0;
  int m_out_used[NPORTS];

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [A-1:0] addr(input int x, input int y);
    return {H'(x), H'(y)};
  endfunction

  function automatic int xy(input logic [A-1:0] d);
    int lx = int'(RA[A-1 -: H]), ly = int'(RA[H-1:0]), dx = int'(d[A-1 -: H]), dy = int'(d[H-1:0]);
    if (dx > lx) return 0;
    if (dx < lx) return 1;
    if (dy > ly) return 2;
    if (dy < ly) return 3;
    return 4;
  endfunction

  task automatic send(input int i, input logic [A-1:0] dest, input int size);
    int o;
    logic [N-1:0] f;
    o = xy(dest);
    f = {3'(i), (A-3)'(seq[i]), dest};
    seq[i]++;
    sq[i].push_back(f); exf[i][o].push_back(f);
    sq[i].push_back(N'(size)); exf[i][o].push_back(N'(size));
    for (int k = 0; k < size; k++) begin
      f = N'($urandom);
      sq[i].push_back(f); exf[i][o].push_back(f);
    end
    exl[i][o].push_back(size + 2);
    sent_pkts++;
  endtask

  function automatic int qdepth(input logic [3:0] v);
    return $countones(v);
  endfunction

  function automatic bit distinct(input logic [3:0] v, input logic [3:0][2:0] d);
    for (int a = 0; a < 4; a++)
      for (int b = a + 1; b < 4; b++)
        if (v[a] && v[b] && d[a] == d[b]) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int nf;
    in_fired = in_valid & in_ready;
    // mechanisms
    if ($countones(g_dut.dut.a_valid) >= 2) m_arb++;
    if (qdepth(g_dut.dut.u_switch_control.g_port_select[0].u_fifo.c_valid[4:1]) >= 2 ||
        qdepth(g_dut.dut.u_switch_control.g_port_select[1].u_fifo.c_valid[4:1]) >= 2 ||
        qdepth(g_dut.dut.u_switch_control.g_port_select[2].u_fifo.c_valid[4:1]) >= 2 ||
        qdepth(g_dut.dut.u_switch_control.g_port_select[3].u_fifo.c_valid[4:1]) >= 2 ||
        qdepth(g_dut.dut.u_switch_control.g_port_select[4].u_fifo.c_valid[4:1]) >= 2) m_queue++;
    // an input port never waits twice in the same output's queue
    check(distinct(g_dut.dut.u_switch_control.g_port_select[0].u_fifo.c_valid[4:1],
                   g_dut.dut.u_switch_control.g_port_select[0].u_fifo.c_data[4:1]) &&
          distinct(g_dut.dut.u_switch_control.g_port_select[1].u_fifo.c_valid[4:1],
                   g_dut.dut.u_switch_control.g_port_select[1].u_fifo.c_data[4:1]) &&
          distinct(g_dut.dut.u_switch_control.g_port_select[2].u_fifo.c_valid[4:1],
                   g_dut.dut.u_switch_control.g_port_select[2].u_fifo.c_data[4:1]) &&
          distinct(g_dut.dut.u_switch_control.g_port_select[3].u_fifo.c_valid[4:1],
                   g_dut.dut.u_switch_control.g_port_select[3].u_fifo.c_data[4:1]) &&
          distinct(g_dut.dut.u_switch_control.g_port_select[4].u_fifo.c_valid[4:1],
                   g_dut.dut.u_switch_control.g_port_select[4].u_fifo.c_data[4:1]),
          "an input port queued twice for one output");
    if ((g_dut.dut.x_valid & ~g_dut.dut.x_ready) != '0) m_block++;
    if ((in_valid & ~in_ready) != '0) m_in_full++;
    if ((out_valid & ~out_ready) != '0) m_out_stall++;
    if (g_dut.dut.u_switch_control.ch_valid && !g_dut.dut.u_switch_control.ch_ready) m_choice_wait++;
    nf = $countones(out_valid & out_ready);
    if (nf >= 2) m_conc2++;
    if (nf == 5) m_conc5++;
    // outputs
    for (int o = 0; o < NPORTS; o++)
      if (out_valid[o] && out_ready[o]) begin
        if (rx_rem[o] == 0) begin
          // header: identify the packet from its input port field
          int s;
          s = int'(out_data[o][N-1 -: 3]);
          check(s < NPORTS && exl[s][o].size() != 0,
                $sformatf("output %0d: unexpected header %h", o, out_data[o]));
          if (s < NPORTS && exl[s][o].size() != 0) begin
            rx_src[o] = s;
            rx_rem[o] = exl[s][o].pop_front();
            m_out_used[o]++;
          end else begin
            rx_src[o] = -1;
            rx_rem[o] = 0;
          end
        end
        if (rx_src[o] >= 0 && rx_rem[o] > 0) begin
          int s;
          s = rx_src[o];
          check(exf[s][o].size() != 0 && exf[s][o][0] == out_data[o],
                $sformatf("output %0d from %0d: flit %h expected %h", o, s, out_data[o],
                          exf[s][o].size() ? exf[s][o][0] : '0));
          if (exf[s][o].size() != 0) begin
            void'(exf[s][o].pop_front());
          end
          rx_rem[o]--;
          if (rx_rem[o] == 0) rcvd_pkts++;
        end
      end
    for (int i = 0; i < NPORTS; i++)
      if (in_fired[i]) void'(sq[i].pop_front());
  end

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NPORTS; i++)
      if (!in_valid[i] || in_fired[i]) begin
        in_valid[i] = sq[i].size() != 0 && $urandom_range(7) != 0;
        in_data[i]  = sq[i].size() != 0 ? sq[i][0] : '0;
      end
    for (int o = 0; o < NPORTS; o++)
      out_ready[o] = rnd_ready ? ($urandom_range(4) != 0) : 1'b1;
  end

  // payloads of size zero, counted as they are sent
  task automatic send_random(input int i);
    int size;
    logic [A-1:0] dest;
    // a destination in the 3x3 block around the router whose output exists
    do dest = addr((RX > 0 ? RX - 1 : 0) + $urandom_range(RX > 0 ? 2 : 1),
                   (RY > 0 ? RY - 1 : 0) + $urandom_range(RY > 0 ? 2 : 1));
    while (!PORTS[xy(dest)]);
    case ($urandom_range(9))
      0:       size = 0;
      1:       size = $urandom_range(40, 20);
      default: size = $urandom_range(8, 1);
    endcase
    if (size == 0) m_empty++;
    send(i, dest, size);
  endtask

  task automatic wait_drained();
    bit busy;
    do begin
      @(negedge clk);
      busy = 1'b0;
      for (int i = 0; i < NPORTS; i++) begin
        if (sq[i].size() != 0) busy = 1'b1;
        for (int o = 0; o < NPORTS; o++) if (exl[i][o].size() != 0) busy = 1'b1;
      end
      for (int o = 0; o < NPORTS; o++) if (rx_rem[o] != 0) busy = 1'b1;
    end while (busy);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 0: header latency through the empty router, Local to Local.
    // Input buffer DEPTH-1 edges, grant 1, routing into the port-select
    // FIFO 1, through that FIFO 3, transfer 1: DEPTH+5 edges in all.
    rnd_ready = 1'b0;
    @(negedge clk);
    send(4, RA, 0);
    begin
      int t;
      do @(posedge clk); while (!(in_valid[4] && in_ready[4]));
      t = 0;
      @(negedge clk);
      while (!out_valid[4]) begin t++; @(negedge clk); end
      check(t + 1 == int'(DEPTH) + 5, $sformatf("header latency %0d edges, expected %0d", t + 1, DEPTH + 5));
      $display("header latency %0d clock edges", t + 1);
    end
    wait_drained();
    rnd_ready = 1'b1;
    // phase 1: random traffic on all inputs
    for (int k = 0; k < 200; k++)
      for (int i = 0; i < NPORTS; i++) if (PORTS[i]) send_random(i);
    wait_drained();
    // phase 2: a permutation, one long packet per input to a different output
    // (only when the router has all five ports)
    if (ALL) begin
      rnd_ready = 1'b0;
      send(0, addr(RX - 1, RY), 60);   // East  -> West
      send(1, addr(RX + 1, RY), 60);   // West  -> East
      send(2, addr(RX, RY - 1), 60);   // North -> South
      send(3, addr(RX, RY + 1), 60);   // South -> North
      send(4, RA, 60);                 // Local -> Local
      wait_drained();
    end
    repeat (10) @(negedge clk);
    check(rcvd_pkts == sent_pkts, $sformatf("received %0d of %0d packets", rcvd_pkts, sent_pkts));
    $display("packets %0d", rcvd_pkts);
    $display("mechanisms: arbitration %0d, queued requests %0d, wormhole blocking %0d, input buffer full %0d",
             m_arb, m_queue, m_block, m_in_full);
    $display("            output backpressure %0d, empty payloads %0d, >=2 paths %0d, 5 paths %0d, choice waiting %0d",
             m_out_stall, m_empty, m_conc2, m_conc5, m_choice_wait);
    $display("            headers per output: %0d %0d %0d %0d %0d",
             m_out_used[0], m_out_used[1], m_out_used[2], m_out_used[3], m_out_used[4]);
    check(m_arb > 0, "no simultaneous address requests");
    check(m_queue > 0, "no output request queued behind another");
    check(m_block > 0, "no packet waited for a busy output");
    check(m_in_full > 0, "no input buffer filled");
    check(m_out_stall > 0, "no output backpressure");
    check(m_empty > 0, "no empty payload");
    check(m_conc2 > 0, "no concurrent paths");
    if (ALL) check(m_conc5 > 0, "never five paths at once");
    for (int o = 0; o < NPORTS; o++) if (PORTS[o]) check(m_out_used[o] > 0, $sformatf("output %0d never used", o));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
