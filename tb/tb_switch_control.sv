// tb_switch_control: self-checking test of the switch control (arbiter,
// XY routing and port-select FIFOs) for the router at address 0x11.
//
// Each input port raises address requests to random destinations of a 3x3
// neighbourhood and holds each until acknowledged; the CTRL channels are
// acknowledged at random. Each time a request is acknowledged the testbench
// routes it with its own XY model and appends the port to its model of that
// output's queue; every CTRL value taken must match. Directed parts check
// the delay from grant to CTRL (CTRL_FIFO_DEPTH edges) and that an output
// queue holds four entries. Ends with a TB_RESULT line.
module tb_switch_control;
  import babanoc_pkg::*;
  localparam int unsigned AW = 8;
  localparam logic [AW-1:0] RA = 8'h11;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0]             req_valid = '0, req_ready;
  logic [NPORTS-1:0][AW-1:0]     req_addr = '0;
  logic [NPORTS-1:0]             ctrl_valid, ctrl_ready = '0;
  logic [NPORTS-1:0][PORT_W-1:0] ctrl_port;

  switch_control #(.ADDR_W(AW), .CTRL_FIFO_DEPTH(4), .ROUTER_ADDR(RA)) dut (.*);

  int checks = 0, failures = 0;
  int q[NPORTS][$];
  logic [NPORTS-1:0] fired = '0;
  bit rnd = 1'b0;
  int n_pops = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int xy(input logic [AW-1:0] d);
    int lx = RA[7:4], ly = RA[3:0], dx = d[7:4], dy = d[3:0];
    if (dx > lx) return 0;
    if (dx < lx) return 1;
    if (dy > ly) return 2;
    if (dy < ly) return 3;
    return 4;
  endfunction

  function automatic logic [AW-1:0] rand_dest();
    return {4'($urandom_range(2)), 4'($urandom_range(2))};
  endfunction

  always @(posedge clk) if (rst_n) begin
    fired = req_valid & req_ready;
    for (int p = 0; p < NPORTS; p++)
      if (fired[p]) q[xy(req_addr[p])].push_back(p);
    for (int o = 0; o < NPORTS; o++)
      if (ctrl_valid[o] && ctrl_ready[o]) begin
        check(q[o].size() != 0 && int'(ctrl_port[o]) == q[o][0],
              $sformatf("output %0d bound to %0d", o, ctrl_port[o]));
        if (q[o].size() != 0) void'(q[o].pop_front());
        n_pops++;
      end
  end

  always @(negedge clk) if (rnd) begin
    for (int p = 0; p < NPORTS; p++)
      if (!req_valid[p] || fired[p]) begin
        req_valid[p] <= ($urandom_range(2) == 0);
        req_addr[p]  <= rand_dest();
      end
    for (int o = 0; o < NPORTS; o++) ctrl_ready[o] <= ($urandom_range(3) == 0);
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // grant-to-CTRL delay for one request from West to South (dest 0x10)
    @(negedge clk);
    req_valid[1] = 1'b1; req_addr[1] = 8'h10;
    @(posedge clk);
    check(req_ready[1], "single request not granted at once");
    @(negedge clk);
    req_valid[1] = 1'b0;
    n = 0;
    while (!ctrl_valid[3]) begin n++; @(negedge clk); end
    check(n == 4, $sformatf("grant to CTRL took %0d edges, expected 4", n));
    check(ctrl_port[3] == 3'd1, "CTRL South does not name West");
    ctrl_ready[3] = 1'b1;
    @(negedge clk);
    ctrl_ready[3] = 1'b0;
    // four inputs queue for Local: all four enter the Local queue
    for (int p = 0; p < 4; p++) begin
      req_valid[p] = 1'b1; req_addr[p] = RA;
    end
    repeat (20) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) if (fired[p]) req_valid[p] = 1'b0;
    end
    check(req_valid[3:0] == '0, "not all four Local requests accepted");
    check(q[4].size() == 4, "Local queue model not at four");
    check(dut.g_port_select[4].u_fifo.c_valid[4:1] == 4'hF, "Local port-select FIFO does not hold four entries");
    ctrl_ready[4] = 1'b1;
    repeat (12) @(negedge clk);
    ctrl_ready[4] = 1'b0;
    check(q[4].size() == 0, "Local queue not drained");
    // random traffic
    rnd = 1'b1;
    wait (n_pops >= 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
