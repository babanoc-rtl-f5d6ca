// tb_sc_arbiter: self-checking test of the switch-control arbiter.
//
// Each of the five ports raises address requests at random and holds each
// until it is acknowledged; the CHOICE channel is consumed at random. The
// testbench checks that only pending requests are granted, that the choice
// carries the granting port and its address, that no request is lost, that
// with all five ports requesting the grants rotate 0,1,2,3,4, and that the
// choice is held stable until taken. Ends with a TB_RESULT line.
module tb_sc_arbiter;
  import babanoc_pkg::*;
  localparam int unsigned AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0]           req_valid = '0, req_ready;
  logic [NPORTS-1:0][AW-1:0]   req_addr = '0;
  logic                        ch_valid, ch_ready = 1'b0;
  logic [PORT_W-1:0]           ch_port;
  logic [AW-1:0]               ch_addr;

  sc_arbiter #(.ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  int granted[NPORTS], issued[NPORTS];
  logic [PORT_W-1:0] exp_port[$];
  logic [AW-1:0]     exp_addr[$];
  bit rnd = 1'b1;
  int n_choices = 0;
  logic [NPORTS-1:0] fired = '0;

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

  always @(negedge clk) if (rst_n && rnd) begin
    for (int p = 0; p < NPORTS; p++)
      if (!req_valid[p] || fired[p]) begin
        req_valid[p] <= ($urandom_range(3) == 0);
        req_addr[p]  <= AW'($urandom);
      end
    ch_ready <= ($urandom_range(2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    fired = req_valid & req_ready;
    check((req_ready & ~req_valid) == '0, "grant without request");
    check($countones(req_ready) <= 1, "two grants at once");
    for (int p = 0; p < NPORTS; p++)
      if (req_valid[p] && req_ready[p]) begin
        exp_port.push_back(PORT_W'(p));
        exp_addr.push_back(req_addr[p]);
        granted[p]++;
      end
    if (ch_valid && ch_ready) begin
      check(exp_port.size() != 0 && exp_port[0] == ch_port && exp_addr[0] == ch_addr,
            "choice differs from the granted request");
      if (exp_port.size() != 0) begin void'(exp_port.pop_front()); void'(exp_addr.pop_front()); end
      n_choices++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5000) @(posedge clk);
    // all five ports requesting: grants must rotate
    @(negedge clk);
    rnd = 1'b0;
    req_valid = '0; ch_ready = 1'b1;
    repeat (4) @(negedge clk);
    begin
      int last, seq[$];
      req_valid = '1;
      for (int k = 0; k < 15; k++) begin
        @(posedge clk);
        for (int p = 0; p < NPORTS; p++) if (req_ready[p]) seq.push_back(p);
        @(negedge clk);
        req_valid = '1;
      end
      check(seq.size() >= 7, "too few grants with all ports requesting");
      for (int k = 1; k < seq.size(); k++)
        check(seq[k] == (seq[k-1] + 1) % NPORTS, $sformatf("grant %0d after %0d", seq[k], seq[k-1]));
    end
    req_valid = '0;
    repeat (5) @(negedge clk);
    check(exp_port.size() == 0, "choices lost");
    check(n_choices > 1000, "too few choices");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
