// tb_in_ctrl: self-checking test of the packet framing block.
//
// The testbench builds random packets (header, size flit, 0..20 payload
// flits, empty payloads included) and offers their flits with random gaps,
// while the address and crossbar channels accept at random. Independently
// of the block it predicts the address sequence (lower half of each header)
// and the crossbar stream (every flit, with EOP on the last payload flit or
// on a zero size flit). It also checks that a header reaches the crossbar
// only after its address transfer and that the input FIFO is popped exactly
// when the crossbar takes a flit. Ends with a TB_RESULT line.
module tb_in_ctrl;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           in_valid = 1'b0, in_ready;
  logic [N-1:0]   in_data = '0;
  logic           addr_valid, addr_ready = 1'b0;
  logic [N/2-1:0] addr_data;
  logic           xb_valid, xb_ready = 1'b0;
  logic [N:0]     xb_data;

  in_ctrl #(.FLIT_W(N)) dut (.*);

  int checks = 0, failures = 0;
  logic [N-1:0] src[$];          // flits still to offer
  logic [N:0]   exp_xb[$];       // expected crossbar words
  logic [N/2-1:0] exp_addr[$];   // expected addresses
  int addr_sent = 0, headers_passed = 0;
  int n_pkts = 0, n_empty = 0;
  bit exp_header = 1'b1;    // next crossbar word is a header
  bit in_fired = 1'b0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic make_packet();
    int len;
    logic [N-1:0] h;
    len = ($urandom_range(4) == 0) ? 0 : $urandom_range(20, 1);
    h = N'($urandom);
    src.push_back(h);          exp_xb.push_back({1'b0, h}); exp_addr.push_back(h[N/2-1:0]);
    src.push_back(N'(len));    exp_xb.push_back({len == 0, N'(len)});
    for (int k = 0; k < len; k++) begin
      logic [N-1:0] f;
      f = N'($urandom);
      src.push_back(f);
      exp_xb.push_back({k == len - 1, f});
    end
    n_pkts++;
    if (len == 0) n_empty++;
  endtask

  always @(negedge clk) if (rst_n) begin
    if (!in_valid || in_fired) begin
      if (src.size() != 0 && $urandom_range(3) != 0) begin
        in_valid <= 1'b1; in_data <= src.pop_front();
      end else in_valid <= 1'b0;
    end
    addr_ready <= ($urandom_range(2) != 0);
    xb_ready   <= ($urandom_range(2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    in_fired = in_valid && in_ready;
    check((in_valid && in_ready) == (xb_valid && xb_ready), "FIFO pop differs from crossbar transfer");
    if (addr_valid && addr_ready) begin
      check(exp_addr.size() != 0 && exp_addr[0] == addr_data, "wrong address");
      if (exp_addr.size() != 0) void'(exp_addr.pop_front());
      addr_sent++;
    end
    if (xb_valid && xb_ready) begin
      check(exp_xb.size() != 0 && exp_xb[0] == xb_data,
            $sformatf("crossbar word %h expected %h", xb_data, exp_xb.size() ? exp_xb[0] : '0));
      if (exp_header) begin
        check(addr_sent == headers_passed + 1, "header passed before its address");
        headers_passed++;
      end
      exp_header = 1'b0;
      if (exp_xb.size() != 0) begin
        // the word after an EOP word is a header
        if (exp_xb[0][N]) exp_header = 1'b1;
        void'(exp_xb.pop_front());
      end
    end
  end

  initial begin
    repeat (300) make_packet();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (exp_xb.size() == 0);
    repeat (5) @(posedge clk);
    check(exp_addr.size() == 0, "addresses missing");
    check(headers_passed == n_pkts, "packets missing");
    check(n_empty > 0, "no empty packet exercised");
    $display("packets %0d, empty %0d", n_pkts, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
