// tb_hs_fifo: self-checking test of the register-chain FIFO at its default
// size (16 words of 16 bits).
//
// Phase 1 measures the latency through an empty FIFO (DEPTH-1 cycles from
// acceptance to output). Phase 2 blocks the output and checks that exactly
// DEPTH words are accepted. Phase 3 streams words with both sides always
// ready and checks one word every two cycles. Phase 4 runs random
// valid/ready traffic against a queue model. Ends with a TB_RESULT line.
module tb_hs_fifo;
  localparam int unsigned W = 16;
  localparam int unsigned D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         i_valid = 1'b0, o_ready = 1'b0, i_ready, o_valid;
  logic [W-1:0] i_data = '0, o_data;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_in = 0, n_out = 0;
  longint cyc = 0;
  bit rnd = 0;
  bit in_fired = 0;

  hs_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    in_fired = i_valid && i_ready;
    if (o_valid && o_ready) begin
      check(q.size() != 0 && q[0] == o_data, "output word differs from model");
      if (q.size() != 0) void'(q.pop_front());
      n_out++;
    end
    if (i_valid && i_ready) begin
      q.push_back(i_data);
      n_in++;
    end
  end

  always @(negedge clk) if (rnd) begin
    if (!i_valid || in_fired) begin
      i_valid <= ($urandom_range(2) != 0);
      i_data  <= W'($urandom);
    end
    o_ready <= ($urandom_range(3) != 0);
  end

  initial begin
    longint t0;
    int acc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: latency
    @(negedge clk);
    i_valid = 1'b1; i_data = 16'hA5A5; o_ready = 1'b1;
    @(posedge clk);
    t0 = 0;
    @(negedge clk); i_valid = 1'b0;
    while (!o_valid) begin t0++; @(negedge clk); end
    // the word is offered DEPTH-1 edges after the edge that took it
    check(t0 == D - 1, $sformatf("latency %0d, expected %0d", t0, D - 1));
    @(negedge clk);
    // phase 2: capacity
    o_ready = 1'b0;
    acc = 0;
    for (int k = 0; k < 4 * D; k++) begin
      i_valid = 1'b1; i_data = W'(k);
      @(posedge clk);
      if (i_ready) acc++;
      @(negedge clk);
    end
    i_valid = 1'b0;
    check(acc == D, $sformatf("capacity %0d, expected %0d", acc, D));
    // drain
    o_ready = 1'b1;
    while (q.size() != 0) @(negedge clk);
    // phase 3: throughput
    begin
      int n_before;
      repeat (2 * D) begin
        i_valid = 1'b1; i_data = W'($urandom);
        @(negedge clk);
      end
      n_before = n_out;
      repeat (200) begin
        i_data = W'($urandom);
        @(negedge clk);
      end
      check(n_out - n_before >= 99 && n_out - n_before <= 101, $sformatf("throughput %0d words in 200 cycles", n_out - n_before));
      i_valid = 1'b0;
      while (q.size() != 0) @(negedge clk);
    end
    // phase 4: random traffic
    rnd = 1;
    wait (n_out >= 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
