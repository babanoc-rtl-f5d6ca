// tb_hs_register: self-checking test of the one-place handshake register.
//
// Random words are offered with random valid and ready patterns. A queue
// model checks that every word comes out once, in order and unchanged, that
// the register refuses input while it holds a word, and that a word taken on
// one edge is offered right after it. Ends with a TB_RESULT line.
module tb_hs_register;
  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         i_valid = 1'b0, o_ready = 1'b0, i_ready, o_valid;
  logic [W-1:0] i_data = '0, o_data;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_in = 0, n_out = 0;
  bit was_fire = 0;
  bit in_fired = 0;

  hs_register #(.WIDTH(W)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus on the falling edge
  always @(negedge clk) if (rst_n) begin
    if (!i_valid || in_fired) begin
      i_valid <= ($urandom_range(3) != 0);
      i_data  <= W'($urandom);
    end
    o_ready <= ($urandom_range(2) != 0);
  end

  // checks on the rising edge, on the values before it
  always @(posedge clk) if (rst_n) begin
    in_fired = i_valid && i_ready;
    checks++;
    if (was_fire != o_valid && was_fire) begin
      failures++; $display("word taken but not offered next cycle");
    end
    if (o_valid == i_ready) begin
      failures++; $display("ready/valid not complementary");
    end
    was_fire = 1'b0;
    if (o_valid && o_ready) begin
      checks++;
      if (q.size() == 0 || q[0] != o_data) begin
        failures++; $display("bad output %h", o_data);
      end
      if (q.size() != 0) void'(q.pop_front());
      n_out++;
    end
    if (i_valid && i_ready) begin
      q.push_back(i_data);
      n_in++;
      was_fire = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out >= 2000);
    @(negedge clk);
    checks++;
    if (n_in - n_out > 1) begin
      failures++; $display("more than one word held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
