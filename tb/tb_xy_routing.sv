// tb_xy_routing: exhaustive self-checking test of the XY routing function
// for 8-bit addresses (every router address against every destination).
// The expected port is worked out from the coordinates in the testbench.
module tb_xy_routing;
  localparam int unsigned AW = 8;
  logic [AW-1:0] local_addr, dest_addr;
  logic [2:0]    port;
  int checks = 0, failures = 0;
  int hist[5];

  xy_routing #(.ADDR_W(AW)) dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 256; l++)
      for (int d = 0; d < 256; d++) begin
        int lx, ly, dx, dy, exp_port;
        local_addr = AW'(l); dest_addr = AW'(d);
        #1;
        lx = l / 16; ly = l % 16; dx = d / 16; dy = d % 16;
        if (dx != lx)      exp_port = (dx > lx) ? 0 : 1;
        else if (dy != ly) exp_port = (dy > ly) ? 2 : 3;
        else               exp_port = 4;
        checks++;
        hist[exp_port]++;
        if (int'(port) != exp_port) begin
          failures++;
          if (failures < 10) $display("local %h dest %h: port %0d expected %0d", l, d, port, exp_port);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
