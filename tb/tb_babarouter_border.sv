// tb_babarouter_border: end-to-end test of a border router. The router sits
// at the mesh corner X = 0, Y = 0 and has only its East, North and Local
// ports (PORTS = 5'b10101); the traffic, reference model and mechanism
// counts are those of babarouter_e2e, restricted to the ports it has.
module tb_babarouter_border;
  babarouter_e2e #(.N(16), .DEPTH(16), .DEFAULTS(1'b0), .RX(0), .RY(0), .PORTS(5'b10101)) u_e2e ();
  // a last guard in case the shared test never finishes
  initial begin
    #50ms;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
