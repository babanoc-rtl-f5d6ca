// tb_babarouter: end-to-end test of the router exactly as delivered: every
// parameter at its default (16-bit flits, 16-flit input buffers, 4-place
// port-select FIFOs, router address X = 1, Y = 1). The traffic, the
// reference model and the mechanism counts are in babarouter_e2e.
module tb_babarouter;
  babarouter_e2e #(.N(16), .DEPTH(16), .DEFAULTS(1'b1)) u_e2e ();
  // a last guard in case the shared test never finishes
  initial begin
    #50ms;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
