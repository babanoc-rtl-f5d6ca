// tb_babarouter_8b: end-to-end test of the router in its smaller
// configuration, 8-bit flits (4-bit addresses) and 8-flit input buffers,
// with the traffic, reference model and mechanism counts of babarouter_e2e.
module tb_babarouter_8b;
  babarouter_e2e #(.N(8), .DEPTH(8), .DEFAULTS(1'b0)) u_e2e ();
  // a last guard in case the shared test never finishes
  initial begin
    #50ms;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
