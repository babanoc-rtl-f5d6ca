// tb_crossbar: self-checking test of the crossbar.
//
// The testbench plays the five IN CTRL blocks and the switch control: each
// input sends packets (1..12 flits, EOP on the last) to random outputs, and
// before a packet starts the testbench appends that input to its model of
// the destination's CTRL queue. It predicts each output's flit stream from
// the queue order and checks every flit, that the CTRL channel is
// acknowledged exactly with the EOP flit, and that several packets cross
// at the same time (concurrency counted, up to all five). Ends with a
// TB_RESULT line.
module tb_crossbar;
  import babanoc_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NPORTS-1:0]             in_valid = '0, in_ready;
  logic [NPORTS-1:0][N:0]        in_data = '0;
  logic [NPORTS-1:0]             ctrl_valid = '0, ctrl_ready;
  logic [NPORTS-1:0][PORT_W-1:0] ctrl_port = '0;
  logic [NPORTS-1:0]             out_valid, out_ready = '0;
  logic [NPORTS-1:0][N-1:0]      out_data;

  crossbar #(.FLIT_W(N)) dut (.*);

  int checks = 0, failures = 0;
  logic [N:0] pk[NPORTS][$];     // flits each input still has to send
  logic [N:0] ex[NPORTS][$];     // flits each output must deliver
  int         cq[NPORTS][$];     // CTRL queue model per output
  bit         busy[NPORTS];
  logic [NPORTS-1:0] in_fired = '0;
  int n_pkts = 0, conc[NPORTS+1];

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

  always @(posedge clk) if (rst_n) begin
    int nf;
    nf = 0;
    in_fired = in_valid & in_ready;
    for (int o = 0; o < NPORTS; o++) begin
      bit fire, eop;
      fire = out_valid[o] && out_ready[o];
      eop  = 1'b0;
      if (fire) begin
        nf++;
        check(ex[o].size() != 0 && ex[o][0][N-1:0] == out_data[o],
              $sformatf("output %0d flit %h", o, out_data[o]));
        if (ex[o].size() != 0) eop = ex[o].pop_front()[N];
      end
      check(ctrl_ready[o] == (fire && eop), $sformatf("CTRL %0d acknowledge wrong", o));
      if (ctrl_valid[o] && ctrl_ready[o]) void'(cq[o].pop_front());
    end
    conc[nf]++;
    for (int i = 0; i < NPORTS; i++)
      if (in_fired[i]) begin
        if (pk[i].pop_front()[N]) busy[i] = 1'b0;
      end
    // start new packets
    for (int i = 0; i < NPORTS; i++)
      if (!busy[i] && n_pkts < 2000 && $urandom_range(3) == 0) begin
        int o, len;
        o = $urandom_range(NPORTS - 1);
        len = $urandom_range(12, 1);
        for (int k = 0; k < len; k++) begin
          logic [N:0] f;
          f = {k == len - 1, N'($urandom)};
          pk[i].push_back(f);
          ex[o].push_back(f);
        end
        cq[o].push_back(i);
        busy[i] = 1'b1;
        n_pkts++;
      end
  end

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NPORTS; i++)
      if (!in_valid[i] || in_fired[i]) begin
        in_valid[i] = pk[i].size() != 0 && $urandom_range(5) != 0;
        in_data[i]  = pk[i].size() != 0 ? pk[i][0] : '0;
      end
    for (int o = 0; o < NPORTS; o++) begin
      ctrl_valid[o] = cq[o].size() != 0;
      ctrl_port[o]  = cq[o].size() != 0 ? PORT_W'(cq[o][0]) : '0;
      out_ready[o]  = $urandom_range(4) != 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_pkts >= 2000);
    for (int o = 0; o < NPORTS; o++) wait (ex[o].size() == 0);
    repeat (5) @(posedge clk);
    for (int o = 0; o < NPORTS; o++) check(cq[o].size() == 0, "CTRL not released");
    check(conc[2] + conc[3] + conc[4] + conc[5] > 0, "no concurrent transfers");
    check(conc[5] > 0, "never five paths at once");
    $display("cycles with 0..5 concurrent transfers: %0d %0d %0d %0d %0d %0d",
             conc[0], conc[1], conc[2], conc[3], conc[4], conc[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
