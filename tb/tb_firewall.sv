// tb_firewall: self-checking test of one firewall at node (1,2) of a 4 x 4
// mesh. The access register is first loaded through the configuration
// input with a random set of allowed sources (one three-word rule per
// source, frames for other nodes mixed in). Then, at the same time:
//  - inbound: the router side sends packets from random sources; exactly
//    those whose source bit was configured as allowed must reach the NI;
//  - outbound: the NI side sends packets with a random declared source;
//    exactly those that declare (1,2) must reach the router.
// Data is wired from sender to receiver by the test, as it would be around
// the firewall. Event counts are compared with the verdicts.
module tb_firewall;
  import fw_pkg::*;

  localparam int M = 4, N = 4, NS = M * N;
  localparam int NPKT = 150;

  logic clk = 0, rst_n = 0;
  flit_t rt_data_out, ni_data_out;
  logic  rt_tx, rt_credit_in, ni_rx, ni_credit_out;
  logic  ni_tx, ni_credit_in, rt_rx, rt_credit_out;
  cfg_word_t cfg_in, cfg_out;
  logic  in_pass, in_drop, out_pass, out_drop, cfg_hit;

  int checks = 0, failures = 0;
  int n_in_pass = 0, n_in_drop = 0, n_out_pass = 0, n_out_drop = 0;
  int e_in_pass = 0, e_in_drop = 0, e_out_pass = 0, e_out_drop = 0;
  logic [NS-1:0] allow;

  firewall #(.M(M), .N(N), .FX(1), .FY(2)) dut (.*,
    .in_pass_o(in_pass), .in_drop_o(in_drop), .out_pass_o(out_pass),
    .out_drop_o(out_drop), .cfg_hit_o(cfg_hit));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  flit_t in_exp[$], in_got[$], out_exp[$], out_got[$];

  always @(posedge clk) if (rst_n) begin
    if (ni_rx && ni_credit_out) in_got.push_back(rt_data_out);
    if (rt_rx && rt_credit_out) out_got.push_back(ni_data_out);
    ni_credit_out <= ($urandom_range(0, 3) != 0);
    rt_credit_out <= ($urandom_range(0, 3) != 0);
    n_in_pass += int'(in_pass);   n_in_drop += int'(in_drop);
    n_out_pass += int'(out_pass); n_out_drop += int'(out_drop);
  end

  task automatic cfg_frame(input int x, input int y, input int idx, input bit ab);
    @(posedge clk); #1 cfg_in = '{valid: 1'b1, data: 8'(x), ab: 1'b0};
    @(posedge clk); #1 cfg_in = '{valid: 1'b1, data: 8'(y), ab: 1'b0};
    @(posedge clk); #1 cfg_in = '{valid: 1'b1, data: 8'(idx), ab: ab};
    @(posedge clk); #1 cfg_in = '0;
  endtask

  // one packet on a credit link; returns when its last flit has moved
  task automatic send_pkt(input bit inbound, input header_t h);
    flit_t pkt[$];
    int size = $urandom_range(0, 5);
    pkt.push_back(flit_t'(h));
    pkt.push_back(flit_t'(size));
    for (int i = 0; i < size; i++) pkt.push_back(flit_t'($urandom));
    foreach (pkt[i]) begin
      if (inbound) begin
        #1 rt_tx = 1; rt_data_out = pkt[i];
        do @(posedge clk); while (!rt_credit_in);
        #1 rt_tx = 0;
      end else begin
        #1 ni_tx = 1; ni_data_out = pkt[i];
        do @(posedge clk); while (!ni_credit_in);
        #1 ni_tx = 0;
      end
    end
    if (inbound && allow[h.src_y * M + h.src_x]) foreach (pkt[i]) in_exp.push_back(pkt[i]);
    if (!inbound && h.src_x == 1 && h.src_y == 2) foreach (pkt[i]) out_exp.push_back(pkt[i]);
  endtask

  initial begin
    rt_tx = 0; ni_tx = 0; rt_data_out = '0; ni_data_out = '0; cfg_in = '0;
    ni_credit_out = 0; rt_credit_out = 0;
    allow = NS'($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < NS; s++) begin
      cfg_frame($urandom_range(0, 3), 3, $urandom_range(0, NS - 1), 1'b1);  // other node
      cfg_frame(1, 2, s, allow[s]);
    end
    repeat (10) @(posedge clk);
    check(dut.u_cfg.a_r == allow, "access register loaded through the chain");
    fork
      for (int p = 0; p < NPKT; p++) begin
        automatic header_t h = header_t'(flit_t'($urandom));
        h.src_x[3:2] = 2'b00; h.src_y[3:2] = 2'b00;
        if (allow[h.src_y * M + h.src_x]) e_in_pass++; else e_in_drop++;
        send_pkt(1'b1, h);
      end
      for (int p = 0; p < NPKT; p++) begin
        automatic header_t h = header_t'(flit_t'($urandom));
        if ($urandom_range(0, 1)) begin h.src_x = 1; h.src_y = 2; end
        if (h.src_x == 1 && h.src_y == 2) e_out_pass++; else e_out_drop++;
        send_pkt(1'b0, h);
      end
    join
    repeat (10) @(posedge clk);
    check(in_got == in_exp, $sformatf("inbound: %0d flits delivered, %0d expected", in_got.size(), in_exp.size()));
    check(out_got == out_exp, $sformatf("outbound: %0d flits delivered, %0d expected", out_got.size(), out_exp.size()));
    check(n_in_pass == e_in_pass && n_in_drop == e_in_drop,
          $sformatf("inbound events pass %0d drop %0d, expected %0d %0d", n_in_pass, n_in_drop, e_in_pass, e_in_drop));
    check(n_out_pass == e_out_pass && n_out_drop == e_out_drop,
          $sformatf("outbound events pass %0d drop %0d, expected %0d %0d", n_out_pass, n_out_drop, e_out_pass, e_out_drop));
    check(e_in_pass > 10 && e_in_drop > 10 && e_out_pass > 10 && e_out_drop > 10, "all verdicts exercised");
    $display("inbound pass/drop %0d/%0d, outbound pass/drop %0d/%0d", n_in_pass, n_in_drop, n_out_pass, n_out_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
