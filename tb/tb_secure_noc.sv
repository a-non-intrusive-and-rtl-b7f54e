// tb_secure_noc: end-to-end test of the firewall layer of a 4 x 4 mesh at
// its default parameters, with a behavioural router network (noc_model) and
// processing-element models written here.
//
// Scenario: six nodes, A(0,3) B(2,2) C(0,1) D(3,3) E(0,0) F(3,1).
//  1. Configuration, driven from E at the head of the chain, one rule at a
//     time, each sent 3*M*N cycles after the one before (the worst-case
//     chain delay). First node A is fully configured (one rule per other
//     node, only B allowed): the last rule must take effect exactly
//     3*M*N*(M*N-1) = 720 cycles after the first word. Then only the
//     allowed rules of the other nodes are sent: B accepts A and C, C and A
//     accept B, E accepts F, F accepts E. Each rule must land exactly 3*k
//     cycles after it was sent, k being the target's place on the chain.
//  2. Traffic: A<->B, B<->C, E<->F send legitimate packets; C also sends
//     packets to B that claim to come from A (impersonation); D floods B and
//     F. Every legitimate packet must arrive intact exactly once; nothing
//     from D and nothing impersonated may arrive anywhere.
// Counted mechanisms, each of which must occur: rule applied, inbound pass,
// inbound drop, outbound pass, outbound drop, back-pressure stall.
module tb_secure_noc;
  import fw_pkg::*;

  localparam int M = 4, N = 4, NS = M * N;
  localparam int NPKT = 20;   // packets per legitimate flow

  logic clk = 0, rst_n = 0;
  flit_t rt_data_out [NS], ni_data_in [NS], ni_data_out [NS], rt_data_in [NS];
  logic  rt_tx [NS], rt_clock_tx [NS], rt_credit_in [NS], ni_rx [NS], ni_clock_rx [NS];
  logic  ni_credit_out [NS], ni_tx [NS], ni_clock_tx [NS], ni_credit_in [NS];
  logic  rt_rx [NS], rt_clock_rx [NS], rt_credit_out [NS];
  logic  in_pass [NS], in_drop [NS], out_pass [NS], out_drop [NS], cfg_hit [NS];
  cfg_word_t cfg_in, cfg_out;
  int    n_routed;

  secure_noc dut (.*);

  noc_model #(.M(M), .N(N)) u_net (
    .clk, .rst_n, .rt_data_in, .rt_rx, .rt_credit_out,
    .rt_data_out, .rt_tx, .rt_credit_in, .n_routed
  );

  always #5 clk = ~clk;
  assign rt_clock_tx = '{default: clk};
  assign ni_clock_tx = '{default: clk};

  int checks = 0, failures = 0, cyc = 0;
  int c_cfg = 0, c_in_pass = 0, c_in_drop = 0, c_out_pass = 0, c_out_drop = 0, c_stall = 0;
  int last_hit [NS];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  function automatic int id(input int x, input int y);
    return y * M + x;
  endfunction

  // chain position (1-based) of node (x, y): row-wise snake from (0,0)
  function automatic int chain_pos(input int x, input int y);
    return y * M + ((y % 2 == 0) ? x : M - 1 - x) + 1;
  endfunction

  // ---------------- monitors ----------------
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NS; i++) begin
      c_cfg      += int'(cfg_hit[i]);
      c_in_pass  += int'(in_pass[i]);
      c_in_drop  += int'(in_drop[i]);
      c_out_pass += int'(out_pass[i]);
      c_out_drop += int'(out_drop[i]);
      c_stall    += int'((ni_rx[i] && !ni_credit_out[i]) || (rt_rx[i] && !rt_credit_out[i]));
      if (cfg_hit[i]) last_hit[i] = cyc;
    end

  // ---------------- PE receivers ----------------
  flit_t rx_cur [NS][$];
  string got [$];     // "dst:packet" signatures of delivered packets
  always @(posedge clk) begin
    for (int i = 0; i < NS; i++) begin
      if (rst_n && ni_rx[i] && ni_credit_out[i]) begin
        rx_cur[i].push_back(ni_data_in[i]);
        if (rx_cur[i].size() >= 2 && rx_cur[i].size() == int'(rx_cur[i][1]) + 2) begin
          got.push_back($sformatf("%0d:%p", i, rx_cur[i]));
          rx_cur[i].delete();
        end
      end
      ni_credit_out[i] <= ($urandom_range(0, 2) != 0);
    end
  end

  // ---------------- PE senders ----------------
  typedef flit_t pkt_t[$];
  pkt_t  txq [NS][$];
  string exp_sig [$];
  int    n_forged = 0, n_flood = 0;

  function automatic pkt_t make_pkt(input int sx, input int sy, input int dx, input int dy);
    pkt_t p;
    int size = $urandom_range(0, 6);
    header_t h = '{src_x: coord_t'(sx), src_y: coord_t'(sy), dst_x: coord_t'(dx), dst_y: coord_t'(dy)};
    p.push_back(flit_t'(h));
    p.push_back(flit_t'(size));
    for (int i = 0; i < size; i++) p.push_back(flit_t'($urandom));
    return p;
  endfunction

  // node `from` sends a packet declaring source (sx,sy) to node (dx,dy)
  task automatic queue_pkt(input int from, input int sx, input int sy,
                           input int dx, input int dy, input bit legit);
    pkt_t p = make_pkt(sx, sy, dx, dy);
    txq[from].push_back(p);
    if (legit) exp_sig.push_back($sformatf("%0d:%p", id(dx, dy), p));
  endtask

  int flit_idx [NS];
  always @(posedge clk) begin
    for (int i = 0; i < NS; i++) begin
      if (!rst_n) begin
        ni_tx[i] <= 1'b0; ni_data_out[i] <= '0; flit_idx[i] = 0;
      end else begin
        if (ni_tx[i] && ni_credit_in[i]) begin
          flit_idx[i]++;
          if (flit_idx[i] == txq[i][0].size()) begin
            void'(txq[i].pop_front());
            flit_idx[i] = 0;
          end
        end
        ni_tx[i]       <= (txq[i].size() > 0);
        ni_data_out[i] <= (txq[i].size() > 0) ? txq[i][0][flit_idx[i]] : '0;
      end
    end
  end

  // access registers, by chain position, observed inside the design
  logic [NS-1:0] a_r_chain [NS];
  for (genvar k = 0; k < NS; k++) begin : g_peek
    assign a_r_chain[k] = dut.g_node[k].u_fw.u_cfg.a_r;
  end

  // ---------------- configuration source (trusted node E) ----------------
  task automatic send_rule(input int tx_, input int ty, input int sx, input int sy, input bit ab);
    int t0, pos;
    @(posedge clk); #1 cfg_in = '{valid: 1'b1, data: 8'(tx_), ab: 1'b0}; t0 = cyc;
    @(posedge clk); #1 cfg_in = '{valid: 1'b1, data: 8'(ty), ab: 1'b0};
    @(posedge clk); #1 cfg_in = '{valid: 1'b1, data: 8'(id(sx, sy)), ab: ab};
    @(posedge clk); #1 cfg_in = '0;
    pos = chain_pos(tx_, ty);
    // the index word reaches the target in cycle t0 + 3*pos - 1; check it
    // once that cycle is over, without delaying the next rule
    fork begin
      repeat (3 * NS - 3) @(posedge clk);
      #1;
      check(last_hit[id(tx_, ty)] == t0 + 3 * pos - 1,
            $sformatf("rule for (%0d,%0d) applied at %0d, expected %0d",
                      tx_, ty, last_hit[id(tx_, ty)], t0 + 3 * pos - 1));
      check(a_r_chain[pos - 1][id(sx, sy)] == ab, "A_r bit written");
    end join_none
    repeat (3 * NS - 4) @(posedge clk);
  endtask

  localparam int AX = 0, AY = 3, BX = 2, BY = 2, CX = 0, CY = 1;
  localparam int DX = 3, DY = 3, EX = 0, EY = 0, FX = 3, FY = 1;

  initial begin
    int t_start, t_a;
    cfg_in = '0;
    foreach (last_hit[i]) last_hit[i] = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // --- full configuration of A (worst case) ---
    t_start = cyc + 1;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < M; x++)
        if (!(x == AX && y == AY)) send_rule(AX, AY, x, y, (x == BX && y == BY));
    repeat (2) @(posedge clk);
    t_a = last_hit[id(AX, AY)] + 1 - t_start;
    check(t_a == 3 * NS * (NS - 1), $sformatf("T_A = %0d cycles, expected %0d", t_a, 3 * NS * (NS - 1)));
    $display("full configuration of node A: %0d cycles", t_a);
    // --- remaining allowed rules (all others start denied) ---
    send_rule(BX, BY, AX, AY, 1);
    send_rule(BX, BY, CX, CY, 1);
    send_rule(CX, CY, BX, BY, 1);
    send_rule(EX, EY, FX, FY, 1);
    send_rule(FX, FY, EX, EY, 1);
    // --- traffic ---
    for (int k = 0; k < NPKT; k++) begin
      queue_pkt(id(AX, AY), AX, AY, BX, BY, 1);
      queue_pkt(id(BX, BY), BX, BY, AX, AY, 1);
      queue_pkt(id(BX, BY), BX, BY, CX, CY, 1);
      queue_pkt(id(CX, CY), CX, CY, BX, BY, 1);
      queue_pkt(id(EX, EY), EX, EY, FX, FY, 1);
      queue_pkt(id(FX, FY), FX, FY, EX, EY, 1);
      queue_pkt(id(CX, CY), AX, AY, BX, BY, 0);  n_forged++;  // C impersonates A
      queue_pkt(id(DX, DY), DX, DY, BX, BY, 0);  n_flood++;   // D floods B
      queue_pkt(id(DX, DY), DX, DY, FX, FY, 0);  n_flood++;   // D floods F
    end
    wait (txq[id(AX, AY)].size() == 0 && txq[id(BX, BY)].size() == 0 &&
          txq[id(CX, CY)].size() == 0 && txq[id(DX, DY)].size() == 0 &&
          txq[id(EX, EY)].size() == 0 && txq[id(FX, FY)].size() == 0);
    repeat (300) @(posedge clk);
    // --- results ---
    check(got.size() == exp_sig.size(),
          $sformatf("%0d packets delivered, %0d legitimate sent", got.size(), exp_sig.size()));
    got.sort();
    exp_sig.sort();
    check(got == exp_sig, "delivered packets are exactly the legitimate ones");
    check(c_out_drop == n_forged, $sformatf("outbound drops %0d, forged packets %0d", c_out_drop, n_forged));
    check(c_in_drop == n_flood, $sformatf("inbound drops %0d, flood packets %0d", c_in_drop, n_flood));
    check(n_routed == 7 * NPKT + 2 * NPKT - NPKT,
          $sformatf("network carried %0d packets, expected %0d", n_routed, 8 * NPKT));
    $display("mechanisms: rules %0d, in_pass %0d, in_drop %0d, out_pass %0d, out_drop %0d, stalls %0d",
             c_cfg, c_in_pass, c_in_drop, c_out_pass, c_out_drop, c_stall);
    check(c_cfg > 0,      "configuration rule applied");
    check(c_in_pass > 0,  "inbound packet passed");
    check(c_in_drop > 0,  "inbound packet dropped");
    check(c_out_pass > 0, "outbound packet passed");
    check(c_out_drop > 0, "outbound packet dropped");
    check(c_stall > 0,    "back-pressure stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
