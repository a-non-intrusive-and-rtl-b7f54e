// tb_config_time: worst-case configuration time of the firewall layer for
// mesh sizes 3x3 to 8x8.
//
// For each size a secure_noc instance is built and the firewall at the end
// of the configuration chain (the farthest from the configuring node at
// (0,0)) gets one rule for every other node, sent one at a time, each rule
// 3*M*N cycles after the previous one. The time from the first word to the
// last rule taking effect must be 3*M*N*(M*N-1) cycles:
// 216, 720, 1800, 3780, 7056 and 12096 cycles for 3x3 ... 8x8. The test also
// checks that the rules wrote the intended pattern (every even-numbered
// source allowed) into that firewall's access register.
module tb_config_time;
  import fw_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, done = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int SIZES [6] = '{3, 4, 5, 6, 7, 8};
  localparam int EXPECT [6] = '{216, 720, 1800, 3780, 7056, 12096};

  for (genvar g = 0; g < 6; g++) begin : g_size
    localparam int M = SIZES[g], N = SIZES[g], NS = M * N;
    // last node on the snake-shaped chain
    localparam int LY = N - 1;
    localparam int LX = (LY % 2 == 0) ? M - 1 : 0;

    flit_t zf [NS];
    logic  zl [NS];
    flit_t of1 [NS], of2 [NS];
    logic  ol1 [NS], ol2 [NS], ol3 [NS], ol4 [NS], ol5 [NS], ol6 [NS], ol7 [NS];
    logic  ol8 [NS], ol9 [NS], ol10 [NS], ol11 [NS], hit [NS];
    cfg_word_t cfg_in, cfg_out;

    assign zf = '{default: '0};
    assign zl = '{default: 1'b0};

    secure_noc #(.M(M), .N(N)) dut (
      .clk, .rst_n,
      .rt_data_out(zf), .rt_tx(zl), .rt_clock_tx(zl), .rt_credit_in(ol1),
      .ni_data_in(of1), .ni_rx(ol2), .ni_clock_rx(ol3), .ni_credit_out(zl),
      .ni_data_out(zf), .ni_tx(zl), .ni_clock_tx(zl), .ni_credit_in(ol4),
      .rt_data_in(of2), .rt_rx(ol5), .rt_clock_rx(ol6), .rt_credit_out(zl),
      .cfg_in, .cfg_out,
      .in_pass(ol7), .in_drop(ol8), .out_pass(ol9), .out_drop(ol10), .cfg_hit(hit)
    );

    int cyc = 0, last_hit = -1, n_hit = 0;
    always @(posedge clk) begin
      cyc <= cyc + 1;
      if (hit[LY * M + LX]) begin last_hit = cyc; n_hit++; end
    end

    logic [NS-1:0] a_r_last;
    assign a_r_last = dut.g_node[NS - 1].u_fw.u_cfg.a_r;

    initial begin
      int t_start;
      logic [NS-1:0] want;
      cfg_in = '0;
      want = '0;
      wait (rst_n);
      @(posedge clk);
      t_start = -1;
      for (int s = 0; s < NS; s++) begin
        if (s == LY * M + LX) continue;
        want[s] = (s % 2 == 0);
        @(posedge clk); #1 cfg_in = '{valid: 1'b1, data: 8'(LX), ab: 1'b0};
        if (t_start < 0) t_start = cyc;
        @(posedge clk); #1 cfg_in = '{valid: 1'b1, data: 8'(LY), ab: 1'b0};
        @(posedge clk); #1 cfg_in = '{valid: 1'b1, data: 8'(s), ab: (s % 2 == 0)};
        @(posedge clk); #1 cfg_in = '0;
        repeat (3 * NS - 4) @(posedge clk);
      end
      repeat (2) @(posedge clk);
      check(last_hit + 1 - t_start == EXPECT[g],
            $sformatf("%0dx%0d: full configuration took %0d cycles, expected %0d",
                      M, N, last_hit + 1 - t_start, EXPECT[g]));
      check(n_hit == NS - 1, $sformatf("%0dx%0d: %0d rules applied", M, N, n_hit));
      check(a_r_last == want, $sformatf("%0dx%0d: access register %h, expected %h", M, N, a_r_last, want));
      $display("%0dx%0d: worst-case configuration %0d cycles", M, N, last_hit + 1 - t_start);
      done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done == 6);
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
