// tb_fw_config_node: self-checking test of one configuration-chain stage.
//
// The node sits at address (2,1) of a 4 x 4 mesh. The test sends random
// three-word frames (x, y, index with A_b), some for this node and some for
// others, with random gaps or back to back. A reference model predicts:
//  - every word of a frame for another node appears on cfg_out exactly three
//    cycles after it went in, unchanged;
//  - a frame for this node never appears on cfg_out, and A_r[index] takes
//    the A_b value on the edge that ends the index word's cycle;
//  - A_r starts all zero after reset (initial configuration: all denied).
module tb_fw_config_node;
  import fw_pkg::*;

  localparam int M = 4, N = 4, NS = M * N;
  localparam int NFRAME = 400;

  logic clk = 0, rst_n = 0;
  addr_t     f_addr;
  cfg_word_t cfg_in, cfg_out;
  logic [NS-1:0] a_r, a_r_exp;
  logic      hit;

  int checks = 0, failures = 0, cyc = 0, n_hits = 0, n_fwd = 0;

  fw_config_node #(.M(M), .N(N)) dut (
    .clk, .rst_n, .f_addr, .cfg_in, .cfg_out, .a_r, .cfg_hit_o(hit)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // expected output word for each cycle
  cfg_word_t exp_out [int];

  // compare cfg_out and A_r every cycle
  always @(negedge clk) if (rst_n) begin
    cfg_word_t e;
    e = exp_out.exists(cyc) ? exp_out[cyc] : '0;
    check(cfg_out.valid == e.valid, $sformatf("cfg_out.valid %0d expected %0d", cfg_out.valid, e.valid));
    if (e.valid) begin
      check(cfg_out == e, $sformatf("cfg_out %h expected %h", cfg_out, e));
      n_fwd++;
    end
    check(a_r == a_r_exp, $sformatf("A_r %h expected %h", a_r, a_r_exp));
  end

  bit         pend = 1'b0;
  logic [7:0] pend_idx;
  logic       pend_ab;

  task automatic send(input cfg_word_t w);
    @(posedge clk);
    if (pend) a_r_exp[pend_idx[3:0]] = pend_ab;
    pend = 1'b0;
    #1 cfg_in = w;
    if (w.valid) exp_out[cyc + 3] = w;
  endtask

  initial begin
    cfg_in = '0;
    f_addr = '{x: 4'd2, y: 4'd1};
    a_r_exp = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < NFRAME; f++) begin
      logic [3:0] x, y;
      logic [7:0] idx;
      logic       ab;
      bit         mine;
      mine = ($urandom_range(0, 1) == 1);
      x = mine ? 4'd2 : 4'($urandom_range(0, 3));
      y = mine ? 4'd1 : 4'($urandom_range(0, 3));
      if (x == 2 && y == 1) mine = 1;
      idx = 8'($urandom_range(0, NS - 1));
      ab  = 1'($urandom);
      repeat ($urandom_range(0, 1) * $urandom_range(0, 4)) send('0);
      if (mine) begin
        send('{valid: 1'b1, data: 8'(x), ab: 1'b0});
        exp_out.delete(cyc + 3);
        send('{valid: 1'b1, data: 8'(y), ab: 1'b0});
        exp_out.delete(cyc + 3);
        send('{valid: 1'b1, data: idx, ab: ab});
        exp_out.delete(cyc + 3);
        n_hits++;
        // the write lands on the edge ending this cycle
        pend = 1'b1; pend_idx = idx; pend_ab = ab;
      end else begin
        send('{valid: 1'b1, data: 8'(x), ab: 1'($urandom)});
        send('{valid: 1'b1, data: 8'(y), ab: 1'($urandom)});
        send('{valid: 1'b1, data: idx, ab: ab});
      end
    end
    send('0);
    repeat (6) send('0);
    check(n_hits > 50 && n_fwd > 300, "both own and forwarded frames exercised");
    $display("frames applied %0d, words forwarded %0d", n_hits, n_fwd);
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
