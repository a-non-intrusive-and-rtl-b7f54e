// tb_fw_filter: self-checking test of one firewall filter direction.
//
// A sender model offers random packets (header, size, `size` payload flits)
// with random idle gaps and holds each flit until credit arrives; a receiver
// model grants credit at random. The test's own rule for the verdict is
// "source X even is allowed". Checks:
//  - allowed packets reach the receiver whole and in order, dropped ones not
//    at all, and every flit of every packet is taken from the sender;
//  - an allowed header is offered to the receiver (rx high) exactly three
//    cycles after it first appears, a rejected one is consumed exactly two
//    cycles after;
//  - pass/drop event pulses match the verdicts.
module tb_fw_filter;
  import fw_pkg::*;

  localparam int NPKT = 200;

  logic    clk = 0, rst_n = 0;
  logic    s_tx, s_credit, r_rx, r_credit, permit, pass_o, drop_o;
  flit_t   s_data;
  header_t hdr;

  int checks = 0, failures = 0, cyc = 0;

  fw_filter dut (
    .clk, .rst_n, .s_tx, .s_data, .s_credit, .r_rx, .r_credit,
    .hdr_o(hdr), .permit_i(permit), .pass_o, .drop_o
  );

  assign permit = (hdr.src_x[0] == 1'b0);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  flit_t exp_q[$];   // flits the receiver should see, in order
  flit_t got_q[$];
  int    n_pass = 0, n_drop = 0, n_pass_evt = 0, n_drop_evt = 0;

  // receiver: random credit, records what it takes
  always @(posedge clk) begin
    if (rst_n && r_rx && r_credit) got_q.push_back(s_data);
    r_credit <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    n_pass_evt += int'(pass_o);
    n_drop_evt += int'(drop_o);
  end

  // sender
  initial begin
    s_tx = 0; s_data = '0; r_credit = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < NPKT; p++) begin
      flit_t pkt[$];
      int    size, t0, t_ev;
      bit    allow;
      header_t h;
      pkt.delete();
      h = header_t'(flit_t'($urandom));
      size = $urandom_range(0, 6);
      pkt.push_back(flit_t'(h));
      pkt.push_back(flit_t'(size));
      for (int i = 0; i < size; i++) pkt.push_back(flit_t'($urandom));
      allow = (h.src_x[0] == 1'b0);
      if (allow) begin n_pass++; foreach (pkt[i]) exp_q.push_back(pkt[i]); end
      else n_drop++;
      repeat ($urandom_range(0, 2)) @(posedge clk);
      foreach (pkt[i]) begin
        #1 s_tx = 1; s_data = pkt[i];
        t0 = cyc;
        t_ev = -1;
        forever begin
          @(negedge clk);
          if (i == 0 && t_ev < 0 && (allow ? r_rx : s_credit)) begin
            t_ev = cyc;
            // first cycle the filter reacts to this header
            check(t_ev - t0 == (allow ? 3 : 2),
                  $sformatf("header reaction after %0d cycles (allow=%0d)", t_ev - t0, allow));
          end
          if (s_tx && s_credit) break;
        end
        @(posedge clk);
        #1 s_tx = 0;
      end
    end
    repeat (10) @(posedge clk);
    check(got_q.size() == exp_q.size(),
          $sformatf("received %0d flits, expected %0d", got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
      check(got_q[i] == exp_q[i], $sformatf("flit %0d: got %h expected %h", i, got_q[i], exp_q[i]));
    check(n_pass_evt == n_pass, $sformatf("pass events %0d, expected %0d", n_pass_evt, n_pass));
    check(n_drop_evt == n_drop, $sformatf("drop events %0d, expected %0d", n_drop_evt, n_drop));
    check(n_pass > 10 && n_drop > 10, "both verdicts exercised");
    $display("passed %0d packets, dropped %0d", n_pass, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
