// secure_noc: the firewall layer of an M x N mesh network-on-chip.
//
// Every mesh node (x, y), numbered y*M + x, gets one firewall between its
// router's local port and its network interface (NI). The routers and NIs are
// outside this module: their local-port signals are the ports here, as
// arrays indexed by node. Following the credit-based port interface, the
// flit data and the link clocks (clockTx -> clockRx) run straight from
// sender to receiver; the firewall controls tx/rx and credit.
//
// The firewalls' configuration stages are chained along a Hamiltonian path
// that snakes through the mesh: row 0 from x = 0 to M-1, row 1 back, and so
// on. The chain starts at node (0,0), fed by cfg_in from the trusted
// configuring element, and cfg_out leaves the last node. A rule for the k-th
// firewall on the chain (k = 1 for node (0,0)) takes effect 3*k cycles after
// its first word enters; for the last node that is 3*M*N cycles.
//
// Event outputs are per node, one-cycle pulses: inbound packet passed or
// dropped, outbound packet passed or dropped, configuration rule applied.
module secure_noc
  import fw_pkg::*;
#(
  parameter int unsigned M          = 4,
  parameter int unsigned N          = 4,
  parameter bit          INIT_ALLOW = 1'b0
)(
  input  logic  clk,
  input  logic  rst_n,
  // router local output port -> NI input port
  input  flit_t rt_data_out   [M*N],
  input  logic  rt_tx         [M*N],
  input  logic  rt_clock_tx   [M*N],
  output logic  rt_credit_in  [M*N],
  output flit_t ni_data_in    [M*N],
  output logic  ni_rx         [M*N],
  output logic  ni_clock_rx   [M*N],
  input  logic  ni_credit_out [M*N],
  // NI output port -> router local input port
  input  flit_t ni_data_out   [M*N],
  input  logic  ni_tx         [M*N],
  input  logic  ni_clock_tx   [M*N],
  output logic  ni_credit_in  [M*N],
  output flit_t rt_data_in    [M*N],
  output logic  rt_rx         [M*N],
  output logic  rt_clock_rx   [M*N],
  input  logic  rt_credit_out [M*N],
  // configuration circuit
  input  cfg_word_t cfg_in,
  output cfg_word_t cfg_out,
  // events
  output logic  in_pass       [M*N],
  output logic  in_drop       [M*N],
  output logic  out_pass      [M*N],
  output logic  out_drop      [M*N],
  output logic  cfg_hit       [M*N]
);

  localparam int unsigned NS = M * N;

  // chain[k] enters the k-th firewall on the path; chain[NS] leaves the last
  cfg_word_t chain [NS+1];

  assign chain[0] = cfg_in;
  assign cfg_out  = chain[NS];

  for (genvar k = 0; k < NS; k++) begin : g_node
    localparam int unsigned X  = chain_x(k, M);
    localparam int unsigned Y  = chain_y(k, M);
    localparam int unsigned ID = ar_index(X, Y, M);

    assign ni_data_in[ID]  = rt_data_out[ID];
    assign ni_clock_rx[ID] = rt_clock_tx[ID];
    assign rt_data_in[ID]  = ni_data_out[ID];
    assign rt_clock_rx[ID] = ni_clock_tx[ID];

    firewall #(.M(M), .N(N), .FX(X), .FY(Y), .INIT_ALLOW(INIT_ALLOW)) u_fw (
      .clk, .rst_n,
      .rt_data_out   (rt_data_out[ID]),
      .rt_tx         (rt_tx[ID]),
      .rt_credit_in  (rt_credit_in[ID]),
      .ni_rx         (ni_rx[ID]),
      .ni_credit_out (ni_credit_out[ID]),
      .ni_data_out   (ni_data_out[ID]),
      .ni_tx         (ni_tx[ID]),
      .ni_credit_in  (ni_credit_in[ID]),
      .rt_rx         (rt_rx[ID]),
      .rt_credit_out (rt_credit_out[ID]),
      .cfg_in        (chain[k]),
      .cfg_out       (chain[k+1]),
      .in_pass_o     (in_pass[ID]),
      .in_drop_o     (in_drop[ID]),
      .out_pass_o    (out_pass[ID]),
      .out_drop_o    (out_drop[ID]),
      .cfg_hit_o     (cfg_hit[ID])
    );
  end

endmodule
