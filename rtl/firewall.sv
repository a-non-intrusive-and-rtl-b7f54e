// firewall: access-control unit placed between a router's local port and the
// network interface (NI) of its processing element, on a credit-based link.
//
// Two fw_filter instances watch the two directions without storing packets:
//  - inbound (router -> NI): the packet is let through only if the bit of its
//    source (x, y) in the access register A_r is set; otherwise it is
//    consumed and discarded, so it cannot block the router.
//  - outbound (NI -> router): the packet may enter the network only if its
//    header source equals this firewall's own address F_addr, which stops a
//    processing element from impersonating another.
// The data wires run directly from sender to receiver; the firewall only
// reads them and steers tx/rx and credit. A_r is written through the serial
// configuration chain (fw_config_node). F_addr is a register loaded at reset
// with the parameters FX, FY.
//
// Timing: an allowed packet's header moves three cycles after it is offered,
// a rejected one is consumed from two cycles after; the rest of a packet
// then moves at the link's own rate. Configuration words pass through in
// three cycles. The event outputs pulse once per packet decision.
//
// A source coordinate outside the M x N mesh is treated as not allowed
// (this design's choice). The destination half of the header is not used:
// the firewall judges packets by their source only, so lint reports those
// header bits as unused.
module firewall
  import fw_pkg::*;
#(
  parameter int unsigned M          = 4,
  parameter int unsigned N          = 4,
  parameter int unsigned FX         = 0,
  parameter int unsigned FY         = 0,
  parameter bit          INIT_ALLOW = 1'b0
)(
  input  logic      clk,
  input  logic      rst_n,
  // router output port -> NI input port (inbound traffic)
  input  flit_t     rt_data_out,
  input  logic      rt_tx,
  output logic      rt_credit_in,
  output logic      ni_rx,
  input  logic      ni_credit_out,
  // NI output port -> router input port (outbound traffic)
  input  flit_t     ni_data_out,
  input  logic      ni_tx,
  output logic      ni_credit_in,
  output logic      rt_rx,
  input  logic      rt_credit_out,
  // configuration chain
  input  cfg_word_t cfg_in,
  output cfg_word_t cfg_out,
  // events
  output logic      in_pass_o,
  output logic      in_drop_o,
  output logic      out_pass_o,
  output logic      out_drop_o,
  output logic      cfg_hit_o
);

  localparam int unsigned NS = M * N;

  addr_t         f_addr_q;
  logic [NS-1:0] a_r;
  header_t       hdr_in, hdr_out;
  logic          permit_in, permit_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) f_addr_q <= '{x: coord_t'(FX), y: coord_t'(FY)};
    else        f_addr_q <= f_addr_q;
  end

  fw_config_node #(.M(M), .N(N), .INIT_ALLOW(INIT_ALLOW)) u_cfg (
    .clk, .rst_n,
    .f_addr   (f_addr_q),
    .cfg_in, .cfg_out,
    .a_r,
    .cfg_hit_o
  );

  // inbound verdict: A_r bit of the packet's source
  always_comb begin
    permit_in = 1'b0;
    if (int'(hdr_in.src_x) < M && int'(hdr_in.src_y) < N)
      permit_in = a_r[ar_index(int'(hdr_in.src_x), int'(hdr_in.src_y), M)];
  end

  // outbound verdict: declared source must be this node
  assign permit_out = (hdr_out.src_x == f_addr_q.x) && (hdr_out.src_y == f_addr_q.y);

  fw_filter u_in (
    .clk, .rst_n,
    .s_tx     (rt_tx),
    .s_data   (rt_data_out),
    .s_credit (rt_credit_in),
    .r_rx     (ni_rx),
    .r_credit (ni_credit_out),
    .hdr_o    (hdr_in),
    .permit_i (permit_in),
    .pass_o   (in_pass_o),
    .drop_o   (in_drop_o)
  );

  fw_filter u_out (
    .clk, .rst_n,
    .s_tx     (ni_tx),
    .s_data   (ni_data_out),
    .s_credit (ni_credit_in),
    .r_rx     (rt_rx),
    .r_credit (rt_credit_out),
    .hdr_o    (hdr_out),
    .permit_i (permit_out),
    .pass_o   (out_pass_o),
    .drop_o   (out_drop_o)
  );

endmodule
