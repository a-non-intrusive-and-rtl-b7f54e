// noc_model: behavioural stand-in for the routers of an M x N mesh, seen
// only at their local ports. Not synthesizable, not a router design.
//
// Each node's local input port (fed through the firewall) collects flits;
// once a whole packet (header, size, size payload flits) is in, the packet
// is appended to the output queue of the destination node named in its
// header. Each local output port offers its queue head with tx (registered) and drops
// it when the firewall returns credit. Packets to one destination never
// interleave. Input credit is granted at random to exercise back-pressure.
module noc_model
  import fw_pkg::*;
#(
  parameter int M = 4,
  parameter int N = 4
)(
  input  logic  clk,
  input  logic  rst_n,
  // local input ports (from the firewalls)
  input  flit_t rt_data_in    [M*N],
  input  logic  rt_rx         [M*N],
  output logic  rt_credit_out [M*N],
  // local output ports (to the firewalls)
  output flit_t rt_data_out   [M*N],
  output logic  rt_tx         [M*N],
  input  logic  rt_credit_in  [M*N],
  output int    n_routed
);
  localparam int NS = M * N;

  flit_t inq  [NS][$];
  flit_t outq [NS][$];

  always @(posedge clk) begin
    if (!rst_n) begin
      n_routed = 0;
      for (int i = 0; i < NS; i++) begin
        inq[i].delete();
        outq[i].delete();
        rt_credit_out[i] <= 1'b0;
        rt_tx[i]         <= 1'b0;
        rt_data_out[i]   <= '0;
      end
    end else begin
      for (int i = 0; i < NS; i++) begin
        if (rt_tx[i] && rt_credit_in[i]) void'(outq[i].pop_front());
        if (rt_rx[i] && rt_credit_out[i]) begin
          inq[i].push_back(rt_data_in[i]);
          if (inq[i].size() >= 2 && inq[i].size() == int'(inq[i][1]) + 2) begin
            automatic header_t h = header_t'(inq[i][0]);
            automatic int d = int'(h.dst_y) * M + int'(h.dst_x);
            if (int'(h.dst_x) < M && int'(h.dst_y) < N) begin
              foreach (inq[i][k]) outq[d].push_back(inq[i][k]);
              n_routed = n_routed + 1;
            end
            inq[i].delete();
          end
        end
        rt_credit_out[i] <= ($urandom_range(0, 3) != 0);
      end
      // present the (possibly new) queue heads for the next cycle
      for (int i = 0; i < NS; i++) begin
        rt_tx[i]       <= (outq[i].size() > 0);
        rt_data_out[i] <= (outq[i].size() > 0) ? outq[i][0] : '0;
      end
    end
  end

endmodule
