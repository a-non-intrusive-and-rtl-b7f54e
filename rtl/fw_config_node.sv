// fw_config_node: one firewall's stage of the serial configuration circuit,
// holding that firewall's access register A_r.
//
// Configuration words (fw_pkg::cfg_word_t) enter on cfg_in and leave on
// cfg_out exactly three cycles later through a 3-deep shift register, so a
// rule advances one firewall every three cycles along the chain. A rule is a
// frame of three consecutive valid words: target X, target Y, A_r index; the
// A_b value rides on the dedicated `ab` bit of the index word. When the index
// word arrives and the two words before it (still in the shift register)
// name this firewall's own address f_addr, the node writes A_r[index] = A_b
// at that clock edge and removes the frame from the chain. Frames for other
// firewalls pass on unchanged. An index at or above M*N is ignored.
//
// A_r has one bit per node of the M x N mesh, bit y*M+x for node (x, y);
// a set bit allows traffic from that source. After reset every bit holds
// INIT_ALLOW. The three-cycle hop, the x / y / index word order, the
// dedicated A_b signal and the reset-time default permission follow the
// source design; the word width, the frame alignment by a phase counter
// (valid words of a frame must be back to back) and the bit order of A_r are
// this design's choices.
module fw_config_node
  import fw_pkg::*;
#(
  parameter int unsigned M          = 4,
  parameter int unsigned N          = 4,
  parameter bit          INIT_ALLOW = 1'b0
)(
  input  logic        clk,
  input  logic        rst_n,
  input  addr_t       f_addr,
  input  cfg_word_t   cfg_in,
  output cfg_word_t   cfg_out,
  output logic [M*N-1:0] a_r,
  output logic        cfg_hit_o
);

  localparam int unsigned NS = M * N;
  localparam int unsigned IW = (NS > 1) ? $clog2(NS) : 1;

  cfg_word_t  s0_q, s1_q, s2_q;
  logic [1:0] phase_q;
  logic       hit;

  assign hit = cfg_in.valid && (phase_q == 2'd2) && s0_q.valid && s1_q.valid &&
               (s1_q.data == CFG_W'(f_addr.x)) && (s0_q.data == CFG_W'(f_addr.y));
  assign cfg_hit_o = hit;
  assign cfg_out   = s2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_q    <= '0;
      s1_q    <= '0;
      s2_q    <= '0;
      phase_q <= '0;
      a_r     <= {NS{INIT_ALLOW}};
    end else begin
      phase_q <= (cfg_in.valid && phase_q != 2'd2) ? phase_q + 2'd1 : 2'd0;
      if (hit) begin
        s0_q <= '0;
        s1_q <= '0;
        s2_q <= '0;
        if (int'(cfg_in.data) < NS)
          a_r[cfg_in.data[IW-1:0]] <= cfg_in.ab;
      end else begin
        s0_q <= cfg_in;
        s1_q <= s0_q;
        s2_q <= s1_q;
      end
    end
  end

endmodule
