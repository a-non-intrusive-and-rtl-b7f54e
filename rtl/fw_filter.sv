// fw_filter: one direction of the NoC firewall (router -> NI or NI -> router).
//
// The filter sits on a credit-based link without buffering any flit. The
// sender raises `s_tx` with a flit on `s_data` and holds both until the
// receiver side answers with credit; a flit moves in a cycle where tx and
// credit are both high.
//
// Operation, for a header first offered in cycle t:
//   t    IDLE   credit to the sender is held low; the header is copied into
//               hdr_q (exposed on hdr_o).
//   t+1  CHECK  the parent's verdict `permit_i` (computed from hdr_o) is
//               registered.
//   allowed:    t+2 SETUP sets the control signals; from t+3 (PASS) the
//               handshake is joined through: r_rx = s_tx, s_credit = r_credit.
//               The header therefore moves three cycles after it appeared.
//   rejected:   from t+2 (DROP) credit to the sender is held high and r_rx low,
//               so the packet is consumed and never reaches the receiver.
// In PASS and DROP the filter counts the flits that move: the second flit is
// the size, stored in rem_q, and the packet ends after `size` more flits.
// The filter then returns to IDLE for the next header.
//
// The 3-cycle forward / 2-cycle discard latencies, the header and size
// checks, and discarding by consuming the packet follow the source design.
// The exact state split and the event pulses (pass_o / drop_o, one cycle in
// CHECK) are this design's choices. Lint notes rst_n as used both
// asynchronously and synchronously: the synchronous use is only the
// assertion's disable condition, not logic.
module fw_filter
  import fw_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // sender side (its output port)
  input  logic    s_tx,
  input  flit_t   s_data,
  output logic    s_credit,
  // receiver side (its input port); data runs past the filter on a wire
  output logic    r_rx,
  input  logic    r_credit,
  // permission check, done by the parent on the latched header
  output header_t hdr_o,
  input  logic    permit_i,
  // status
  output logic    pass_o,
  output logic    drop_o
);

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_SETUP, S_PASS, S_DROP} state_t;
  typedef enum logic [1:0] {F_HDR, F_SIZE, F_PAY} fpos_t;

  state_t state_q;
  fpos_t  fpos_q;
  flit_t  hdr_q, rem_q;  // rem_q: the packet-size register
  logic   xfer, last;

  assign hdr_o  = header_t'(hdr_q);
  assign pass_o = (state_q == S_CHECK) &&  permit_i;
  assign drop_o = (state_q == S_CHECK) && !permit_i;

  always_comb begin
    s_credit = 1'b0;
    r_rx     = 1'b0;
    unique case (state_q)
      S_PASS: begin s_credit = r_credit; r_rx = s_tx; end
      S_DROP: begin s_credit = 1'b1;     r_rx = 1'b0; end
      default: ;
    endcase
  end

  assign xfer = s_tx && s_credit;
  // last flit of the packet: a zero size flit, or the final payload flit
  assign last = xfer && (((fpos_q == F_SIZE) && (s_data == '0)) ||
                         ((fpos_q == F_PAY)  && (rem_q == flit_t'(1))));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      fpos_q  <= F_HDR;
      hdr_q   <= '0;
      rem_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE:  if (s_tx) begin
                   hdr_q   <= s_data;
                   state_q <= S_CHECK;
                 end
        S_CHECK: state_q <= permit_i ? S_SETUP : S_DROP;
        S_SETUP: state_q <= S_PASS;
        default: ;
      endcase
      if (xfer) begin
        unique case (fpos_q)
          F_HDR:  fpos_q <= F_SIZE;
          F_SIZE: begin
                    rem_q  <= s_data;
                    fpos_q <= F_PAY;
                  end
          default: rem_q <= rem_q - flit_t'(1);
        endcase
        if (last) begin
          fpos_q  <= F_HDR;
          state_q <= S_IDLE;
        end
      end
    end
  end

  // Credit-based link rule the filter relies on: an offered flit stays
  // offered, unchanged, until it is taken.
  a_sender_holds: assert property (@(posedge clk) disable iff (!rst_n)
    (s_tx && !s_credit) |=> (s_tx && $stable(s_data)));

endmodule
