// Symbol mapper: turns the NRZ bit stream into the two keying bits of the
// I and Q channels.
//
// QPSK (bq = 1): bits are taken in pairs. The first (odd) bit of a pair goes
// to the I channel, the second (even) bit to the Q channel, and both are
// presented together on out_iq when the second bit arrives, so a symbol lasts
// two bit periods. BPSK (bq = 0): every bit goes straight to the I channel
// and the Q bit is held at 0 (the output stage ignores it in this mode).
// These rules follow the modulator description.
//
// This design's own choices: din and bq are sampled on the rising edge of
// clk_b; out_iq and bq_out are registered by the same edge, so a BPSK bit
// shows on out_iq right after the edge that samples it, and a QPSK pair
// right after the edge that samples its second bit. bq_out is the mode
// that belongs to the symbol on out_iq and only changes together with it,
// so both can cross into the sample clock domain as one word. A change of
// bq restarts the pairing: a half-finished pair is dropped.
// Interface: clk_b, rst_n, din, bq in; out_iq ({q, i}) and bq_out out.
// Reset is asynchronous and active low; it clears out_iq and selects BPSK.
module symbol_mapper (
  input  logic             clk_b,
  input  logic             rst_n,
  input  logic             din,
  input  psk_pkg::mode_e   bq,
  output psk_pkg::iq_sym_t out_iq,
  output psk_pkg::mode_e   bq_out
);

  logic have_i;  // first bit of a QPSK pair is held
  logic i_bit;   // the held I bit

  always_ff @(posedge clk_b or negedge rst_n) begin
    if (!rst_n) begin
      have_i  <= 1'b0;
      i_bit   <= 1'b0;
      out_iq  <= '0;
      bq_out  <= psk_pkg::MODE_BPSK;
    end else begin
      if (bq == psk_pkg::MODE_QPSK) begin
        if (!have_i) begin
          i_bit  <= din;
          have_i <= 1'b1;
        end else begin
          out_iq  <= '{q: din, i: i_bit};
          bq_out  <= psk_pkg::MODE_QPSK;
          have_i  <= 1'b0;
        end
      end else begin
        out_iq  <= '{q: 1'b0, i: din};
        bq_out  <= psk_pkg::MODE_BPSK;
        have_i  <= 1'b0;
      end
    end
  end

endmodule
