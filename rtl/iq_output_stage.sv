// Output stage: the two channel "multipliers" and the output adder.
//
// Because the channel signals are +-1, a multiplier only has to keep or
// invert the sign of its carrier: out_iq.i = 1 passes the cosine, 0 passes
// its bitwise inverse (one's complement, -x-1); out_iq.q does the same for
// the sine. The channel samples out_i and out_q are registered. On the next
// edge the adder forms the IF sample, one bit wider than a channel sample:
//   QPSK: if_out = out_i - out_q   (m_I*cos - m_Q*sin)
//   BPSK: if_out = out_i           (sign-extended; Q is unused)
// Sign keying by inversion, the registered two-stage structure, the
// subtraction in QPSK and the one-bit-wider output follow the modulator
// description. The mode bit is delayed with the channel samples so that a
// mode change and its symbol reach the adder together (own choice), and
// reset (asynchronous, active low, own choice) clears every register.
// Latency: two clock edges from inputs to if_out.
module iq_output_stage #(
  parameter int unsigned SAMPLE_W = psk_pkg::DEF_SAMPLE_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  psk_pkg::iq_sym_t           out_iq,
  input  psk_pkg::mode_e             bq,
  input  logic signed [SAMPLE_W-1:0] cosine,
  input  logic signed [SAMPLE_W-1:0] sine,
  output logic signed [SAMPLE_W:0]   if_out
);

  logic signed [SAMPLE_W-1:0] out_i;
  logic signed [SAMPLE_W-1:0] out_q;
  psk_pkg::mode_e             bq_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_i  <= '0;
      out_q  <= '0;
      bq_q   <= psk_pkg::MODE_BPSK;
      if_out <= '0;
    end else begin
      out_i <= out_iq.i ? cosine : ~cosine;
      out_q <= out_iq.q ? sine   : ~sine;
      bq_q  <= bq;
      if (bq_q == psk_pkg::MODE_QPSK) begin
        if_out <= (SAMPLE_W+1)'(out_i) - (SAMPLE_W+1)'(out_q);
      end else begin
        if_out <= (SAMPLE_W+1)'(out_i);
      end
    end
  end

endmodule
