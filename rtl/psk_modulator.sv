// BPSK/QPSK modulator: NRZ bits in, digital IF samples out.
//
// The symbol mapper (bit clock clk_b) turns the bit stream into the keying
// bits out_iq of the I and Q channels, pairing bits in QPSK and passing
// each bit to I in BPSK. The direct digital synthesizer (sample clock clk)
// generates a cosine and a sine carrier at f_c = phase_inc * f_clk / 2**ACC_W.
// The output stage keeps or inverts the sign of each carrier according to
// out_iq and adds the two channels (QPSK) or passes the I channel (BPSK):
//   if_out = m_I * cos(2*pi*f_c*t) - m_Q * sin(2*pi*f_c*t).
// This block structure follows the modulator description; so do the 10-bit
// carriers and the 11-bit output.
//
// This design's own choices: the mapper's symbol and mode cross into the
// clk domain through a small synchroniser, so clk_b may be any clock whose
// bit period is at least three clk periods (the symbol then reaches the
// output stage three or four clk edges after it leaves the mapper, and
// if_out two edges later); out_iq and out_bq are brought out as the symbol
// and the modulation type that the output stage is using. One asynchronous active-low reset serves both
// domains. bq is sampled on clk_b with din.
module psk_modulator #(
  parameter int unsigned ACC_W    = psk_pkg::DEF_ACC_W,
  parameter int unsigned ADDR_W   = psk_pkg::DEF_ADDR_W,
  parameter int unsigned SAMPLE_W = psk_pkg::DEF_SAMPLE_W
) (
  input  logic                       clk,
  input  logic                       clk_b,
  input  logic                       rst_n,
  input  logic                       din,
  input  psk_pkg::mode_e             bq,
  input  logic        [ACC_W-1:0]    phase_inc,
  output logic signed [SAMPLE_W:0]   if_out,
  output psk_pkg::iq_sym_t           out_iq,
  output psk_pkg::mode_e             out_bq
);

  psk_pkg::iq_sym_t           map_iq;
  psk_pkg::mode_e             map_bq;
  logic signed [SAMPLE_W-1:0] cosine;
  logic signed [SAMPLE_W-1:0] sine;

  symbol_mapper u_mapper (
    .clk_b  (clk_b),
    .rst_n  (rst_n),
    .din    (din),
    .bq     (bq),
    .out_iq (map_iq),
    .bq_out (map_bq)
  );

  word_sync #(.W(3)) u_sync (
    .clk  (clk),
    .rst_n(rst_n),
    .d    ({map_bq, map_iq}),
    .q    ({out_bq, out_iq})
  );

  dds #(.ACC_W(ACC_W), .ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W)) u_dds (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase_inc(phase_inc),
    .cosine   (cosine),
    .sine     (sine)
  );

  iq_output_stage #(.SAMPLE_W(SAMPLE_W)) u_out (
    .clk   (clk),
    .rst_n (rst_n),
    .out_iq(out_iq),
    .bq    (out_bq),
    .cosine(cosine),
    .sine  (sine),
    .if_out(if_out)
  );

endmodule
