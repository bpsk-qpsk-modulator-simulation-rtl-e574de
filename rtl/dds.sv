// Direct digital synthesizer: generates the two quadrature carriers,
// cos(2*pi*f_c*t) and sin(2*pi*f_c*t), from a phase increment.
//
// It chains the phase accumulator (input register, adder, accumulator
// register) and the quantiser with the sine/cosine table, as the
// synthesizer's block diagram draws them. The carrier frequency is
//   f_c = phase_inc * f_clk / 2**ACC_W,
// e.g. phase_inc = 429496730 gives 10 MHz from a 100 MHz clock.
// Timing: a new phase_inc reaches the accumulator one edge after it is
// applied; the samples for accumulator phase theta(n) appear one edge after
// theta(n). After reset the first sample is cos(0) = A, sin(0) = 0.
// Reset is asynchronous and active low.
module dds #(
  parameter int unsigned ACC_W    = psk_pkg::DEF_ACC_W,
  parameter int unsigned ADDR_W   = psk_pkg::DEF_ADDR_W,
  parameter int unsigned SAMPLE_W = psk_pkg::DEF_SAMPLE_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic        [ACC_W-1:0]    phase_inc,
  output logic signed [SAMPLE_W-1:0] cosine,
  output logic signed [SAMPLE_W-1:0] sine
);

  logic [ACC_W-1:0] phase;

  dds_phase_accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase_inc(phase_inc),
    .phase    (phase)
  );

  dds_sincos_lut #(.ACC_W(ACC_W), .ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W)) u_lut (
    .clk   (clk),
    .phase (phase),
    .cosine(cosine),
    .sine  (sine)
  );

endmodule
