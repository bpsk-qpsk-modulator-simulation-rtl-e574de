// Shared types and default sizes of the BPSK/QPSK modulator.
//
// SAMPLE_W (10-bit carrier samples, hence an 11-bit IF output) follows the
// modulator description. ACC_W (32-bit phase accumulator) and ADDR_W (a
// 512-entry sine/cosine table, one 18 Kbit block RAM worth of 20-bit words)
// are this design's own choices; the description does not give them.
package psk_pkg;

  // Default sizes.
  localparam int unsigned DEF_ACC_W    = 32;  // phase accumulator width
  localparam int unsigned DEF_ADDR_W   = 9;   // quantised phase width, table depth 2**ADDR_W
  localparam int unsigned DEF_SAMPLE_W = 10;  // carrier sample width (two's complement)

  // Modulation type selected by the bq input.
  typedef enum logic {
    MODE_BPSK = 1'b0,
    MODE_QPSK = 1'b1
  } mode_e;

  // One symbol: bit 0 keys the I (cosine) channel, bit 1 the Q (sine)
  // channel; a 1 keeps the carrier's sign, a 0 inverts it.
  typedef struct packed {
    logic q;
    logic i;
  } iq_sym_t;

endpackage
