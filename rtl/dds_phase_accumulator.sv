// Phase accumulator of the direct digital synthesizer.
//
// The phase increment is first captured in an input register, and the
// accumulator adds the registered increment to its own value on every rising
// clock edge, wrapping modulo 2**ACC_W. Its value is the phase theta(n), a
// fraction of a full turn, so a constant increment dtheta gives a carrier of
// f_out = dtheta * f_clk / 2**ACC_W. This structure (input register, adder
// and accumulator register) follows the synthesizer's block diagram.
//
// This design's own choices: ACC_W = 32 by default; reset (asynchronous,
// active low) clears both registers, so the carrier starts at phase 0. A new
// increment takes effect on phase two clock edges after it is applied.
module dds_phase_accumulator #(
  parameter int unsigned ACC_W = psk_pkg::DEF_ACC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] phase_inc,
  output logic [ACC_W-1:0] phase
);

  logic [ACC_W-1:0] inc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc_q <= '0;
      phase <= '0;
    end else begin
      inc_q <= phase_inc;
      phase <= phase + inc_q;
    end
  end

endmodule
