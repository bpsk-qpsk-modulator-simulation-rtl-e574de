// Carries a slowly changing multi-bit word from another clock domain into
// the clk domain.
//
// Two flip-flop stages resynchronise every bit; the output register takes
// the resynchronised word only when it has been the same on two successive
// clk edges, so bits of one update that arrive on different edges never show
// as a mixed word. This requires the word to stay constant for at least
// three clk periods between changes, which holds for the modulator's
// symbols (one or two bit periods at a bit clock far below the sample
// clock). Latency: three to four clk edges. Reset is asynchronous, active
// low, and loads RESET_VAL. This synchroniser is this design's own choice;
// the modulator description does not say how its two clocks are related.
module word_sync #(
  parameter int unsigned W         = 3,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] s1;
  logic [W-1:0] s2;
  logic [W-1:0] s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= RESET_VAL;
      s2 <= RESET_VAL;
      s3 <= RESET_VAL;
      q  <= RESET_VAL;
    end else begin
      s1 <= d;
      s2 <= s1;
      s3 <= s2;
      if (s2 == s3) q <= s3;
    end
  end

endmodule
