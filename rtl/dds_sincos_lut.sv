// Phase quantiser and sine/cosine lookup table of the direct digital
// synthesizer.
//
// The quantiser keeps the top ADDR_W bits of the ACC_W-bit phase
// (truncation), and the table, 2**ADDR_W words deep, returns the cosine and
// sine of that phase as SAMPLE_W-bit two's complement samples on the next
// rising clock edge (a synchronous read, as a block RAM does). Entry k holds
//   cos = round(A * cos(2*pi*k / 2**ADDR_W)),
//   sin = round(A * sin(2*pi*k / 2**ADDR_W)),  A = 2**(SAMPLE_W-1) - 1,
// computed at elaboration by a constant function, so the table follows the
// parameters. The quantiser, a full-turn table of both functions and the
// 10-bit samples follow the synthesizer description; the table depth (512,
// which fits one 18 Kbit block RAM as 20-bit words), the amplitude and the
// rounding are this design's own choices.
// Interface: clk and the full accumulator phase in; cosine and sine out.
// The low ACC_W-ADDR_W phase bits are deliberately unused (the quantiser
// drops them), which lint reports as unused input bits. The table's output
// register has no reset: it is reloaded on every edge.
module dds_sincos_lut #(
  parameter int unsigned ACC_W    = psk_pkg::DEF_ACC_W,
  parameter int unsigned ADDR_W   = psk_pkg::DEF_ADDR_W,
  parameter int unsigned SAMPLE_W = psk_pkg::DEF_SAMPLE_W
) (
  input  logic                       clk,
  input  logic        [ACC_W-1:0]    phase,
  output logic signed [SAMPLE_W-1:0] cosine,
  output logic signed [SAMPLE_W-1:0] sine
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  typedef logic [2*SAMPLE_W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    real amp;
    real ang;
    amp = real'((1 << (SAMPLE_W - 1)) - 1);
    for (int k = 0; k < int'(DEPTH); k++) begin
      ang = 6.283185307179586 * real'(k) / real'(DEPTH);
      build_rom[k] = {SAMPLE_W'($rtoi($floor(amp * $cos(ang) + 0.5))),
                      SAMPLE_W'($rtoi($floor(amp * $sin(ang) + 0.5)))};
    end
  endfunction

  localparam rom_t ROM = build_rom();

  logic [ADDR_W-1:0]     addr;
  logic [2*SAMPLE_W-1:0] word;

  assign addr = phase[ACC_W-1 -: ADDR_W];  // quantiser Q(): truncation

  always_ff @(posedge clk) begin
    word <= ROM[addr];
  end

  assign cosine = word[2*SAMPLE_W-1:SAMPLE_W];
  assign sine   = word[SAMPLE_W-1:0];

endmodule
