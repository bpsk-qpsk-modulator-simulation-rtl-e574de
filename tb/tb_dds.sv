// Self-checking testbench of dds (phase accumulator plus sine/cosine table).
//
// With the 10 MHz word K = 429496730 at a 100 MHz clock, and then with a
// random word, the samples after edge n must be the table values of phase
// (n-2)*K (increment register, accumulator, table read), the table value
// of address a being round(511*cos(2*pi*a/512)) and round(511*sin(...)),
// computed here in real arithmetic. The carrier frequency is checked too:
// over 2000 samples the 10 MHz sine must cross zero upwards 200 times, +-1.
module tb_dds;

  localparam int unsigned ACC_W = 32;
  localparam int unsigned SAMPLE_W = 10;
  localparam real TWO_PI = 6.283185307179586;

  logic                       clk = 1'b0;
  logic                       rst_n = 1'b0;
  logic        [ACC_W-1:0]    phase_inc = '0;
  logic signed [SAMPLE_W-1:0] cosine;
  logic signed [SAMPLE_W-1:0] sine;

  int checks = 0;
  int failures = 0;

  dds dut (.clk(clk), .rst_n(rst_n), .phase_inc(phase_inc), .cosine(cosine), .sine(sine));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input real x);
    return $rtoi($floor(x + 0.5));
  endfunction

  initial begin
    logic [ACC_W-1:0] k;
    logic [63:0]      ph;
    int               a, crossings, prev_sine;
    for (int t = 0; t < 2; t++) begin
      k = (t == 0) ? 32'd429496730 : $urandom();
      @(negedge clk);
      rst_n = 1'b0;
      phase_inc = k;
      @(negedge clk);
      rst_n = 1'b1;
      crossings = 0;
      prev_sine = 0;
      // the first edge after reset reads the table at phase 0
      for (int n = 1; n <= 2000; n++) begin
        @(posedge clk);
        #1;
        ph = (n >= 2) ? 64'(n - 2) * 64'(k) : 64'd0;
        a = int'(ph[ACC_W-1 -: 9]);
        checks++;
        if (int'(cosine) != rnd(511.0 * $cos(TWO_PI * real'(a) / 512.0)) ||
            int'(sine) != rnd(511.0 * $sin(TWO_PI * real'(a) / 512.0))) begin
          failures++;
          if (failures < 10) $display("FAIL K=%h n=%0d cos=%0d sin=%0d addr=%0d", k, n, cosine, sine, a);
        end
        if (n > 1 && prev_sine < 0 && int'(sine) >= 0) crossings++;
        prev_sine = int'(sine);
      end
      if (t == 0) begin
        checks++;
        if (crossings < 199 || crossings > 201) begin
          failures++;
          $display("FAIL carrier: %0d upward zero crossings in 2000 samples", crossings);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
