// Workload testbench: the two modulator runs of the design's reference
// simulations, at the default sizes, f_clk = 100 MHz and f_c = 10 MHz.
//
//  1. BPSK: the I symbol alternates 0, 1, 0, 1 (carrier phase 180, 0, 180,
//     0 degrees).
//  2. QPSK: the symbols 00, 01, 10, 11 are sent in that order (written
//     {Q, I}; carrier phases -135, -45, 135 and 45 degrees).
// Each bit lasts 40 sample clocks (four carrier periods); each QPSK symbol
// lasts two bits. The IF output is compared sample by sample with the ideal,
// unquantised equations s = m_I*A*cos(theta) (BPSK) and
// s = m_I*A*cos(theta) - m_Q*A*sin(theta) (QPSK), A = 511, with a tolerance
// that covers the 9-bit phase quantisation (A*2*pi/512 per carrier), the
// rounding of the table and the one's-complement negation. The carrier
// phase of every symbol is also measured by correlating the IF with cos and
// sin of the exact phase over the symbol and must be within 3 degrees of the
// expected state.
module tb_psk_workloads;
  import psk_pkg::*;

  localparam int unsigned ACC_W = 32;
  localparam logic [ACC_W-1:0] K = 32'd429496730;
  localparam real TWO_PI = 6.283185307179586;
  localparam real A = 511.0;
  localparam int MAXN = 20000;

  logic                     clk = 1'b0;
  logic                     clk_b = 1'b0;
  logic                     rst_n = 1'b0;
  logic                     din = 1'b0;
  mode_e                    bq = MODE_BPSK;
  logic signed [10:0]       if_out;
  iq_sym_t                  out_iq;
  mode_e                    out_bq;

  int checks = 0;
  int failures = 0;

  psk_modulator dut (.clk(clk), .clk_b(clk_b), .rst_n(rst_n), .din(din), .bq(bq),
                     .phase_inc(K), .if_out(if_out), .out_iq(out_iq), .out_bq(out_bq));

  always #5 clk = ~clk;
  initial begin
    #3;
    forever #200 clk_b = ~clk_b;  // bit period 400 = 40 sample clocks, offset from clk
  end

  initial begin
    repeat (MAXN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: the BPSK run, then the QPSK run
  logic done = 1'b0;
  initial begin
    logic bpsk_bits[4] = '{1'b0, 1'b1, 1'b0, 1'b1};
    logic qpsk_bits[8] = '{1'b0, 1'b0,  1'b1, 1'b0,  1'b0, 1'b1,  1'b1, 1'b1};  // pairs (I, Q)
    @(negedge clk_b);
    rst_n = 1'b1;
    foreach (bpsk_bits[j]) begin
      @(negedge clk_b);
      bq = MODE_BPSK;
      din = bpsk_bits[j];
    end
    foreach (qpsk_bits[j]) begin
      @(negedge clk_b);
      bq = MODE_QPSK;
      din = qpsk_bits[j];
    end
    repeat (3) @(negedge clk_b);
    done = 1'b1;
  end

  function automatic real expected_angle(input logic [2:0] w);
    real mi, mq;
    mi = w[0] ? 1.0 : -1.0;
    mq = w[2] ? (w[1] ? 1.0 : -1.0) : 0.0;
    return $atan2(mq, mi) * 360.0 / TWO_PI;
  endfunction

  initial begin
    int          n, run, symbols, nb, nq;
    logic [2:0]  hist[MAXN];
    real         theta, ideal, err, ci, cq, ang, d, tol;
    logic [63:0] ph;
    n = 0; run = 0; symbols = 0; nb = 0; nq = 0;
    ci = 0.0; cq = 0.0;
    @(posedge rst_n);
    while (!done) begin
      @(posedge clk);
      #1;
      hist[n] = {out_bq, out_iq};
      if (n >= 3) begin
        logic [2:0] w;
        w = hist[n-2];                       // symbol the output stage used for this sample
        ph = 64'(n - 3) * 64'(K);
        theta = TWO_PI * real'(ph[ACC_W-1:0]) / 4294967296.0;
        ideal = (w[0] ? A : -A) * $cos(theta);
        if (w[2]) ideal -= (w[1] ? A : -A) * $sin(theta);
        tol = w[2] ? 12.5 : 8.0;
        err = real'(if_out) - ideal;
        checks++;
        if (err > tol || err < -tol) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d if_out=%0d ideal=%f", n, if_out, ideal);
        end
        // coherent phase measurement over each symbol, skipping its first 3 samples
        if (n >= 4 && hist[n-2] != hist[n-3]) begin
          if (run >= 30) begin
            ang = $atan2(cq, ci) * 360.0 / TWO_PI;
            d = ang - expected_angle(hist[n-3]);
            if (d > 180.0) d -= 360.0;
            if (d < -180.0) d += 360.0;
            checks++;
            symbols++;
            if (hist[n-3][2]) nq++; else nb++;
            $display("symbol {mode,q,i}=%b: carrier phase %7.2f deg (expected %7.2f)", hist[n-3], ang, expected_angle(hist[n-3]));
            if (d > 3.0 || d < -3.0) failures++;
          end
          run = 0; ci = 0.0; cq = 0.0;
        end else begin
          run++;
          if (run > 3) begin
            ci += real'(if_out) * $cos(theta);
            cq -= real'(if_out) * $sin(theta);
          end
        end
      end
      n++;
    end
    // the last symbol is still on at the end: measure it now
    if (run >= 30) begin
      ang = $atan2(cq, ci) * 360.0 / TWO_PI;
      d = ang - expected_angle(hist[n-3]);
      checks++;
      if (hist[n-3][2]) nq++; else nb++;
      $display("symbol {mode,q,i}=%b: carrier phase %7.2f deg (expected %7.2f)", hist[n-3], ang, expected_angle(hist[n-3]));
      if (d > 3.0 || d < -3.0) failures++;
    end
    // four BPSK and four QPSK symbols must have been measured
    checks++;
    if (nb != 4 || nq != 4) failures++;
    $display("measured symbols: bpsk=%0d qpsk=%0d, samples=%0d", nb, nq, n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
