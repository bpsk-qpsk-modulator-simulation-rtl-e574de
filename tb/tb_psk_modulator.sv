// End-to-end testbench of psk_modulator at its default sizes (32-bit phase
// accumulator, 512-entry table, 10-bit carriers, 11-bit IF).
//
// The sample clock runs at 100 MHz and the carrier word is 429496730, a
// 10 MHz carrier. The bit clock (period 16.3 sample periods) is never
// aligned with the sample clock, so the symbols really cross clock domains.
// Bits are sent in segments of random length that alternate between QPSK
// and BPSK.
//
// Three things are checked independently of the design:
//  * the symbol and mode used by the output stage, sampled on every clk edge,
//    must be the symbol the bit stream calls for, taken 3 or 4 clk edges
//    earlier (never a mix of two symbols);
//  * every IF sample must equal m_I*cos - m_Q*sin (QPSK) or m_I*cos (BPSK),
//    where a keyed-off carrier c is -c-1, computed from the symbol two edges
//    earlier and from cos/sin of the closed-form phase (n-2)*K quantised to
//    9 bits, in real arithmetic;
//  * the carrier frequency: the phase wraps once every 10 samples.
// It counts how often each mechanism happened and counts a failure for one
// that never did: BPSK bits, each of the four QPSK symbols, switches in both
// directions, QPSK half pairs dropped by a switch, 180-degree BPSK phase
// flips and phase-accumulator wraps.
module tb_psk_modulator;
  import psk_pkg::*;

  localparam int unsigned ACC_W = 32;
  localparam int unsigned SAMPLE_W = 10;
  localparam logic [ACC_W-1:0] K = 32'd429496730;  // 10 MHz at 100 MHz
  localparam real TWO_PI = 6.283185307179586;
  localparam int NSEG = 40;
  localparam int MAXN = 40000;

  logic                       clk = 1'b0;
  logic                       clk_b = 1'b0;
  logic                       rst_n = 1'b0;
  logic                       din = 1'b0;
  mode_e                      bq = MODE_BPSK;
  logic        [ACC_W-1:0]    phase_inc = K;
  logic signed [SAMPLE_W:0]   if_out;
  iq_sym_t                    out_iq;
  mode_e                      out_bq;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_bpsk_bits = 0, n_qpsk_sym[4], n_to_qpsk = 0, n_to_bpsk = 0;
  int n_drop = 0, n_flip = 0, n_wrap = 0;

  psk_modulator dut (.clk(clk), .clk_b(clk_b), .rst_n(rst_n), .din(din), .bq(bq),
                     .phase_inc(phase_inc), .if_out(if_out), .out_iq(out_iq),
                     .out_bq(out_bq));

  always #50 clk = ~clk;
  always #815 clk_b = ~clk_b;

  initial begin
    repeat (MAXN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected mapper output {mode, symbol}, from the bit stream.
  logic [2:0] ref_word = 3'b000;
  logic       stim_done = 1'b0;

  initial begin
    logic b0;
    int   len;
    repeat (2) @(posedge clk_b);
    @(negedge clk_b) rst_n = 1'b1;
    for (int seg = 0; seg < NSEG; seg++) begin
      mode_e m;
      m = (seg % 2 == 0) ? MODE_QPSK : MODE_BPSK;
      len = 4 + int'($urandom_range(0, 12));
      if (m == MODE_QPSK && len % 2 == 1 && seg < NSEG - 1) n_drop++;
      for (int j = 0; j < len; j++) begin
        @(negedge clk_b);
        bq  = m;
        din = 1'(($urandom() >> 5) & 1);
        if (j % 2 == 0) b0 = din;
        @(posedge clk_b);
        if (m == MODE_BPSK) begin
          n_bpsk_bits++;
          ref_word = {MODE_BPSK, 1'b0, din};
        end else if (j % 2 == 1) begin
          ref_word = {MODE_QPSK, din, b0};
        end
      end
    end
    repeat (4) @(posedge clk_b);
    stim_done = 1'b1;
  end

  function automatic int rnd(input real x);
    return $rtoi($floor(x + 0.5));
  endfunction

  // Sample-clock checks; edge n counts clk edges since reset was released.
  logic [2:0] word_hist[MAXN];
  logic [2:0] port_hist[MAXN];
  int         cos_hist[MAXN];
  int         sin_hist[MAXN];

  initial begin
    int         n;
    logic [63:0] ph;
    int         a, vi, vq, e;
    logic [2:0] pw;
    n = 0;
    @(posedge rst_n);
    while (!stim_done) begin
      @(posedge clk);
      word_hist[n] = ref_word;    // value before this edge, as the design samples it
      #1;
      pw = {out_bq, out_iq};
      port_hist[n] = pw;
      // expected carrier after edge n (edge 0 here is the first edge after reset)
      ph = (n >= 1) ? 64'(n - 1) * 64'(K) : 64'd0;
      a = int'(ph[ACC_W-1 -: 9]);
      cos_hist[n] = rnd(511.0 * $cos(TWO_PI * real'(a) / 512.0));
      sin_hist[n] = rnd(511.0 * $sin(TWO_PI * real'(a) / 512.0));
      if (n >= 1 && ph[ACC_W-1:0] < K) n_wrap++;
      if (n >= 5) begin
        checks++;
        if (pw != word_hist[n-3] && pw != word_hist[n-4]) begin
          failures++;
          if (failures < 10) $display("FAIL symbol n=%0d port=%b expect %b or %b", n, pw, word_hist[n-3], word_hist[n-4]);
        end
        if (pw != port_hist[n-1]) begin
          if (pw[2] && !port_hist[n-1][2]) n_to_qpsk++;
          if (!pw[2] && port_hist[n-1][2]) n_to_bpsk++;
          if (!pw[2] && !port_hist[n-1][2] && pw[0] != port_hist[n-1][0]) n_flip++;
        end
        if (pw[2] && pw != port_hist[n-1]) n_qpsk_sym[pw[1:0]]++;
      end
      if (n >= 3) begin
        pw = port_hist[n-2];
        vi = pw[0] ? cos_hist[n-2] : -cos_hist[n-2] - 1;
        vq = pw[1] ? sin_hist[n-2] : -sin_hist[n-2] - 1;
        e  = pw[2] ? vi - vq : vi;
        checks++;
        if (int'(if_out) != e) begin
          failures++;
          if (failures < 10) $display("FAIL if n=%0d if_out=%0d expect=%0d", n, if_out, e);
        end
      end
      n++;
    end
    // every mechanism must have happened
    foreach (n_qpsk_sym[i]) begin
      checks++;
      if (n_qpsk_sym[i] == 0) begin failures++; $display("FAIL QPSK symbol %0d never sent", i); end
    end
    checks++; if (n_bpsk_bits == 0) begin failures++; $display("FAIL no BPSK bit"); end
    checks++; if (n_to_qpsk == 0) begin failures++; $display("FAIL no switch to QPSK"); end
    checks++; if (n_to_bpsk == 0) begin failures++; $display("FAIL no switch to BPSK"); end
    checks++; if (n_drop == 0) begin failures++; $display("FAIL no half pair dropped"); end
    checks++; if (n_flip == 0) begin failures++; $display("FAIL no BPSK phase flip"); end
    checks++;
    if (n_wrap < (n - 1) / 10 - 1 || n_wrap > (n - 1) / 10 + 1) begin
      failures++;
      $display("FAIL carrier: %0d wraps in %0d samples", n_wrap, n);
    end
    $display("samples=%0d bpsk_bits=%0d qpsk_symbols=%0d/%0d/%0d/%0d to_qpsk=%0d to_bpsk=%0d dropped=%0d flips=%0d wraps=%0d",
             n, n_bpsk_bits, n_qpsk_sym[0], n_qpsk_sym[1], n_qpsk_sym[2], n_qpsk_sym[3],
             n_to_qpsk, n_to_bpsk, n_drop, n_flip, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
