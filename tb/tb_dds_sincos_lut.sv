// Self-checking testbench of dds_sincos_lut.
//
// Reads every table entry, with random low phase bits that the quantiser
// must discard, and compares cosine and sine one edge later with
// A*cos(2*pi*k/512) and A*sin(2*pi*k/512), A = 511, computed here in real
// arithmetic: each sample must lie within half an LSB of the exact value.
// Random addresses are then read back to back to check the one-edge latency.
module tb_dds_sincos_lut;

  localparam int unsigned ACC_W = 32;
  localparam int unsigned ADDR_W = 9;
  localparam int unsigned SAMPLE_W = 10;
  localparam real AMP = 511.0;
  localparam real TWO_PI = 6.283185307179586;

  logic                       clk = 1'b0;
  logic        [ACC_W-1:0]    phase = '0;
  logic signed [SAMPLE_W-1:0] cosine;
  logic signed [SAMPLE_W-1:0] sine;

  int checks = 0;
  int failures = 0;

  dds_sincos_lut #(.ACC_W(ACC_W), .ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W)) dut (
    .clk(clk), .phase(phase), .cosine(cosine), .sine(sine));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_entry(input int k);
    real c, s, ec, es;
    c = AMP * $cos(TWO_PI * real'(k) / 512.0);
    s = AMP * $sin(TWO_PI * real'(k) / 512.0);
    ec = real'(cosine) - c;
    es = real'(sine) - s;
    checks++;
    if (ec > 0.5001 || ec < -0.5001 || es > 0.5001 || es < -0.5001) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d cos=%0d (%f) sin=%0d (%f)", k, cosine, c, sine, s);
    end
  endtask

  initial begin
    int q[$];
    for (int k = 0; k < 512; k++) begin
      @(negedge clk);
      phase = {9'(k), 23'($urandom())};
      @(posedge clk);
      #1;
      check_entry(k);
    end
    // back-to-back reads: output after edge n belongs to the address before edge n
    for (int n = 0; n < 400; n++) begin
      int k;
      @(negedge clk);
      k = int'($urandom_range(0, 511));
      phase = {9'(k), 23'($urandom())};
      q.push_back(k);
      @(posedge clk);
      #1;
      check_entry(q.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
