// Self-checking testbench of dds_phase_accumulator.
//
// For each of several increments K (the 10 MHz carrier word, random words,
// 0 and 2**ACC_W - 1) the block is reset and K applied; after edge n the
// phase must be (n-1)*K mod 2**ACC_W, a closed form that also covers the
// wrap-around and the one-edge delay of the increment register.
module tb_dds_phase_accumulator;

  localparam int unsigned ACC_W = 32;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [ACC_W-1:0] phase_inc = '0;
  logic [ACC_W-1:0] phase;

  int checks = 0;
  int failures = 0;
  int wraps = 0;

  dds_phase_accumulator #(.ACC_W(ACC_W)) dut (.clk(clk), .rst_n(rst_n),
                                              .phase_inc(phase_inc), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ACC_W-1:0] k;
    logic [63:0]      expect_full;
    logic [ACC_W-1:0] last;
    for (int t = 0; t < 8; t++) begin
      case (t)
        0: k = 32'd429496730;
        1: k = '0;
        2: k = '1;
        3: k = 32'h8000_0000;
        default: k = $urandom();
      endcase
      @(negedge clk);
      rst_n = 1'b0;
      phase_inc = k;
      #1;
      checks++;
      if (phase != '0) failures++;
      @(negedge clk);
      rst_n = 1'b1;
      last = '0;
      for (int n = 1; n <= 2000; n++) begin
        @(posedge clk);
        #1;
        expect_full = 64'(n - 1) * 64'(k);
        checks++;
        if (phase != expect_full[ACC_W-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL K=%h n=%0d phase=%h expect=%h", k, n, phase, expect_full[ACC_W-1:0]);
        end
        if (phase < last) wraps++;
        last = phase;
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
