// Self-checking testbench of iq_output_stage.
//
// Random carrier samples, symbols and modes are applied every clock. The
// expected IF sample two edges later is worked out in integer arithmetic:
// a channel keyed by 1 keeps its carrier c, one keyed by 0 gives -c-1
// (one's complement); QPSK outputs I - Q, BPSK outputs I. Corner samples
// (+-max) are included to show that the 11-bit output never overflows.
module tb_iq_output_stage;
  import psk_pkg::*;

  localparam int unsigned SAMPLE_W = 10;

  logic                       clk = 1'b0;
  logic                       rst_n = 1'b0;
  iq_sym_t                    out_iq = '0;
  mode_e                      bq = MODE_BPSK;
  logic signed [SAMPLE_W-1:0] cosine = '0;
  logic signed [SAMPLE_W-1:0] sine = '0;
  logic signed [SAMPLE_W:0]   if_out;

  int checks = 0;
  int failures = 0;
  int n_sym[8];

  iq_output_stage #(.SAMPLE_W(SAMPLE_W)) dut (.clk(clk), .rst_n(rst_n), .out_iq(out_iq), .bq(bq),
                                             .cosine(cosine), .sine(sine), .if_out(if_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_q[$];
    int c, s, vi, vq, e;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (if_out != '0) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      case ($urandom_range(0, 7))
        0: c = 511;
        1: c = -512;
        default: c = int'($urandom_range(0, 1023)) - 512;
      endcase
      case ($urandom_range(0, 7))
        0: s = 511;
        1: s = -512;
        default: s = int'($urandom_range(0, 1023)) - 512;
      endcase
      cosine = SAMPLE_W'(c);
      sine   = SAMPLE_W'(s);
      out_iq = iq_sym_t'($urandom_range(0, 3));
      bq     = mode_e'($urandom_range(0, 1));
      vi = out_iq.i ? c : -c - 1;
      vq = out_iq.q ? s : -s - 1;
      e  = (bq == MODE_QPSK) ? vi - vq : vi;
      n_sym[{bq, out_iq}]++;
      exp_q.push_back(e);
      @(posedge clk);
      #1;
      if (exp_q.size() == 2) begin
        e = exp_q.pop_front();
        checks++;
        if (int'(if_out) != e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d if_out=%0d expect=%0d q=%p", n, if_out, e, exp_q);
        end
      end
    end
    foreach (n_sym[i]) begin
      checks++;
      if (n_sym[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
