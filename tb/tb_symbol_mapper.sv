// Self-checking testbench of symbol_mapper.
//
// Drives random bits in segments of random length that alternate between
// BPSK and QPSK (odd QPSK segments leave a half pair behind). The expected
// outputs come from the bit index within the segment: in QPSK the pair
// (b[2k], b[2k+1]) must appear as {q: b[2k+1], i: b[2k]} right after the
// edge that samples b[2k+1] and hold through the next edge (symbol period of
// two bits); in BPSK each bit must appear on I right after its edge with Q
// at 0. bq_out must match the segment's mode once its first symbol is out.
module tb_symbol_mapper;
  import psk_pkg::*;

  logic    clk_b = 1'b0;
  logic    rst_n = 1'b0;
  logic    din   = 1'b0;
  mode_e   bq    = MODE_BPSK;
  iq_sym_t out_iq;
  mode_e   bq_out;

  int checks = 0;
  int failures = 0;
  int n_bpsk = 0, n_qpsk = 0, n_switch = 0, n_drop = 0;

  symbol_mapper dut (.clk_b(clk_b), .rst_n(rst_n), .din(din), .bq(bq),
                     .out_iq(out_iq), .bq_out(bq_out));

  always #5 clk_b = ~clk_b;

  initial begin
    repeat (20000) @(posedge clk_b);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: out_iq=%b bq_out=%0d", what, $time, out_iq, bq_out);
    end
  endtask

  initial begin
    iq_sym_t prev;
    logic    b0;
    int      len;
    repeat (3) @(posedge clk_b);
    #1;
    check(out_iq == '0 && bq_out == MODE_BPSK, "reset value");
    @(negedge clk_b) rst_n = 1'b1;
    for (int seg = 0; seg < 60; seg++) begin
      mode_e m;
      m = (seg % 2 == 0) ? MODE_QPSK : MODE_BPSK;
      len = 1 + int'($urandom_range(0, 24));
      if (seg > 0) n_switch++;
      if (m == MODE_QPSK && len % 2 == 1 && seg < 59) n_drop++;
      for (int j = 0; j < len; j++) begin
        @(negedge clk_b);
        prev = out_iq;
        bq  = m;
        din = 1'(($urandom() >> 7) & 1);
        if (j % 2 == 0) b0 = din;
        @(posedge clk_b);
        #1;
        if (m == MODE_BPSK) begin
          n_bpsk++;
          check(out_iq == '{q: 1'b0, i: din}, "BPSK bit on I");
          check(bq_out == MODE_BPSK, "BPSK mode out");
        end else if (j % 2 == 1) begin
          n_qpsk++;
          check(out_iq == '{q: din, i: b0}, "QPSK pair");
          check(bq_out == MODE_QPSK, "QPSK mode out");
        end else begin
          check(out_iq == prev, "QPSK symbol held for two bits");
        end
      end
    end
    check(n_bpsk > 0 && n_qpsk > 0 && n_switch > 0 && n_drop > 0, "all cases seen");
    $display("bpsk=%0d qpsk=%0d switches=%0d dropped_halves=%0d", n_bpsk, n_qpsk, n_switch, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
