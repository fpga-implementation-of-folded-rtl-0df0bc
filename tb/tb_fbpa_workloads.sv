// tb_fbpa_workloads: runs the filter configurations whose cost and speed are
// usually quoted for this architecture and checks the cycle behaviour behind
// the throughput figures.
//
// Four filters with 16, 12, 8 and 4 taps (8-bit input words, coefficients of
// up to 8 bits) each filter random data with 8-bit coefficients (folding
// factor 8); every output is checked against a reference model and the
// measured clocks per output must be 8. Throughput is then f_clk / 8: with
// basic clock rates of 204.1, 188.7, 178.6 and 137.0 MHz (4, 8, 12, 16 taps)
// that gives 25.5, 23.6, 22.3 and 17.1 MHz, which the test recomputes from
// the measured clock counts and compares to 0.1 MHz. The 16-tap filter is
// also swept over coefficient lengths m = 8 .. 1, where the output rate must
// grow as 8/m (one output every m clocks).
module tb_fbpa_workloads;
  logic clk = 0, start = 0;
  always #5 clk = ~clk;

  int unsigned m8 [8] = '{8, 0, 0, 0, 0, 0, 0, 0};
  int unsigned sweep [8] = '{8, 7, 6, 5, 4, 3, 2, 1};

  logic done4, done8, done12, done16, done16s;
  int c4, c8, c12, c16, c16s, f4, f8, f12, f16, f16s;
  int unsigned cpo4 [8], cpo8 [8], cpo12 [8], cpo16 [8], cpo16s [8];

  fbpa_fir_stream_check #(.K(4))  u4  (.clk, .start, .m_list(m8), .n_m(1), .done(done4),
                                       .checks(c4), .failures(f4), .clocks_per_output(cpo4));
  fbpa_fir_stream_check #(.K(8))  u8  (.clk, .start, .m_list(m8), .n_m(1), .done(done8),
                                       .checks(c8), .failures(f8), .clocks_per_output(cpo8));
  fbpa_fir_stream_check #(.K(12)) u12 (.clk, .start, .m_list(m8), .n_m(1), .done(done12),
                                       .checks(c12), .failures(f12), .clocks_per_output(cpo12));
  fbpa_fir_stream_check #(.K(16)) u16 (.clk, .start, .m_list(m8), .n_m(1), .done(done16),
                                       .checks(c16), .failures(f16), .clocks_per_output(cpo16));
  fbpa_fir_stream_check #(.K(16)) u16s (.clk, .start, .m_list(sweep), .n_m(8), .done(done16s),
                                        .checks(c16s), .failures(f16s), .clocks_per_output(cpo16s));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rate(input int taps, input real f_ck, input real f_th_quoted,
                            input int unsigned cpo);
    real f_th;
    checks++;
    f_th = f_ck / real'(cpo);
    $display("k=%0d: %0d clocks per output, %.1f MHz / %0d = %.2f MHz (quoted %.1f)",
             taps, cpo, f_ck, cpo, f_th, f_th_quoted);
    if (cpo != 8 || f_th < f_th_quoted - 0.1 || f_th > f_th_quoted + 0.1) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    start = 1;
    wait (done4 && done8 && done12 && done16 && done16s);
    checks += c4 + c8 + c12 + c16 + c16s;
    failures += f4 + f8 + f12 + f16 + f16s;
    check_rate(4,  204.1, 25.5, cpo4[0]);
    check_rate(8,  188.7, 23.6, cpo8[0]);
    check_rate(12, 178.6, 22.3, cpo12[0]);
    check_rate(16, 137.0, 17.1, cpo16[0]);
    for (int i = 0; i < 8; i++) begin
      checks++;
      $display("k=16 m=%0d: %0d clocks per output, rate x%.2f of m=8", sweep[i], cpo16s[i],
               8.0 / real'(cpo16s[i]));
      if (cpo16s[i] != sweep[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
