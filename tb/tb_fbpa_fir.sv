// tb_fbpa_fir: end-to-end self-checking test of the folded FIR filter at its
// default size (16 taps, 8-bit input words, coefficients of up to 8 bits).
//
// The test configures the filter with every folding factor m = 8, 7, ..., 1
// and then with random factors, each time with fresh random coefficients of
// m bits, and streams random input words. A reference model keeps the last K
// input words taken by the filter (zero after each reconfiguration) and
// predicts y = sum_j c_j * x_(l-j) for every word taken. It checks:
//   * every output word against the model;
//   * the latency: the output for a word taken at clock edge e appears at
//     edge e + m + 1;
//   * the throughput: outputs arrive exactly m clocks apart (f_clk / m);
//   * that exactly two zero words come out after each reconfiguration, before
//     the output of the first word taken.
// Runs with all-ones words and coefficients exercise the full output width.
// Counted mechanisms, each of which must occur: operation at every folding
// factor 1..8, a change of folding factor, a reconfiguration while outputs
// are still pending, and a full-scale (all-ones) run.
module tb_fbpa_fir;
  import fbpa_pkg::*;
  localparam int unsigned K = 16, NX = 8, M1 = 8;
  localparam int unsigned W = row_width(NX, M1, K), LW = len_width(M1);

  logic clk = 0, rst_n = 0, cfg_load = 0;
  logic [LW-1:0] cfg_len = '0;
  logic [K-1:0][M1-1:0] cfg_coef = '0;
  logic [NX-1:0] x_in = '0;
  logic x_take, y_valid;
  logic [W-1:0] y;

  fbpa_fir dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned m_cur = 8;
  longint unsigned cyc = 0;
  logic [NX-1:0] hist [K];
  logic [M1-1:0] coef [K];
  // expected outputs: value and the cycle on which y_valid must be seen
  logic [W-1:0]    exp_q [$];
  longint unsigned due_q [$];
  int unsigned n_out = 0, n_startup = 0;
  longint unsigned last_out_cyc = 0;
  bit have_last_out = 0;
  int unsigned seen_m [M1 + 1];
  int unsigned n_m_change = 0, n_pending_dropped = 0, n_full_scale = 0;
  bit full_scale = 0;
  int unsigned startup_left = 0;
  bit configured = 0;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  function automatic logic [W-1:0] model();
    logic [W-1:0] acc = '0;
    for (int j = 0; j < K; j++) acc += W'(coef[j]) * W'(hist[j]);
    return acc;
  endfunction

  // Monitor: sees the values that are present just before each clock edge.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (configured && !cfg_load && x_take) begin
      for (int j = K - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = x_in;
      exp_q.push_back(model());
      due_q.push_back(cyc + 64'(m_cur) + 2);
    end
    if (configured && y_valid) begin
      checks++;
      if (have_last_out && (cyc - last_out_cyc) != 64'(m_cur))
        fail($sformatf("outputs %0d clocks apart, m=%0d", cyc - last_out_cyc, m_cur));
      last_out_cyc = cyc;
      have_last_out = 1;
      if (startup_left > 0) begin
        startup_left--;
        n_startup++;
        if (y !== '0) fail($sformatf("start-up output %0d not zero", y));
      end else begin
        if (due_q[0] != cyc)
          fail($sformatf("output due at %0d seen at %0d (m=%0d)", due_q[0], cyc, m_cur));
        if (y !== exp_q[0])
          fail($sformatf("m=%0d y=%0d want %0d", m_cur, y, exp_q[0]));
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
        n_out++;
        seen_m[m_cur]++;
        if (full_scale) n_full_scale++;
      end
    end
  end

  // Drive a new input word on every clock; the filter takes one every m.
  always @(negedge clk)
    x_in <= full_scale ? '1 : NX'($urandom);

  task automatic configure(input int unsigned m, input bit all_ones);
    @(negedge clk);
    if (exp_q.size() != 0) n_pending_dropped++;
    if (m != m_cur) n_m_change++;
    cfg_load = 1;
    cfg_len  = LW'(m - 1);
    for (int j = 0; j < K; j++) begin
      coef[j] = all_ones ? M1'((1 << m) - 1) : (M1'($urandom) & M1'((1 << m) - 1));
      // bits above m are junk that the filter must ignore
      cfg_coef[j] = coef[j] | (all_ones ? '0 : (M1'($urandom) & ~M1'((1 << m) - 1)));
    end
    @(negedge clk);
    cfg_load = 0;
    m_cur = m;
    for (int j = 0; j < K; j++) hist[j] = '0;
    exp_q.delete();
    due_q.delete();
    have_last_out = 0;
    startup_left = 2;
    configured = 1;
    full_scale = all_ones;
  endtask

  task automatic run(input int unsigned n_words);
    int unsigned start = n_out, start_up = n_startup;
    while (n_out - start < n_words) @(negedge clk);
    if (n_startup - start_up != 2)
      fail($sformatf("%0d start-up outputs, expected 2", n_startup - start_up));
  endtask

  initial begin
    for (int j = 0; j < K; j++) hist[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = M1; m >= 1; m--) begin
      configure(m, 0);
      run(40);
    end
    for (int m = M1; m >= 1; m -= 3) begin
      configure(m, 1);
      run(K + 4);
    end
    for (int i = 0; i < 12; i++) begin
      configure(1 + $urandom % M1, 0);
      run(10 + $urandom % 30);
    end
    configure(M1, 0);
    run(5);
    for (int m = 1; m <= M1; m++) begin
      checks++;
      if (seen_m[m] == 0) fail($sformatf("folding factor %0d never run", m));
    end
    checks += 3;
    if (n_m_change == 0) fail("folding factor never changed");
    if (n_pending_dropped == 0) fail("never reconfigured with outputs pending");
    if (n_full_scale == 0) fail("no full-scale run");
    $display("outputs checked %0d, factor changes %0d, reconfigurations with pending outputs %0d, full-scale outputs %0d",
             n_out, n_m_change, n_pending_dropped, n_full_scale);
    for (int m = 1; m <= M1; m++) $display("  m=%0d: %0d outputs", m, seen_m[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
