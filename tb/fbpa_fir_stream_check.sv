// fbpa_fir_stream_check: testbench helper that runs one folded FIR filter of
// K taps at a list of folding factors and checks it against a reference model.
//
// For each folding factor in the list it loads random m-bit coefficients,
// streams N_WORDS random 8-bit words and checks every output word against
// y = sum_j c_j * x_(l-j), and that outputs come exactly m clocks apart. It
// reports, per factor, the measured number of clocks per output so that the
// caller can turn it into a throughput. The first two outputs after each
// reconfiguration are the zero start-up words and are checked to be zero.
module fbpa_fir_stream_check
  import fbpa_pkg::*;
#(
  parameter int unsigned K       = 16,
  parameter int unsigned N_WORDS = 40
) (
  input  logic        clk,
  input  logic        start,
  input  int unsigned m_list [8],
  input  int unsigned n_m,
  output logic        done,
  output int          checks,
  output int          failures,
  output int unsigned clocks_per_output [8]
);
  localparam int unsigned NX = 8, M1 = 8;
  localparam int unsigned W = row_width(NX, M1, K), LW = len_width(M1);

  logic rst_n = 0, cfg_load = 0;
  logic [LW-1:0] cfg_len = '0;
  logic [K-1:0][M1-1:0] cfg_coef = '0;
  logic [NX-1:0] x_in = '0;
  logic x_take, y_valid;
  logic [W-1:0] y;

  fbpa_fir #(.K(K), .NX(NX), .M1(M1)) dut (.*);

  logic [NX-1:0] hist [K];
  logic [M1-1:0] coef [K];
  logic [W-1:0]  exp_q [$];
  bit            active = 0;
  int unsigned   startup_left = 0, n_out = 0, m_cur = 1;
  longint unsigned cyc = 0, last_cyc = 0;
  bit            have_last = 0;

  function automatic logic [W-1:0] model();
    logic [W-1:0] acc = '0;
    for (int j = 0; j < K; j++) acc += W'(coef[j]) * W'(hist[j]);
    return acc;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int i = 0; i < 8; i++) clocks_per_output[i] = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (active && !cfg_load && x_take) begin
      for (int j = K - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = x_in;
      exp_q.push_back(model());
    end
    if (active && y_valid) begin
      if (have_last) begin
        checks++;
        if (cyc - last_cyc != 64'(m_cur)) begin
          failures++;
          $display("K=%0d m=%0d: outputs %0d clocks apart", K, m_cur, cyc - last_cyc);
        end
      end
      last_cyc = cyc;
      have_last = 1;
      checks++;
      if (startup_left > 0) begin
        startup_left--;
        if (y !== '0) failures++;
      end else if (exp_q.size() == 0) begin
        failures++;
        $display("K=%0d: unexpected output", K);
      end else begin
        if (y !== exp_q[0]) begin
          failures++;
          $display("K=%0d m=%0d: y=%0d want %0d", K, m_cur, y, exp_q[0]);
        end
        void'(exp_q.pop_front());
        n_out++;
      end
    end
  end

  always @(negedge clk) x_in <= NX'($urandom);

  initial begin
    longint unsigned t0;
    int unsigned m;
    wait (start);
    @(negedge clk);
    rst_n = 1;
    for (int unsigned i = 0; i < n_m; i++) begin
      m = m_list[i];
      @(negedge clk);
      cfg_load = 1;
      cfg_len  = LW'(m - 1);
      for (int j = 0; j < K; j++) begin
        coef[j] = M1'($urandom) & M1'((1 << m) - 1);
        cfg_coef[j] = coef[j];
        hist[j] = '0;
      end
      @(negedge clk);
      cfg_load = 0;
      m_cur = m;
      exp_q.delete();
      startup_left = 2;
      have_last = 0;
      active = 1;
      n_out = 0;
      while (n_out < 2) @(negedge clk);
      t0 = cyc;
      while (n_out < N_WORDS + 2) @(negedge clk);
      clocks_per_output[i] = int'((cyc - t0) / 64'(N_WORDS));
    end
    done = 1;
  end
endmodule
