// tb_fbpa_ctrl: self-checking test of the folding control.
//
// For each folding factor m = 1..M1 checks that ck1 is high exactly once every
// m clocks, that last is high on the clock before each ck1, that the step
// counter counts 0..m-1 and that cfg_load restarts the counter at step 0.
module tb_fbpa_ctrl;
  localparam int unsigned M1 = 8, LW = 3;
  logic clk = 0, rst_n = 0, cfg_load = 0;
  logic [LW-1:0] len_in = '0, len_q, step;
  logic ck1, last;
  int checks = 0, failures = 0;

  fbpa_ctrl #(.M1(M1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%s failed at %0t", what, $time);
    end
  endtask

  initial begin
    int unsigned n_ck1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int unsigned m = 1; m <= M1; m++) begin
        @(negedge clk);
        cfg_load = 1; len_in = LW'(m - 1);
        @(negedge clk);
        cfg_load = 0; len_in = LW'($urandom);
        n_ck1 = 0;
        for (int unsigned t = 0; t < 10 * m; t++) begin
          check(len_q == LW'(m - 1), "len_q");
          check(step == LW'(t % m), "step");
          check(ck1 == ((t % m) == 0), "ck1");
          check(last == ((t % m) == m - 1), "last");
          n_ck1 += ck1;
          @(negedge clk);
        end
        check(n_ck1 == 10, "ck1 count");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
