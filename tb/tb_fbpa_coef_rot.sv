// tb_fbpa_coef_rot: self-checking test of the coefficient rotate register.
//
// For every length m = 1..M1 (and a length above the range, which must act as
// m1) loads a random coefficient and checks over several sample periods that
// the bit presented on the j-th clock after load is bit (j mod m) of the
// coefficient.
module tb_fbpa_coef_rot;
  localparam int unsigned M1 = 8, LW = 3;
  logic clk = 0, rst_n = 0, load = 0;
  logic [M1-1:0] coef_in = '0;
  logic [LW-1:0] len_m1 = '0;
  logic c_bit;
  int checks = 0, failures = 0;

  fbpa_coef_rot #(.M1(M1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M1-1:0] c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 40; rep++) begin
      for (int unsigned m = 1; m <= M1; m++) begin
        c = M1'($urandom);
        @(negedge clk);
        load = 1; coef_in = c; len_m1 = LW'(m - 1);
        @(negedge clk);
        load = 0; coef_in = M1'($urandom);
        for (int unsigned j = 0; j < 5 * m; j++) begin
          checks++;
          if (c_bit !== c[j % m]) begin
            failures++;
            $display("m=%0d c=%b step %0d: got %b want %b", m, c, j, c_bit, c[j % m]);
          end
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
