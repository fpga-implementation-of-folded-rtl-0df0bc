// tb_fbpa_row: self-checking test of one processing row.
//
// Runs the row through sample periods of m steps for random m, input word,
// coefficient and starting carry-save value from the previous row. On step i
// the testbench supplies x * 2^i and bit i of the coefficient, with ck1 high
// on step 0, and checks after m steps that s + 2*cy equals
// previous_value + c * x (modulo 2^W). Each period starts from an arbitrary
// previous-row pair (sum and carry words) to exercise both multiplexers.
module tb_fbpa_row;
  localparam int unsigned W = 20, NX = 8, M1 = 8;
  logic clk = 0, rst_n = 0, clr = 0, ck1 = 0;
  logic [W-1:0] x_sh = '0, s_prev = '0, cy_prev = '0, s, cy;
  logic c_bit = 0;
  int checks = 0, failures = 0;

  fbpa_row #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NX-1:0] x;
    logic [M1-1:0] c;
    logic [W-1:0]  prev_val, got, want;
    int unsigned   m;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 500; p++) begin
      m = 1 + $urandom % M1;
      x = NX'($urandom);
      c = M1'($urandom) & M1'((1 << m) - 1);
      // previous row value kept within what the filter can produce
      s_prev  = W'($urandom) & W'((1 << (W - 2)) - 1);
      cy_prev = W'($urandom) & W'((1 << (W - 3)) - 1);
      prev_val = s_prev + (cy_prev << 1);
      for (int unsigned i = 0; i < m; i++) begin
        @(negedge clk);
        ck1   = (i == 0);
        x_sh  = W'(x) << i;
        c_bit = c[i];
        if (i > 0) begin
          s_prev  = W'($urandom);  // must be ignored when ck1 = 0
          cy_prev = W'($urandom);
        end
      end
      @(negedge clk);
      ck1 = 1; s_prev = '0; cy_prev = '0; x_sh = '0; c_bit = 0;
      got  = s + (cy << 1);
      want = prev_val + W'(c) * W'(x);
      checks++;
      if (got !== want) begin
        failures++;
        $display("period %0d m=%0d x=%0d c=%0d prev=%0d: got %0d want %0d",
                 p, m, x, c, prev_val, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
