// tb_fbpa_cell: self-checking test of the basic cell.
//
// Drives random partial-product, multiplexer and carry-save inputs for many
// clocks and compares the registered sum and carry with a full-adder model
// that keeps its own copy of the cell's state. Also checks reset and the
// synchronous clear.
module tb_fbpa_cell;
  logic clk = 0, rst_n = 0, clr = 0, ck1 = 0;
  logic x_bit = 0, c_bit = 0, s_prev = 0, cy_prev = 0, cy_own = 0;
  logic s, cy;
  int checks = 0, failures = 0;
  logic exp_s, exp_cy;

  fbpa_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic es, input logic ec);
    checks++;
    if (s !== es || cy !== ec) begin
      failures++;
      $display("mismatch: s=%b cy=%b expected %b %b", s, cy, es, ec);
    end
  endtask

  initial begin
    logic a, b, c;
    repeat (2) @(posedge clk);
    #1 check(1'b0, 1'b0);
    rst_n = 1;
    exp_s = 0; exp_cy = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      {ck1, x_bit, c_bit, s_prev, cy_prev, cy_own} = 6'($urandom);
      clr = ($urandom % 50) == 0;
      a = x_bit & c_bit;
      b = ck1 ? s_prev : exp_s;
      c = ck1 ? cy_prev : cy_own;
      if (clr) begin
        exp_s = 0; exp_cy = 0;
      end else begin
        exp_s  = a ^ b ^ c;
        exp_cy = (a + b + c) >= 2;
      end
      @(posedge clk); #1;
      check(exp_s, exp_cy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
