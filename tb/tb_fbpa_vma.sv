// tb_fbpa_vma: self-checking test of the vector merging adder.
//
// Drives random carry-save pairs with random enables and checks that y takes
// s + 2*cy (modulo 2^W) one clock after an enable, holds otherwise, and that
// y_valid follows the enable by one clock.
module tb_fbpa_vma;
  localparam int unsigned W = 20;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] s = '0, cy = '0, y;
  logic y_valid;
  int checks = 0, failures = 0;

  fbpa_vma #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] want;
    logic         want_v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    want = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = ($urandom % 3) == 0;
      s  = W'($urandom);
      cy = W'($urandom);
      if (en) want = s + W'({cy, 1'b0});
      want_v = en;
      @(negedge clk);
      checks++;
      if (y !== want || y_valid !== want_v) begin
        failures++;
        $display("y=%0d v=%b want %0d %b", y, y_valid, want, want_v);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
