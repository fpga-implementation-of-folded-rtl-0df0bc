// tb_fbpa_shift_reg: self-checking test of the shared input shift register.
//
// Loads random words and checks that the i-th clock after load presents
// x * 2^i (modulo 2^W), that a new load replaces the word and that clear wins
// over load.
module tb_fbpa_shift_reg;
  localparam int unsigned NX = 8, W = 20;
  logic clk = 0, rst_n = 0, clr = 0, load = 0;
  logic [NX-1:0] x_in = '0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  fbpa_shift_reg #(.NX(NX), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] want);
    checks++;
    if (q !== want) begin
      failures++;
      $display("q=%h want %h", q, want);
    end
  endtask

  initial begin
    logic [NX-1:0] x;
    int unsigned len;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      x = NX'($urandom);
      len = 1 + $urandom % 16;
      @(negedge clk);
      load = 1; x_in = x;
      @(negedge clk);
      load = 0; x_in = NX'($urandom);
      for (int unsigned i = 0; i < len; i++) begin
        check(W'(x) << i);
        @(negedge clk);
      end
    end
    load = 1; clr = 1; x_in = 8'hff;
    @(negedge clk);
    load = 0; clr = 0;
    check('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
