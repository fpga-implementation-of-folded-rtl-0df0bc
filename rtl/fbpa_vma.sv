// fbpa_vma: vector merging adder and output switch of the folded filter.
//
// The last row of the array holds the filter result in carry-save form: a sum
// word s and a carry word cy whose bit b has weight 2^(b+1). The vector merging
// adder adds s + 2*cy (modulo 2^W, which is exact for the row width used) to
// give the binary output word. The output switch of the folded architecture
// passes the last row's value only on folding step 0; here that is a register
// loaded when en (ck1) is high, so y holds each result for a whole sample
// period and y_valid pulses for one clock when a new y appears.
//
// Timing: y and y_valid change one clock after en. The adder is a plain
// word-level adder; the register at the output is this design's choice.
module fbpa_vma #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] s,
  input  logic [W-1:0] cy,
  output logic [W-1:0] y,
  output logic         y_valid
);

  logic [W-1:0] merged;
  assign merged = s + {cy[W-2:0], 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) y <= merged;
    end
  end

endmodule
