// fbpa_cell: basic cell of the folded bit-plane array.
//
// One cell forms a one-bit partial product (AND of an input-word bit and a
// coefficient bit) and adds it with a full adder to a carry-save pair. The two
// addends other than the partial product come through two 2:1 multiplexers
// steered by ck1: on folding step 0 (ck1 = 1) the cell takes the sum bit of the
// same weight and the carry bit of the weight below from the previous row; on
// steps 1..m-1 (ck1 = 0) it takes its own sum bit back and the carry bit of its
// lower neighbour in the same row. Sum and carry are registered, so every cell
// is one pipeline stage and the critical path is AND + mux + full adder.
//
// Ports: s_prev / cy_prev are the previous row's sum bit (weight 2^b) and carry
// bit from cell b-1 (also weight 2^b); cy_own is the carry register of cell
// b-1 of this row. s / cy are this cell's registered sum (weight 2^b) and carry
// (weight 2^(b+1)). clr synchronously zeroes both registers.
//
// The AND gate, full adder and two multiplexers per cell follow the
// architecture; which carry-save bit each multiplexer picks, the synchronous
// clear and the active-low reset are this design's choices.
module fbpa_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic ck1,
  input  logic x_bit,
  input  logic c_bit,
  input  logic s_prev,
  input  logic cy_prev,
  input  logic cy_own,
  output logic s,
  output logic cy
);

  logic pp, s_in, cy_in, sum, carry;

  always_comb begin
    pp    = x_bit & c_bit;
    s_in  = ck1 ? s_prev  : s;
    cy_in = ck1 ? cy_prev : cy_own;
    sum   = pp ^ s_in ^ cy_in;
    carry = (pp & s_in) | (pp & cy_in) | (s_in & cy_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s  <= 1'b0;
      cy <= 1'b0;
    end else if (clr) begin
      s  <= 1'b0;
      cy <= 1'b0;
    end else begin
      s  <= sum;
      cy <= carry;
    end
  end

endmodule
