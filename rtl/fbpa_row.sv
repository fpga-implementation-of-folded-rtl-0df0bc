// fbpa_row: one processing element (one folding set S_j) of the folded filter.
//
// A row of W basic cells accumulates, in carry-save form, the m partial
// products (x * 2^i) AND c^i, i = 0..m-1, of one coefficient c with the current
// input word. The shared shift register supplies x * 2^i on step i and the
// coefficient rotator supplies c^i. On step 0 (ck1 = 1) the row starts from the
// previous row's carry-save result, so after m steps it holds
// previous_row_result + c * x. Chaining k rows this way gives the transposed
// FIR structure of the folded architecture: the last row holds
// y = sum_j c_j * x_(l-j) at the end of each sample period.
//
// Ports: x_sh is the shifted input word, c_bit the coefficient bit of this
// step, s_prev / cy_prev the previous row's registered sum and carry words
// (zero for the first row), s / cy this row's registers. cy[W] would be the
// carry out of the top cell; it is dropped because W is chosen so that the
// result never exceeds W bits (sum + 2*carry is then exact modulo 2^W).
// Timing: one step per clock; result valid m clocks after the row's step 0.
module fbpa_row #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         ck1,
  input  logic [W-1:0] x_sh,
  input  logic         c_bit,
  input  logic [W-1:0] s_prev,
  input  logic [W-1:0] cy_prev,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  // Carry into cell b is the carry register of cell b-1 (0 into cell 0).
  logic [W-1:0] cy_prev_in, cy_own_in;
  assign cy_prev_in = {cy_prev[W-2:0], 1'b0};
  assign cy_own_in  = {cy[W-2:0], 1'b0};

  for (genvar b = 0; b < W; b++) begin : g_cell
    fbpa_cell u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .clr    (clr),
      .ck1    (ck1),
      .x_bit  (x_sh[b]),
      .c_bit  (c_bit),
      .s_prev (s_prev[b]),
      .cy_prev(cy_prev_in[b]),
      .cy_own (cy_own_in[b]),
      .s      (s[b]),
      .cy     (cy[b])
    );
  end

endmodule
