// fbpa_shift_reg: shared input shift section of the folded filter.
//
// All k shift sections SS_0 .. SS_(k-1) of the folded architecture supply the
// same word, x * 2^i on folding step i, so one shift register serves every
// row. It takes the n-bit input word in parallel (zero-extended to W bits) and
// then shifts it left by one place on every clock, giving x, 2x, 4x, ... to all
// rows. Bits shifted out of the top are lost; with W = m1 + n + ceil(log2 k)
// no bit that matters is ever shifted out.
//
// Ports: load takes x_in at this clock edge (the edge that ends the last step
// of a sample period, so x is in place for step 0); clr zeroes the register
// and takes priority. Timing: q = x * 2^i during the i-th clock after load.
//
// The single shared shift register with parallel input follows the
// architecture; the load/clear controls are this design's choices.
module fbpa_shift_reg #(
  parameter int unsigned NX = 8,
  parameter int unsigned W  = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          load,
  input  logic [NX-1:0] x_in,
  output logic [W-1:0]  q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (clr)  q <= '0;
    else if (load) q <= W'(x_in);
    else           q <= q << 1;
  end

endmodule
