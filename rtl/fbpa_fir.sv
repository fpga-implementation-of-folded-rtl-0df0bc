// fbpa_fir: folded bit-plane FIR filter with changeable folding factor.
//
// Computes y_l = c_0*x_l + c_1*x_(l-1) + ... + c_(K-1)*x_(l-K+1) for unsigned
// NX-bit input words and unsigned m-bit coefficients, where the coefficient
// length m can be set at run time anywhere in 1 <= m <= M1. The array is K rows
// of W = M1 + NX + ceil(log2 K) basic cells (AND gate + full adder), one row per
// tap. Each row is a folding set: it works through the m bit-planes of its
// coefficient one per clock, LSB first, adding (x * 2^i) AND c^i to a
// carry-save accumulator, so one multiplication takes m clocks and the folding
// factor equals m. Row r serves coefficient c_(K-1-r); on step 0 of every
// sample period it starts from the result of row r-1, which makes the array a
// pipelined transposed-form FIR. A vector merging adder on the last row turns
// its carry-save result into the binary output.
//
// Blocks: fbpa_ctrl (step counter, ck1 phase, length register), fbpa_shift_reg
// (shared shift section giving x * 2^i), K x fbpa_coef_rot (coefficient
// rotators), K x fbpa_row (rows of fbpa_cell), fbpa_vma (merging adder and
// output register).
//
// Interface: cfg_load (one clock) writes cfg_len = m-1 and all coefficients
// (cfg_coef[j] is c_j, only its low m bits are used) and clears the array and
// shift register, so the filter restarts from an all-zero history. x_take is
// high on the clock edge at which x_in is taken: once every m clocks, first
// m clocks after cfg_load. y_valid pulses when y holds a new output word.
// Timing: one output per m clocks (throughput f_clk / m); y for the word taken
// at edge e appears at edge e + m + 1. The first two outputs after cfg_load
// are zero: the cleared array, then the zero word left in the shift register.
//
// Following the architecture: the row/folding-set structure, the width rule,
// the shared shift register, the m-bit coefficient rotation under length
// control, ck1 with a period of m clocks and the merging adder on the last
// row. This design's own choices: unsigned operands, a single clock with ck1
// as a phase enable, the configuration/clear port and the output register.
module fbpa_fir
  import fbpa_pkg::*;
#(
  parameter int unsigned K  = 16,
  parameter int unsigned NX = 8,
  parameter int unsigned M1 = 8,
  localparam int unsigned W  = row_width(NX, M1, K),
  localparam int unsigned LW = len_width(M1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_load,
  input  logic [LW-1:0]        cfg_len,
  input  logic [K-1:0][M1-1:0] cfg_coef,
  input  logic [NX-1:0]        x_in,
  output logic                 x_take,
  output logic [W-1:0]         y,
  output logic                 y_valid
);

  logic          ck1, last;
  logic [LW-1:0] len_q, step;
  logic [W-1:0]  x_sh;
  logic [K-1:0]  c_bit;
  logic [W-1:0]  s_row  [K+1];
  logic [W-1:0]  cy_row [K+1];

  fbpa_ctrl #(.M1(M1)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .cfg_load(cfg_load),
    .len_in  (cfg_len),
    .len_q   (len_q),
    .step    (step),
    .ck1     (ck1),
    .last    (last)
  );

  assign x_take = last & ~cfg_load;

  fbpa_shift_reg #(.NX(NX), .W(W)) u_shift (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (cfg_load),
    .load (x_take),
    .x_in (x_in),
    .q    (x_sh)
  );

  // Row 0 starts every sample period from zero.
  assign s_row[0]  = '0;
  assign cy_row[0] = '0;

  for (genvar r = 0; r < K; r++) begin : g_tap
    fbpa_coef_rot #(.M1(M1)) u_coef (
      .clk    (clk),
      .rst_n  (rst_n),
      .load   (cfg_load),
      .coef_in(cfg_coef[K-1-r]),
      .len_m1 (len_q),
      .c_bit  (c_bit[r])
    );

    fbpa_row #(.W(W)) u_row (
      .clk    (clk),
      .rst_n  (rst_n),
      .clr    (cfg_load),
      .ck1    (ck1),
      .x_sh   (x_sh),
      .c_bit  (c_bit[r]),
      .s_prev (s_row[r]),
      .cy_prev(cy_row[r]),
      .s      (s_row[r+1]),
      .cy     (cy_row[r+1])
    );
  end

  fbpa_vma #(.W(W)) u_vma (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (ck1 & ~cfg_load),
    .s      (s_row[K]),
    .cy     (cy_row[K]),
    .y      (y),
    .y_valid(y_valid)
  );

  // The step counter and the coefficient rotators must agree: on step 0 every
  // rotator presents bit 0 of its coefficient again.
  a_xtake_on_last: assert property (@(posedge clk) disable iff (!rst_n)
                                    x_take |-> (step == len_q));

endmodule
