// fbpa_ctrl: folding control of the folded filter.
//
// Generates the phase signal ck1 whose period is m periods of the basic clock
// ck0 (the module's clk). A step counter runs 0 .. m-1; ck1 is high on step 0,
// when every row takes the previous row's result and the output is sampled;
// last is high on step m-1, the clock edge at which the next input word is
// taken. The folding factor m is held in a length register written by
// cfg_load (len_in is m-1, values above m1-1 are clamped); cfg_load also
// restarts the counter so that the step after it is step 0.
//
// Ports: len_q is the held m-1 for the coefficient rotators. With m = 1, ck1
// and last are high on every clock. Timing: one output word every m clocks.
//
// ck1 as a one-in-m phase of the basic clock follows the architecture; making
// it an enable in a single clock domain rather than a second clock, and the
// load/restart behaviour, are this design's choices.
module fbpa_ctrl
  import fbpa_pkg::*;
#(
  parameter int unsigned M1 = 8,
  localparam int unsigned LW = len_width(M1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_load,
  input  logic [LW-1:0] len_in,
  output logic [LW-1:0] len_q,
  output logic [LW-1:0] step,
  output logic          ck1,
  output logic          last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_q <= LW'(M1 - 1);
      step  <= '0;
    end else if (cfg_load) begin
      len_q <= (len_in >= LW'(M1 - 1)) ? LW'(M1 - 1) : len_in;
      step  <= '0;
    end else begin
      step  <= last ? '0 : step + 1'b1;
    end
  end

  assign ck1  = (step == '0);
  assign last = (step == len_q);

  a_step_in_range: assert property (@(posedge clk) disable iff (!rst_n) step <= len_q);

endmodule
