// fbpa_coef_rot: coefficient shift/rotate register of one tap.
//
// Holds the m1 bits of one coefficient and presents one bit per clock to its
// row, least significant bit first: c^0 on folding step 0, c^1 on step 1, and
// so on. The register rotates over only the low m bits: every clock, bits
// 1..m-1 move down by one place and bit 0 is routed back into place m-1 by a
// 1-to-m1 demultiplexer addressed by the length control word (m-1). Bits above
// m-1 hold. After m clocks the register is back where it started, so the
// coefficient repeats every sample period whatever m is (1 <= m <= m1).
//
// Ports: load writes coef_in (aligned to the folding step 0 that follows);
// len_m1 is m-1; c_bit is bit 0 of the register. A len_m1 above m1-1 is
// treated as m1-1. Timing: c_bit changes on every clock edge after load.
//
// The rotate register with a 1-to-m demultiplexer driven by the length control
// follows the architecture; the parallel load port and the clamping of the
// length are this design's choices.
module fbpa_coef_rot
  import fbpa_pkg::*;
#(
  parameter int unsigned M1 = 8,
  localparam int unsigned LW = len_width(M1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [M1-1:0] coef_in,
  input  logic [LW-1:0] len_m1,
  output logic          c_bit
);

  logic [M1-1:0] q, q_next;
  logic [LW-1:0] len;

  always_comb begin
    len = (len_m1 >= LW'(M1 - 1)) ? LW'(M1 - 1) : len_m1;
    q_next = q;
    for (int unsigned i = 0; i < M1; i++) begin
      if (i < 32'(len))       q_next[i] = (i + 1 < M1) ? q[(i + 1) % M1] : q[0];
      else if (i == 32'(len)) q_next[i] = q[0];  // demultiplexer output i
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= coef_in;
    else           q <= q_next;
  end

  assign c_bit = q[0];

endmodule
