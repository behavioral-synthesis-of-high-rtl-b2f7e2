// Fixed-point coefficient multiplier occupying M control steps.
//
// p = (a * c) >>> CF, truncated to W bits (two's complement wrap). The full
// product is registered in the first step and then delayed through M-1 further
// register stages, so the product of the operands presented in step k can be
// read from p in step k+M. The pipeline runs every cycle; a consumer samples p
// in the step its schedule says the product is ready.
// The M-step multiplication time is the document's timing model; the number
// format and the pipelined realisation are this design's own choices.
module mult_pipe #(
  parameter int unsigned W  = lin_pkg::DEF_W,
  parameter int unsigned CW = lin_pkg::DEF_CW,
  parameter int unsigned CF = lin_pkg::DEF_CF,
  parameter int unsigned M  = lin_pkg::DEF_M
) (
  input  logic                 clk,
  input  logic signed [W-1:0]  a,
  input  logic signed [CW-1:0] c,
  output logic signed [W-1:0]  p
);
  localparam int unsigned PW = W + CW;

  logic signed [PW-1:0] full;
  logic signed [W-1:0]  stage [M];

  always_comb full = (PW'(a) * PW'(c)) >>> CF;

  always_ff @(posedge clk) begin
    stage[0] <= full[W-1:0];
    for (int unsigned i = 1; i < M; i++) stage[i] <= stage[i-1];
  end

  assign p = stage[M-1];

  initial assert (M >= 1) else $error("mult_pipe: M must be at least 1");
  // Bits of the full product above the W-bit result are dropped (wrap-around).
  logic unused_hi;
  assign unused_hi = ^full[PW-1:W];
endmodule
