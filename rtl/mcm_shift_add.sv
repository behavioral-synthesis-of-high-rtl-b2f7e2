// Bit-level multiplication of one variable by K constant coefficients at once.
//
// Many products in the transformed structures multiply the same variable by
// different coefficients. Done at bit level, they can share one shifter: the
// variable is shifted left one place per cycle, and in the cycle that handles
// coefficient bit j every coefficient whose bit j is set adds the shifted
// variable into its own accumulator (the sign bit, j = CW-1, subtracts, as
// coefficients are two's complement). All K products are therefore ready after
// CW shift steps, whatever the coefficient values.
//
// Timing: the operand v is taken in the cycle start is high (step 0, bit 0 is
// handled then), bits 1..CW-1 follow in the next CW-1 cycles, and p[] holds
// (v*c[i]) >>> CF, truncated to W bits, from step CW until the next start.
// The products are then the same as mult_pipe's. busy is high while bits
// 1..CW-1 are being handled; a start during busy restarts the operation.
// The shared-shifter idea is the document's; this sequential realisation is
// this design's own.
module mcm_shift_add #(
  parameter int unsigned K  = 2 * lin_pkg::DEF_N,
  parameter int unsigned W  = lin_pkg::DEF_W,
  parameter int unsigned CW = lin_pkg::DEF_CW,
  parameter int unsigned CF = lin_pkg::DEF_CF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [W-1:0]  v,
  input  logic signed [CW-1:0] c [K],
  output logic                 busy,
  output logic signed [W-1:0]  p [K]
);
  localparam int unsigned PW = W + CW;
  localparam int unsigned BW = $clog2(CW + 1);
  localparam int unsigned IW = $clog2(CW);

  logic signed [PW-1:0] sh;            // the one shifted copy of v
  logic signed [PW-1:0] acc [K];
  logic [BW-1:0]        bitn;          // coefficient bit handled this cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitn <= '0;
      busy <= 1'b0;
    end else if (start) begin
      bitn <= BW'(1);
      busy <= 1'b1;
    end else if (busy) begin
      bitn <= bitn + BW'(1);
      busy <= (32'(bitn) < CW - 1);
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      sh <= PW'(v) <<< 1;
      for (int i = 0; i < K; i++) acc[i] <= c[i][0] ? PW'(v) : '0;
    end else if (busy) begin
      sh <= sh <<< 1;
      for (int i = 0; i < K; i++) begin
        if (c[i][IW'(bitn)]) begin
          if (32'(bitn) == CW - 1) acc[i] <= acc[i] - sh;
          else                     acc[i] <= acc[i] + sh;
        end
      end
    end
  end

  for (genvar i = 0; i < K; i++) begin : g_out
    logic signed [PW-1:0] scaled;
    assign scaled = acc[i] >>> CF;
    assign p[i]   = scaled[W-1:0];
    logic unused_hi;
    assign unused_hi = ^scaled[PW-1:W];
  end
endmodule
