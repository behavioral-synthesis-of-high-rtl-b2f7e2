// Four low-latency processors for one single-input single-output linear filter.
//
// The top holds the four transformed structures side by side, each a complete
// processor with its own coefficient memory, controller, sample input and
// output (array index 0..3):
//   [0] technique 1, modified Direct Form II         T_L = M+1, T_S = M+2
//   [1] technique 2, technique 1 unfolded once       T_L = M+1, T_S = M+1
//   [2] technique 3, transposed Direct Form II       T_L = M+1, T_S = M+2
//   [3] technique 4, technique 3 unfolded once       T_L = M+1, T_S = M+1
// (T_L latency, T_S sample period, both in control steps = clock cycles; M
// control steps per multiplication, 1 by default as in the document's results).
// Loaded with coefficients derived from the same transfer function, all four
// produce the same output sequence up to fixed-point rounding.
//
// Interface per processor: a coefficient write port (coef_we, coef_addr,
// coef_wdata; writes to addresses past that processor's memory are ignored),
// a valid/ready sample input and a y_valid pulse with y_data. rst_n is an
// asynchronous active-low reset that clears all states and coefficients.
// Putting the four alternatives side by side, and the port arrays, are this
// design's choices; the document presents them as four separate techniques.
module lin_asp_top
  import lin_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned W  = DEF_W,
  parameter int unsigned CW = DEF_CW,
  parameter int unsigned CF = DEF_CF,
  parameter int unsigned M  = DEF_M,
  parameter bit          T1_B0_IS_ZERO = 1'b0,
  parameter bit          T1_BIT_LEVEL  = 1'b0,
  parameter int unsigned AW = $clog2(ncoef_mdf2u(N))   // widest coefficient memory
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_we    [4],
  input  logic [AW-1:0]        coef_addr  [4],
  input  logic signed [CW-1:0] coef_wdata [4],
  input  logic                 x_valid    [4],
  output logic                 x_ready    [4],
  input  logic signed [W-1:0]  x_data     [4],
  output logic                 y_valid    [4],
  output logic signed [W-1:0]  y_data     [4]
);
  localparam int unsigned NC1 = ncoef_mdf2(N),  AW1 = $clog2(NC1);
  localparam int unsigned NC2 = ncoef_mdf2u(N), AW2 = $clog2(NC2);
  localparam int unsigned NC3 = ncoef_tdf2(N),  AW3 = $clog2(NC3);
  localparam int unsigned NC4 = ncoef_tdf2u(N), AW4 = $clog2(NC4);

  logic we [4];
  assign we[0] = coef_we[0] && (32'(coef_addr[0]) < NC1);
  assign we[1] = coef_we[1] && (32'(coef_addr[1]) < NC2);
  assign we[2] = coef_we[2] && (32'(coef_addr[2]) < NC3);
  assign we[3] = coef_we[3] && (32'(coef_addr[3]) < NC4);

  mdf2_proc #(.N(N), .W(W), .CW(CW), .CF(CF), .M(M),
              .B0_IS_ZERO(T1_B0_IS_ZERO), .BIT_LEVEL(T1_BIT_LEVEL)) u_t1 (
    .clk, .rst_n, .coef_we(we[0]), .coef_addr(AW1'(coef_addr[0])), .coef_wdata(coef_wdata[0]),
    .x_valid(x_valid[0]), .x_ready(x_ready[0]), .x_data(x_data[0]),
    .y_valid(y_valid[0]), .y_data(y_data[0]));

  mdf2u_proc #(.N(N), .W(W), .CW(CW), .CF(CF), .M(M)) u_t2 (
    .clk, .rst_n, .coef_we(we[1]), .coef_addr(AW2'(coef_addr[1])), .coef_wdata(coef_wdata[1]),
    .x_valid(x_valid[1]), .x_ready(x_ready[1]), .x_data(x_data[1]),
    .y_valid(y_valid[1]), .y_data(y_data[1]));

  tdf2_proc #(.N(N), .W(W), .CW(CW), .CF(CF), .M(M)) u_t3 (
    .clk, .rst_n, .coef_we(we[2]), .coef_addr(AW3'(coef_addr[2])), .coef_wdata(coef_wdata[2]),
    .x_valid(x_valid[2]), .x_ready(x_ready[2]), .x_data(x_data[2]),
    .y_valid(y_valid[2]), .y_data(y_data[2]));

  tdf2u_proc #(.N(N), .W(W), .CW(CW), .CF(CF), .M(M)) u_t4 (
    .clk, .rst_n, .coef_we(we[3]), .coef_addr(AW4'(coef_addr[3])), .coef_wdata(coef_wdata[3]),
    .x_valid(x_valid[3]), .x_ready(x_ready[3]), .x_data(x_data[3]),
    .y_valid(y_valid[3]), .y_data(y_data[3]));
endmodule
