// Technique 1: modified Direct Form II processor.
//
// Direct Form II, coefficient-scaled by b0 and retimed so that the delays of
// the middle branch sit on both sides (two chains of N states), then turned
// into the state-space form
//   s_i[n]   = alpha_i * s_1[n-1] + beta_i * x[n] + s_{i+1}[n-1]   (i = 1..2N)
//   y[n]     = s_1[n-1] + s_{N+1}[n-1] + d * x[n]
// where the chain term s_{i+1} is zero for i = N and i = 2N: s_{N+1} does not
// feed s_N, so the two chains are independent. For b0 != 0: alpha = (a_1..a_N, b_1/b0..b_N/b0),
// beta = (b0*a_1..b0*a_N, b_1..b_N), d = b0. For b0 = 0 (parameter B0_IS_ZERO):
// alpha = beta = (a_1..a_N, b_1..b_N) and y[n] = s_{N+1}[n-1], available in the
// step the sample arrives (latency 0).
//
// Schedule (maximally fast, one multiplier per product, step 0 = arrival):
//   step 0      all products start; v = s_1 + s_{N+1}
//   step M      t_i = alpha_i*s_1 + beta_i*x ;  y = d*x + v
//   step M+1    s_i <= t_i + s_{i+1}
// so the latency is T_L = M+1 and the sample period T_S = M+2 control steps.
//
// With BIT_LEVEL = 1 the multiplications are done at bit level instead: all
// products of s_1 share one shifter, and all products of x another
// (mcm_shift_add), so each group takes CW shift steps whatever the
// coefficients; M is then CW in the schedule above.
//
// Coefficient memory (4N+1 words): address 0 = d, 1..2N = alpha_1..alpha_2N,
// 2N+1..4N = beta_1..beta_2N. Interface: valid/ready sample input, a one-cycle
// y_valid pulse with y_data. Reset clears the states (zero initial state).
// The structure, equations and T_L/T_S follow the document; the schedule,
// number format, coefficient layout and handshake are this design's choices.
module mdf2_proc
  import lin_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned W  = DEF_W,
  parameter int unsigned CW = DEF_CW,
  parameter int unsigned CF = DEF_CF,
  parameter int unsigned M  = DEF_M,
  parameter bit          B0_IS_ZERO = 1'b0,
  parameter bit          BIT_LEVEL  = 1'b0,
  parameter int unsigned NC = ncoef_mdf2(N),
  parameter int unsigned AW = $clog2(NC)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coefficient memory write port
  input  logic                 coef_we,
  input  logic [AW-1:0]        coef_addr,
  input  logic signed [CW-1:0] coef_wdata,
  // sample input
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic signed [W-1:0]  x_data,
  // sample output
  output logic                 y_valid,
  output logic signed [W-1:0]  y_data
);
  localparam int unsigned NS = 2 * N;
  localparam int unsigned MM = BIT_LEVEL ? CW : M;   // control steps per multiplication
  localparam int unsigned TS = MM + 2;
  localparam int unsigned KW = $clog2(TS + 2);

  logic signed [CW-1:0] coef [NC];
  logic                 start, par_unused, parc_unused;
  logic [KW-1:0]        k;

  coef_mem #(.NC(NC), .CW(CW), .AW(AW)) u_coef (
    .clk, .rst_n, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata), .coef);

  step_ctrl #(.TS(TS), .KW(KW)) u_ctrl (
    .clk, .rst_n, .x_valid, .x_ready, .start, .k, .par_in(par_unused), .par_cur(parc_unused));

  logic en_m, en_m1;
  assign en_m  = (32'(k) == MM);
  assign en_m1 = (32'(k) == MM + 1);

  // state registers s[1..NS] (index 0 unused)
  logic signed [W-1:0] s [NS+1];
  logic signed [W-1:0] pa [NS+1], pb [NS+1], t [NS+1];
  logic signed [W-1:0] pd, v;

  // products
  if (!BIT_LEVEL) begin : g_prod
    for (genvar i = 1; i <= NS; i++) begin : g_i
      mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_ma (
        .clk, .a(s[1]), .c(coef[i]), .p(pa[i]));
      mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_mb (
        .clk, .a(x_data), .c(coef[NS+i]), .p(pb[i]));
    end
    mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_md (
      .clk, .a(x_data), .c(coef[0]), .p(pd));
  end else begin : g_prod
    // group of s_1: alpha_1..alpha_2N ; group of x: d, beta_1..beta_2N
    logic signed [CW-1:0] cs [NS], cx [NS+1];
    logic signed [W-1:0]  ps [NS], px [NS+1];
    logic                 busy_s, busy_x;
    for (genvar i = 0; i < NS; i++) begin : g_i
      assign cs[i]    = coef[i+1];
      assign cx[i+1]  = coef[NS+i+1];
      assign pa[i+1]  = ps[i];
      assign pb[i+1]  = px[i+1];
    end
    assign cx[0] = coef[0];
    assign pd    = px[0];
    mcm_shift_add #(.K(NS), .W(W), .CW(CW), .CF(CF)) u_mcm_s (
      .clk, .rst_n, .start, .v(s[1]), .c(cs), .busy(busy_s), .p(ps));
    mcm_shift_add #(.K(NS + 1), .W(W), .CW(CW), .CF(CF)) u_mcm_x (
      .clk, .rst_n, .start, .v(x_data), .c(cx), .busy(busy_x), .p(px));
    logic unused_busy;
    assign unused_busy = busy_s ^ busy_x;
  end

  // state update: t_i in step M, s_i in step M+1
  for (genvar i = 1; i <= NS; i++) begin : g_state
    logic signed [W-1:0] nxt;
    if (i == N || i == NS) begin : g_end
      assign nxt = '0;
    end else begin : g_mid
      assign nxt = s[i+1];
    end
    always_ff @(posedge clk) begin
      if (en_m) t[i] <= pa[i] + pb[i];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     s[i] <= '0;
      else if (en_m1) s[i] <= t[i] + nxt;
    end
  end
  assign s[0] = '0;
  assign t[0] = '0;
  assign pa[0] = '0;
  assign pb[0] = '0;

  if (!B0_IS_ZERO) begin : g_out
    // y = d*x + (s_1 + s_{N+1}); pre-sum in step 0, final add in step M
    always_ff @(posedge clk) begin
      if (start) v <= s[1] + s[N+1];
      if (en_m)  y_data <= pd + v;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) y_valid <= 1'b0;
      else        y_valid <= en_m;
    end
  end else begin : g_out0
    // b0 = 0: y[n] = s_{N+1}[n-1] is ready when x[n] arrives (T_L = 0)
    assign v  = '0;
    assign y_data  = s[N+1];
    assign y_valid = start;
  end

  logic unused;
  assign unused = par_unused ^ parc_unused ^ (^pd) ^ (^v) ^ (^s[0]) ^ (^t[0]) ^ (^pa[0]) ^ (^pb[0]);

  initial assert (N >= 1) else $error("mdf2_proc: N must be at least 1");
endmodule
