// Technique 3: Transposed Direct Form II (companion form) processor.
//
// N states with the state-space form
//   s_i[n] = a_i * s_1[n-1] + e_i * x[n] + s_{i+1}[n-1]   (i = 1..N, s_{N+1} = 0)
//   y[n]   = s_1[n-1] + b0 * x[n]
// where a_i are the Direct Form II feedback coefficients and e_i = b_i + a_i*b0
// (matrices A, B, C = [1 0 .. 0], D = [b0] of the companion form).
//
// Schedule (one multiplier per product, step 0 = arrival of x[n]):
//   step 0      all products start
//   step M      t_i = a_i*s_1 + e_i*x ;  y = b0*x + s_1
//   step M+1    s_i <= t_i + s_{i+1}
// giving latency T_L = M+1 and sample period T_S = M+2 control steps, with half
// the state registers and about half the coefficients of technique 1.
//
// Coefficient memory (2N+1 words): address 0 = b0, 1..N = a_1..a_N,
// N+1..2N = e_1..e_N. Interface and reset as in mdf2_proc.
// The structure, matrices and T_L/T_S follow the document; the schedule,
// number format, coefficient layout and handshake are this design's choices.
module tdf2_proc
  import lin_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned W  = DEF_W,
  parameter int unsigned CW = DEF_CW,
  parameter int unsigned CF = DEF_CF,
  parameter int unsigned M  = DEF_M,
  parameter int unsigned NC = ncoef_tdf2(N),
  parameter int unsigned AW = $clog2(NC)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_we,
  input  logic [AW-1:0]        coef_addr,
  input  logic signed [CW-1:0] coef_wdata,
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic signed [W-1:0]  x_data,
  output logic                 y_valid,
  output logic signed [W-1:0]  y_data
);
  localparam int unsigned TS = M + 2;
  localparam int unsigned KW = $clog2(TS + 2);

  logic signed [CW-1:0] coef [NC];
  logic                 start, par_unused, parc_unused;
  logic [KW-1:0]        k;

  coef_mem #(.NC(NC), .CW(CW), .AW(AW)) u_coef (
    .clk, .rst_n, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata), .coef);

  step_ctrl #(.TS(TS), .KW(KW)) u_ctrl (
    .clk, .rst_n, .x_valid, .x_ready, .start, .k, .par_in(par_unused), .par_cur(parc_unused));

  logic en_m, en_m1;
  assign en_m  = (32'(k) == M);
  assign en_m1 = (32'(k) == M + 1);

  logic signed [W-1:0] s [N+2];   // s[1..N]; s[0] and s[N+1] are zero
  logic signed [W-1:0] pa [N+1], pe [N+1], t [N+1];
  logic signed [W-1:0] pd;

  for (genvar i = 1; i <= N; i++) begin : g_state
    mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_ma (
      .clk, .a(s[1]), .c(coef[i]), .p(pa[i]));
    mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_me (
      .clk, .a(x_data), .c(coef[N+i]), .p(pe[i]));
    always_ff @(posedge clk) begin
      if (en_m) t[i] <= pa[i] + pe[i];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     s[i] <= '0;
      else if (en_m1) s[i] <= t[i] + s[i+1];
    end
  end
  assign s[0]   = '0;
  assign s[N+1] = '0;
  assign pa[0]  = '0;
  assign pe[0]  = '0;
  assign t[0]   = '0;

  mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_md (
    .clk, .a(x_data), .c(coef[0]), .p(pd));

  always_ff @(posedge clk) begin
    if (en_m) y_data <= pd + s[1];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= en_m;
  end

  logic unused;
  assign unused = start ^ par_unused ^ parc_unused ^ (^s[0]) ^ (^pa[0]) ^ (^pe[0]) ^ (^t[0]);

  initial assert (N >= 1) else $error("tdf2_proc: N must be at least 1");
endmodule
