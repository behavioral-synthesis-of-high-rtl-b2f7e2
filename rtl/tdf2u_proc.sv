// Technique 4: Transposed Direct Form II unfolded once, with on-arrival processing.
//
// The N-state companion form of technique 3 (s[n] = A s[n-1] + B x[n],
// y[n] = s_1[n-1] + b0 x[n], A = [a | superdiagonal ones], B = e) is unfolded
// once, so one iteration consumes the sample pair x[n], x[n+1] (n even):
//   s_i[n+1] = p_i s_1 + q_i s_2 + s_{i+2} + r_i x[n] + g_i x[n+1]
//   y[n]     = s_1 + d0 x[n]
//   y[n+1]   = h1 s_1 + s_2 + h2 x[n] + d1 x[n+1]
// with (a_{N+1} = e_{N+1} = 0, s_{N+1} = s_{N+2} = 0)
//   p_i = a_i a_1 + a_{i+1}   q_i = a_i   r_i = a_i e_1 + e_{i+1}   g_i = e_i
//   h1 = a_1   h2 = e_1   d0 = d1 = b0.
//
// On-arrival processing: the terms in s[n-1] and x[n] are summed while waiting
// for x[n+1], which then costs one multiplication and one addition.
// Schedule (even step 0 = arrival of x[n], odd step 0 = arrival of x[n+1], at
// least T_S = M+1 steps later):
//   even 0      products start
//   even M      l1a_i = p_i s_1 + q_i s_2 ; l1b_i = r_i x[n] + s_{i+2}
//               y = d0 x[n] + s_1 ;  qa = h1 s_1 + h2 x[n]
//   even M+1    part_i = l1a_i + l1b_i ; qs = qa + s_2
//   odd M       s_i <= part_i + g_i x[n+1] ; y = qs + d1 x[n+1]
// Latency T_L = M+1 and sample period T_S = M+1 control steps, with N states
// and 4N+4 coefficients (half of technique 2).
//
// Coefficient memory (4N+4 words): 0 = d0, 1 = h1, 2 = h2, 3 = d1, then
// p_1..p_N, q_1..q_N, r_1..r_N, g_1..g_N from address 4, 4+N, 4+2N, 4+3N.
// Interface and reset as in mdf2_proc; the first sample after reset is the
// even one of a pair.
// The document gives this technique's T_L/T_S and says it follows technique 2;
// the equations above are derived here the same way, and the schedule, number
// format, coefficient layout and handshake are this design's choices.
module tdf2u_proc
  import lin_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned W  = DEF_W,
  parameter int unsigned CW = DEF_CW,
  parameter int unsigned CF = DEF_CF,
  parameter int unsigned M  = DEF_M,
  parameter int unsigned NC = ncoef_tdf2u(N),
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
  localparam int unsigned TS = M + 1;
  localparam int unsigned KW = $clog2(TS + 2);
  localparam int unsigned OP = 4;
  localparam int unsigned OQ = OP + N;
  localparam int unsigned OR = OQ + N;
  localparam int unsigned OG = OR + N;

  logic signed [CW-1:0] coef [NC];
  logic                 start, par_in, par;
  logic [KW-1:0]        k;

  coef_mem #(.NC(NC), .CW(CW), .AW(AW)) u_coef (
    .clk, .rst_n, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata), .coef);

  step_ctrl #(.TS(TS), .KW(KW)) u_ctrl (
    .clk, .rst_n, .x_valid, .x_ready, .start, .k, .par_in, .par_cur(par));

  logic ev_m, ev_m1, od_m;
  assign ev_m  = (32'(k) == M)     && !par;
  assign ev_m1 = (32'(k) == M + 1) && !par;
  assign od_m  = (32'(k) == M)     &&  par;

  logic signed [W-1:0] s [N+3];       // s[1..N]; s[0], s[N+1], s[N+2] are zero
  logic signed [W-1:0] pp [N+1], pq [N+1], pr [N+1], pg [N+1];
  logic signed [W-1:0] l1a [N+1], l1b [N+1], part [N+1];
  logic signed [W-1:0] pd0, pd1, ph1, ph2, qa, qs;

  for (genvar i = 1; i <= N; i++) begin : g_state
    mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_mp (
      .clk, .a(s[1]),   .c(coef[OP+i-1]), .p(pp[i]));
    mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_mq (
      .clk, .a(s[2]),   .c(coef[OQ+i-1]), .p(pq[i]));
    mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_mr (
      .clk, .a(x_data), .c(coef[OR+i-1]), .p(pr[i]));
    mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_mg (
      .clk, .a(x_data), .c(coef[OG+i-1]), .p(pg[i]));
    always_ff @(posedge clk) begin
      if (ev_m) begin
        l1a[i] <= pp[i] + pq[i];
        l1b[i] <= pr[i] + s[i+2];
      end
      if (ev_m1) part[i] <= l1a[i] + l1b[i];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    s[i] <= '0;
      else if (od_m) s[i] <= part[i] + pg[i];
    end
  end
  assign s[0]    = '0;
  assign s[N+1]  = '0;
  assign s[N+2]  = '0;
  assign pp[0]   = '0;
  assign pq[0]   = '0;
  assign pr[0]   = '0;
  assign pg[0]   = '0;
  assign l1a[0]  = '0;
  assign l1b[0]  = '0;
  assign part[0] = '0;

  mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_md0 (.clk, .a(x_data), .c(coef[0]), .p(pd0));
  mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_mh1 (.clk, .a(s[1]),   .c(coef[1]), .p(ph1));
  mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_mh2 (.clk, .a(x_data), .c(coef[2]), .p(ph2));
  mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(M)) u_md1 (.clk, .a(x_data), .c(coef[3]), .p(pd1));

  always_ff @(posedge clk) begin
    if (ev_m)  qa <= ph1 + ph2;
    if (ev_m1) qs <= qa + s[2];
    if (ev_m)      y_data <= pd0 + s[1];
    else if (od_m) y_data <= qs + pd1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= ev_m || od_m;
  end

  logic unused;
  assign unused = start ^ par_in ^ (^s[0]) ^ (^pp[0]) ^ (^pq[0]) ^ (^pr[0]) ^ (^pg[0]) ^ (^l1a[0]) ^
                  (^l1b[0]) ^ (^part[0]);

  initial assert (N >= 1) else $error("tdf2u_proc: N must be at least 1");
endmodule
