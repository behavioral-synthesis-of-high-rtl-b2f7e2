// Technique 2: modified Direct Form II unfolded once, with on-arrival processing.
//
// The 2N-state system of technique 1 (s[n] = A s[n-1] + B x[n],
// y[n] = C s[n-1] + D x[n]) is unfolded once, so one iteration consumes the
// sample pair x[n], x[n+1] (n even):
//   s[n+1] = A^2 s[n-1] + A B x[n] + B x[n+1]
//   y[n]   = C s[n-1] + D x[n]
//   y[n+1] = C A s[n-1] + C B x[n] + D x[n+1]
// Because A has only its first column and a superdiagonal (broken between the
// two chains) non-zero, A^2 has two non-zero columns plus a second
// superdiagonal, and per state
//   s_i[n+1] = p_i s_1 + q_i s_2 + s_{i+2} + r_i x[n] + g_i x[n+1]
// (s_{i+2} is zero when it belongs to the other chain or lies past it), and
//   y[n+1]   = h1 s_1 + s_2 + s_{N+2} + h2 x[n] + d1 x[n+1],
//   y[n]     = s_1 + s_{N+1} + d0 x[n].
//
// On-arrival processing: everything that depends on s[n-1] and x[n] is
// computed while waiting for x[n+1], which then needs only one multiplication
// and one addition. Schedule (even step 0 = arrival of x[n], odd step 0 =
// arrival of x[n+1], which is at least T_S = M+1 steps later):
//   even 0      products start; v = s_1 + s_{N+1}; w = s_2 + s_{N+2}
//   even M      l1a_i = p_i s_1 + q_i s_2 ; l1b_i = r_i x[n] + s_{i+2}
//               y = d0 x[n] + v ;  qa = h1 s_1 + h2 x[n]
//   even M+1    part_i = l1a_i + l1b_i ; qs = qa + w
//   odd 0       products g_i x[n+1], d1 x[n+1] start
//   odd M       s_i <= part_i + g_i x[n+1] ; y = qs + d1 x[n+1]
// Latency T_L = M+1 and sample period T_S = M+1 control steps for both samples.
//
// Coefficient memory (8N+4 words): 0 = d0, 1 = h1, 2 = h2, 3 = d1, then
// p_1..p_2N, q_1..q_2N, r_1..r_2N, g_1..g_2N from address 4, 4+2N, 4+4N, 4+6N.
// In terms of the technique-1 coefficients alpha, beta, d, with u_i = 1 when
// s_{i+1} is in the same chain as s_i (i != N, 2N) and 0 otherwise:
//   p_i = alpha_i*alpha_1 + u_i*alpha_{i+1}   q_i = alpha_i
//   r_i = alpha_i*beta_1  + u_i*beta_{i+1}    g_i = beta_i
//   h1 = alpha_1 + alpha_{N+1}   h2 = beta_1 + beta_{N+1}   d0 = d1 = d.
// Requires N >= 2. Interface and reset as in mdf2_proc; the first sample after
// reset is the even one of a pair.
// The unfolded equations, on-arrival processing and T_L/T_S follow the
// document; the schedule, number format, coefficient layout and handshake are
// this design's choices.
module mdf2u_proc
  import lin_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned W  = DEF_W,
  parameter int unsigned CW = DEF_CW,
  parameter int unsigned CF = DEF_CF,
  parameter int unsigned M  = DEF_M,
  parameter int unsigned NC = ncoef_mdf2u(N),
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
  localparam int unsigned NS = 2 * N;
  localparam int unsigned TS = M + 1;
  localparam int unsigned KW = $clog2(TS + 2);
  localparam int unsigned OP = 4;            // first p coefficient
  localparam int unsigned OQ = OP + NS;
  localparam int unsigned OR = OQ + NS;
  localparam int unsigned OG = OR + NS;

  logic signed [CW-1:0] coef [NC];
  logic                 start, par_in, par;
  logic [KW-1:0]        k;

  coef_mem #(.NC(NC), .CW(CW), .AW(AW)) u_coef (
    .clk, .rst_n, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata), .coef);

  step_ctrl #(.TS(TS), .KW(KW)) u_ctrl (
    .clk, .rst_n, .x_valid, .x_ready, .start, .k, .par_in, .par_cur(par));

  logic ev_0, ev_m, ev_m1, od_m;
  assign ev_0  = start && !par_in;
  assign ev_m  = (32'(k) == M)     && !par;
  assign ev_m1 = (32'(k) == M + 1) && !par;
  assign od_m  = (32'(k) == M)     &&  par;

  logic signed [W-1:0] s [NS+1];      // s[1..NS]
  logic signed [W-1:0] pp [NS+1], pq [NS+1], pr [NS+1], pg [NS+1];
  logic signed [W-1:0] l1a [NS+1], l1b [NS+1], part [NS+1];
  logic signed [W-1:0] pd0, pd1, ph1, ph2, v, w, qa, qs;

  for (genvar i = 1; i <= NS; i++) begin : g_state
    logic signed [W-1:0] nxt2;
    if ((i <= N && i + 2 <= N) || (i > N && i + 2 <= NS)) begin : g_chain
      assign nxt2 = s[i+2];
    end else begin : g_end
      assign nxt2 = '0;
    end
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
        l1b[i] <= pr[i] + nxt2;
      end
      if (ev_m1) part[i] <= l1a[i] + l1b[i];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    s[i] <= '0;
      else if (od_m) s[i] <= part[i] + pg[i];
    end
  end
  assign s[0]    = '0;
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
    if (ev_0) begin
      v <= s[1] + s[N+1];
      w <= s[2] + s[N+2];
    end
    if (ev_m)  qa <= ph1 + ph2;
    if (ev_m1) qs <= qa + w;
    if (ev_m)      y_data <= pd0 + v;
    else if (od_m) y_data <= qs + pd1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= ev_m || od_m;
  end

  logic unused;
  assign unused = (^s[0]) ^ (^pp[0]) ^ (^pq[0]) ^ (^pr[0]) ^ (^pg[0]) ^ (^l1a[0]) ^
                  (^l1b[0]) ^ (^part[0]);

  initial assert (N >= 2) else $error("mdf2u_proc: N must be at least 2");
endmodule
