// Stimulus generator and checker for one of the four filter processors.
//
// Draws a random stable filter of order N (Direct Form II coefficients a_i,
// b_j), builds the state-space matrices of the chosen structure in floating
// point (and, for the unfolded structures, A*A, A*B, C*A, C*B by plain matrix
// products), quantises them to the processor's coefficient format and loads
// them through the coefficient write port. It then streams NSAMP random
// samples, first with the input always valid (checking that samples are taken
// exactly one sample period apart), then with random gaps, and checks each
// output three ways:
//   * bit-exact against a full-matrix fixed-point model of the same equations
//     (each product truncated, sums wrapping), which does not use the
//     processor's sparse wiring;
//   * within a tolerance against a floating-point Direct Form II filter, which
//     checks that the transformed structure still has the original H(z);
//   * its latency in cycles against the expected T_L.
// TECH: 1 = mdf2_proc, 2 = mdf2u_proc, 3 = tdf2_proc, 4 = tdf2u_proc.
// The processor itself is connected through the ports (see tb_proc_run).
// It also counts how often the input waited on x_ready (back-pressure), how
// often a sample came later than the earliest slot (idle gap), and how many
// second samples of a pair were processed on arrival (unfolded structures).
module tb_proc_drv #(
  parameter int unsigned TECH  = 1,
  parameter int unsigned N     = 3,
  parameter int unsigned M     = 1,
  parameter bit          B0Z   = 1'b0,
  parameter bit          BL    = 1'b0,   // technique 1 with bit-level multiplication
  parameter int unsigned NSAMP = 200,
  parameter int unsigned SEED  = 1,
  parameter int unsigned ORD   = N,    // order of the filter drawn (<= N, rest zero)
  parameter int unsigned W     = 16,
  parameter int unsigned CW    = 16,
  parameter int unsigned CF    = 12,
  parameter int unsigned AW    = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   n_backpressure,
  output int                   n_gap,
  output int                   n_pair,
  // to the processor
  output logic                 coef_we,
  output logic [AW-1:0]        coef_addr,
  output logic signed [CW-1:0] coef_wdata,
  output logic                 x_valid,
  input  logic                 x_ready,
  output logic signed [W-1:0]  x_data,
  input  logic                 y_valid,
  input  logic signed [W-1:0]  y_data
);
  localparam bit UNF = (TECH == 2 || TECH == 4);
  localparam int unsigned NS = (TECH == 1 || TECH == 2) ? 2 * N : N;
  localparam int unsigned NC = (TECH == 1) ? lin_pkg::ncoef_mdf2(N)  :
                               (TECH == 2) ? lin_pkg::ncoef_mdf2u(N) :
                               (TECH == 3) ? lin_pkg::ncoef_tdf2(N)  : lin_pkg::ncoef_tdf2u(N);
  localparam int unsigned MM = BL ? CW : M;
  localparam int unsigned TS = UNF ? MM + 1 : MM + 2;
  localparam int unsigned TL = B0Z ? 0 : MM + 1;

  // ---------------- filter and matrices ----------------
  real a [N+1];          // a[1..N]
  real b [N+1];          // b[0..N]
  real A  [NS+1][NS+1], B [NS+1], C [NS+1], D;
  real A2 [NS+1][NS+1], AB [NS+1], CA [NS+1], CB;
  int  Aq [NS+1][NS+1], Bq [NS+1], Cq [NS+1], Dq;   // single-rate (or A^2 etc. if unfolded)
  int  ABq [NS+1], CAq [NS+1], CBq, B1q [NS+1];

  function automatic int q(input real v);
    return int'($floor(v * real'(1 << CF) + 0.5));
  endfunction

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  // fixed-point product as the hardware does it: (x*c) >>> CF, wrapped to W bits
  function automatic logic signed [W-1:0] fm(input logic signed [W-1:0] x, input int c);
    longint p;
    p = (longint'(x) * longint'(c)) >>> CF;
    return W'(p);
  endfunction

  task automatic build();
    for (int i = 0; i <= NS; i++) begin
      B[i] = 0.0; C[i] = 0.0;
      for (int j = 0; j <= NS; j++) A[i][j] = 0.0;
    end
    if (TECH == 1 || TECH == 2) begin
      for (int i = 1; i <= N; i++) begin
        A[i][1]   = a[i];
        A[N+i][1] = B0Z ? b[i] : b[i] / b[0];
        B[i]      = B0Z ? a[i] : b[0] * a[i];
        B[N+i]    = b[i];
        if (i < N) begin
          A[i][i+1]     = 1.0;
          A[N+i][N+i+1] = 1.0;
        end
      end
      C[N+1] = 1.0;
      if (!B0Z) C[1] = 1.0;
      D = B0Z ? 0.0 : b[0];
    end else begin
      for (int i = 1; i <= N; i++) begin
        A[i][1] = a[i];
        B[i]    = b[i] + a[i] * b[0];
        if (i < N) A[i][i+1] = 1.0;
      end
      C[1] = 1.0;
      D = b[0];
    end
    // unfolded products
    CB = 0.0;
    for (int i = 1; i <= NS; i++) begin
      AB[i] = 0.0; CA[i] = 0.0;
      for (int j = 1; j <= NS; j++) begin
        A2[i][j] = 0.0;
        for (int l = 1; l <= NS; l++) A2[i][j] += A[i][l] * A[l][j];
        AB[i] += A[i][j] * B[j];
        CA[i] += C[j] * A[j][i];
      end
      CB += C[i] * B[i];
    end
    for (int i = 1; i <= NS; i++) begin
      for (int j = 1; j <= NS; j++) Aq[i][j] = UNF ? q(A2[i][j]) : q(A[i][j]);
      Bq[i] = q(B[i]); Cq[i] = q(C[i]); ABq[i] = q(AB[i]); CAq[i] = q(CA[i]);
      B1q[i] = q(B[i]);
    end
    Dq = q(D); CBq = q(CB);
  endtask

  function automatic int coef_val(input int unsigned addr);
    int unsigned o;
    if (TECH == 1) begin
      if (addr == 0) return Dq;
      if (addr <= NS) return Aq[addr][1];
      return Bq[addr-NS];
    end else if (TECH == 3) begin
      if (addr == 0) return Dq;
      if (addr <= N) return Aq[addr][1];
      return Bq[addr-N];
    end else begin
      if (addr == 0 || addr == 3) return Dq;
      if (addr == 1) return CAq[1];
      if (addr == 2) return CBq;
      o = addr - 4;
      if (o < NS)     return Aq[o+1][1];
      if (o < 2 * NS) return (NS >= 2) ? Aq[o-NS+1][2] : 0;
      if (o < 3 * NS) return ABq[o-2*NS+1];
      return B1q[o-3*NS+1];
    end
  endfunction

  // ---------------- reference models ----------------
  logic signed [W-1:0] S [NS+1];            // fixed-point state, full-matrix model
  logic signed [W-1:0] xe;                  // pending even sample (unfolded)
  real wr [N+1];                            // floating-point DF-II delay line

  function automatic real df2(input real x);
    real w0, y;
    w0 = x;
    for (int i = 1; i <= N; i++) w0 += a[i] * wr[i];
    y = b[0] * w0;
    for (int i = 1; i <= N; i++) y += b[i] * wr[i];
    for (int i = N; i >= 2; i--) wr[i] = wr[i-1];
    wr[1] = w0;
    return y;
  endfunction

  // returns the exact expected output for a sample and advances the model
  function automatic logic signed [W-1:0] model(input logic signed [W-1:0] x, input bit odd);
    logic signed [W-1:0] y, sn [NS+1];
    y = '0;
    if (!UNF) begin
      for (int j = 1; j <= NS; j++) y += fm(S[j], Cq[j]);
      y += fm(x, Dq);
      for (int i = 1; i <= NS; i++) begin
        sn[i] = fm(x, Bq[i]);
        for (int j = 1; j <= NS; j++) sn[i] += fm(S[j], Aq[i][j]);
      end
      for (int i = 1; i <= NS; i++) S[i] = sn[i];
    end else if (!odd) begin
      for (int j = 1; j <= NS; j++) y += fm(S[j], Cq[j]);
      y += fm(x, Dq);
      xe = x;
    end else begin
      for (int j = 1; j <= NS; j++) y += fm(S[j], CAq[j]);
      y += fm(xe, CBq) + fm(x, Dq);
      for (int i = 1; i <= NS; i++) begin
        sn[i] = fm(xe, ABq[i]) + fm(x, B1q[i]);
        for (int j = 1; j <= NS; j++) sn[i] += fm(S[j], Aq[i][j]);
      end
      for (int i = 1; i <= NS; i++) S[i] = sn[i];
    end
    return y;
  endfunction

  // ---------------- stimulus and checking ----------------
  logic signed [W-1:0] exp_q [$];
  real                 ref_q [$];
  int                  acc_cyc_q [$];

  initial begin
    int cyc, last_acc, nacc, nout, gap_phase, tol;
    bit odd;
    done = 1'b0; checks = 0; failures = 0;
    n_backpressure = 0; n_gap = 0; n_pair = 0;
    coef_we = 1'b0; coef_addr = '0; coef_wdata = '0; x_valid = 1'b0; x_data = '0;
    void'($urandom(SEED));
    b[0] = B0Z ? 0.0 : urand(0.3, 0.8);
    a[0] = 0.0;
    for (int i = 1; i <= N; i++) begin
      a[i] = urand(-0.6, 0.6) / real'(ORD);
      b[i] = urand(-0.4, 0.4);
      if (i > int'(ORD)) begin a[i] = 0.0; b[i] = 0.0; end
    end
    build();
    for (int i = 0; i <= NS; i++) S[i] = '0;
    for (int i = 0; i <= N; i++) wr[i] = 0.0;
    xe = '0;
    tol = 8 + 8 * NS;
    @(posedge rst_n);
    // load the coefficient memory
    for (int unsigned ad = 0; ad < NC; ad++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = AW'(ad); coef_wdata = CW'(coef_val(ad));
    end
    @(negedge clk);
    coef_we = 1'b0;
    cyc = 0; last_acc = -1; nacc = 0; nout = 0; odd = 1'b0;
    while (nout < NSAMP) begin
      @(negedge clk);
      cyc++;
      gap_phase = (nacc >= NSAMP / 2) ? 1 : 0;
      if (nacc < NSAMP) x_valid = gap_phase ? (($urandom % 3) != 0) : 1'b1;
      else              x_valid = 1'b0;
      x_data = W'($signed($urandom % 4001) - 2000);
      #1;
      if (x_valid && !x_ready) n_backpressure++;
      if (x_valid && x_ready && last_acc >= 0 && cyc - last_acc > int'(TS)) n_gap++;
      if (x_valid && x_ready && UNF && odd) n_pair++;
      if (x_valid && x_ready) begin
        if (!gap_phase && last_acc >= 0) begin
          checks++;
          if (cyc - last_acc != int'(TS)) begin
            failures++;
            $display("ERROR: T%0d sample period %0d expected %0d", TECH, cyc - last_acc, TS);
          end
        end
        exp_q.push_back(model(x_data, odd));
        ref_q.push_back(df2(real'(x_data)));
        acc_cyc_q.push_back(cyc);
        last_acc = cyc; nacc++;
        if (UNF) odd = !odd;
      end
      if (y_valid) begin
        logic signed [W-1:0] ye;
        real yr;
        int lat;
        if (exp_q.size() == 0) begin
          failures++; $display("ERROR: unexpected output at cycle %0d", cyc);
        end else begin
          ye = exp_q.pop_front(); yr = ref_q.pop_front(); lat = cyc - acc_cyc_q.pop_front();
          checks += 3;
          if (y_data !== ye) begin
            failures++;
            $display("ERROR: T%0d N=%0d out %0d: got %0d expected %0d", TECH, N, nout, y_data, ye);
          end
          if (((real'(y_data) - yr) > real'(tol)) || ((yr - real'(y_data)) > real'(tol))) begin
            failures++;
            $display("ERROR: T%0d N=%0d out %0d: got %0d, H(z) reference %f", TECH, N, nout, y_data, yr);
          end
          if (lat != int'(TL)) begin
            failures++;
            $display("ERROR: T%0d latency %0d expected %0d", TECH, lat, TL);
          end
        end
        nout++;
      end
    end
    @(negedge clk);
    x_valid = 1'b0;
    done = 1'b1;
  end
endmodule
