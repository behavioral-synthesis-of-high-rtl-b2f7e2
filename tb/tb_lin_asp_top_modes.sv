// End-to-end testbench for lin_asp_top covering its modes. Three copies of
// the top run at once with N = 12, M = 1: the default build, a build whose
// technique-1 processor is the b0 = 0 form (output available in the arrival
// cycle), and a build whose technique-1 processor multiplies at bit level
// (shared shifters, T_L = 17, T_S = 18). Every processor of every copy gets
// its own random stable filter and sample stream and is checked bit-exactly,
// against the floating-point transfer function, and for latency and sample
// period (tb_proc_drv). The test counts input back-pressure, idle gaps,
// on-arrival pair processing, zero-latency outputs and bit-level runs, and
// fails if any of them never happened.
module tb_lin_asp_top_modes;
  import lin_pkg::*;
  localparam int unsigned N = DEF_N, M = DEF_M, W = DEF_W, CW = DEF_CW, CF = DEF_CF;
  localparam int unsigned AW = $clog2(ncoef_mdf2u(N));
  localparam int NV = 3;   // 0: default, 1: b0 = 0 form, 2: bit-level multiplication

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [NV][4];
  int   chk [NV][4], fail [NV][4], n_bp [NV][4], n_gap [NV][4], n_pair [NV][4];
  int   n_zero_lat = 0, n_bitlevel = 0;

  for (genvar v = 0; v < NV; v++) begin : g_v
    logic                 coef_we    [4];
    logic [AW-1:0]        coef_addr  [4];
    logic signed [CW-1:0] coef_wdata [4];
    logic                 x_valid    [4];
    logic                 x_ready    [4];
    logic signed [W-1:0]  x_data     [4];
    logic                 y_valid    [4];
    logic signed [W-1:0]  y_data     [4];

    lin_asp_top #(.T1_B0_IS_ZERO(v == 1), .T1_BIT_LEVEL(v == 2)) dut (.*);

    for (genvar t = 0; t < 4; t++) begin : g_drv
      tb_proc_drv #(.TECH(t + 1), .N(N), .M(M), .B0Z(v == 1 && t == 0), .BL(v == 2 && t == 0),
                    .NSAMP(160), .SEED(300 + 10 * v + t),
                    .W(W), .CW(CW), .CF(CF), .AW(AW)) drv (
        .clk, .rst_n, .done(done[v][t]), .checks(chk[v][t]), .failures(fail[v][t]),
        .n_backpressure(n_bp[v][t]), .n_gap(n_gap[v][t]), .n_pair(n_pair[v][t]),
        .coef_we(coef_we[t]), .coef_addr(coef_addr[t]), .coef_wdata(coef_wdata[t]),
        .x_valid(x_valid[t]), .x_ready(x_ready[t]), .x_data(x_data[t]),
        .y_valid(y_valid[t]), .y_data(y_data[t]));
    end
  end

  // mode events seen at the top's ports
  initial begin
    forever begin
      @(negedge clk);
      #2;
      if (g_v[1].y_valid[0] && g_v[1].x_valid[0] && g_v[1].x_ready[0]) n_zero_lat++;
      if (g_v[2].y_valid[0]) n_bitlevel++;
    end
  end

  task automatic need(input int count, input string what);
    if (count == 0) begin
      $display("ERROR: %s never happened", what);
    end
  endtask

  initial begin
    int checks, failures;
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int v = 0; v < NV; v++) for (int t = 0; t < 4; t++) all_done &= done[v][t];
    end while (!all_done);
    checks = 0; failures = 0;
    for (int v = 0; v < NV; v++) begin
      for (int t = 0; t < 4; t++) begin
        checks += chk[v][t]; failures += fail[v][t];
        $display("build %0d technique %0d: checks=%0d failures=%0d back-pressure=%0d gaps=%0d pairs=%0d",
                 v, t + 1, chk[v][t], fail[v][t], n_bp[v][t], n_gap[v][t], n_pair[v][t]);
        checks += 2;
        if (n_bp[v][t] == 0)  begin failures++; need(0, "back-pressure"); end
        if (n_gap[v][t] == 0) begin failures++; need(0, "idle gap"); end
        if (t == 1 || t == 3) begin
          checks++;
          if (n_pair[v][t] == 0) begin failures++; need(0, "on-arrival pair"); end
        end
      end
    end
    $display("zero-latency outputs (b0 = 0): %0d, bit-level outputs: %0d", n_zero_lat, n_bitlevel);
    checks += 2;
    if (n_zero_lat == 0) begin failures++; need(0, "zero-latency output"); end
    if (n_bitlevel == 0) begin failures++; need(0, "bit-level multiplication"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
