// Runs the benchmark sizes of the evaluation on lin_asp_top at its default
// parameters (N = 12, M = 1): filters with 3, 4, 5, 6, 8, 10, 11 and 12
// states, the state counts of the benchmark set (3-state controller, 4- and
// 5-state controllers, 5th- to 12th-order IIR filters). The benchmarks'
// own coefficients are not available, so each order gets a random stable
// filter; a lower order fills the unused coefficients with zero. For each
// order all four processors are reset, loaded and run, and every output is
// checked bit-exactly, against the floating-point transfer function, and for
// the latency and sample period (2 and 3 cycles for techniques 1 and 3,
// 2 and 2 cycles for techniques 2 and 4).
module tb_workloads;
  import lin_pkg::*;
  localparam int unsigned N = DEF_N, M = DEF_M, W = DEF_W, CW = DEF_CW, CF = DEF_CF;
  localparam int unsigned AW = $clog2(ncoef_mdf2u(N));
  localparam int NORD = 8;
  localparam int unsigned ORDS [NORD] = '{3, 4, 5, 6, 8, 10, 11, 12};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [NORD][4];
  int   chk [NORD][4], fail [NORD][4];

  for (genvar o = 0; o < NORD; o++) begin : g_ord
    logic                 rst_n;
    logic                 coef_we    [4];
    logic [AW-1:0]        coef_addr  [4];
    logic signed [CW-1:0] coef_wdata [4];
    logic                 x_valid    [4];
    logic                 x_ready    [4];
    logic signed [W-1:0]  x_data     [4];
    logic                 y_valid    [4];
    logic signed [W-1:0]  y_data     [4];
    int                   n_bp [4], n_gap [4], n_pair [4];

    initial begin
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
    end

    lin_asp_top dut (.*);

    for (genvar t = 0; t < 4; t++) begin : g_drv
      tb_proc_drv #(.TECH(t + 1), .N(N), .M(M), .NSAMP(120), .SEED(100 + o), .ORD(ORDS[o]),
                    .W(W), .CW(CW), .CF(CF), .AW(AW)) drv (
        .clk, .rst_n, .done(done[o][t]), .checks(chk[o][t]), .failures(fail[o][t]),
        .n_backpressure(n_bp[t]), .n_gap(n_gap[t]), .n_pair(n_pair[t]),
        .coef_we(coef_we[t]), .coef_addr(coef_addr[t]), .coef_wdata(coef_wdata[t]),
        .x_valid(x_valid[t]), .x_ready(x_ready[t]), .x_data(x_data[t]),
        .y_valid(y_valid[t]), .y_data(y_data[t]));
    end
  end

  initial begin
    int checks, failures;
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int o = 0; o < NORD; o++) for (int t = 0; t < 4; t++) all_done &= done[o][t];
    end while (!all_done);
    checks = 0; failures = 0;
    for (int o = 0; o < NORD; o++) begin
      for (int t = 0; t < 4; t++) begin
        checks += chk[o][t]; failures += fail[o][t];
      end
      $display("order %0d: failures %0d %0d %0d %0d (techniques 1-4)", ORDS[o],
               fail[o][0], fail[o][1], fail[o][2], fail[o][3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
