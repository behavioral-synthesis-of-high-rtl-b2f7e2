// End-to-end testbench for lin_asp_top at its default parameters (order
// N = 12, M = 1). One random stable 12th-order filter is loaded into all four
// processors, each in its own coefficient format, and each processor is fed
// its own random sample stream (first back-to-back, then with random gaps).
// Every output is checked bit-exactly against a full-matrix fixed-point model
// of its structure and within a tolerance against the floating-point Direct
// Form II filter, and its latency (2 cycles) and sample period (3 cycles for
// techniques 1 and 3, 2 cycles for techniques 2 and 4) are checked. The test
// also counts input back-pressure, idle gaps and second samples of a pair
// processed on arrival, and fails if any of them never happened.
module tb_lin_asp_top;
  import lin_pkg::*;
  localparam int unsigned N = DEF_N, M = DEF_M, W = DEF_W, CW = DEF_CW, CF = DEF_CF;
  localparam int unsigned AW = $clog2(ncoef_mdf2u(N));
  localparam int unsigned NSAMP = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 coef_we    [4];
  logic [AW-1:0]        coef_addr  [4];
  logic signed [CW-1:0] coef_wdata [4];
  logic                 x_valid    [4];
  logic                 x_ready    [4];
  logic signed [W-1:0]  x_data     [4];
  logic                 y_valid    [4];
  logic signed [W-1:0]  y_data     [4];

  lin_asp_top dut (.*);

  logic done [4];
  int   chk [4], fail [4], n_bp [4], n_gap [4], n_pair [4];

  for (genvar t = 0; t < 4; t++) begin : g_drv
    tb_proc_drv #(.TECH(t + 1), .N(N), .M(M), .NSAMP(NSAMP), .SEED(77),
                  .W(W), .CW(CW), .CF(CF), .AW(AW)) drv (
      .clk, .rst_n, .done(done[t]), .checks(chk[t]), .failures(fail[t]),
      .n_backpressure(n_bp[t]), .n_gap(n_gap[t]), .n_pair(n_pair[t]),
      .coef_we(coef_we[t]), .coef_addr(coef_addr[t]), .coef_wdata(coef_wdata[t]),
      .x_valid(x_valid[t]), .x_ready(x_ready[t]), .x_data(x_data[t]),
      .y_valid(y_valid[t]), .y_data(y_data[t]));
  end

  initial begin
    int checks, failures, bp, gap, pair;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done.and() == 1'b1);
    checks = 0; failures = 0; bp = 0; gap = 0; pair = 0;
    for (int t = 0; t < 4; t++) begin
      checks += chk[t]; failures += fail[t];
      $display("technique %0d: checks=%0d failures=%0d back-pressure=%0d gaps=%0d pairs=%0d",
               t + 1, chk[t], fail[t], n_bp[t], n_gap[t], n_pair[t]);
      checks++;
      if (n_bp[t] == 0)  begin failures++; $display("ERROR: technique %0d never back-pressured", t + 1); end
      checks++;
      if (n_gap[t] == 0) begin failures++; $display("ERROR: technique %0d never saw a gap", t + 1); end
    end
    for (int t = 1; t < 4; t += 2) begin
      checks++;
      if (n_pair[t] == 0) begin failures++; $display("ERROR: technique %0d no on-arrival pair", t + 1); end
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
