// Test harness for one of the four filter processors: the processor selected
// by TECH with the given parameters, driven and checked by tb_proc_drv.
// TECH: 1 = mdf2_proc, 2 = mdf2u_proc, 3 = tdf2_proc, 4 = tdf2u_proc.
module tb_proc_run #(
  parameter int unsigned TECH  = 1,
  parameter int unsigned N     = 3,
  parameter int unsigned M     = 1,
  parameter bit          B0Z   = 1'b0,
  parameter bit          BL    = 1'b0,
  parameter int unsigned NSAMP = 200,
  parameter int unsigned SEED  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned W  = 16;
  localparam int unsigned CW = 16;
  localparam int unsigned CF = 12;
  localparam int unsigned NC = (TECH == 1) ? lin_pkg::ncoef_mdf2(N)  :
                               (TECH == 2) ? lin_pkg::ncoef_mdf2u(N) :
                               (TECH == 3) ? lin_pkg::ncoef_tdf2(N)  : lin_pkg::ncoef_tdf2u(N);
  localparam int unsigned AW = $clog2(NC);

  logic                 coef_we;
  logic [AW-1:0]        coef_addr;
  logic signed [CW-1:0] coef_wdata;
  logic                 x_valid, x_ready;
  logic signed [W-1:0]  x_data;
  logic                 y_valid;
  logic signed [W-1:0]  y_data;
  int                   n_bp, n_gap, n_pair;

  if (TECH == 1) begin : g_dut
    mdf2_proc #(.N(N), .M(M), .B0_IS_ZERO(B0Z), .BIT_LEVEL(BL)) dut (.*);
  end else if (TECH == 2) begin : g_dut
    mdf2u_proc #(.N(N), .M(M)) dut (.*);
  end else if (TECH == 3) begin : g_dut
    tdf2_proc #(.N(N), .M(M)) dut (.*);
  end else begin : g_dut
    tdf2u_proc #(.N(N), .M(M)) dut (.*);
  end

  tb_proc_drv #(.TECH(TECH), .N(N), .M(M), .B0Z(B0Z), .BL(BL), .NSAMP(NSAMP), .SEED(SEED),
                .W(W), .CW(CW), .CF(CF), .AW(AW)) drv (
    .clk, .rst_n, .done, .checks, .failures, .n_backpressure(n_bp), .n_gap, .n_pair,
    .coef_we, .coef_addr, .coef_wdata, .x_valid, .x_ready, .x_data, .y_valid, .y_data);
endmodule
