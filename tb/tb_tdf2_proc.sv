// Self-checking testbench for tdf2_proc: technique 3 at M = 1 (N = 1, 3 and 12) and M = 2.
// Each configuration loads random stable filter coefficients, streams samples
// and checks every output bit-exactly against a full-matrix model, against
// the original Direct Form II transfer function, and for latency and sample
// period (see tb_proc_run).
module tb_tdf2_proc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 4;
  logic done [NR];
  int   chk [NR], fail [NR];

  tb_proc_run #(.TECH(3), .N(1),  .M(1), .SEED(31)) r0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  tb_proc_run #(.TECH(3), .N(3),  .M(1), .SEED(32)) r1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  tb_proc_run #(.TECH(3), .N(12), .M(1), .SEED(33)) r2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  tb_proc_run #(.TECH(3), .N(6),  .M(2), .SEED(34)) r3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done.and() == 1'b1);
    checks = 0; failures = 0;
    for (int i = 0; i < NR; i++) begin checks += chk[i]; failures += fail[i]; end
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
