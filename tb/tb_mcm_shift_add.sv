// Self-checking testbench for mcm_shift_add: random variables and K = 5
// random coefficients (plus extreme values); after each start the products
// must appear exactly CW cycles later and equal (v*c) >>> CF truncated to W
// bits, the same as an ordinary multiplier. Operands change while the unit is
// busy to show that it keeps the value taken at start.
module tb_mcm_shift_add;
  localparam int unsigned K = 5, W = 16, CW = 16, CF = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 start = 1'b0, busy;
  logic signed [W-1:0]  v = '0;
  logic signed [CW-1:0] c [K];
  logic signed [W-1:0]  p [K];
  int checks = 0, failures = 0;

  mcm_shift_add #(.K(K), .W(W), .CW(CW), .CF(CF)) dut (.clk, .rst_n, .start, .v, .c, .busy, .p);

  function automatic logic signed [W-1:0] ref_mul(input logic signed [W-1:0] x,
                                                  input logic signed [CW-1:0] y);
    longint pr;
    pr = (longint'(x) * longint'(y)) >>> CF;
    return W'(pr);
  endfunction

  initial begin
    logic signed [W-1:0] expv [K];
    for (int i = 0; i < K; i++) c[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      start = 1'b1;
      v = (t == 0) ? 16'sh8000 : (t == 1) ? 16'sh7fff : W'($urandom);
      for (int i = 0; i < K; i++)
        c[i] = (t == 0 && i == 0) ? 16'sh8000 : (t == 1 && i == 0) ? 16'sh7fff : CW'($urandom);
      for (int i = 0; i < K; i++) expv[i] = ref_mul(v, c[i]);
      for (int s = 1; s <= int'(CW); s++) begin
        @(negedge clk);
        start = 1'b0;
        v = W'($urandom);                      // must not matter any more
        checks++;
        if (busy !== (s < int'(CW))) begin failures++; $display("ERROR: busy at step %0d", s); end
      end
      // step CW: products ready
      for (int i = 0; i < K; i++) begin
        checks++;
        if (p[i] !== expv[i]) begin
          failures++; $display("ERROR: run %0d product %0d got %0d exp %0d", t, i, p[i], expv[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
