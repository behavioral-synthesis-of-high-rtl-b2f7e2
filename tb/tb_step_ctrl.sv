// Self-checking testbench for step_ctrl (TS = 3): checks that with the input
// always valid samples are taken exactly TS cycles apart, that with random
// gaps none is taken earlier than TS cycles after the last, that k counts the
// steps since the last acceptance, and that the parity alternates from 0.
module tb_step_ctrl;
  localparam int unsigned TS = 3, KW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          x_valid = 1'b0, x_ready, start, par_in, par_cur;
  logic [KW-1:0] k;
  int checks = 0, failures = 0;

  step_ctrl #(.TS(TS), .KW(KW)) dut (.clk, .rst_n, .x_valid, .x_ready, .start, .k,
                                     .par_in, .par_cur);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR: %s", msg); end
  endtask

  initial begin
    int last, since, nacc;
    bit expect_par;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    last = -1; nacc = 0; since = 0; expect_par = 1'b0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      x_valid = (cyc < 200) ? 1'b1 : (($urandom % 4) == 0);
      #1;
      // k is the number of steps since the last acceptance (saturating)
      if (last >= 0) check(int'(k) == ((since > int'(TS) + 1) ? int'(TS) + 1 : since), "k count");
      check(x_ready == ((last < 0) || (since >= int'(TS))), "x_ready");
      check(start == (x_valid && x_ready), "start");
      if (start) begin
        if (last >= 0 && cyc < 200) check(cyc - last == int'(TS), "period with input always valid");
        check(par_in == expect_par, "parity of accepted sample");
        expect_par = !expect_par;
        last = cyc; since = 0; nacc++;
      end else if (last >= 0) begin
        check(par_cur == !expect_par, "parity of current sample");
      end
      if (last >= 0) since++;
    end
    check(nacc > 80, "enough samples accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
