// Self-checking testbench for mult_pipe: random operands (and the extreme
// values) go in every cycle; the product seen M cycles later must equal
// (a*c) >>> CF truncated to W bits. Run for M = 1 and M = 3.
module tb_mult_pipe;
  localparam int unsigned W = 16, CW = 16, CF = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0]  a;
  logic signed [CW-1:0] c;
  logic signed [W-1:0]  p1, p3;
  int checks = 0, failures = 0;

  mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(1)) dut1 (.clk, .a, .c, .p(p1));
  mult_pipe #(.W(W), .CW(CW), .CF(CF), .M(3)) dut3 (.clk, .a, .c, .p(p3));

  function automatic logic signed [W-1:0] ref_mul(input logic signed [W-1:0] x,
                                                  input logic signed [CW-1:0] y);
    longint pr;
    pr = (longint'(x) * longint'(y)) >>> CF;
    return W'(pr);
  endfunction

  logic signed [W-1:0] hist [4];

  initial begin
    for (int i = 0; i < 4; i++) hist[i] = '0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      case (cyc % 50)
        0:       begin a = 16'sh8000; c = 16'sh8000; end
        1:       begin a = 16'sh7fff; c = 16'sh7fff; end
        2:       begin a = -16'sd1;   c = 16'sd1;    end
        default: begin a = W'($urandom); c = CW'($urandom); end
      endcase
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = ref_mul(a, c);
      @(posedge clk); #1;
      if (cyc >= 1) begin
        checks++;
        if (p1 !== hist[0]) begin failures++; $display("ERROR: M=1 cycle %0d got %0d exp %0d", cyc, p1, hist[0]); end
      end
      if (cyc >= 3) begin
        checks++;
        if (p3 !== hist[2]) begin failures++; $display("ERROR: M=3 cycle %0d got %0d exp %0d", cyc, p3, hist[2]); end
      end
    end
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
