// Self-checking testbench for coef_mem: after reset every word reads zero;
// random writes (including out-of-range addresses, which must be ignored) are
// mirrored in a reference array and all words are compared every cycle.
module tb_coef_mem;
  localparam int unsigned NC = 13, CW = 16, AW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 we = 1'b0;
  logic [AW-1:0]        waddr = '0;
  logic signed [CW-1:0] wdata = '0;
  logic signed [CW-1:0] coef [NC];
  logic signed [CW-1:0] mirror [NC];
  int checks = 0, failures = 0;

  coef_mem #(.NC(NC), .CW(CW), .AW(AW)) dut (.clk, .rst_n, .we, .waddr, .wdata, .coef);

  initial begin
    for (int i = 0; i < NC; i++) mirror[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (coef[i] !== mirror[i]) begin
          failures++; $display("ERROR: word %0d got %0d exp %0d", i, coef[i], mirror[i]);
        end
      end
      we    = ($urandom % 2) == 0;
      waddr = AW'($urandom);
      wdata = CW'($urandom);
      if (we && int'(waddr) < NC) mirror[waddr] = wdata;
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
