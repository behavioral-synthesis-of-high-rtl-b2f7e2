// Control-step sequencer shared by the four processors.
//
// A sample is accepted (start = 1) in a cycle where x_valid and x_ready are
// both high; that cycle is control step 0 of the sample. The register k then
// counts the control steps since the last acceptance (k = j during step j,
// j >= 1) and saturates at TS+1. x_ready is high before the first sample and
// from step TS on, so samples are taken at most one every TS cycles, the
// sample period. Samples alternate in parity, 0 for the first one after
// reset: par_in is the parity of the sample being accepted (meaningful with
// start), par_cur the parity of the last sample accepted before this cycle,
// which is the one steps k >= 1 belong to. The once-unfolded processors use
// them to tell the first sample of a pair from the second.
// The document describes a central finite-state controller stepping the
// datapath through control steps; this counter form is this design's choice.
module step_ctrl #(
  parameter int unsigned TS = lin_pkg::DEF_M + 2,
  parameter int unsigned KW = $clog2(TS + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  output logic          x_ready,
  output logic          start,
  output logic [KW-1:0] k,
  output logic          par_in,
  output logic          par_cur
);
  logic par_q;  // parity of the most recently accepted sample

  assign x_ready = (k == '0) || (32'(k) >= TS);
  assign start   = x_valid && x_ready;
  assign par_in  = ~par_q;
  assign par_cur = par_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k     <= '0;
      par_q <= 1'b1;
    end else begin
      // The step counter stays within 0..TS+1.
      a_k_range : assert (32'(k) <= TS + 1);
      if (start) begin
        k     <= KW'(1);
        par_q <= ~par_q;
      end else if ((k != '0) && (32'(k) <= TS)) begin
        k <= k + KW'(1);
      end
    end
  end
endmodule
