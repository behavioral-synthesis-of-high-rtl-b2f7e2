// Coefficient memory of one processor.
//
// NC signed coefficients of CW bits, written one at a time through a simple
// write port (we, waddr, wdata) and read all at once on coef[], because the
// maximally parallel datapaths use every coefficient in the same control step.
// Reset clears every entry to zero. A write takes effect on the next clock.
// The document sizes this memory (4N+1, 8N+4, 2N+1 words for techniques 1-3);
// the write port and the parallel read are this design's choices.
module coef_mem #(
  parameter int unsigned NC = 4 * lin_pkg::DEF_N + 1,
  parameter int unsigned CW = lin_pkg::DEF_CW,
  parameter int unsigned AW = (NC > 1) ? $clog2(NC) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic signed [CW-1:0] wdata,
  output logic signed [CW-1:0] coef [NC]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NC; i++) coef[i] <= '0;
    end else if (we && (32'(waddr) < NC)) begin
      coef[waddr] <= wdata;
    end
  end
endmodule
