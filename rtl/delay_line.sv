// delay_line: a chain of DEPTH registers that delays a WIDTH-bit word.
//
// Used by the exp core to keep the table value exp(i) in step with the
// CORDIC pipeline that computes exp(f). DEPTH = 0 is a plain wire. No
// reset: the word is data, its valid flag travels in a separate pipeline.
module delay_line #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1
)(
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] r [DEPTH];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int k = 1; k < DEPTH; k++) r[k] <= r[k-1];
    end
    assign q = r[DEPTH-1];
  end

endmodule
