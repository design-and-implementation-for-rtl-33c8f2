// Bank selector of the data alignment controller ("selector from low").
//
// Among the N line-buffer rows that hold data for one memory bank it picks the
// lowest-index one (request 1 has the highest priority) and raises the row
// enable. With single-port LLR banks one row is served per bank and cycle.
// Purely combinational: req -> (valid, sel) in the same cycle.
module bank_selector #(
  parameter int N = 16
) (
  input  logic [N-1:0]         req,
  output logic                 valid,
  output logic [$clog2(N)-1:0] sel
);
  always_comb begin
    valid = 1'b0;
    sel   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        valid = 1'b1;
        sel   = ($clog2(N))'(i);
      end
    end
  end
endmodule
