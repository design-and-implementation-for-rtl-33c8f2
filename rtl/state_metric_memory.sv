// State metric memory of one SISO: W words of 8 states x 8 bits, simple dual
// port (one write port, one read port).
//
// The backward recursion writes the beta metrics of the next window while the
// forward recursion reads the betas of the current window. Because both walk
// the same address sequence in the same step, each window is stored in the
// opposite address direction to the previous one; the SISO flips the direction
// every window. Read data is registered (available one clock after raddr);
// a read and a write of the same address in one clock return the old word.
module state_metric_memory
  import tdec_pkg::*;
#(
  parameter int W = 64
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(W)-1:0] waddr,
  input  smv_t                 wdata,
  input  logic [$clog2(W)-1:0] raddr,
  output smv_t                 rdata
);
  smv_t mem [W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
