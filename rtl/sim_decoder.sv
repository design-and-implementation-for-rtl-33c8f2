// SimDecoder: turns a SISO index into the enable lines of the parallel SISOs.
//
// With en=1 and ind=1 it is a plain binary decoder: only output `value` is
// set. With en=1 and ind=0 it is a thermometer decoder: outputs 0..value are
// set, which activates the first value+1 SISOs. With en=0 every output is 0.
// Purely combinational. The behaviour follows the SimDecoder description of
// the ParSISO instruction; the port names are this design's.
module sim_decoder #(
  parameter int P = 16
) (
  input  logic                 en,
  input  logic                 ind,
  input  logic [$clog2(P)-1:0] value,
  output logic [P-1:0]         q
);
  always_comb begin
    for (int i = 0; i < P; i++) begin
      if (!en)      q[i] = 1'b0;
      else if (ind) q[i] = (i == int'(value));
      else          q[i] = (i <= int'(value));
    end
  end
endmodule
