// Program memory of the ASIP: 512 words of 58 bits, single port.
//
// The fetch stage presents the program counter on raddr; the instruction
// appears on rdata one clock later (registered read), which is the fetch
// stage of the three-stage pipeline. A host loads the program through the
// write port before starting the processor. Depth and word width follow the
// memory list of the decoder; the load port is this design's choice.
module program_memory
  import tdec_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [IW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [IW-1:0]            rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
