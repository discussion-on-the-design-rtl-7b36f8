// weight_mem: memory unit holding stored coefficients (weights).
//
// A simple dual-port memory of DEPTH words of WIDTH bits: one synchronous
// write port used to load the weights, one synchronous read port used by the
// datapath. Read data appears one cycle after the read address; a read and a
// write to the same address in one cycle return the old word. The contents
// are not reset. Storage of the model's coefficients is the document's
// function; the organisation is this design's choice (it maps to block RAM).
module weight_mem #(
  parameter int unsigned DEPTH = 49,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
