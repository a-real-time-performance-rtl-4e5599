// data_memory: the 1k x 16 data RAM.
//
// A single-port memory, written on the rising clock edge and read
// asynchronously like the bipolar RAMs the document uses; the memory output
// register (in mem_interface) captures the read data. Size follows the
// document (1k x 16); the port timing is this design's choice.
module data_memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [WORDS];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

endmodule
