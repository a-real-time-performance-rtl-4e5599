// wcs: writable control store (microprogram memory).
//
// DEPTH words of 64 bits. While the machine runs, the sequencer's address
// reads the next microinstruction asynchronously (the pipeline register
// captures it at the clock edge). While it is stopped, the address
// multiplexer hands the store to the support processor, which writes the
// microprogram one word per clock through host_we/host_addr/host_wdata.
// The 64-bit word and the support-processor path follow the block diagram;
// the depth (default 1024 words, addressed by the low bits of the 12-bit
// sequencer address) is this design's choice, the document gives none.
module wcs
  import eval_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = 12
) (
  input  logic          clk,
  input  logic          run,         // 1: sequencer owns the store
  input  logic [AW-1:0] seq_addr,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [63:0]   host_wdata,
  output logic [63:0]   rdata
);

  localparam int unsigned IW = $clog2(DEPTH);

  logic [63:0]   mem [DEPTH];
  logic [AW-1:0] addr;

  assign addr  = run ? seq_addr : host_addr;
  assign rdata = mem[addr[IW-1:0]];

  always_ff @(posedge clk) begin
    if (!run && host_we) mem[addr[IW-1:0]] <= host_wdata;
  end

endmodule
