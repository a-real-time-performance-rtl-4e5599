// mem_interface: the registers that buffer the data memory.
//
// Two memory address registers (MAR1, MAR2) are loaded from the OBUS. The
// memory address select bit of the microinstruction chooses which of them
// addresses the memory, so two blocks of data in different places (for
// example input samples and decoded samples) can be accessed alternately
// without the CPU recomputing an address. When the auto-increment bit is
// set, both registers step by one together at the end of the cycle. The
// memory buffer register (MBR) is loaded from the OBUS and is what a memory
// write stores; the memory output register (MOR) captures what a memory read
// returns and drives the IBUS. This follows the document; that a read and a
// write are requested by two further microinstruction bits is this design's
// choice.
//
// Timing: registers change on the rising edge when en is high. A value
// loaded into a MAR or the MBR is used by the next microinstruction; data
// read into MOR is on the IBUS in the next microinstruction.
module mem_interface #(
  parameter int unsigned AW = 10,
  parameter int unsigned W  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  obus,
  input  logic          ld_mar1,
  input  logic          ld_mar2,
  input  logic          ld_mbr,
  input  logic          mem_sel,   // 0 MAR1, 1 MAR2
  input  logic          auto_inc,
  input  logic          mem_rd,
  input  logic          mem_wr,
  output logic [W-1:0]  mor,
  // to the data memory
  output logic [AW-1:0] mem_addr,
  output logic          mem_we,
  output logic [W-1:0]  mem_wdata,
  input  logic [W-1:0]  mem_rdata,
  output logic [AW-1:0] mar1,
  output logic [AW-1:0] mar2
);

  logic [W-1:0] mbr;

  assign mem_addr  = mem_sel ? mar2 : mar1;
  assign mem_we    = en & mem_wr;
  assign mem_wdata = mbr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mar1 <= '0;
      mar2 <= '0;
      mbr  <= '0;
      mor  <= '0;
    end else if (en) begin
      if (ld_mar1)       mar1 <= obus[AW-1:0];
      else if (auto_inc) mar1 <= mar1 + AW'(1);
      if (ld_mar2)       mar2 <= obus[AW-1:0];
      else if (auto_inc) mar2 <= mar2 + AW'(1);
      if (ld_mbr)        mbr  <= obus;
      if (mem_rd)        mor  <= mem_rdata;
    end
  end

endmodule
