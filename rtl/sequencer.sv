// sequencer: microprogram sequencer (the role the Am2911 plays).
//
// An address multiplexer picks the next microprogram address from one of
// four sources, as the document lists them: the direct input D (the
// microinstruction's direct field), the register R, the microprogram
// counter uPC, and the file (a small last-in first-out stack for
// subroutine return addresses and loop starts). uPC is loaded with the
// chosen address plus one on every clock, so it always holds the address
// that follows the instruction being fetched.
//
// Controls (from the control unit's decoder): sel chooses the source, r_ld
// loads R from D, fe with pup=1 pushes uPC, fe with pup=0 pops, zero forces
// address 0. clr (machine stopped) clears uPC, R and the stack pointer.
// The file depth of 4 words is this design's choice.
//
// Timing: y is combinational; uPC, R and the file change on the rising edge
// when en is high.
module sequencer
  import eval_pkg::*;
#(
  parameter int unsigned AW    = 12,
  parameter int unsigned DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  input  logic [1:0]    sel,   // 0 D, 1 R, 2 uPC, 3 file
  input  logic [AW-1:0] d,
  input  logic          r_ld,
  input  logic          fe,    // file enable
  input  logic          pup,   // 1 push, 0 pop
  input  logic          zero,
  output logic [AW-1:0] y,
  output logic [AW-1:0] upc
);

  localparam int unsigned SPW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [AW-1:0]  r_reg;
  logic [AW-1:0]  file [DEPTH];
  logic [SPW-1:0] sp;

  always_comb begin
    if (zero) y = '0;
    else begin
      unique case (sel)
        2'd0:    y = d;
        2'd1:    y = r_reg;
        2'd2:    y = upc;
        default: y = file[sp];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc   <= '0;
      r_reg <= '0;
      sp    <= '0;
    end else if (clr) begin
      upc   <= '0;
      r_reg <= '0;
      sp    <= '0;
    end else if (en) begin
      upc <= y + AW'(1);
      if (r_ld) r_reg <= d;
      if (fe) begin
        if (pup) sp <= sp + SPW'(1);
        else     sp <= sp - SPW'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en && !clr && fe && pup) file[sp + SPW'(1)] <= upc;
  end

endmodule
