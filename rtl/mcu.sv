// mcu: microprogram control unit.
//
// Decodes the next-address field of the microinstruction held in the
// pipeline register, tests the condition chosen by the condition-code field
// (through cc_mux) and drives the sequencer, whose output addresses the
// control store for the next microinstruction. While the current
// microinstruction executes, the next one is being fetched: this is the
// pipelining the document describes. An I/O interrupt is not a hardware
// trap: the microprogram tests a request with a conditional branch whose
// target is the direct field, as the document describes.
//
// The document names the fields (next address, condition code, branch
// address, status, interrupt clear) but not their encodings; the
// next-address operations in eval_pkg::next_e are this design's choice.
//
// Timing: next_addr is combinational from the pipeline register and status;
// sequencer state changes on the rising edge when en is high.
module mcu
  import eval_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  input  next_e         na,
  input  cc_e           cc,
  input  logic          cc_pol,
  input  logic [AW-1:0] direct,
  input  status_t       status,
  input  logic          irq_in,
  input  logic          irq_out,
  output logic [AW-1:0] next_addr,
  output logic          cond,
  output logic [AW-1:0] upc
);

  logic [1:0] sel;
  logic       r_ld, fe, pup, zero;

  localparam logic [1:0] S_D = 2'd0, S_R = 2'd1, S_PC = 2'd2, S_F = 2'd3;

  cc_mux u_cc (
    .sel(cc), .pol(cc_pol), .status, .irq_in, .irq_out, .pass(cond)
  );

  always_comb begin
    sel  = S_PC;
    r_ld = 1'b0;
    fe   = 1'b0;
    pup  = 1'b0;
    zero = 1'b0;
    unique case (na)
      NA_CONT: ;
      NA_JUMP: sel = S_D;
      NA_CJP:  if (cond) sel = S_D;
      NA_CALL: begin sel = S_D; fe = 1'b1; pup = 1'b1; end
      NA_CJS:  if (cond) begin sel = S_D; fe = 1'b1; pup = 1'b1; end
      NA_RET:  begin sel = S_F; fe = 1'b1; end
      NA_CRET: if (cond) begin sel = S_F; fe = 1'b1; end
      NA_LDR:  r_ld = 1'b1;
      NA_JR:   sel = S_R;
      NA_CJR:  if (cond) sel = S_R;
      NA_ZERO: zero = 1'b1;
      NA_PUSH: begin fe = 1'b1; pup = 1'b1; end
      NA_LOOP: if (cond) fe = 1'b1; else sel = S_F;
      default: ;
    endcase
  end

  sequencer #(.AW(AW)) u_seq (
    .clk, .rst_n, .en, .clr, .sel, .d(direct), .r_ld, .fe, .pup, .zero,
    .y(next_addr), .upc
  );

endmodule
