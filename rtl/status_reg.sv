// status_reg: the CPU status register.
//
// Captures the four ALU flags (zero, negative, carry, overflow) at the end
// of a microinstruction whose status field is set, and holds them for the
// condition-code multiplexer of the microprogram control unit and for the
// carry input multiplexer. Four status lines run from the CPU to the control
// unit in the block diagram; which four flags they are is this design's
// choice. Cleared by reset; loads on the rising clock edge when en and ld.
module status_reg
  import eval_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    ld,
  input  status_t flags_in,
  output status_t flags
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        flags <= '0;
    else if (en && ld) flags <= flags_in;
  end

endmodule
