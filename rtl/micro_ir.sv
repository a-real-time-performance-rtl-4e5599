// micro_ir: the microinstruction (pipeline) register.
//
// Holds the 64-bit microinstruction currently being executed while the
// control store is already being read for the next one. It loads on every
// rising clock edge while the machine runs, and holds the all-zero
// no-operation word after reset and while the machine is stopped, so that
// starting the machine first executes one no-operation and then the word at
// address 0. The reset and stop behaviour is this design's choice.
module micro_ir
  import eval_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     run,
  input  logic [63:0] din,
  output uinstr_t  uir
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    uir <= '0;
    else if (!run) uir <= '0;
    else           uir <= uinstr_t'(din);
  end

endmodule
