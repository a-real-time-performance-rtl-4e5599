// cc_mux: condition-code multiplexer of the microprogram control unit.
//
// Sixteen test inputs, of which eleven are used (as in the document): a
// constant true, the four status bits and three combinations of them, and
// the I/O interrupt requests. The output is the selected input, inverted
// when pol is set. Which eleven conditions are wired, their order and the
// polarity bit are this design's choice. Purely combinational.
module cc_mux
  import eval_pkg::*;
(
  input  cc_e     sel,
  input  logic    pol,
  input  status_t status,
  input  logic    irq_in,
  input  logic    irq_out,   // already masked by a pending input request
  output logic    pass
);

  logic [15:0] tests;

  always_comb begin
    tests              = '0;
    tests[CC_TRUE]     = 1'b1;
    tests[CC_Z]        = status.z;
    tests[CC_C]        = status.c;
    tests[CC_N]        = status.n;
    tests[CC_V]        = status.v;
    tests[CC_LT]       = status.n ^ status.v;
    tests[CC_LE]       = (status.n ^ status.v) | status.z;
    tests[CC_LS]       = ~status.c | status.z;
    tests[CC_IRQ_IN]   = irq_in;
    tests[CC_IRQ_OUT]  = irq_out;
    tests[CC_IRQ_ANY]  = irq_in | irq_out;
  end

  assign pass = tests[sel] ^ pol;

endmodule
