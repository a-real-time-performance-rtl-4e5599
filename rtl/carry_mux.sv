// carry_mux: the CPU's carry input multiplexer.
//
// Selects the carry into the least significant slice: 0, 1, the carry
// stored in the status register, or its complement. Adding the stored carry
// into the upper word after adding the lower words gives 32-bit (double
// length) addition and subtraction, which the document names as the purpose
// of this multiplexer. The four choices are this design's own.
//
// Purely combinational.
module carry_mux
  import eval_pkg::*;
(
  input  cin_e sel,
  input  logic c_flag,  // stored carry from the status register
  output logic cin
);

  always_comb begin
    unique case (sel)
      CIN_ZERO: cin = 1'b0;
      CIN_ONE:  cin = 1'b1;
      CIN_C:    cin = c_flag;
      default:  cin = ~c_flag;
    endcase
  end

endmodule
