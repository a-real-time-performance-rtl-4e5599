// shift_mux: the CPU's shift multiplexer.
//
// The four slices shift their RAM (register-file write) path and their Q path
// one place up or down. At the two outer ends of the 16-bit word the bit that
// enters must come from somewhere; this multiplexer supplies it, and by
// feeding the bit that leaves one shifter into the other it joins RAM and Q
// into one 32-bit shifter, which is what makes double-length (32-bit)
// arithmetic possible, as the document states. The four modes (see
// eval_pkg::shift_e) are this design's choice; the document names the
// multiplexer and its purpose only.
//
// Purely combinational.
module shift_mux
  import eval_pkg::*;
(
  input  shift_e sel,
  input  logic   f_msb,      // ALU F bit 15
  input  logic   f_lsb,      // ALU F bit 0
  input  logic   q_msb,      // Q bit 15
  input  logic   q_lsb,      // Q bit 0
  output logic   ram_dn_in,  // into RAM MSB on a down shift
  output logic   ram_up_in,  // into RAM LSB on an up shift
  output logic   q_dn_in,    // into Q MSB on a down shift
  output logic   q_up_in     // into Q LSB on an up shift
);

  always_comb begin
    unique case (sel)
      SH_LOGIC: begin
        ram_dn_in = 1'b0;  ram_up_in = 1'b0;
        q_dn_in   = 1'b0;  q_up_in   = 1'b0;
      end
      SH_ARITH: begin
        ram_dn_in = f_msb; ram_up_in = q_msb;
        q_dn_in   = f_lsb; q_up_in   = 1'b0;
      end
      SH_DOUBLE: begin
        ram_dn_in = 1'b0;  ram_up_in = q_msb;
        q_dn_in   = f_lsb; q_up_in   = 1'b0;
      end
      default: begin  // SH_ROTATE
        ram_dn_in = q_lsb; ram_up_in = q_msb;
        q_dn_in   = f_lsb; q_up_in   = f_msb;
      end
    endcase
  end

endmodule
