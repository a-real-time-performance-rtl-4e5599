// bus_control: the input bus (IBUS) and output bus (OBUS) of the machine.
//
// The IBUS carries one of three sources into the CPU's D input, chosen by
// the IBUS field: the 12-bit direct field of the microinstruction (zero
// extended, as an operand), the memory output register, or the A/D
// converter sample. The CPU's Y output drives the OBUS, and the OBUS field
// picks one destination: the D/A converter latch, MAR1, MAR2, the memory
// buffer register, the output register read by the support processor, or
// MAR1 and MAR2 together. The sources and destinations are the document's;
// it speaks of six destinations but names five, and loading both address
// registers at once as the sixth is this design's reading. The D/A latch and
// the output register live here and raise a one-cycle strobe (dac_load,
// out_load) in the cycle after they are written, together with the new
// value.
//
// Timing: the IBUS multiplexer and the decoder are combinational; the two
// latches change on the rising edge when en is high.
module bus_control
  import eval_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  ibus_e        ibus_sel,
  input  obus_e        obus_sel,
  input  logic [11:0]  direct,
  input  logic [W-1:0] mor,
  input  logic [W-1:0] adc_sample,
  input  logic [W-1:0] obus,      // CPU Y output
  output logic [W-1:0] ibus,
  output logic         ld_mar1,
  output logic         ld_mar2,
  output logic         ld_mbr,
  output logic [W-1:0] dac_data,
  output logic         dac_load,
  output logic [W-1:0] out_data,
  output logic         out_load
);

  always_comb begin
    unique case (ibus_sel)
      IB_DIRECT: ibus = W'(direct);
      IB_MOR:    ibus = mor;
      IB_ADC:    ibus = adc_sample;
      default:   ibus = '0;
    endcase
  end

  assign ld_mar1 = en && (obus_sel == OB_MAR1 || obus_sel == OB_MARS);
  assign ld_mar2 = en && (obus_sel == OB_MAR2 || obus_sel == OB_MARS);
  assign ld_mbr  = en && (obus_sel == OB_MBR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_data <= '0;
      dac_load <= 1'b0;
      out_data <= '0;
      out_load <= 1'b0;
    end else begin
      dac_load <= en && (obus_sel == OB_DAC);
      out_load <= en && (obus_sel == OB_OUTREG);
      if (en && obus_sel == OB_DAC)    dac_data <= obus;
      if (en && obus_sel == OB_OUTREG) out_data <= obus;
    end
  end

endmodule
