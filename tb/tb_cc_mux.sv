// tb_cc_mux: every select, both polarities, all status and request values,
// compared with the conditions written out from their definitions.
module tb_cc_mux;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  cc_e sel;
  logic pol, irq_in, irq_out, pass;
  status_t status;

  cc_mux dut (.sel, .pol, .status, .irq_in, .irq_out, .pass);

  initial begin
    logic z, n, c, v, e;
    for (int s = 0; s < 16; s++)
      for (int x = 0; x < 128; x++) begin
        sel = cc_e'(s);
        {pol, irq_in, irq_out, z, n, c, v} = 7'(x);
        status = '{z: z, n: n, c: c, v: v};
        case (s)
          0: e = 1;
          1: e = z;
          2: e = c;
          3: e = n;
          4: e = v;
          5: e = (n != v);
          6: e = (n != v) || z;
          7: e = !c || z;
          8: e = irq_in;
          9: e = irq_out;
          10: e = irq_in || irq_out;
          default: e = 0;
        endcase
        if (pol) e = !e;
        #1 checks++;
        if (pass !== e) begin
          failures++;
          $display("FAIL sel %0d in %b: got %b exp %b", s, x[6:0], pass, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
