// tb_shift_mux: exhaustive check of the shift multiplexer. For every mode
// and every combination of the four end bits, the bits it feeds the
// shifters are compared with the 32-bit shift each mode stands for:
// independent 16-bit logical shifts, 32-bit arithmetic, 32-bit logical and
// 32-bit rotate of RAM:Q.
module tb_shift_mux;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  shift_e sel;
  logic f_msb, f_lsb, q_msb, q_lsb, rdn, rup, qdn, qup;

  shift_mux dut (.sel, .f_msb, .f_lsb, .q_msb, .q_lsb,
                 .ram_dn_in(rdn), .ram_up_in(rup), .q_dn_in(qdn), .q_up_in(qup));

  initial begin
    logic [31:0] v, dn, up;
    logic        e_rdn, e_rup, e_qdn, e_qup;
    for (int m = 0; m < 4; m++) begin
      for (int b = 0; b < 16; b++) begin
        sel = shift_e'(m);
        {f_msb, f_lsb, q_msb, q_lsb} = 4'(b);
        // a 32-bit word RAM:Q with these end bits
        v = {f_msb, 14'h1555, f_lsb, q_msb, 14'h2aaa, q_lsb};
        case (m)
          0: begin dn = {1'b0, v[31:17], 1'b0, v[15:1]}; up = {v[30:16], 1'b0, v[14:0], 1'b0}; end
          1: begin dn = {v[31], v[31:1]};   up = {v[30:0], 1'b0}; end
          2: begin dn = {1'b0, v[31:1]};    up = {v[30:0], 1'b0}; end
          default: begin dn = {v[0], v[31:1]}; up = {v[30:0], v[31]}; end
        endcase
        e_rdn = dn[31]; e_qdn = dn[15]; e_rup = up[16]; e_qup = up[0];
        #1;
        checks++;
        if ({rdn, rup, qdn, qup} !== {e_rdn, e_rup, e_qdn, e_qup}) begin
          failures++;
          $display("FAIL mode %0d bits %b: got %b exp %b", m, b[3:0],
                   {rdn, rup, qdn, qup}, {e_rdn, e_rup, e_qdn, e_qup});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
