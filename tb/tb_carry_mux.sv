// tb_carry_mux: exhaustive check of the carry input multiplexer.
module tb_carry_mux;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  cin_e sel;
  logic c_flag, cin;

  carry_mux dut (.sel, .c_flag, .cin);

  initial begin
    logic exp;
    for (int m = 0; m < 4; m++)
      for (int c = 0; c < 2; c++) begin
        sel = cin_e'(m);
        c_flag = c[0];
        exp = (m == 0) ? 1'b0 : (m == 1) ? 1'b1 : (m == 2) ? c[0] : ~c[0];
        #1;
        checks++;
        if (cin !== exp) begin
          failures++;
          $display("FAIL sel %0d c %0d: got %b", m, c, cin);
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
