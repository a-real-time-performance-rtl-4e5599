// tb_status_reg: random loads and holds of the status register, checked
// against a model register, plus the reset value.
module tb_status_reg;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, ld = 0;
  status_t flags_in, flags, model;

  status_reg dut (.clk, .rst_n, .en, .ld, .flags_in, .flags);

  always #5 clk = ~clk;

  initial begin
    flags_in = '1;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (flags !== 4'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      ld = 1'($urandom);
      flags_in = status_t'($urandom);
      @(posedge clk);
      if (en && ld) model = flags_in;
      #1 checks++;
      if (flags !== model) begin
        failures++;
        $display("FAIL step %0d: got %b exp %b", i, flags, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
