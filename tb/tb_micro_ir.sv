// tb_micro_ir: the pipeline register loads every clock while running,
// holds the no-operation word after reset and while stopped.
module tb_micro_ir;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  logic [63:0] din;
  uinstr_t uir;

  micro_ir dut (.clk, .rst_n, .run, .din, .uir);

  always #5 clk = ~clk;

  initial begin
    logic [63:0] exp;
    din = '1;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (uir !== 64'h0) begin failures++; $display("FAIL reset"); end
    @(negedge clk);
    rst_n = 1;
    exp = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      run = ($urandom % 4) != 0;
      din = {$urandom, $urandom};
      @(posedge clk);
      exp = run ? din : 64'h0;
      #1 checks++;
      if (uir !== exp) begin failures++; $display("FAIL step %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
