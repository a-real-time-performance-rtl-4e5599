// tb_data_memory: the full 1k x 16 data RAM. Every word is written with a
// value derived from its address, then random writes and reads are checked
// against a model array.
module tb_data_memory;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [9:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [1024];

  data_memory dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we = 1; addr = 10'(i); wdata = 16'(i * 37 + 11); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 1024; i++) begin
      addr = 10'(i);
      #1 checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 10'($urandom); wdata = 16'($urandom);
      #1 if (!we) begin
        checks++;
        if (rdata !== model[addr]) begin failures++; $display("FAIL read %0d", addr); end
      end
      @(posedge clk);
      if (we) model[addr] = wdata;
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
