// tb_wcs: the writable control store. The host writes random 64-bit words
// while the machine is stopped, they are read back through the sequencer
// address while it runs, and a host write attempted while running must
// leave the store unchanged. Runs with a 64-word store.
module tb_wcs;
  int checks = 0, failures = 0;
  localparam int DEPTH = 64;
  logic clk = 0, run = 0, host_we = 0;
  logic [11:0] seq_addr = 0, host_addr = 0;
  logic [63:0] host_wdata = 0, rdata;
  logic [63:0] model [DEPTH];

  wcs #(.DEPTH(DEPTH)) dut (.clk, .run, .seq_addr, .host_we, .host_addr, .host_wdata, .rdata);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = 12'(i); host_wdata = {$urandom, $urandom};
      model[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    // host reads back while stopped
    for (int i = 0; i < DEPTH; i++) begin
      host_addr = 12'(i);
      #1 chk(rdata === model[i], $sformatf("host read %0d", i));
    end
    run = 1;
    // a host write while running must be ignored
    @(negedge clk);
    host_we = 1; host_addr = 5; host_wdata = ~model[5];
    @(negedge clk);
    host_we = 0;
    for (int i = 0; i < 200; i++) begin
      seq_addr = 12'($urandom % DEPTH);
      #1 chk(rdata === model[seq_addr], $sformatf("run read %0d", seq_addr));
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
