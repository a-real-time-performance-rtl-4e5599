// tb_mem_interface: MAR1/MAR2/MBR/MOR with a data memory attached. Random
// cycles of register loads, address selection, auto-increment, reads and
// writes are checked against a model of the registers and of the memory.
// It also checks that one auto-increment steps both address registers.
module tb_mem_interface;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] obus = 0, mor, mem_wdata, mem_rdata;
  logic ld_mar1 = 0, ld_mar2 = 0, ld_mbr = 0, mem_sel = 0, auto_inc = 0, mem_rd = 0, mem_wr = 0;
  logic [9:0] mem_addr, mar1, mar2;
  logic mem_we;

  mem_interface dut (.clk, .rst_n, .en, .obus, .ld_mar1, .ld_mar2, .ld_mbr, .mem_sel,
                     .auto_inc, .mem_rd, .mem_wr, .mor, .mem_addr, .mem_we, .mem_wdata,
                     .mem_rdata, .mar1, .mar2);
  data_memory mem (.clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;

  logic [15:0] m_mem [1024];
  logic [9:0]  m_mar1, m_mar2;
  logic [15:0] m_mbr, m_mor;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [9:0] a;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1; en = 1;
    m_mar1 = 0; m_mar2 = 0; m_mbr = 0; m_mor = 0;
    // clear the memory through the interface: MBR = 0, write with auto-increment
    ld_mbr = 1; obus = 0;
    @(negedge clk);
    ld_mbr = 0; mem_wr = 1; auto_inc = 1;
    for (int i = 0; i < 1024; i++) begin
      m_mem[i] = 0;
      @(negedge clk);
    end
    mem_wr = 0; auto_inc = 0;
    #1 chk(mar1 === 10'd0 && mar2 === 10'd0, "both MARs wrapped after 1024 increments");
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      obus = 16'($urandom);
      ld_mar1 = ($urandom % 4) == 0; ld_mar2 = ($urandom % 4) == 0; ld_mbr = 1'($urandom);
      mem_sel = 1'($urandom); auto_inc = 1'($urandom);
      mem_rd = 1'($urandom); mem_wr = 1'($urandom);
      en = ($urandom % 8) != 0;
      a = mem_sel ? m_mar2 : m_mar1;
      #1 chk(mem_addr === a, "address select");
      @(posedge clk);
      if (en) begin
        if (mem_rd) m_mor = m_mem[a];   // read sees the word before this write
        if (mem_wr) m_mem[a] = m_mbr;
        if (ld_mbr) m_mbr = obus;
        m_mar1 = ld_mar1 ? obus[9:0] : auto_inc ? m_mar1 + 1 : m_mar1;
        m_mar2 = ld_mar2 ? obus[9:0] : auto_inc ? m_mar2 + 1 : m_mar2;
      end
      #1;
      chk(mar1 === m_mar1 && mar2 === m_mar2, $sformatf("step %0d MARs", i));
      chk(mor === m_mor, $sformatf("step %0d MOR got %h exp %h", i, mor, m_mor));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
