// tb_sequencer: the microprogram sequencer against a reference model of its
// four address sources (direct, register, uPC, file), the 4-word file with
// push and pop, the register load, the zero input and the stop clear.
module tb_sequencer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, clr = 0, r_ld = 0, fe = 0, pup = 0, zero = 0;
  logic [1:0]  sel = 0;
  logic [11:0] d = 0, y, upc;

  sequencer dut (.clk, .rst_n, .en, .clr, .sel, .d, .r_ld, .fe, .pup, .zero, .y, .upc);

  always #5 clk = ~clk;

  logic [11:0] m_upc, m_r, m_file [4];
  logic [1:0]  m_sp;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [11:0] ey;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_upc = 0; m_r = 0; m_sp = 0;
    #1 chk(upc === 12'd0, "reset uPC");
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      sel = 2'($urandom); d = 12'($urandom); r_ld = 1'($urandom);
      fe = ($urandom % 3) == 0; pup = 1'($urandom);
      zero = ($urandom % 16) == 0; clr = ($urandom % 64) == 0;
      en = ($urandom % 8) != 0;
      if (i < 4) begin  // fill the file first so that no entry is read unwritten
        sel = 2; fe = 1; pup = 1; zero = 0; clr = 0; en = 1;
      end
      if (zero) ey = 0;
      else case (sel)
        0: ey = d;
        1: ey = m_r;
        2: ey = m_upc;
        default: ey = m_file[m_sp];
      endcase
      #1 chk(y === ey, $sformatf("step %0d y got %h exp %h", i, y, ey));
      @(posedge clk);
      if (clr) begin
        m_upc = 0; m_r = 0; m_sp = 0;
      end else if (en) begin
        if (fe && pup) begin m_sp = m_sp + 1; m_file[m_sp] = m_upc; end
        else if (fe) m_sp = m_sp - 1;
        m_upc = ey + 1;
        if (r_ld) m_r = d;
      end
      #1 chk(upc === m_upc, $sformatf("step %0d upc got %h exp %h", i, upc, m_upc));
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
