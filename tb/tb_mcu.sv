// tb_mcu: the microprogram control unit. Random next-address operations,
// condition selections and status/request values are applied and the next
// microprogram address is compared with a model of what each operation
// means: continue, jump, conditional jump, call and return through the
// file, the register-indirect jumps, restart at zero and the counted loop.
// The input/output request conditions are exercised like the status bits.
module tb_mcu;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, clr = 0, cc_pol = 0, irq_in = 0, irq_out = 0;
  next_e na; cc_e cc;
  logic [11:0] direct, next_addr, upc;
  logic cond;
  status_t status;

  mcu dut (.clk, .rst_n, .en, .clr, .na, .cc, .cc_pol, .direct, .status,
           .irq_in, .irq_out, .next_addr, .cond, .upc);

  always #5 clk = ~clk;

  logic [11:0] m_pc, m_r;
  logic [11:0] m_stack [$];
  int n_taken = 0;

  function automatic logic cond_of();
    logic c;
    case (cc)
      CC_TRUE: c = 1;
      CC_Z: c = status.z;
      CC_C: c = status.c;
      CC_N: c = status.n;
      CC_V: c = status.v;
      CC_LT: c = status.n ^ status.v;
      CC_LE: c = (status.n ^ status.v) | status.z;
      CC_LS: c = !status.c | status.z;
      CC_IRQ_IN: c = irq_in;
      CC_IRQ_OUT: c = irq_out;
      CC_IRQ_ANY: c = irq_in | irq_out;
      default: c = 0;
    endcase
    return c ^ cc_pol;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [11:0] ey, top;
    logic c, push, pop;
    na = NA_CONT; cc = CC_TRUE; direct = 0; status = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1; en = 1;
    m_pc = 0; m_r = 0;
    @(posedge clk);
    m_pc = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // keep the stack between 1 and 3 entries deep so it never wraps
      do na = next_e'($urandom % 13);
      while ((m_stack.size() >= 3 && (na == NA_CALL || na == NA_CJS || na == NA_PUSH)) ||
             (m_stack.size() == 0 && (na == NA_RET || na == NA_CRET || na == NA_LOOP)));
      cc = cc_e'($urandom); cc_pol = 1'($urandom); direct = 12'($urandom);
      status = status_t'($urandom); irq_in = 1'($urandom); irq_out = 1'($urandom);
      c = cond_of();
      top = (m_stack.size() > 0) ? m_stack[$] : 12'h0;
      push = 0; pop = 0;
      case (na)
        NA_JUMP: ey = direct;
        NA_CJP:  ey = c ? direct : m_pc;
        NA_CALL: begin ey = direct; push = 1; end
        NA_CJS:  begin ey = c ? direct : m_pc; push = c; end
        NA_RET:  begin ey = top; pop = 1; end
        NA_CRET: begin ey = c ? top : m_pc; pop = c; end
        NA_JR:   ey = m_r;
        NA_CJR:  ey = c ? m_r : m_pc;
        NA_ZERO: ey = 0;
        NA_PUSH: begin ey = m_pc; push = 1; end
        NA_LOOP: begin ey = c ? m_pc : top; pop = c; end
        default: ey = m_pc;
      endcase
      #1;
      chk(cond === c, $sformatf("cond op %0d", na));
      chk(next_addr === ey, $sformatf("step %0d op %0d: next %h exp %h", i, na, next_addr, ey));
      if (c && na inside {NA_CJP, NA_CJS, NA_CRET, NA_CJR}) n_taken++;
      @(posedge clk);
      if (push) m_stack.push_back(m_pc);
      if (pop) void'(m_stack.pop_back());
      if (na == NA_LDR) m_r = direct;
      m_pc = ey + 1;
      #1 chk(upc === m_pc, "uPC");
    end
    chk(n_taken > 100, "conditional branches taken");
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
