// tb_cpu: the 16-bit CPU (four slices, shift multiplexer, carry
// multiplexer, status register) against a 16-bit reference model.
// Shifts are modelled as shifts of the 32-bit word RAM:Q, so the test
// checks that the slices' links and the shift multiplexer together give
// proper double-length shifts. Random microoperations with random status
// loads check Y each cycle and the status flags after each edge; a 32-bit
// addition chained through the stored carry and a register read-back close
// the test.
module tb_cpu;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, stat_ld = 0;
  alu_src_e src; alu_fn_e fn; alu_dst_e dst; shift_e sh; cin_e cin_sel;
  logic [3:0] a_addr, b_addr;
  logic [15:0] d, y;
  status_t status;

  cpu dut (.clk, .rst_n, .en, .src, .fn, .dst, .a_addr, .b_addr, .sh, .cin_sel,
           .stat_ld, .d, .y, .status);

  always #5 clk = ~clk;

  logic [15:0] m_rf [16];
  logic [15:0] m_q;
  status_t     m_st;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step();
    logic [15:0] r, s, ri, si, ef, ey;
    logic [16:0] t;
    logic [31:0] w;
    logic        c, ec, ev, arith;
    case (src)
      SRC_AQ: begin r = m_rf[a_addr]; s = m_q; end
      SRC_AB: begin r = m_rf[a_addr]; s = m_rf[b_addr]; end
      SRC_ZQ: begin r = 0; s = m_q; end
      SRC_ZB: begin r = 0; s = m_rf[b_addr]; end
      SRC_ZA: begin r = 0; s = m_rf[a_addr]; end
      SRC_DA: begin r = d; s = m_rf[a_addr]; end
      SRC_DQ: begin r = d; s = m_q; end
      default: begin r = d; s = 0; end
    endcase
    case (cin_sel)
      CIN_ZERO: c = 0;
      CIN_ONE:  c = 1;
      CIN_C:    c = m_st.c;
      default:  c = !m_st.c;
    endcase
    ri = (fn == FN_SUBR) ? ~r : r;
    si = (fn == FN_SUBS) ? ~s : s;
    arith = (fn == FN_ADD || fn == FN_SUBR || fn == FN_SUBS);
    t = ri + si + c;
    case (fn)
      FN_OR:    ef = r | s;
      FN_AND:   ef = r & s;
      FN_NOTRS: ef = ~r & s;
      FN_EXOR:  ef = r ^ s;
      FN_EXNOR: ef = ~(r ^ s);
      default:  ef = t[15:0];
    endcase
    ec = arith && t[16];
    ev = arith && (ri[15] == si[15]) && (t[15] != ri[15]);
    ey = (dst == DST_RAMA) ? m_rf[a_addr] : ef;
    #1;
    chk(y === ey, $sformatf("Y got %h exp %h (src %0d fn %0d dst %0d)", y, ey, src, fn, dst));
    @(posedge clk);
    if (en) begin
      w = {ef, m_q};
      case (dst)
        DST_QREG: m_q = ef;
        DST_RAMA, DST_RAMF: m_rf[b_addr] = ef;
        DST_RAMQD: case (sh)
          SH_LOGIC:  begin m_rf[b_addr] = ef >> 1; m_q = m_q >> 1; end
          SH_ARITH:  {m_rf[b_addr], m_q} = $signed(w) >>> 1;
          SH_DOUBLE: {m_rf[b_addr], m_q} = w >> 1;
          default:   {m_rf[b_addr], m_q} = {w[0], w[31:1]};
        endcase
        DST_RAMD: case (sh)
          SH_LOGIC, SH_DOUBLE: m_rf[b_addr] = ef >> 1;
          SH_ARITH:  m_rf[b_addr] = {ef[15], ef[15:1]};
          default:   m_rf[b_addr] = {m_q[0], ef[15:1]};
        endcase
        DST_RAMQU: case (sh)
          SH_LOGIC:  begin m_rf[b_addr] = ef << 1; m_q = m_q << 1; end
          SH_ARITH, SH_DOUBLE: {m_rf[b_addr], m_q} = w << 1;
          default:   {m_rf[b_addr], m_q} = {w[30:0], w[31]};
        endcase
        DST_RAMU: m_rf[b_addr] = (sh == SH_LOGIC) ? (ef << 1) : {ef[14:0], m_q[15]};
        default: ;
      endcase
      if (stat_ld) m_st = '{z: (ef == 0), n: ef[15], c: ec, v: ev};
    end
    #1;
    chk(status === m_st, $sformatf("status got %b exp %b", status, m_st));
  endtask

  initial begin
    logic [31:0] x1, x2, sum;
    a_addr = 0; b_addr = 0; d = 0; src = SRC_DZ; fn = FN_ADD; dst = DST_NOP;
    sh = SH_LOGIC; cin_sel = CIN_ZERO;
    repeat (2) @(posedge clk);
    m_st = '0; m_q = 0;
    rst_n = 1; en = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      src = SRC_DZ; fn = FN_ADD; dst = DST_RAMF; b_addr = 4'(i); d = 16'($urandom);
      step();
    end
    dst = DST_QREG; d = 16'($urandom); step();
    for (int i = 0; i < 4000; i++) begin
      src = alu_src_e'($urandom); fn = alu_fn_e'($urandom); dst = alu_dst_e'($urandom);
      sh = shift_e'($urandom); cin_sel = cin_e'($urandom);
      a_addr = 4'($urandom); b_addr = 4'($urandom); d = 16'($urandom);
      stat_ld = 1'($urandom);
      en = ($urandom % 8) != 0;
      step();
    end
    // 32-bit addition: r1:r0 = x1, r3:r2 = x2, r1:r0 += r3:r2
    en = 1; sh = SH_LOGIC;
    x1 = $urandom; x2 = $urandom; sum = x1 + x2;
    src = SRC_DZ; fn = FN_ADD; dst = DST_RAMF; cin_sel = CIN_ZERO; stat_ld = 0;
    b_addr = 0; d = x1[15:0];  step();
    b_addr = 1; d = x1[31:16]; step();
    b_addr = 2; d = x2[15:0];  step();
    b_addr = 3; d = x2[31:16]; step();
    src = SRC_AB; stat_ld = 1;
    a_addr = 2; b_addr = 0; cin_sel = CIN_ZERO; step();
    a_addr = 3; b_addr = 1; cin_sel = CIN_C;    step();
    stat_ld = 0;
    src = SRC_ZA; fn = FN_OR; dst = DST_NOP;
    a_addr = 0; #1 chk(y === sum[15:0], "32-bit add low word");
    a_addr = 1; #1 chk(y === sum[31:16], "32-bit add high word");
    for (int i = 0; i < 16; i++) begin
      a_addr = 4'(i);
      #1 chk(y === m_rf[i], $sformatf("reg %0d got %h exp %h", i, y, m_rf[i]));
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
