// tb_alu_slice: one 4-bit slice on its own. Every register and Q are first
// loaded from D, then random microoperations with random carry and shift
// inputs run against a reference model of the slice (register file, Q,
// ALU, shifter); Y, F, carry out and zero detect are compared each cycle
// and every register is read back at the end.
module tb_alu_slice;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  alu_src_e src; alu_fn_e fn; alu_dst_e dst;
  logic [3:0] a_addr, b_addr, d, y, f, q;
  logic cin, rdn, rup, qdn, qup, cout, cmsb, fz;

  alu_slice dut (.clk, .rst_n, .en, .src, .fn, .dst, .a_addr, .b_addr, .d, .cin,
                 .ram_dn_in(rdn), .ram_up_in(rup), .q_dn_in(qdn), .q_up_in(qup),
                 .y, .cout, .c_into_msb(cmsb), .f, .q, .f_zero(fz));

  always #5 clk = ~clk;

  logic [3:0] m_rf [16];
  logic [3:0] m_q;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference evaluation of the current inputs; updates the model at the edge
  task automatic step(input logic check_y);
    logic [3:0] r, s, ef, ey;
    logic [4:0] t;
    logic       ec;
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
    ec = 0;
    case (fn)
      FN_ADD:  begin t = r + s + cin;  ef = t[3:0]; ec = t[4]; end
      FN_SUBR: begin t = s + {1'b0, ~r} + cin; ef = t[3:0]; ec = t[4]; end
      FN_SUBS: begin t = r + {1'b0, ~s} + cin; ef = t[3:0]; ec = t[4]; end
      FN_OR:   ef = r | s;
      FN_AND:  ef = r & s;
      FN_NOTRS: ef = ~r & s;
      FN_EXOR: ef = r ^ s;
      default: ef = ~(r ^ s);
    endcase
    ey = (dst == DST_RAMA) ? m_rf[a_addr] : ef;
    #1;
    if (check_y) begin
      chk(f === ef, $sformatf("F got %h exp %h", f, ef));
      chk(y === ey, $sformatf("Y got %h exp %h", y, ey));
      chk(cout === ec, $sformatf("cout got %b exp %b (fn %0d)", cout, ec, fn));
      chk(fz === (ef == 0), "zero detect");
    end
    @(posedge clk);
    if (en) begin
      case (dst)
        DST_QREG:  m_q = ef;
        DST_RAMA, DST_RAMF: m_rf[b_addr] = ef;
        DST_RAMQD: begin m_rf[b_addr] = {rdn, ef[3:1]}; m_q = {qdn, m_q[3:1]}; end
        DST_RAMD:  m_rf[b_addr] = {rdn, ef[3:1]};
        DST_RAMQU: begin m_rf[b_addr] = {ef[2:0], rup}; m_q = {m_q[2:0], qup}; end
        DST_RAMU:  m_rf[b_addr] = {ef[2:0], rup};
        default: ;
      endcase
    end
    #1;
  endtask

  initial begin
    {rdn, rup, qdn, qup, cin} = '0;
    a_addr = 0; b_addr = 0; d = 0; src = SRC_DZ; fn = FN_ADD; dst = DST_NOP;
    repeat (2) @(posedge clk);
    rst_n = 1; en = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      src = SRC_DZ; fn = FN_ADD; dst = DST_RAMF; b_addr = 4'(i); d = 4'($urandom);
      step(1);
    end
    dst = DST_QREG; d = 4'($urandom); step(1);
    for (int i = 0; i < 3000; i++) begin
      src = alu_src_e'($urandom); fn = alu_fn_e'($urandom); dst = alu_dst_e'($urandom);
      a_addr = 4'($urandom); b_addr = 4'($urandom); d = 4'($urandom);
      {rdn, rup, qdn, qup, cin} = 5'($urandom);
      en = ($urandom % 8) != 0;
      step(1);
    end
    en = 1;
    for (int i = 0; i < 16; i++) begin
      src = SRC_ZA; fn = FN_OR; dst = DST_NOP; a_addr = 4'(i);
      #1 chk(y === m_rf[i], $sformatf("reg %0d got %h exp %h", i, y, m_rf[i]));
    end
    chk(q === m_q, "Q");
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
