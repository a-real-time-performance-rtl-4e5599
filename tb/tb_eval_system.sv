// tb_eval_system: the whole machine, at its default parameters, running a
// small evaluation microprogram on one segment of 128 sample pairs at the
// 32 kHz maximum sampling rate.
//
// The testbench plays the support processor (it loads the control store
// and reads the output register) and the analog front end (an A/D model
// that returns a coder-input sample s(n) on channel 0 and a decoded sample
// r(n) = s(n) + noise on channel 1, with a random conversion time).
//
// The microprogram:
//   init  clear the 32-bit sum R1:R0, set the sample counter R2 = -128,
//         load MAR1 and MAR2 together, then MAR2 = 0x200, R = main loop
//   main  test the output request, then the input request, else jump to R
//   in    read the A/D (input sample), store it in MBR, clear the request;
//         write it to memory at MAR1 and echo it to the D/A converter
//   out   read the A/D (decoded sample), write it at MAR2, read s back
//         through MOR, e = s - r (status loaded), step both MARs together,
//         add e sign-extended into R1:R0 (two branches on the sign, the
//         high word adds the stored carry), count the sample
//   done  report sum low/high, then shift R1:Q right arithmetically
//         7 times (a counted loop calling a one-line subroutine) and
//         report the mean error low/high; halt.
// Checked: the four reported words, both memory blocks, the D/A echo, the
// sampling period (141 clocks = 32 kHz at 4.5 MHz), no overrun, and that
// every mechanism happened: input and output service, both requests
// pending at once (priority), both sign branches, subroutine call/return,
// loop, a carry into the high word.
module tb_eval_system;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  localparam int N = 128, K = 7;

  logic clk = 0, rst_n = 0, run = 0, host_we = 0;
  logic [11:0] host_addr = 0, upc;
  logic [63:0] host_wdata = 0;
  logic [15:0] out_data, rate_div = 16'd141, adc_data = 0, dac_data, overruns;
  logic out_load, codec_clk, sh_hold, adc_start, adc_chan, adc_done = 0, dac_load;

  eval_system dut (.clk, .rst_n, .run, .host_we, .host_addr, .host_wdata, .out_data,
                   .out_load, .rate_div, .codec_clk, .sh_hold, .adc_start, .adc_chan,
                   .adc_done, .adc_data, .dac_data, .dac_load, .upc, .overruns);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- test signals ----------------
  logic signed [15:0] s [N + 8];
  logic signed [15:0] r [N + 8];
  initial begin
    for (int i = 0; i < N + 8; i++) begin
      s[i] = 16'($signed($urandom % 16001) - 8000);
      r[i] = s[i] + 16'($signed($urandom % 101) - 50);
    end
  end

  // ---------------- A/D model ----------------
  int n_in = 0, n_out = 0;
  always @(posedge clk) begin
    if (adc_start && rst_n) begin
      automatic logic ch = adc_chan;
      repeat (1 + $urandom % 4) @(posedge clk);
      adc_data <= ch ? r[n_out] : s[n_in];
      if (ch) n_out++; else n_in++;
      adc_done <= 1;
      @(posedge clk);
      adc_done <= 0;
    end
  end

  // ---------------- microprogram assembler ----------------
  uinstr_t prog [64];

  function automatic uinstr_t alu(alu_src_e src, alu_fn_e fn, alu_dst_e dst,
                                  int a, int b, cin_e cin = CIN_ZERO);
    uinstr_t u = '0;
    u.src = src; u.fn = fn; u.dst = dst; u.a = 4'(a); u.b = 4'(b); u.cin = cin;
    return u;
  endfunction

  function automatic uinstr_t br(uinstr_t u, next_e na, int target,
                                 cc_e cc = CC_TRUE, logic pol = 0);
    u.na = na; u.direct = 12'(target); u.cc = cc; u.cc_pol = pol;
    return u;
  endfunction

  localparam int MAIN = 6, ISR_IN = 10, ISR_OUT = 20, POS = 25, NEG = 27,
                 COUNT = 29, DONE = 31, LOOPB = 35, SHR = 40, HALT = 39;

  initial begin
    uinstr_t u;
    foreach (prog[i]) prog[i] = '0;
    // init
    u = alu(SRC_DZ, FN_ADD, DST_RAMF, 0, 0); prog[0] = u;              // R0 = 0
    u = alu(SRC_DZ, FN_ADD, DST_RAMF, 0, 1); prog[1] = u;              // R1 = 0
    u = alu(SRC_DZ, FN_SUBR, DST_RAMF, 0, 2, CIN_ONE); u.direct = 12'(N);
    prog[2] = u;                                                      // R2 = -N
    u = alu(SRC_DZ, FN_ADD, DST_NOP, 0, 0); u.obus = OB_MARS; prog[3] = u; // MAR1 = MAR2 = 0
    u = alu(SRC_DZ, FN_ADD, DST_NOP, 0, 0); u.direct = 12'h200; u.obus = OB_MAR2;
    prog[4] = u;                                                      // MAR2 = 0x200
    prog[5] = br('0, NA_LDR, MAIN);                                   // R = MAIN
    // main loop: output request is tested first; priority must hold it back
    prog[MAIN]     = br('0, NA_CJP, ISR_OUT, CC_IRQ_OUT);
    prog[MAIN + 1] = br('0, NA_CJP, ISR_IN, CC_IRQ_IN);
    prog[MAIN + 2] = br('0, NA_JR, 0);
    // input sample service
    u = alu(SRC_DZ, FN_ADD, DST_RAMF, 0, 3); u.ibus = IB_ADC; u.obus = OB_MBR; u.irq_clr = 2'b01;
    prog[ISR_IN] = u;                                                 // R3 = MBR = s
    u = alu(SRC_ZA, FN_OR, DST_NOP, 3, 0); u.obus = OB_DAC; u.mem_wr = 1; u.mem_sel = 0;
    prog[ISR_IN + 1] = br(u, NA_JUMP, MAIN);                          // mem[MAR1] = s, D/A = s
    // output sample service
    u = alu(SRC_DZ, FN_ADD, DST_RAMF, 0, 4); u.ibus = IB_ADC; u.obus = OB_MBR; u.irq_clr = 2'b10;
    prog[ISR_OUT] = u;                                                // R4 = MBR = r
    u = '0; u.mem_wr = 1; u.mem_sel = 1; prog[ISR_OUT + 1] = u;       // mem[MAR2] = r
    u = '0; u.mem_rd = 1; u.mem_sel = 0; prog[ISR_OUT + 2] = u;       // MOR = mem[MAR1]
    u = alu(SRC_DA, FN_SUBS, DST_RAMF, 4, 4, CIN_ONE); u.ibus = IB_MOR; u.stat_ld = 1;
    u.auto_inc = 1; prog[ISR_OUT + 3] = u;                            // R4 = e = s - r
    prog[ISR_OUT + 4] = br('0, NA_CJP, NEG, CC_N);
    u = alu(SRC_AB, FN_ADD, DST_RAMF, 4, 0); u.stat_ld = 1; prog[POS] = u;      // R0 += e
    u = alu(SRC_ZB, FN_ADD, DST_RAMF, 0, 1, CIN_C); prog[POS + 1] = br(u, NA_JUMP, COUNT);
    u = alu(SRC_AB, FN_ADD, DST_RAMF, 4, 0); u.stat_ld = 1; prog[NEG] = u;      // R0 += e
    u = alu(SRC_ZB, FN_SUBR, DST_RAMF, 0, 1, CIN_C); prog[NEG + 1] = u;         // R1 += -1 + C
    u = alu(SRC_ZB, FN_ADD, DST_RAMF, 0, 2, CIN_ONE); u.stat_ld = 1; prog[COUNT] = u;
    prog[COUNT + 1] = br('0, NA_CJP, MAIN, CC_Z, 1'b1);              // not done: main
    // segment done
    u = alu(SRC_ZA, FN_OR, DST_NOP, 0, 0); u.obus = OB_OUTREG; prog[DONE] = u;
    u = alu(SRC_ZA, FN_OR, DST_NOP, 1, 0); u.obus = OB_OUTREG; prog[DONE + 1] = u;
    u = alu(SRC_ZA, FN_OR, DST_QREG, 0, 0); prog[DONE + 2] = u;                 // Q = R0
    u = alu(SRC_DZ, FN_SUBR, DST_RAMF, 0, 6, CIN_ONE); prog[DONE + 3] = br(u, NA_PUSH, K);
    u = alu(SRC_ZB, FN_ADD, DST_RAMF, 0, 6, CIN_ONE); u.stat_ld = 1;
    prog[LOOPB] = br(u, NA_CALL, SHR);                                // R6++, call SHR
    prog[LOOPB + 1] = br('0, NA_LOOP, 0, CC_Z);                      // until R6 == 0
    u = alu(SRC_ZQ, FN_OR, DST_NOP, 0, 0); u.obus = OB_OUTREG; prog[LOOPB + 2] = u;
    u = alu(SRC_ZA, FN_OR, DST_NOP, 1, 0); u.obus = OB_OUTREG; prog[LOOPB + 3] = u;
    prog[HALT] = br('0, NA_JUMP, HALT);
    u = alu(SRC_ZB, FN_OR, DST_RAMQD, 0, 1); u.sh = SH_ARITH;
    prog[SHR] = br(u, NA_RET, 0);                                     // R1:Q >>= 1
  end

  // ---------------- observation ----------------
  int n_isr_in = 0, n_isr_out = 0, n_pos = 0, n_neg = 0, n_call = 0, n_loop_back = 0;
  int n_both = 0, n_carry = 0, cyc = 0, last_tick = -1, period = 0, n_dac = 0;
  logic [15:0] outs [$];
  always @(posedge clk) if (run) begin
    cyc++;
    case (dut.next_addr)
      12'(ISR_IN):  n_isr_in++;
      12'(ISR_OUT): n_isr_out++;
      12'(POS):     n_pos++;
      12'(NEG):     n_neg++;
      12'(SHR):     n_call++;
      default: ;
    endcase
    if (dut.uir.na == NA_LOOP && !dut.cond) n_loop_back++;
    if (dut.irq_in && dut.irq_out) n_both++;
    if ((dut.uir.cin == CIN_C) && dut.status.c) n_carry++;
    if (dut.u_io.sample_tick) begin
      if (last_tick >= 0) period = cyc - last_tick;
      last_tick = cyc;
    end
    if (out_load) outs.push_back(out_data);
    if (dac_load) begin
      if (n_dac < N) chk(dac_data === s[n_dac], $sformatf("D/A echo %0d", n_dac));
      n_dac++;
    end
  end

  initial begin
    logic signed [31:0] sum, mean;
    int t0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      host_we = 1; host_addr = 12'(i); host_wdata = prog[i];
      @(negedge clk);
    end
    host_we = 0;
    @(negedge clk);
    run = 1;
    t0 = cyc;
    wait (outs.size() == 4);
    repeat (4) @(posedge clk);
    sum = 0;
    for (int i = 0; i < N; i++) sum += 32'(s[i]) - 32'(r[i]);
    mean = sum >>> K;
    chk(outs[0] === sum[15:0],  $sformatf("sum low %h exp %h", outs[0], sum[15:0]));
    chk(outs[1] === sum[31:16], $sformatf("sum high %h exp %h", outs[1], sum[31:16]));
    chk(outs[2] === mean[15:0], $sformatf("mean low %h exp %h", outs[2], mean[15:0]));
    chk(outs[3] === mean[31:16], $sformatf("mean high %h exp %h", outs[3], mean[31:16]));
    for (int i = 0; i < N; i++) begin
      chk(dut.u_dmem.mem[i] === s[i], $sformatf("input block word %0d", i));
      chk(dut.u_dmem.mem[512 + i] === r[i], $sformatf("output block word %0d", i));
    end
    chk(n_dac == N, $sformatf("D/A writes %0d", n_dac));
    chk(period == 141, $sformatf("sampling period %0d clocks", period));
    chk(overruns == 0, "no sample lost");
    chk(cyc - t0 <= (N + 2) * 141, "segment processed in real time");
    $display("mechanisms: in=%0d out=%0d both_pending=%0d pos=%0d neg=%0d carry=%0d calls=%0d loop_back=%0d cycles=%0d",
             n_isr_in, n_isr_out, n_both, n_pos, n_neg, n_carry, n_call, n_loop_back, cyc - t0);
    chk(n_isr_in == N && n_isr_out == N, "every request served once");
    chk(n_both > 0, "input and output requests pending together");
    chk(n_pos > 0 && n_neg > 0, "both sign branches");
    chk(n_carry > 0, "carry chained into the high word");
    chk(n_call == K && n_loop_back == K - 1, "counted loop with subroutine calls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
