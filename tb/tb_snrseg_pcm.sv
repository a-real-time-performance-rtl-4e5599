// tb_snrseg_pcm: segmental SNR of a 64 kbit/s mu-law PCM codec, measured
// by the machine in real time, with compensation of the codec's delay.
//
// Workload: an 800 Hz tone sampled at 8 kHz (563 clocks per sample at
// 4.5 MHz), eight segments of 128 samples at different levels, one of them
// nearly silent. The codec under test is modelled here as mu-law encode and
// decode with a delay of D = 3 samples; the A/D model returns the coder
// input s(n) on channel 0 and the decoded r(n) = Q(s(n - D)) on channel 1.
//
// Microprogram (loaded as the support processor would):
//   start        MAR1 = 0 (write pointer), MAR2 = -D (read pointer), and
//                the delayed sample number counter R12 = -D
//   per sample   the input request stores s(n) at MAR1; the output request
//                reads s(n - D) at MAR2 into R5, steps both MARs together
//                (auto-increment), and skips the sample while R12 counts up
//                to 0. Then e = s - r, s^2 and e^2 by a 16-step
//                shift-and-add multiply into R7:Q, added into the 32-bit
//                energies R1:R0 (signal) and R3:R2 (error)
//   per segment  if the signal energy's high word is below TH the segment
//                is discarded (silence); otherwise log2 of both energies
//                is taken by normalising shifts (integer part) plus the
//                next 7 bits (linear fraction), in units of 1/128 octave,
//                and log2(Es) - log2(Ee) is added to R9; R11 counts kept
//                segments
//   at the end   R9 and R11 are written to the output register.
// SNR_SEG in dB = R9 / R11 * 10*log10(2) / 128. R15 holds the constant 128
// (one octave) because a word's direct field cannot carry both a constant
// and a branch target.
//
// The segmental SNR definition, the silence discard, the delayed sample
// counter, the two address registers and the polling of the two requests
// follow the reference design; the squaring and logarithm methods, the
// codec model, the threshold and the signal levels are this test's own.
//
// Checked: R9 and R11 equal a bit-exact model of that arithmetic, the dB
// value is within 0.5 dB of a floating-point SNR_SEG over the kept
// segments, one segment was discarded, exactly D samples were skipped for
// the delay, every sample pair was served once, none was lost, and the
// longest service (a segment end) fits in one sample period.
module tb_snrseg_pcm;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  localparam int J = 128, M = 8, TH = 16, D = 3;
  localparam int NS = J * M;

  logic clk = 0, rst_n = 0, run = 0, host_we = 0;
  logic [11:0] host_addr = 0, upc;
  logic [63:0] host_wdata = 0;
  logic [15:0] out_data, rate_div = 16'd563, adc_data = 0, dac_data, overruns;
  logic out_load, codec_clk, sh_hold, adc_start, adc_chan, adc_done = 0, dac_load;

  eval_system dut (.clk, .rst_n, .run, .host_we, .host_addr, .host_wdata, .out_data,
                   .out_load, .rate_div, .codec_clk, .sh_hold, .adc_start, .adc_chan,
                   .adc_done, .adc_data, .dac_data, .dac_load, .upc, .overruns);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mu-law codec model (G.711 style, 16-bit linear) ----------------
  function automatic logic [7:0] mulaw_enc(int x);
    int sgn, e, mant, v;
    sgn = (x < 0) ? 32'h80 : 0;
    v = (x < 0) ? -x : x;
    if (v > 32635) v = 32635;
    v += 132;
    e = 7;
    while (e > 0 && ((v >> (e + 7)) & 1) == 0) e--;
    mant = (v >> (e + 3)) & 15;
    return ~8'(sgn | (e << 4) | mant);
  endfunction

  function automatic int mulaw_dec(logic [7:0] c);
    int e, mant, v;
    c = ~c;
    e = int'(c[6:4]);
    mant = int'(c[3:0]);
    v = (((mant << 3) + 132) << e) - 132;
    return c[7] ? -v : v;
  endfunction

  // ---------------- test signal ----------------
  int amp [M] = '{2000, 1000, 20, 1500, 500, 2000, 250, 1200};
  // r(n) is the decoded s(n - D): the codec delays by D samples
  logic signed [15:0] s [NS + D + 4];
  logic signed [15:0] r [NS + D + 4];
  initial begin
    for (int n = 0; n < NS + D + 4; n++)
      s[n] = 16'($rtoi($floor(amp[(n / J) % M] * $sin(2.0 * 3.14159265358979 * 800.0 * n / 8000.0) + 0.5)));
    for (int n = 0; n < NS + D + 4; n++)
      r[n] = (n < D) ? 16'sd0 : 16'(mulaw_dec(mulaw_enc(32'(s[n - D]))));
  end

  // ---------------- A/D model ----------------
  int n_in = 0, n_out = 0;
  always @(posedge clk) begin
    if (adc_start && rst_n) begin
      automatic logic ch = adc_chan;
      repeat (10) @(posedge clk);
      adc_data <= ch ? r[n_out] : s[n_in];
      if (ch) n_out++; else n_in++;
      adc_done <= 1;
      @(posedge clk);
      adc_done <= 0;
    end
  end

  // ---------------- microprogram ----------------
  uinstr_t prog [96];

  function automatic uinstr_t alu(alu_src_e src, alu_fn_e fn, alu_dst_e dst,
                                  int a, int b, cin_e cin = CIN_ZERO, int direct = 0);
    uinstr_t u = '0;
    u.src = src; u.fn = fn; u.dst = dst; u.a = 4'(a); u.b = 4'(b); u.cin = cin;
    u.direct = 12'(direct);
    return u;
  endfunction

  function automatic uinstr_t br(uinstr_t u, next_e na, int target,
                                 cc_e cc = CC_TRUE, logic pol = 0);
    u.na = na; u.direct = 12'(target); u.cc = cc; u.cc_pol = pol;
    return u;
  endfunction

  // register moves and constants
  function automatic uinstr_t mov(int from, int to);
    return alu(SRC_ZA, FN_OR, DST_RAMF, from, to);
  endfunction
  function automatic uinstr_t setk(int to, int k);
    return alu(SRC_DZ, FN_ADD, DST_RAMF, 0, to, CIN_ZERO, k);
  endfunction
  function automatic uinstr_t setneg(int to, int k);
    return alu(SRC_DZ, FN_SUBR, DST_RAMF, 0, to, CIN_ONE, k);
  endfunction
  function automatic uinstr_t inc(int reg_no);
    uinstr_t u = alu(SRC_ZB, FN_ADD, DST_RAMF, 0, reg_no, CIN_ONE);
    u.stat_ld = 1;
    return u;
  endfunction

  localparam int CLR = 8, MAIN = 14, IN = 17, OUT = 20, SEGEND = 34, SKIP = 44,
                 HALT = 48, SQ = 50, LOG = 70;

  initial begin
    uinstr_t u;
    foreach (prog[i]) prog[i] = '0;
    prog[0] = setk(9, 0);                      // SNR sum
    prog[1] = setk(11, 0);                     // kept segments
    prog[2] = setneg(10, M);                   // segment counter
    prog[3] = setk(15, 128);                   // octave step of the logarithm
    prog[4] = setneg(12, D);                   // delayed sample number counter
    u = alu(SRC_DZ, FN_OR, DST_NOP, 0, 0); u.obus = OB_MAR1; prog[5] = u;      // write pointer
    u = alu(SRC_DZ, FN_OR, DST_NOP, 0, 0, CIN_ZERO, 1024 - D); u.obus = OB_MAR2;
    prog[6] = u;                                                               // read pointer
    prog[7] = br('0, NA_LDR, MAIN);
    prog[CLR]     = setk(0, 0);
    prog[CLR + 1] = setk(1, 0);
    prog[CLR + 2] = setk(2, 0);
    prog[CLR + 3] = setk(3, 0);
    prog[CLR + 4] = setneg(4, J);
    prog[CLR + 5] = br('0, NA_JUMP, MAIN);
    prog[MAIN]     = br('0, NA_CJP, OUT, CC_IRQ_OUT);
    prog[MAIN + 1] = br('0, NA_CJP, IN, CC_IRQ_IN);
    prog[MAIN + 2] = br('0, NA_JR, 0);
    u = alu(SRC_DZ, FN_OR, DST_NOP, 0, 0); u.ibus = IB_ADC; u.obus = OB_MBR;
    u.irq_clr = 2'b01; prog[IN] = u;                          // MBR = s(n)
    u = '0; u.mem_wr = 1; prog[IN + 1] = br(u, NA_JUMP, MAIN); // mem[MAR1] = s(n)
    u = alu(SRC_DZ, FN_ADD, DST_RAMF, 0, 6); u.ibus = IB_ADC; u.irq_clr = 2'b10;
    u.mem_rd = 1; u.mem_sel = 1; u.auto_inc = 1;
    prog[OUT] = u;                                            // R6 = r(n), MOR = s(n-D)
    u = alu(SRC_DZ, FN_ADD, DST_RAMF, 0, 5); u.ibus = IB_MOR; prog[OUT + 1] = u;  // R5 = s(n-D)
    u = alu(SRC_ZA, FN_OR, DST_NOP, 12, 0); u.stat_ld = 1; prog[OUT + 2] = u;
    prog[OUT + 3] = br('0, NA_CJP, OUT + 5, CC_Z);
    prog[OUT + 4] = br(alu(SRC_ZB, FN_ADD, DST_RAMF, 0, 12, CIN_ONE), NA_JUMP, MAIN);  // not yet aligned
    prog[OUT + 5] = alu(SRC_AB, FN_SUBS, DST_RAMF, 5, 6, CIN_ONE);   // R6 = s - r
    prog[OUT + 6] = br(mov(5, 14), NA_CALL, SQ);              // R7:Q = s^2
    u = alu(SRC_AQ, FN_ADD, DST_RAMF, 0, 0); u.stat_ld = 1; prog[OUT + 7] = u;
    prog[OUT + 8] = alu(SRC_AB, FN_ADD, DST_RAMF, 7, 1, CIN_C);
    prog[OUT + 9] = br(mov(6, 14), NA_CALL, SQ);              // R7:Q = e^2
    u = alu(SRC_AQ, FN_ADD, DST_RAMF, 2, 2); u.stat_ld = 1; prog[OUT + 10] = u;
    prog[OUT + 11] = alu(SRC_AB, FN_ADD, DST_RAMF, 7, 3, CIN_C);
    prog[OUT + 12] = inc(4);
    prog[OUT + 13] = br('0, NA_CJP, MAIN, CC_Z, 1'b1);
    // segment end: silence test on the signal energy's high word
    u = alu(SRC_DA, FN_SUBR, DST_NOP, 1, 0, CIN_ONE, TH); u.stat_ld = 1;
    prog[SEGEND] = u;
    prog[SEGEND + 1] = br('0, NA_CJP, SKIP, CC_C, 1'b1);
    prog[SEGEND + 2] = mov(1, 7);
    prog[SEGEND + 3] = br(alu(SRC_ZA, FN_OR, DST_QREG, 0, 0), NA_CALL, LOG);
    prog[SEGEND + 4] = mov(13, 8);
    prog[SEGEND + 5] = mov(3, 7);
    prog[SEGEND + 6] = br(alu(SRC_ZA, FN_OR, DST_QREG, 2, 0), NA_CALL, LOG);
    prog[SEGEND + 7] = alu(SRC_AB, FN_SUBR, DST_RAMF, 13, 8, CIN_ONE);   // R8 -= R13
    prog[SEGEND + 8] = alu(SRC_AB, FN_ADD, DST_RAMF, 8, 9);              // R9 += R8
    prog[SEGEND + 9] = alu(SRC_ZB, FN_ADD, DST_RAMF, 0, 11, CIN_ONE);    // R11++
    prog[SKIP] = inc(10);
    prog[SKIP + 1] = br('0, NA_CJP, CLR, CC_Z, 1'b1);
    u = alu(SRC_ZA, FN_OR, DST_NOP, 9, 0); u.obus = OB_OUTREG; prog[SKIP + 2] = u;
    u = alu(SRC_ZA, FN_OR, DST_NOP, 11, 0); u.obus = OB_OUTREG; prog[SKIP + 3] = u;
    prog[HALT] = br('0, NA_JUMP, HALT);
    // SQ: R7:Q = R14 * R14 (|R14| < 2^15)
    u = alu(SRC_ZA, FN_OR, DST_NOP, 14, 0); u.stat_ld = 1; prog[SQ] = u;
    prog[SQ + 1] = br('0, NA_CJP, SQ + 3, CC_N, 1'b1);
    prog[SQ + 2] = alu(SRC_ZA, FN_SUBS, DST_RAMF, 14, 14, CIN_ONE);     // R14 = -R14
    prog[SQ + 3] = alu(SRC_ZA, FN_OR, DST_QREG, 14, 0);                  // Q = multiplier
    prog[SQ + 4] = setk(7, 0);
    prog[SQ + 5] = br(setneg(8, 16), NA_PUSH, 16);   // the direct field is shared
    u = alu(SRC_DQ, FN_AND, DST_NOP, 0, 0, CIN_ZERO, 1); u.stat_ld = 1;
    prog[SQ + 6] = u;                                                    // Z = !Q[0]
    prog[SQ + 7] = br('0, NA_CJP, SQ + 9, CC_Z);
    prog[SQ + 8] = alu(SRC_AB, FN_ADD, DST_RAMF, 14, 7);                 // R7 += m
    u = alu(SRC_ZB, FN_OR, DST_RAMQD, 0, 7); u.sh = SH_DOUBLE; prog[SQ + 9] = u;
    prog[SQ + 10] = inc(8);
    prog[SQ + 11] = br('0, NA_LOOP, 0, CC_Z);
    prog[SQ + 12] = br('0, NA_RET, 0);
    // LOG: R13 = log2(R7:Q | 1) in 1/128 octave
    prog[LOG] = alu(SRC_DQ, FN_OR, DST_QREG, 0, 0, CIN_ZERO, 1);
    prog[LOG + 1] = setk(13, 31 * 128);
    u = alu(SRC_ZA, FN_OR, DST_NOP, 7, 0); u.stat_ld = 1; prog[LOG + 2] = u;
    prog[LOG + 3] = br('0, NA_CJP, LOG + 6, CC_N);
    u = alu(SRC_ZB, FN_OR, DST_RAMQU, 0, 7); u.sh = SH_DOUBLE; prog[LOG + 4] = u;
    prog[LOG + 5] = br(alu(SRC_AB, FN_SUBR, DST_RAMF, 15, 13, CIN_ONE), NA_JUMP, LOG + 2);
    for (int i = 0; i < 8; i++) prog[LOG + 6 + i] = alu(SRC_ZB, FN_OR, DST_RAMD, 0, 7);
    prog[LOG + 14] = alu(SRC_DA, FN_AND, DST_RAMF, 7, 7, CIN_ZERO, 127);
    prog[LOG + 15] = br(alu(SRC_AB, FN_ADD, DST_RAMF, 7, 13), NA_RET, 0);
  end

  // ---------------- bit-exact model of the same arithmetic ----------------
  function automatic int log2q7(logic [31:0] x);
    int l = 31 * 128;
    x |= 1;
    while (!x[31]) begin x <<= 1; l -= 128; end
    return l + int'(x[30:24]);
  endfunction

  // ---------------- observation ----------------
  int n_isr_in = 0, n_isr_out = 0, n_lost = 0, n_log = 0, n_align = 0;
  logic [15:0] outs [$];
  always @(posedge clk) if (run) begin
    if (dut.next_addr == 12'(IN))  n_isr_in++;
    if (dut.next_addr == 12'(OUT)) n_isr_out++;
    if (dut.next_addr == 12'(LOG)) n_log++;
    if (dut.next_addr == 12'(OUT + 4)) n_align++;
    // a new conversion result arriving while its request is still set is a lost sample
    if (dut.u_io.state == 2'd1 && adc_done && dut.irq_in) n_lost++;
    if (dut.u_io.state == 2'd2 && adc_done && dut.irq_out) n_lost++;
    if (out_load) outs.push_back(out_data);
  end

  // longest busy stretch: clocks from an output request being served until
  // the machine is back in its wait loop (the real-time budget is 563)
  int busy = 0, busy_max = 0;
  always @(posedge clk) if (run && outs.size() == 0) begin
    if (dut.next_addr == 12'(OUT)) busy <= 1;
    else if (busy != 0 && dut.next_addr == 12'(MAIN)) begin
      if (busy > busy_max) busy_max <= busy;
      busy <= 0;
    end else if (busy != 0) busy <= busy + 1;
  end

  initial begin
    logic [31:0] es, ee;
    int sum_q7, kept, diff;
    real snr_ref, snr_hw, es_r, ee_r;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 96; i++) begin
      host_we = 1; host_addr = 12'(i); host_wdata = prog[i];
      @(negedge clk);
    end
    host_we = 0;
    @(negedge clk);
    run = 1;
    wait (outs.size() == 2);
    // reference
    sum_q7 = 0; kept = 0; snr_ref = 0.0;
    for (int m = 0; m < M; m++) begin
      es = 0; ee = 0; es_r = 0.0; ee_r = 0.0;
      for (int j = 0; j < J; j++) begin
        automatic int sv = 32'(s[m * J + j]), ev = sv - 32'(r[m * J + j + D]);
        es += 32'(sv * sv); ee += 32'(ev * ev);
        es_r += real'(sv) * sv; ee_r += real'(ev) * ev;
      end
      if (int'(es[31:16]) >= TH) begin
        diff = log2q7(es) - log2q7(ee);
        sum_q7 += diff;
        kept++;
        snr_ref += 10.0 * $log10(es_r / ee_r);
        $display("segment %0d: amplitude %0d, SNR %0.2f dB, machine %0.2f dB", m, amp[m],
                 10.0 * $log10(es_r / ee_r), diff * 10.0 * $log10(2.0) / 128.0);
      end else
        $display("segment %0d: amplitude %0d, discarded as silence", m, amp[m]);
    end
    snr_ref /= kept;
    snr_hw = $itor($signed(outs[0])) / $itor(outs[1]) * 10.0 * $log10(2.0) / 128.0;
    $display("SNR_SEG: machine %0.2f dB, floating point %0.2f dB, over %0d segments",
             snr_hw, snr_ref, outs[1]);
    chk(outs[0] == 16'(sum_q7), $sformatf("log-ratio sum %0d exp %0d", $signed(outs[0]), sum_q7));
    chk(outs[1] == 16'(kept), $sformatf("kept segments %0d exp %0d", outs[1], kept));
    chk(kept == M - 1, "one silent segment discarded");
    chk(snr_hw - snr_ref < 0.5 && snr_ref - snr_hw < 0.5, "SNR_SEG within 0.5 dB");
    chk(n_isr_in == NS + D && n_isr_out == NS + D,
        $sformatf("served %0d/%0d of %0d", n_isr_in, n_isr_out, NS + D));
    chk(n_align == D, $sformatf("%0d samples skipped for the delay, exp %0d", n_align, D));
    $display("longest service of one sample pair: %0d of 563 clocks", busy_max);
    chk(busy_max > 0 && busy_max < 563, "fits the sample period");
    chk(n_lost == 0, $sformatf("%0d samples lost", n_lost));
    chk(overruns == 0, "no overrun");
    chk(n_log == 2 * (M - 1), "logarithm routine runs twice per kept segment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired: in %0d out %0d logs %0d outs %0d lost %0d upc %0d", n_isr_in, n_isr_out, n_log, outs.size(), n_lost, upc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
