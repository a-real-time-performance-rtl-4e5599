// tb_io_control: sampling clock, conversion sequence and interrupt
// requests. A simple A/D model answers each start pulse after a
// conversion time with a random word for the selected channel. The test
// checks the sampling period (rate_div cycles, and the 32 kHz limit of
// 141 cycles at 4.5 MHz when a smaller divisor is asked for), that both
// holders stay in hold over both conversions, the channel order, that the
// input request comes first and masks the output request, that the A/D
// read returns the matching sample, that the clear inputs work, and that
// a sampling instant during conversions is counted as an overrun.
module tb_io_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [15:0] rate_div = 200, adc_data = 0, adc_sample, overruns;
  logic codec_clk, sample_tick, sh_hold, adc_start, adc_chan, adc_done = 0;
  logic clr_in = 0, clr_out = 0, irq_in, irq_out, irq_out_prio;
  int conv_cycles = 20;

  io_control dut (.clk, .rst_n, .rate_div, .codec_clk, .sample_tick, .sh_hold, .adc_start,
                  .adc_chan, .adc_done, .adc_data, .clr_in, .clr_out, .irq_in, .irq_out,
                  .irq_out_prio, .adc_sample, .overruns);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // A/D converter model; remembers what it produced per channel
  logic [15:0] conv_val [2];
  logic        hold_ok = 1;
  always @(posedge clk) begin
    if (adc_start && rst_n) begin
      automatic logic ch = adc_chan;
      automatic logic [15:0] v = 16'($urandom);
      if (!sh_hold) hold_ok <= 0;
      repeat (conv_cycles) @(posedge clk);
      if (!sh_hold) hold_ok <= 0;
      conv_val[ch] = v;
      adc_data <= v;
      adc_done <= 1;
      @(posedge clk);
      adc_done <= 0;
    end
  end

  // tick period measurement
  int last_tick = -1, period = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (sample_tick) begin
      if (last_tick >= 0) period = cyc - last_tick;
      last_tick = cyc;
    end
  end

  // one sample's service: input request first, then output request
  task automatic serve();
    wait (irq_in);
    wait (irq_out);   // let both requests be pending before serving
    @(negedge clk);
    chk(!irq_out_prio, "output request masked while input request pending");
    chk(adc_sample === conv_val[0], "input sample on A/D read");
    clr_in = 1;
    @(negedge clk);
    clr_in = 0;
    chk(!irq_in, "input request cleared");
    chk(irq_out_prio, "output request visible once the input request is cleared");
    wait (irq_out_prio);
    @(negedge clk);
    chk(adc_sample === conv_val[1], "output sample on A/D read");
    clr_out = 1;
    @(negedge clk);
    clr_out = 0;
    chk(!irq_out, "output request cleared");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) serve();
    chk(period == 200, $sformatf("sampling period %0d, expected 200", period));
    rate_div = 50;   // below the 32 kHz limit
    repeat (3) serve();
    @(posedge sample_tick);
    chk(period == 141, $sformatf("clamped sampling period %0d, expected 141", period));
    chk(hold_ok, "holders in hold during both conversions");
    chk(overruns == 0, "no overrun at 20-cycle conversions");
    conv_cycles = 100;    // two conversions no longer fit into 141 cycles
    repeat (600) @(posedge clk);
    chk(overruns > 0, "overrun counted");
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
