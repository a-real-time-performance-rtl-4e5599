// io_control: sampling clock, A/D sequencing and interrupt requests.
//
// A programmable divider turns the system clock into the sampling clock
// (rate_div clock cycles per sample, never fewer than MIN_DIV, so the rate
// stays at or below the 32 kHz maximum the document gives for a 4.5 MHz
// clock); codec_clk is a square wave at the sampling rate for the codec
// under test. On each sampling instant both sample-and-holders are put in
// hold together (sh_hold), so the coder's input and output are sampled at
// the same time. The analog multiplexer is then set to the coder input
// (adc_chan = 0) and the A/D converter started; when it reports done the
// word is latched and the input interrupt request raised. The same is then
// done for the coder output (adc_chan = 1), raising the output request, and
// the holders are released.
//
// Input requests have priority over output requests, as in the document:
// irq_out_prio is the output request masked while an input request is
// pending, and a read of the A/D source (adc_sample) returns the input
// sample while the input request is pending and the output sample
// otherwise. The microprogram clears each request through the interrupt
// clear field. The conversion handshake (start pulse, done pulse), the
// two holding registers and the square codec clock are this design's
// choices. A sampling instant that arrives while conversions are still
// running is skipped and counted in overruns.
module io_control #(
  parameter int unsigned CLK_HZ  = 4_500_000,
  parameter int unsigned FS_MAX  = 32_000,
  parameter int unsigned DIV_W   = 16,
  parameter int unsigned W       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] rate_div,      // clock cycles per sample
  output logic             codec_clk,
  output logic             sample_tick,   // one cycle per sampling instant
  output logic             sh_hold,
  output logic             adc_start,
  output logic             adc_chan,      // 0 coder input, 1 coder output
  input  logic             adc_done,
  input  logic [W-1:0]     adc_data,
  input  logic             clr_in,
  input  logic             clr_out,
  output logic             irq_in,
  output logic             irq_out,
  output logic             irq_out_prio,
  output logic [W-1:0]     adc_sample,
  output logic [15:0]      overruns
);

  localparam int unsigned MIN_DIV = (CLK_HZ + FS_MAX - 1) / FS_MAX;

  typedef enum logic [1:0] {S_IDLE, S_CONV_IN, S_CONV_OUT} state_e;

  state_e           state;
  logic [DIV_W-1:0] div_eff, cnt;
  logic [W-1:0]     in_sample, out_sample;

  assign div_eff = (rate_div < DIV_W'(MIN_DIV)) ? DIV_W'(MIN_DIV) : rate_div;

  // sampling clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      sample_tick <= 1'b0;
      codec_clk   <= 1'b0;
    end else begin
      sample_tick <= 1'b0;
      if (cnt >= div_eff - DIV_W'(1)) begin
        cnt         <= '0;
        sample_tick <= 1'b1;
        codec_clk   <= 1'b1;
      end else begin
        cnt <= cnt + DIV_W'(1);
        if (cnt == (div_eff >> 1)) codec_clk <= 1'b0;
      end
    end
  end

  // conversion sequence and interrupt requests
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sh_hold    <= 1'b0;
      adc_start  <= 1'b0;
      adc_chan   <= 1'b0;
      irq_in     <= 1'b0;
      irq_out    <= 1'b0;
      in_sample  <= '0;
      out_sample <= '0;
      overruns   <= '0;
    end else begin
      adc_start <= 1'b0;
      if (clr_in)  irq_in  <= 1'b0;
      if (clr_out) irq_out <= 1'b0;
      unique case (state)
        S_IDLE: if (sample_tick) begin
          sh_hold   <= 1'b1;
          adc_chan  <= 1'b0;
          adc_start <= 1'b1;
          state     <= S_CONV_IN;
        end
        S_CONV_IN: if (adc_done) begin
          in_sample <= adc_data;
          irq_in    <= 1'b1;
          adc_chan  <= 1'b1;
          adc_start <= 1'b1;
          state     <= S_CONV_OUT;
        end
        default: if (adc_done) begin
          out_sample <= adc_data;
          irq_out    <= 1'b1;
          sh_hold    <= 1'b0;
          state      <= S_IDLE;
        end
      endcase
      if (sample_tick && state != S_IDLE) overruns <= overruns + 16'd1;
    end
  end

  assign irq_out_prio = irq_out & ~irq_in;
  assign adc_sample   = irq_in ? in_sample : out_sample;

endmodule
