// eval_system: real-time performance evaluation machine for speech
// waveform coders (top level).
//
// A microprogrammed 16-bit processor samples the input and the decoded
// output of a speech coder at the same instant and computes an objective
// quality measure (such as the segmental signal-to-noise ratio) in real
// time, under control of a microprogram loaded by a support processor.
//
// Three parts, as in the document's block diagram:
//  * central processing: the bit-slice CPU and the 1k x 16 data memory with
//    its buffer registers (MAR1, MAR2, MBR, MOR);
//  * microprogram control: writable control store (64-bit words),
//    pipeline register and control unit (sequencer plus condition mux);
//  * I/O: sampling clock, sample-and-hold / A/D sequencing and the two
//    interrupt requests (input before output), the D/A latch and the output
//    register read by the support processor.
// All units talk over two buses: IBUS (direct field, MOR or A/D into the
// CPU) and OBUS (CPU result to D/A, MAR1, MAR2, MBR or output register).
//
// Interface: the support processor writes the control store through the
// host_* port while run is low and starts the machine by raising run. The
// analog front end (filters, gain control, sample-and-holders, analog
// multiplexer, A/D and D/A converters) and the support processor are
// outside this design; their signals are ports.
//
// Timing: one microinstruction per clock (220 ns at the document's 4.5 MHz
// clock); the next microinstruction is fetched while the current one
// executes. After run rises the machine executes one no-operation, then
// the word at address 0.
module eval_system
  import eval_pkg::*;
#(
  parameter int unsigned WCS_DEPTH = 1024,
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned CLK_HZ    = 4_500_000,
  parameter int unsigned FS_MAX    = 32_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  // support processor: control store loading
  input  logic         host_we,
  input  logic [11:0]  host_addr,
  input  logic [63:0]  host_wdata,
  // support processor: results
  output logic [15:0]  out_data,
  output logic         out_load,
  // sampling rate (system clocks per sample)
  input  logic [15:0]  rate_div,
  // analog front end
  output logic         codec_clk,
  output logic         sh_hold,
  output logic         adc_start,
  output logic         adc_chan,
  input  logic         adc_done,
  input  logic [15:0]  adc_data,
  output logic [15:0]  dac_data,
  output logic         dac_load,
  // observation
  output logic [11:0]  upc,
  output logic [15:0]  overruns
);

  localparam int unsigned MAW = $clog2(MEM_WORDS);

  uinstr_t      uir;
  logic [63:0]  wcs_rdata;
  logic [11:0]  next_addr;
  logic         cond, sample_tick;
  status_t      status;
  logic [15:0]  ibus, obus, mor, adc_sample, mem_rdata, mem_wdata;
  logic         ld_mar1, ld_mar2, ld_mbr, mem_we;
  logic [MAW-1:0] mem_addr, mar1, mar2;
  logic         irq_in, irq_out, irq_out_prio;

  // ---------------- microprogram control ----------------
  wcs #(.DEPTH(WCS_DEPTH)) u_wcs (
    .clk, .run, .seq_addr(next_addr), .host_we, .host_addr, .host_wdata,
    .rdata(wcs_rdata)
  );

  micro_ir u_uir (
    .clk, .rst_n, .run, .din(wcs_rdata), .uir
  );

  mcu u_mcu (
    .clk, .rst_n, .en(run), .clr(!run), .na(uir.na), .cc(uir.cc),
    .cc_pol(uir.cc_pol), .direct(uir.direct), .status, .irq_in,
    .irq_out(irq_out_prio), .next_addr, .cond, .upc
  );

  // ---------------- central processing ----------------
  cpu u_cpu (
    .clk, .rst_n, .en(run), .src(uir.src), .fn(uir.fn), .dst(uir.dst),
    .a_addr(uir.a), .b_addr(uir.b), .sh(uir.sh), .cin_sel(uir.cin),
    .stat_ld(uir.stat_ld), .d(ibus), .y(obus), .status
  );

  bus_control u_bus (
    .clk, .rst_n, .en(run), .ibus_sel(uir.ibus), .obus_sel(uir.obus),
    .direct(uir.direct), .mor, .adc_sample, .obus, .ibus, .ld_mar1,
    .ld_mar2, .ld_mbr, .dac_data, .dac_load, .out_data, .out_load
  );

  mem_interface #(.AW(MAW)) u_mif (
    .clk, .rst_n, .en(run), .obus, .ld_mar1, .ld_mar2, .ld_mbr,
    .mem_sel(uir.mem_sel), .auto_inc(uir.auto_inc), .mem_rd(uir.mem_rd),
    .mem_wr(uir.mem_wr), .mor, .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .mar1, .mar2
  );

  data_memory #(.WORDS(MEM_WORDS)) u_dmem (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  // ---------------- I/O ----------------
  io_control #(.CLK_HZ(CLK_HZ), .FS_MAX(FS_MAX)) u_io (
    .clk, .rst_n, .rate_div, .codec_clk, .sample_tick, .sh_hold, .adc_start,
    .adc_chan, .adc_done, .adc_data,
    .clr_in (run & uir.irq_clr[0]),
    .clr_out(run & uir.irq_clr[1]),
    .irq_in, .irq_out, .irq_out_prio, .adc_sample, .overruns
  );

endmodule
