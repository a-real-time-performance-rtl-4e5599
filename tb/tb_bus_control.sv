// tb_bus_control: IBUS source selection, OBUS destination decoding and the
// D/A and output registers with their one-cycle strobes, against a model.
module tb_bus_control;
  import eval_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  ibus_e ibus_sel; obus_e obus_sel;
  logic [11:0] direct;
  logic [15:0] mor, adc_sample, obus, ibus, dac_data, out_data;
  logic ld_mar1, ld_mar2, ld_mbr, dac_load, out_load;

  bus_control dut (.clk, .rst_n, .en, .ibus_sel, .obus_sel, .direct, .mor, .adc_sample,
                   .obus, .ibus, .ld_mar1, .ld_mar2, .ld_mbr, .dac_data, .dac_load,
                   .out_data, .out_load);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] eib, m_dac, m_out;
    logic m_dl, m_ol;
    ibus_sel = IB_NONE; obus_sel = OB_NONE; direct = 0; mor = 0; adc_sample = 0; obus = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    m_dac = 0; m_out = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0;
      ibus_sel = ibus_e'($urandom); obus_sel = obus_e'($urandom);
      direct = 12'($urandom); mor = 16'($urandom); adc_sample = 16'($urandom); obus = 16'($urandom);
      case (ibus_sel)
        IB_DIRECT: eib = {4'h0, direct};
        IB_MOR: eib = mor;
        IB_ADC: eib = adc_sample;
        default: eib = 0;
      endcase
      #1;
      chk(ibus === eib, "IBUS");
      chk(ld_mar1 === (en && obus_sel inside {OB_MAR1, OB_MARS}), "MAR1 load");
      chk(ld_mar2 === (en && obus_sel inside {OB_MAR2, OB_MARS}), "MAR2 load");
      chk(ld_mbr === (en && obus_sel == OB_MBR), "MBR load");
      @(posedge clk);
      m_dl = en && obus_sel == OB_DAC;
      m_ol = en && obus_sel == OB_OUTREG;
      if (m_dl) m_dac = obus;
      if (m_ol) m_out = obus;
      #1;
      chk(dac_load === m_dl && dac_data === m_dac, "D/A latch");
      chk(out_load === m_ol && out_data === m_out, "output register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
