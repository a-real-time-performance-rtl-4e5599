// cpu: the 16-bit central processing unit.
//
// Four 4-bit slices (alu_slice) form a 16-bit ALU with a 16-word register
// file and a Q register. The carry ripples from slice 0 (bits 3:0) up to
// slice 3; the shift links pass each slice's end bits to its neighbours, and
// the shift multiplexer supplies the bits at the outer ends. The carry input
// multiplexer chooses the carry into slice 0, and the status register keeps
// the flags for conditional branching and for chaining 32-bit arithmetic.
// This is the composition the document gives for its CPU (four slices, a
// status register, a shift multiplexer and a carry input multiplexer).
//
// Interface: the microinstruction's CPU fields, the 16-bit IBUS as D input,
// the 16-bit Y output that drives the OBUS, and the 4 status bits.
// Timing: one microinstruction per clock; Y and the next flags are
// combinational, the register file, Q and the status register change on the
// rising edge when en is high.
module cpu
  import eval_pkg::*;
#(
  parameter int unsigned SLICES  = 4,
  parameter int unsigned SLICE_W = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  alu_src_e                    src,
  input  alu_fn_e                     fn,
  input  alu_dst_e                    dst,
  input  logic [3:0]                  a_addr,
  input  logic [3:0]                  b_addr,
  input  shift_e                      sh,
  input  cin_e                        cin_sel,
  input  logic                        stat_ld,
  input  logic [SLICES*SLICE_W-1:0]   d,
  output logic [SLICES*SLICE_W-1:0]   y,
  output status_t                     status
);

  localparam int unsigned W = SLICES * SLICE_W;

  logic [SLICES:0]   carry;
  logic [SLICES-1:0] c_msb, f_zero, rdn, rup, qdn, qup;
  logic [W-1:0]      f, q;
  logic              ext_rdn, ext_rup, ext_qdn, ext_qup;
  status_t           flags_next;

  carry_mux u_cmux (
    .sel(cin_sel), .c_flag(status.c), .cin(carry[0])
  );

  shift_mux u_smux (
    .sel(sh), .f_msb(f[W-1]), .f_lsb(f[0]), .q_msb(q[W-1]), .q_lsb(q[0]),
    .ram_dn_in(ext_rdn), .ram_up_in(ext_rup), .q_dn_in(ext_qdn), .q_up_in(ext_qup)
  );

  for (genvar i = 0; i < SLICES; i++) begin : g_slice
    if (i == SLICES - 1) begin : g_top
      assign rdn[i] = ext_rdn;
      assign qdn[i] = ext_qdn;
    end else begin : g_mid
      assign rdn[i] = f[(i+1)*SLICE_W];
      assign qdn[i] = q[(i+1)*SLICE_W];
    end
    if (i == 0) begin : g_bot
      assign rup[i] = ext_rup;
      assign qup[i] = ext_qup;
    end else begin : g_up
      assign rup[i] = f[i*SLICE_W-1];
      assign qup[i] = q[i*SLICE_W-1];
    end

    alu_slice #(.SLICE_W(SLICE_W)) u_slice (
      .clk, .rst_n, .en, .src, .fn, .dst, .a_addr, .b_addr,
      .d         (d[i*SLICE_W +: SLICE_W]),
      .cin       (carry[i]),
      .ram_dn_in (rdn[i]),
      .ram_up_in (rup[i]),
      .q_dn_in   (qdn[i]),
      .q_up_in   (qup[i]),
      .y         (y[i*SLICE_W +: SLICE_W]),
      .cout      (carry[i+1]),
      .c_into_msb(c_msb[i]),
      .f         (f[i*SLICE_W +: SLICE_W]),
      .q         (q[i*SLICE_W +: SLICE_W]),
      .f_zero    (f_zero[i])
    );
  end

  assign flags_next.z = &f_zero;
  assign flags_next.n = f[W-1];
  assign flags_next.c = carry[SLICES];
  assign flags_next.v = carry[SLICES] ^ c_msb[SLICES-1];

  status_reg u_status (
    .clk, .rst_n, .en, .ld(stat_ld), .flags_in(flags_next), .flags(status)
  );

endmodule
