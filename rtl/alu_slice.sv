// alu_slice: one bit-slice of the 16-bit CPU (the role the Am2903 plays).
//
// Each slice holds SLICE_W bits of a 16-word two-port register file, of the
// Q register, of the ALU and of the RAM and Q shifters. The CPU cascades four
// slices: the carry ripples from slice to slice and the shift links pass the
// end bits between neighbours, so four 4-bit slices act as one 16-bit
// machine. The register file is read asynchronously at addresses A and B and
// written at B on the rising clock edge; Q is written on the same edge.
//
// The document gives the slice count (four), the 16-bit width and the
// microinstruction fields (source, function, destination, A/B address,
// shift, carry). The encodings in eval_pkg and the 16-word register file
// follow the common bit-slice convention and are this design's choice.
//
// Timing: combinational from operands to Y/flags; registers update on the
// rising edge of clk when en is high.
module alu_slice
  import eval_pkg::*;
#(
  parameter int unsigned SLICE_W = 4,
  parameter int unsigned REGS    = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  alu_src_e           src,
  input  alu_fn_e            fn,
  input  alu_dst_e           dst,
  input  logic [3:0]         a_addr,
  input  logic [3:0]         b_addr,
  input  logic [SLICE_W-1:0] d,          // IBUS bits of this slice
  input  logic               cin,
  input  logic               ram_dn_in,  // enters F MSB on a down shift
  input  logic               ram_up_in,  // enters F LSB on an up shift
  input  logic               q_dn_in,    // enters Q MSB on a down shift
  input  logic               q_up_in,    // enters Q LSB on an up shift
  output logic [SLICE_W-1:0] y,
  output logic               cout,
  output logic               c_into_msb, // carry into the top bit (overflow)
  output logic [SLICE_W-1:0] f,
  output logic [SLICE_W-1:0] q,
  output logic               f_zero
);

  logic [SLICE_W-1:0] rf [REGS];
  logic [SLICE_W-1:0] a_val, b_val, r_op, s_op, r_in, s_in;
  logic [SLICE_W:0]   sum;
  logic [SLICE_W-1:0] low_sum;
  logic               arith;

  assign a_val = rf[a_addr];
  assign b_val = rf[b_addr];

  always_comb begin
    unique case (src)
      SRC_AQ: begin r_op = a_val; s_op = q;     end
      SRC_AB: begin r_op = a_val; s_op = b_val; end
      SRC_ZQ: begin r_op = '0;    s_op = q;     end
      SRC_ZB: begin r_op = '0;    s_op = b_val; end
      SRC_ZA: begin r_op = '0;    s_op = a_val; end
      SRC_DA: begin r_op = d;     s_op = a_val; end
      SRC_DQ: begin r_op = d;     s_op = q;     end
      default: begin r_op = d;    s_op = '0;    end
    endcase
  end

  // adder operands: subtraction is addition of the complement
  always_comb begin
    r_in  = r_op;
    s_in  = s_op;
    arith = 1'b1;
    unique case (fn)
      FN_ADD:  ;
      FN_SUBR: r_in = ~r_op;
      FN_SUBS: s_in = ~s_op;
      default: arith = 1'b0;
    endcase
  end

  assign sum     = {1'b0, r_in} + {1'b0, s_in} + {{SLICE_W{1'b0}}, cin};
  assign low_sum = {1'b0, r_in[SLICE_W-2:0]} + {1'b0, s_in[SLICE_W-2:0]}
                   + {{(SLICE_W-1){1'b0}}, cin};

  always_comb begin
    unique case (fn)
      FN_OR:    f = r_op | s_op;
      FN_AND:   f = r_op & s_op;
      FN_NOTRS: f = ~r_op & s_op;
      FN_EXOR:  f = r_op ^ s_op;
      FN_EXNOR: f = ~(r_op ^ s_op);
      default:  f = sum[SLICE_W-1:0];
    endcase
  end

  assign cout       = arith & sum[SLICE_W];
  assign c_into_msb = arith & low_sum[SLICE_W-1];
  assign f_zero     = (f == '0);
  assign y          = (dst == DST_RAMA) ? a_val : f;

  // register file and Q
  always_ff @(posedge clk) begin
    if (en) begin
      unique case (dst)
        DST_RAMA, DST_RAMF:   rf[b_addr] <= f;
        DST_RAMQD, DST_RAMD:  rf[b_addr] <= {ram_dn_in, f[SLICE_W-1:1]};
        DST_RAMQU, DST_RAMU:  rf[b_addr] <= {f[SLICE_W-2:0], ram_up_in};
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (en) begin
      unique case (dst)
        DST_QREG:  q <= f;
        DST_RAMQD: q <= {q_dn_in, q[SLICE_W-1:1]};
        DST_RAMQU: q <= {q[SLICE_W-2:0], q_up_in};
        default: ;
      endcase
    end
  end

endmodule
