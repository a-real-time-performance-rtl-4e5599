// eval_pkg: types and constants shared by the speech-coder evaluation machine.
//
// The machine is a microprogrammed 16-bit bit-slice processor. Its 64-bit
// microinstruction is split into a CPU part (ALU source, function,
// destination, A/B register addresses, shift and carry control), an MCU part
// (next-address, condition select, branch/direct address, status load,
// interrupt clear) and an "other control" part (IBUS source, OBUS destination,
// auto-increment, memory address select). The widths 16 (data), 10 (memory
// address), 12 (direct field) and 64 (microword) follow the block diagram;
// the order of the fields, their encodings and the memory read/write bits
// are this design's own choice. An all-zero microword is a no-operation.
package eval_pkg;

  localparam int unsigned WORD_W  = 16;  // data path and buses
  localparam int unsigned UWORD_W = 64;  // microinstruction
  localparam int unsigned UADDR_W = 12;  // microprogram address / direct field
  localparam int unsigned MADDR_W = 10;  // data memory address (1k words)

  // ALU operand pair (R, S)
  typedef enum logic [2:0] {
    SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
    SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7
  } alu_src_e;

  // ALU function, F = f(R, S, Cin)
  typedef enum logic [2:0] {
    FN_ADD  = 3'd0,  // R + S + Cin
    FN_SUBR = 3'd1,  // S - R - 1 + Cin
    FN_SUBS = 3'd2,  // R - S - 1 + Cin
    FN_OR   = 3'd3,
    FN_AND  = 3'd4,
    FN_NOTRS= 3'd5,  // ~R & S
    FN_EXOR = 3'd6,
    FN_EXNOR= 3'd7
  } alu_fn_e;

  // ALU destination (where F goes, what appears on Y)
  typedef enum logic [2:0] {
    DST_NOP   = 3'd0,  // Y = F, nothing written
    DST_QREG  = 3'd1,  // Q <= F, Y = F
    DST_RAMA  = 3'd2,  // B <= F, Y = A
    DST_RAMF  = 3'd3,  // B <= F, Y = F
    DST_RAMQD = 3'd4,  // B <= F>>1, Q <= Q>>1, Y = F
    DST_RAMD  = 3'd5,  // B <= F>>1, Y = F
    DST_RAMQU = 3'd6,  // B <= F<<1, Q <= Q<<1, Y = F
    DST_RAMU  = 3'd7   // B <= F<<1, Y = F
  } alu_dst_e;

  // Shift multiplexer: what enters the ends of the RAM and Q shifters
  typedef enum logic [1:0] {
    SH_LOGIC  = 2'd0,  // zeros, RAM and Q shift independently
    SH_ARITH  = 2'd1,  // 32-bit arithmetic: sign into RAM MSB, RAM/Q linked
    SH_DOUBLE = 2'd2,  // 32-bit logical: zero at the outer end, RAM/Q linked
    SH_ROTATE = 2'd3   // 32-bit rotate of RAM:Q
  } shift_e;

  // Carry input multiplexer
  typedef enum logic [1:0] {
    CIN_ZERO = 2'd0, CIN_ONE = 2'd1, CIN_C = 2'd2, CIN_NC = 2'd3
  } cin_e;

  // Next-address field
  typedef enum logic [3:0] {
    NA_CONT = 4'd0,   // continue
    NA_JUMP = 4'd1,   // jump to direct field
    NA_CJP  = 4'd2,   // conditional jump
    NA_CALL = 4'd3,   // call: push return address, jump
    NA_CJS  = 4'd4,   // conditional call
    NA_RET  = 4'd5,   // return from file
    NA_CRET = 4'd6,   // conditional return
    NA_LDR  = 4'd7,   // load sequencer register R from direct field, continue
    NA_JR   = 4'd8,   // jump to R
    NA_CJR  = 4'd9,   // conditional jump to R
    NA_ZERO = 4'd10,  // restart at address 0
    NA_PUSH = 4'd11,  // push loop start (next address), continue
    NA_LOOP = 4'd12,  // if condition: pop and continue, else jump to file
    NA_RSV13 = 4'd13, NA_RSV14 = 4'd14, NA_RSV15 = 4'd15  // act as continue
  } next_e;

  // Condition-code multiplexer inputs (11 of 16 used)
  typedef enum logic [3:0] {
    CC_TRUE = 4'd0, CC_Z = 4'd1, CC_C = 4'd2, CC_N = 4'd3, CC_V = 4'd4,
    CC_LT = 4'd5,     // N ^ V
    CC_LE = 4'd6,     // (N ^ V) | Z
    CC_LS = 4'd7,     // ~C | Z
    CC_IRQ_IN  = 4'd8,
    CC_IRQ_OUT = 4'd9,  // output request, masked by a pending input request
    CC_IRQ_ANY = 4'd10,
    CC_U11 = 4'd11, CC_U12 = 4'd12, CC_U13 = 4'd13, CC_U14 = 4'd14, CC_U15 = 4'd15
  } cc_e;

  // IBUS source
  typedef enum logic [1:0] {
    IB_DIRECT = 2'd0, IB_MOR = 2'd1, IB_ADC = 2'd2, IB_NONE = 2'd3
  } ibus_e;

  // OBUS destination
  typedef enum logic [2:0] {
    OB_NONE = 3'd0, OB_DAC = 3'd1, OB_MAR1 = 3'd2, OB_MAR2 = 3'd3,
    OB_MBR = 3'd4, OB_OUTREG = 3'd5, OB_MARS = 3'd6, OB_RSV7 = 3'd7
  } obus_e;

  // Status register bits
  typedef struct packed {
    logic z, n, c, v;
  } status_t;

  // 64-bit microinstruction, MSB first
  typedef struct packed {
    logic [9:0]  spare;     // unused, write 0
    // other control part
    logic        mem_wr;    // data memory <= MBR at the selected address
    logic        mem_rd;    // MOR <= data memory at the selected address
    logic        mem_sel;   // memory address select: 0 MAR1, 1 MAR2
    logic        auto_inc;  // increment MAR1 and MAR2 together
    obus_e       obus;
    ibus_e       ibus;
    // MCU part
    logic [1:0]  irq_clr;   // bit 0 clears input request, bit 1 output request
    logic        stat_ld;   // status field: load the status register
    logic [11:0] direct;    // branch address / CPU operand
    logic        cc_pol;    // 1: invert the selected condition
    cc_e         cc;
    next_e       na;
    // CPU part
    cin_e        cin;
    shift_e      sh;
    logic [3:0]  b;
    logic [3:0]  a;
    alu_dst_e    dst;
    alu_fn_e     fn;
    alu_src_e    src;
  } uinstr_t;

endpackage
