// vpf_pkg: types and constants shared by the VPF vector processor.
//
// The VPF is a VLIW machine with one issue slot per functional unit: load/store,
// external I/O, flow control, MAC, shuffle and the two broadcast rotate units.
// This package defines the instruction word as a packed struct of those slots,
// the opcodes of each slot, and the widths of the architectural data types
// (1.15 fixed-point words, 13-bit data addresses, 9-bit code addresses,
// 24-bit external addresses, 11-bit loop counts).
//
// The slot order and the fields of each slot follow the instruction-format
// figures of the design (LD/ST, EXT, JMP, MAC, SHF, RT S, RT M). The field
// widths and bit positions, and the fact that every field has a place of its
// own instead of sharing bits with the fields of other formats, are choices of
// this implementation; the resulting instruction word is 149 bits wide.
package vpf_pkg;

  localparam int W     = 16;   // data word: signed 1.15 fixed point
  localparam int NREG  = 32;   // vector registers
  localparam int NPTR  = 16;   // pointer registers of each kind
  localparam int AW    = 13;   // data (vector) address, 0..8191
  localparam int CAW   = 9;    // code address, 0..511
  localparam int XAW   = 24;   // external address
  localparam int LCW   = 11;   // hardware loop count, 0..2047
  localparam int LSTK  = 4;    // hardware loop stack depth

  typedef logic [W-1:0] word_t;

  // ---------------- load/store slot ----------------
  typedef enum logic [4:0] {
    LS_NOP  = 5'd0,
    LS_LDV  = 5'd1,  LS_STV  = 5'd2,  LS_LDP  = 5'd3,  LS_LDT  = 5'd4,
    LS_LDM  = 5'd5,  LS_LDS  = 5'd6,  LS_LDB  = 5'd7,  LS_LDE  = 5'd8,
    LS_LDVM = 5'd9,  LS_STVM = 5'd10, LS_LDTM = 5'd11, LS_LDMM = 5'd12,
    LS_LDSM = 5'd13, LS_MOV  = 5'd14, LS_LDA  = 5'd15, LS_SMG  = 5'd16
  } ls_op_e;

  typedef struct packed {
    ls_op_e          op;
    logic [4:0]      r;    // register / pattern register written or stored
    logic [3:0]      p;    // pointer register
    logic [4:0]      inc;  // signed pointer increment
    logic [AW-1:0]   imm;  // immediate for LDP, LDB, LDE
    logic [4:0]      r2;   // register read: MOV source, LDA operand, SMG addresses
  } ls_slot_t;

  // ---------------- external I/O slot ----------------
  typedef enum logic [3:0] {
    EX_NOP = 4'd0,
    EX_ELI = 4'd1, EX_EIB = 4'd2, EX_EIE = 4'd3, EX_ELX = 4'd4,
    EX_ELD = 4'd5, EX_ELB = 4'd6, EX_ELC = 4'd7, EX_EST = 4'd8,
    EX_ESB = 4'd9, EX_ESC = 4'd10
  } ex_op_e;

  typedef struct packed {
    ex_op_e          op;
    logic [3:0]      x;    // external pointer register
    logic [3:0]      i;    // internal pointer register
    logic            inc;  // post-increment the pointers used
    logic [XAW-1:0]  imm;  // immediate for ELI/EIB/EIE (low AW bits) and ELX
  } ex_slot_t;

  // ---------------- flow control slot ----------------
  typedef enum logic [1:0] {
    FC_NOP = 2'd0, FC_JR = 2'd1, FC_DOI = 2'd2, FC_SGW = 2'd3
  } fc_op_e;

  typedef struct packed {
    fc_op_e          op;
    logic [6:0]      jofs;   // JR: signed offset relative to (JR address + 2)
    logic [CAW-1:0]  lstart; // DOI: loop start relative to the DOI address
    logic [CAW-1:0]  lend;   // DOI: loop end relative to the DOI address
    logic [LCW-1:0]  lcount; // DOI: number of iterations x, x > 0
  } fc_slot_t;

  // ---------------- MAC slot ----------------
  // The 24 MAC instructions are a kind, a broadcast bit (B* forms use
  // vmbc[0] as second factor or addend) and a rounding bit (*R forms).
  typedef enum logic [2:0] {
    MK_NOP = 3'd0, MK_ADD = 3'd1, MK_SUB = 3'd2, MK_MUL = 3'd3,
    MK_MAD = 3'd4, MK_MSB = 3'd5, MK_MAC = 3'd6, MK_MDC = 3'd7
  } mac_kind_e;

  typedef struct packed {
    mac_kind_e  kind;
    logic       b;     // broadcast form
    logic       rnd;   // rounding form
  } mac_op_t;

  typedef struct packed {
    mac_op_t     op;
    logic [4:0]  x;    // destination
    logic [4:0]  y;    // first operand
    logic [4:0]  z;    // second operand (vector forms)
  } mac_slot_t;

  // ---------------- shuffle slot ----------------
  typedef struct packed {
    logic        en;   // SHF Rx, Ry, Tz
    logic [4:0]  x;
    logic [4:0]  y;
    logic [3:0]  t;
  } shf_slot_t;

  typedef struct packed {
    ls_slot_t   ls;
    ex_slot_t   ex;
    fc_slot_t   fc;
    mac_slot_t  mac;
    shf_slot_t  shf;
    logic       rsb;   // RT S: rotate shuffle broadcast vector
    logic       rmb;   // RT M: rotate multiplier broadcast vector
  } instr_t;

  localparam int IW = $bits(instr_t);

  // Register-file write ports, in decreasing priority when two ports
  // write the same register in the same cycle.
  localparam int WP_SHF = 0;
  localparam int WP_MAC = 1;
  localparam int WP_LS  = 2;

  // Read ports.
  localparam int RP_LS   = 0;
  localparam int RP_MAC1 = 1;
  localparam int RP_MAC2 = 2;
  localparam int RP_SHF  = 3;

  function automatic logic is_ls_load_vec(ls_op_e op);
    return op inside {LS_LDV, LS_LDVM};
  endfunction

  function automatic logic is_ls_mem(ls_op_e op);
    return op inside {LS_LDV, LS_STV, LS_LDT, LS_LDM, LS_LDS,
                      LS_LDVM, LS_STVM, LS_LDTM, LS_LDMM, LS_LDSM};
  endfunction

  function automatic logic is_ls_modulo(ls_op_e op);
    return op inside {LS_LDVM, LS_STVM, LS_LDTM, LS_LDMM, LS_LDSM};
  endfunction

endpackage
