// ofz_pkg: types, constants and codeword functions shared by the
// operand-factorization decompression engine.
//
// A compressed program is a list of codeword pairs [Tp, Op]: Tp names a
// tree-pattern (a sequence of opcodes) and Op an operand-pattern (registers
// and immediates). Codewords are at most 16 bits and may split across 32-bit
// word boundaries. Both follow the published scheme.
//
// The codeword format is this design's own concrete choice of a "VLC" code
// (a bounded Huffman code whose leading zeroes give the codeword size):
//   class 0 :  1 + 3-bit payload            4 bits,     8 codewords
//   class 1 :  01 + 6-bit payload           8 bits,    64 codewords
//   class 2 :  00 + 14-bit payload         16 bits, 16384 codewords
// Class 2 is the escape to fixed-length coding. The codeword rank (its index
// into the pattern tables) is the number of codewords in shorter classes plus
// the payload, so ranks run from 0 to 16455: the most frequent patterns get
// the shortest codewords.
//
// Instruction formats (ITYPE) are the MIPS R2000 formats; OPCODE holds the
// 6-bit major opcode and the 6-bit function field {op, funct}.
package ofz_pkg;

  localparam int unsigned WORD_W    = 32;
  localparam int unsigned CW_MAX    = 16;  // longest codeword, bits
  localparam int unsigned VLC_NCLS  = 3;   // codeword classes
  localparam int unsigned RANK_W    = 15;  // holds ranks up to 16455
  localparam int unsigned REG_W     = 5;
  localparam int unsigned OPC_W     = 12;  // {major opcode, funct}
  localparam int unsigned BSEL_W    = 3;
  localparam int unsigned BADDR_W   = 10;
  localparam int unsigned IMB_W     = 32;

  // Instruction format, used by the IAB to place the fields.
  typedef enum logic [2:0] {
    IT_R3     = 3'd0,  // op rs=RS1 rt=RS2 rd=RD 0 funct      (addu, slt)
    IT_RSH    = 3'd1,  // op 0 rt=RS1 rd=RD shamt=IMB funct   (sll, srl)
    IT_IALU   = 3'd2,  // op rs=RS1 rt=RD imm16               (addiu, lw)
    IT_ISTORE = 3'd3,  // op rs=RS1 rt=RS2 imm16              (sw, beq)
    IT_LUI    = 3'd4,  // op 0 rt=RD imm16                    (lui)
    IT_REGIMM = 3'd5,  // op rs=RS1 rt=funct[4:0] imm16       (bgez, bltz)
    IT_J      = 3'd6,  // op target26 = IMB[25:0]             (j, jal)
    IT_RAW    = 3'd7   // op 0 funct                          (syscall)
  } itype_e;

  // One Tree-pattern Dictionary entry: OPCODE, ITYPE, END.
  typedef struct packed {
    logic [OPC_W-1:0] opcode;
    itype_e           itype;
    logic             last;    // END: last instruction of the tree-pattern
  } tpd_entry_t;

  // Register buses produced by RGEN for one instruction.
  typedef struct packed {
    logic [REG_W-1:0] rd;
    logic [REG_W-1:0] rs1;
    logic [REG_W-1:0] rs2;
  } regs_t;

  // Immediate reference produced by IGEN for one instruction.
  typedef struct packed {
    logic               has_imm;
    logic [BSEL_W-1:0]  bsel;
    logic [BADDR_W-1:0] baddr;
  } immsel_t;

  // Targets of the dictionary load port.
  typedef enum logic [2:0] {
    CFG_TGEN  = 3'd0,  // TGEN: Tp rank -> tpaddr
    CFG_TPD   = 3'd1,  // TPD entries
    CFG_RBASE = 3'd2,  // RGEN: Op rank -> first register record
    CFG_RREC  = 3'd3,  // RGEN register records
    CFG_IBASE = 3'd4,  // IGEN: Op rank -> first immediate record
    CFG_IREC  = 3'd5,  // IGEN immediate records
    CFG_IMD   = 3'd6   // IMD bank cfg_bank
  } cfg_tgt_e;

  // Codeword length of class z.
  function automatic int unsigned vlc_len(int unsigned z);
    case (z)
      0:       return 4;
      1:       return 8;
      default: return 16;
    endcase
  endfunction

  // Payload bits of class z (the prefix is z zeroes and, except for the
  // escape class, a terminating one).
  function automatic int unsigned vlc_pay(int unsigned z);
    if (z == VLC_NCLS - 1) return vlc_len(z) - z;
    return vlc_len(z) - z - 1;
  endfunction

  // First rank of class z.
  function automatic int unsigned vlc_base(int unsigned z);
    int unsigned b = 0;
    for (int unsigned k = 0; k < VLC_NCLS; k++)
      if (k < z) b += (1 << vlc_pay(k));
    return b;
  endfunction

endpackage
