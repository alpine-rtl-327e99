// alpine_pkg: shared widths, word formats and CE opcodes of the ALPiNe processor.
//
// The State Word is the concatenation {FLAGS, SEMAPHORES}. A Precondition Word
// encodes the Boolean-AND guard of a transition as a care mask plus the values
// the cared-for bits must have (an empty mask is the guard [true]). A
// Postcondition Word encodes "set or clear these semaphore bits" the same way:
// bits under the mask take the given value, the others keep theirs.
//
// A transition occupies consecutive PNDU memory words in the order of the
// transition coding format: Precondition Word, Address of Subroutine,
// Postcondition Word, Number of Next Transitions (NNT), then NTA1..NTAn.
// The field order follows the document; all widths, the mask/value encoding
// and the "has subroutine" bit are this design's own choices.
package alpine_pkg;

  // Widths of the flag and semaphore registers (environment inputs and
  // control outputs).
  localparam int unsigned FLAG_W  = 8;
  localparam int unsigned SEM_W   = 8;
  localparam int unsigned STATE_W = FLAG_W + SEM_W;

  // PNDU memory: one word holds one field of a transition.
  localparam int unsigned PWORD_W = 2 * STATE_W;   // 32 bits
  localparam int unsigned PADDR_W = 8;             // 256 words

  // CE: 32-bit data path and memory words, 10-bit word address.
  localparam int unsigned CWORD_W = 32;
  localparam int unsigned CADDR_W = 10;

  // Largest Next Transition List the register file holds.
  localparam int unsigned MAX_NT  = 8;
  localparam int unsigned NNT_W   = $clog2(MAX_NT + 1);

  // Word offsets of the fields inside a transition.
  localparam int unsigned OFS_PRE  = 0;
  localparam int unsigned OFS_SUB  = 1;
  localparam int unsigned OFS_POST = 2;
  localparam int unsigned OFS_NNT  = 3;
  localparam int unsigned OFS_NTA  = 4;

  // Bit of the Address-of-Subroutine word that says a subroutine exists.
  localparam int unsigned SUB_VALID_BIT = PWORD_W - 1;

  typedef logic [FLAG_W-1:0]  flags_t;
  typedef logic [SEM_W-1:0]   sem_t;
  typedef logic [STATE_W-1:0] state_t;
  typedef logic [PADDR_W-1:0] paddr_t;
  typedef logic [PWORD_W-1:0] pword_t;
  typedef logic [CADDR_W-1:0] caddr_t;
  typedef logic [CWORD_W-1:0] cword_t;

  // State Word: flags in the upper half, semaphores in the lower half.
  typedef struct packed {
    flags_t flags;
    sem_t   sem;
  } state_word_t;

  // Precondition Word: care mask (upper half) and required values.
  typedef struct packed {
    state_t mask;
    state_t value;
  } pre_word_t;

  // Postcondition Word: write mask and the values written.
  typedef struct packed {
    sem_t mask;
    sem_t value;
  } post_word_t;

  // Subroutine field of a transition.
  typedef struct packed {
    logic                        valid;
    logic [PWORD_W-2-CADDR_W:0]  unused;
    caddr_t                      addr;
  } sub_word_t;

  // ---------------------------------------------------------------------
  // Computing Engine instruction set (32-bit words)
  //   [31:26] opcode  [25:22] rd  [21:18] rs  [17:14] rt  [15:0] imm16
  // (rt and imm overlap: R-type instructions use rt, I-type use imm.)
  // ---------------------------------------------------------------------
  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    OP_ADD    = 6'd1,   // rd = rs + rt
    OP_SUB    = 6'd2,   // rd = rs - rt
    OP_AND    = 6'd3,   // rd = rs & rt
    OP_OR     = 6'd4,   // rd = rs | rt
    OP_XOR    = 6'd5,   // rd = rs ^ rt
    OP_ADDI   = 6'd6,   // rd = rs + sext(imm)
    OP_LUI    = 6'd7,   // rd = imm << 16
    OP_SLL    = 6'd8,   // rd = rs << imm[4:0]
    OP_SRL    = 6'd9,   // rd = rs >> imm[4:0]
    OP_BSET   = 6'd10,  // rd = rs | (1 << imm[4:0])
    OP_BCLR   = 6'd11,  // rd = rs & ~(1 << imm[4:0])
    OP_BTGL   = 6'd12,  // rd = rs ^ (1 << imm[4:0])
    OP_BTST   = 6'd13,  // rd = rs[imm[4:0]]
    OP_LW     = 6'd14,  // rd = mem[rs + sext(imm)]
    OP_SW     = 6'd15,  // mem[rs + sext(imm)] = rd
    OP_BEQ    = 6'd16,  // if (rd == rs) pc = pc + 1 + sext(imm)
    OP_BNE    = 6'd17,  // if (rd != rs) pc = pc + 1 + sext(imm)
    OP_JMP    = 6'd18,  // pc = imm
    OP_RDPRE  = 6'd19,  // rd = Precondition Word
    OP_RDSA   = 6'd20,  // rd = Subroutine Address
    OP_RDPOST = 6'd21,  // rd = Postcondition Word
    OP_WRPOST = 6'd22,  // Postcondition Word = rs
    OP_FIN    = 6'd23   // signal Finished and stop
  } ce_op_t;

  // Instruction builders, used by testbenches to assemble CE code.
  function automatic cword_t ce_r(ce_op_t op, logic [3:0] rd, logic [3:0] rs, logic [3:0] rt);
    return {op, rd, rs, rt, 14'd0};
  endfunction

  function automatic cword_t ce_i(ce_op_t op, logic [3:0] rd, logic [3:0] rs, logic [15:0] imm);
    return {op, rd, rs, 2'b00, imm};
  endfunction

  // Builders for the PNDU program words.
  function automatic pword_t pre_w(state_t mask, state_t value);
    return {mask, value};
  endfunction

  function automatic pword_t post_w(sem_t mask, sem_t value);
    return pword_t'({mask, value});
  endfunction

  function automatic pword_t sub_w(logic valid, caddr_t addr);
    pword_t w;
    w = '0;
    w[SUB_VALID_BIT] = valid;
    w[CADDR_W-1:0]   = addr;
    return w;
  endfunction

endpackage
