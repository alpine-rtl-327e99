// computing_engine: Computing Engine (CE) of the ALPiNe processor.
//
// A small multi-cycle RISC core that runs the subroutine of a fired
// transition. On `start_i` it jumps to `sub_addr_i` and executes until the
// FIN instruction. Then it pulses `finished_o` for one cycle and waits for
// the next start. Each instruction takes three cycles: fetch (address to
// memory), decode (latch the instruction), execute (ALU, branch, writeback).
// A load takes a fourth cycle for its data. Code and data share the CE's own
// memory, which has one synchronous port.
//
// Instruction word: [31:26] opcode, [25:22] rd, [21:18] rs, [17:14] rt,
// [15:0] imm. The set covers arithmetic and logic, shifts, bit manipulation
// (set/clear/toggle/test a bit), load/store, branches and a jump. The
// decision-unit interface adds RDPRE, RDSA and RDPOST, which read the
// Precondition Word, Subroutine Address and Postcondition Word, WRPOST, which
// overwrites the Postcondition Word (`post_we_o`), and FIN, which signals
// Finished. Register r0 reads as 0. The opcode list is in alpine_pkg.
//
// The document specifies a simple RISC core with fetch, decode and execute
// stages, extended with bit manipulation, and the PNDU interface (read
// Precondition, Subroutine Address and Postcondition, write Postcondition,
// Start and Finished). The instruction set, its encoding, the register count
// and the multi-cycle organization are this design's own choices.
module computing_engine
  import alpine_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // decision-unit interface
  input  logic       start_i,
  input  caddr_t     sub_addr_i,
  input  pre_word_t  pre_i,
  input  post_word_t post_i,
  output logic       post_we_o,
  output post_word_t post_wdata_o,
  output logic       finished_o,
  output logic       busy_o,
  // CE memory port
  output caddr_t     mem_addr_o,
  output logic       mem_we_o,
  output cword_t     mem_wdata_o,
  input  cword_t     mem_rdata_i
);

  typedef enum logic [2:0] {C_IDLE, C_FETCH, C_DECODE, C_EXEC, C_MEM} cstate_e;

  cstate_e        state_q;
  caddr_t         pc_q;
  cword_t         ir_q;
  cword_t         rf_q [16];
  caddr_t         sub_addr_q;

  ce_op_t         op;
  logic [3:0]     rd, rs, rt;
  logic [15:0]    imm;
  cword_t         a, b, d, simm, ea, result, bitmask;
  logic           wb_en;

  assign op   = ce_op_t'(ir_q[31:26]);
  assign rd   = ir_q[25:22];
  assign rs   = ir_q[21:18];
  assign rt   = ir_q[17:14];
  assign imm  = ir_q[15:0];
  assign a    = (rs == 4'd0) ? '0 : rf_q[rs];
  assign b    = (rt == 4'd0) ? '0 : rf_q[rt];
  assign d    = (rd == 4'd0) ? '0 : rf_q[rd];
  assign simm = {{(CWORD_W-16){imm[15]}}, imm};
  assign ea   = a + simm;
  assign bitmask = cword_t'(1) << imm[4:0];

  // Execute-stage result and whether it is written back to rd.
  always_comb begin
    result = '0;
    wb_en  = 1'b1;
    unique case (op)
      OP_ADD:    result = a + b;
      OP_SUB:    result = a - b;
      OP_AND:    result = a & b;
      OP_OR:     result = a | b;
      OP_XOR:    result = a ^ b;
      OP_ADDI:   result = ea;
      OP_LUI:    result = {imm, 16'h0000};
      OP_SLL:    result = a << imm[4:0];
      OP_SRL:    result = a >> imm[4:0];
      OP_BSET:   result = a | bitmask;
      OP_BCLR:   result = a & ~bitmask;
      OP_BTGL:   result = a ^ bitmask;
      OP_BTST:   result = cword_t'((a & bitmask) != '0);
      OP_RDPRE:  result = cword_t'(pre_i);
      OP_RDSA:   result = cword_t'(sub_addr_q);
      OP_RDPOST: result = cword_t'(post_i);
      default:   wb_en  = 1'b0;
    endcase
  end

  assign busy_o       = (state_q != C_IDLE);
  assign finished_o   = (state_q == C_EXEC) && (op == OP_FIN);
  assign post_we_o    = (state_q == C_EXEC) && (op == OP_WRPOST);
  assign post_wdata_o = post_word_t'(a[2*SEM_W-1:0]);
  assign mem_we_o     = (state_q == C_EXEC) && (op == OP_SW);
  assign mem_wdata_o  = d;
  assign mem_addr_o   = (state_q == C_EXEC) ? caddr_t'(ea) : pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= C_IDLE;
      pc_q       <= '0;
      ir_q       <= '0;
      sub_addr_q <= '0;
      for (int i = 0; i < 16; i++) rf_q[i] <= '0;
    end else begin
      case (state_q)
        C_IDLE: begin
          if (start_i) begin
            pc_q       <= sub_addr_i;
            sub_addr_q <= sub_addr_i;
            state_q    <= C_FETCH;
          end
        end
        C_FETCH:  state_q <= C_DECODE;
        C_DECODE: begin
          ir_q    <= mem_rdata_i;
          pc_q    <= pc_q + 1'b1;
          state_q <= C_EXEC;
        end
        C_EXEC: begin
          state_q <= C_FETCH;
          if (wb_en) rf_q[rd] <= result;
          case (op)
            OP_LW:  state_q <= C_MEM;
            OP_BEQ: if (d == a) pc_q <= pc_q + caddr_t'(simm);
            OP_BNE: if (d != a) pc_q <= pc_q + caddr_t'(simm);
            OP_JMP: pc_q <= caddr_t'(imm);
            OP_FIN: state_q <= C_IDLE;
            default: ;
          endcase
        end
        C_MEM: begin
          rf_q[rd] <= mem_rdata_i;
          state_q  <= C_FETCH;
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

  // A start arriving while a subroutine runs would be lost.
  assert property (@(posedge clk) disable iff (!rst_n) start_i |-> !busy_o);

endmodule
