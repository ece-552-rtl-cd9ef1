// decoder: turns one WISC-F05 instruction word into pipeline control.
//
// Combinational. Field layout follows the architecture's encodings:
//   arithmetic, VADD   oooo dddd ssss tttt   rd, rs, rt (or 4-bit imm)
//   LW, SW             oooo tttt iiii iiii   rt, signed 8-bit offset
//   LHB, LLB           oooo tttt uuuu uuuu   rt, 8-bit immediate
//   B                  1101 xccc iiii iiii   condition, signed word offset
//   CALL               1110 gggg gggg gggg   low 12 bits of the target
//   RET                1111 xxxx xxxx xxxx
// Operand a is rs, or R14 for LW/SW (data segment), or R13 for RET, or rt
// for LHB/LLB (the byte that is kept). Operand b is rt, or the immediate.
// SW reads its store data through port b. The B immediate leaves here
// already doubled (branch offsets count 16-bit instructions). CALL writes
// the address of the next instruction into R13 through the ALU.
// VADD shares the three-register layout of the arithmetic instructions;
// the architecture gives its syntax but no separate encoding.
module decoder
  import wisc_pkg::*;
(
  input  logic [15:0] instr,
  output ctrl_t       ctrl
);

  opcode_t op;

  always_comb begin
    op   = opcode_t'(instr[15:12]);
    ctrl = CTRL_NOP;
    unique case (op)
      OP_AND, OP_OR, OP_XOR, OP_NOT, OP_ADD, OP_SUB, OP_VADD: begin
        ctrl.ra       = instr[7:4];
        ctrl.rb       = instr[3:0];
        ctrl.use_a    = 1'b1;
        ctrl.use_b    = (op != OP_NOT);
        ctrl.rd       = instr[11:8];
        ctrl.reg_we   = 1'b1;
        ctrl.flags_we = (op != OP_VADD);
        unique case (op)
          OP_AND:  ctrl.alu_op = ALU_AND;
          OP_OR:   ctrl.alu_op = ALU_OR;
          OP_XOR:  ctrl.alu_op = ALU_XOR;
          OP_NOT:  ctrl.alu_op = ALU_NOT;
          OP_ADD:  ctrl.alu_op = ALU_ADD;
          OP_SUB:  ctrl.alu_op = ALU_SUB;
          default: ctrl.alu_op = ALU_VADD;
        endcase
      end
      OP_SRA, OP_SLL: begin
        ctrl.ra       = instr[7:4];
        ctrl.use_a    = 1'b1;
        ctrl.b_is_imm = 1'b1;
        ctrl.imm      = {12'h000, instr[3:0]};
        ctrl.rd       = instr[11:8];
        ctrl.reg_we   = 1'b1;
        ctrl.alu_op   = (op == OP_SRA) ? ALU_SRA : ALU_SLL;
      end
      OP_LW, OP_SW: begin
        ctrl.ra       = REG_DS;
        ctrl.use_a    = 1'b1;
        ctrl.b_is_imm = 1'b1;
        ctrl.imm      = {{8{instr[7]}}, instr[7:0]};
        ctrl.alu_op   = ALU_ADD;
        ctrl.rd       = instr[11:8];
        ctrl.rb       = instr[11:8];
        ctrl.mem_re   = (op == OP_LW);
        ctrl.reg_we   = (op == OP_LW);
        ctrl.mem_we   = (op == OP_SW);
        ctrl.use_b    = (op == OP_SW);
      end
      OP_LHB, OP_LLB: begin
        ctrl.ra       = instr[11:8];
        ctrl.use_a    = 1'b1;
        ctrl.b_is_imm = 1'b1;
        ctrl.imm      = {8'h00, instr[7:0]};
        ctrl.rd       = instr[11:8];
        ctrl.reg_we   = 1'b1;
        ctrl.alu_op   = (op == OP_LHB) ? ALU_LHB : ALU_LLB;
      end
      OP_B: begin
        ctrl.is_branch = 1'b1;
        ctrl.cond      = cond_t'(instr[10:8]);
        ctrl.imm       = {{7{instr[7]}}, instr[7:0], 1'b0};
      end
      OP_CALL: begin
        ctrl.is_call  = 1'b1;
        ctrl.a_is_pc  = 1'b1;
        ctrl.alu_op   = ALU_PASSA;
        ctrl.imm      = {4'h0, instr[11:0]};
        ctrl.rd       = REG_LINK;
        ctrl.reg_we   = 1'b1;
      end
      default: begin  // OP_RET
        ctrl.is_ret   = 1'b1;
        ctrl.ra       = REG_LINK;
        ctrl.use_a    = 1'b1;
      end
    endcase
  end

endmodule
