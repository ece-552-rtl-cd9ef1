// wisc_pkg: types and constants shared by the WISC-F05 processor.
//
// WISC-F05 is a 16-bit load/store machine with sixteen 16-bit registers,
// a 3-bit FLAG register (Z, V, N) and sixteen instructions selected by the
// top four bits of every 16-bit instruction word. The opcode numbering and
// the branch condition codes below are the architecture's own. The ALU
// operation list and the decoded-control struct are this implementation's
// internal encoding.
package wisc_pkg;


  // Registers with a fixed role.
  localparam logic [3:0] REG_LINK = 4'd13;  // CALL return address
  localparam logic [3:0] REG_DS   = 4'd14;  // data segment base for LW / SW

  typedef enum logic [3:0] {
    OP_AND  = 4'b0000,
    OP_OR   = 4'b0001,
    OP_XOR  = 4'b0010,
    OP_NOT  = 4'b0011,
    OP_ADD  = 4'b0100,
    OP_SUB  = 4'b0101,
    OP_SRA  = 4'b0110,
    OP_SLL  = 4'b0111,
    OP_LW   = 4'b1000,
    OP_SW   = 4'b1001,
    OP_LHB  = 4'b1010,
    OP_LLB  = 4'b1011,
    OP_VADD = 4'b1100,
    OP_B    = 4'b1101,
    OP_CALL = 4'b1110,
    OP_RET  = 4'b1111
  } opcode_t;

  typedef enum logic [2:0] {
    C_EQ  = 3'b000,   // Z = 1
    C_LT  = 3'b001,   // N = 1 and V = 0
    C_GT  = 3'b010,   // Z = N = V = 0
    C_OVF = 3'b011,   // V = 1
    C_NE  = 3'b100,   // Z = 0
    C_GE  = 3'b101,   // not LT
    C_LE  = 3'b110,   // LT or Z = 1
    C_TRUE = 3'b111   // always
  } cond_t;

  typedef struct packed {
    logic z;
    logic v;
    logic n;
  } flags_t;

  typedef enum logic [3:0] {
    ALU_AND, ALU_OR, ALU_XOR, ALU_NOT, ALU_ADD, ALU_SUB,
    ALU_SRA, ALU_SLL, ALU_VADD,
    ALU_LHB,    // {b[7:0], a[7:0]}: new high byte from b
    ALU_LLB,    // {a[15:8], b[7:0]}: new low byte from b
    ALU_PASSA   // a, used to write the return address of CALL
  } alu_op_t;

  // Everything decode produces for one instruction.
  typedef struct packed {
    alu_op_t    alu_op;
    logic       b_is_imm;   // ALU operand b is the immediate
    logic       a_is_pc;    // ALU operand a is the address of the next instruction
    logic [15:0] imm;       // already extended / scaled
    logic [3:0] ra;         // source register of operand a
    logic [3:0] rb;         // source register of operand b / store data
    logic       use_a;
    logic       use_b;
    logic [3:0] rd;         // destination register
    logic       reg_we;
    logic       flags_we;
    logic       mem_re;
    logic       mem_we;
    logic       is_branch;
    cond_t      cond;
    logic       is_call;
    logic       is_ret;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    alu_op: ALU_AND, b_is_imm: 1'b0, a_is_pc: 1'b0, imm: 16'h0000,
    ra: 4'd0, rb: 4'd0, use_a: 1'b0, use_b: 1'b0, rd: 4'd0,
    reg_we: 1'b0, flags_we: 1'b0, mem_re: 1'b0, mem_we: 1'b0,
    is_branch: 1'b0, cond: C_EQ, is_call: 1'b0, is_ret: 1'b0
  };

endpackage
