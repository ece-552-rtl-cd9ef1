// alu: the WISC-F05 arithmetic and logic unit.
//
// Purely combinational. Computes the eight arithmetic/logical operations
// (AND, OR, XOR, NOT, ADD, SUB, SRA, SLL), the short-vector VADD (two
// independent byte adds, no carry from the low byte into the high byte),
// the byte merges used by LHB and LLB, and a pass-through of operand a used
// to write the CALL return address. Address arithmetic for LW/SW also uses
// ADD; the pipeline then simply does not write the flags.
//
// Flags, as the architecture defines them: Z is set iff the result is zero;
// for ADD and SUB, V is set on two's-complement overflow and N is the sign
// of the result; AND, OR, XOR and NOT clear V and N. For the other
// operations the flag outputs are still computed but the core never writes
// them (flags_valid is low).
module alu
  import wisc_pkg::*;
(
  input  alu_op_t     op,
  input  logic [15:0] a,
  input  logic [15:0] b,       // for SRA/SLL the shift amount is b[3:0]
  output logic [15:0] y,
  output flags_t      flags,
  output logic        flags_valid  // op is one that sets the FLAG register
);

  logic [15:0] sum, diff;
  logic        add_ovf, sub_ovf;

  always_comb begin
    sum     = a + b;
    diff    = a - b;
    add_ovf = (a[15] == b[15]) && (sum[15] != a[15]);
    sub_ovf = (a[15] != b[15]) && (diff[15] != a[15]);

    unique case (op)
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOT:   y = ~a;
      ALU_ADD:   y = sum;
      ALU_SUB:   y = diff;
      ALU_SRA:   y = 16'($signed(a) >>> b[3:0]);
      ALU_SLL:   y = a << b[3:0];
      ALU_VADD:  y = {a[15:8] + b[15:8], a[7:0] + b[7:0]};
      ALU_LHB:   y = {b[7:0], a[7:0]};
      ALU_LLB:   y = {a[15:8], b[7:0]};
      ALU_PASSA: y = a;
      default:   y = '0;
    endcase

    flags.z = (y == 16'h0000);
    unique case (op)
      ALU_ADD: begin flags.v = add_ovf; flags.n = sum[15];  end
      ALU_SUB: begin flags.v = sub_ovf; flags.n = diff[15]; end
      default: begin flags.v = 1'b0;    flags.n = 1'b0;     end
    endcase

    flags_valid = op inside {ALU_AND, ALU_OR, ALU_XOR, ALU_NOT, ALU_ADD, ALU_SUB};
  end

endmodule
