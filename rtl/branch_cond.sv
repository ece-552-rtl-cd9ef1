// branch_cond: decides whether a conditional branch is taken.
//
// Combinational. Compares the 3-bit condition field of a B instruction with
// the FLAG register exactly as the architecture's condition table gives it:
// EQ (Z), LT (N and not V), GT (Z = N = V = 0), OVF (V), NE (not Z),
// GE (not LT), LE (LT or Z) and TRUE.
module branch_cond
  import wisc_pkg::*;
(
  input  cond_t  cond,
  input  flags_t flags,
  output logic   taken
);

  logic lt;

  always_comb begin
    lt = flags.n && !flags.v;
    unique case (cond)
      C_EQ:   taken = flags.z;
      C_LT:   taken = lt;
      C_GT:   taken = !flags.z && !flags.n && !flags.v;
      C_OVF:  taken = flags.v;
      C_NE:   taken = !flags.z;
      C_GE:   taken = !lt;
      C_LE:   taken = lt || flags.z;
      C_TRUE: taken = 1'b1;
      default: taken = 1'b0;
    endcase
  end

endmodule
