// tb_branch_cond: exhaustive test of the branch-condition unit: every
// condition code against every value of the three flags, with the expected
// outcome taken from the condition table of the architecture.
module tb_branch_cond;
  import wisc_pkg::*;

  cond_t  cond;
  flags_t flags;
  logic   taken;
  int checks = 0, failures = 0;

  branch_cond dut (.cond, .flags, .taken);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_t, z, v, n;
    for (int c = 0; c < 8; c++) begin
      for (int f = 0; f < 8; f++) begin
        {z, v, n} = 3'(f);
        cond  = cond_t'(c);
        flags = '{z: z, v: v, n: n};
        #1;
        case (c)
          0: exp_t = z;
          1: exp_t = n & ~v;
          2: exp_t = ~z & ~n & ~v;
          3: exp_t = v;
          4: exp_t = ~z;
          5: exp_t = ~(n & ~v);
          6: exp_t = (n & ~v) | z;
          default: exp_t = 1'b1;
        endcase
        checks++;
        if (taken !== exp_t) begin
          failures++;
          $display("cond %0d flags ZVN=%b: taken=%b expected %b", c, 3'(f), taken, exp_t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
