// tb_alu: random and corner-case test of the ALU against a reference
// written from the instruction definitions (results, Z/V/N flags and which
// operations set the flags).
module tb_alu;
  import wisc_pkg::*;

  alu_op_t     op;
  logic [15:0] a, b, y;
  flags_t      flags;
  logic        flags_valid;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .flags, .flags_valid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(alu_op_t o, logic [15:0] x, logic [15:0] z);
    logic [15:0] ey;
    logic        ez, ev, en, efv;
    int          sx, sz, s;
    op = o; a = x; b = z;
    #1;
    sx = int'($signed(x));
    sz = int'($signed(z));
    ev = 1'b0; en = 1'b0; efv = 1'b1;
    case (o)
      ALU_AND: ey = x & z;
      ALU_OR:  ey = x | z;
      ALU_XOR: ey = x ^ z;
      ALU_NOT: ey = ~x;
      ALU_ADD: begin
        s = sx + sz; ey = 16'(s);
        ev = (s > 32767) || (s < -32768); en = ey[15];
      end
      ALU_SUB: begin
        s = sx - sz; ey = 16'(s);
        ev = (s > 32767) || (s < -32768); en = ey[15];
      end
      ALU_SRA: begin ey = 16'(sx / (1 << z[3:0])); if (sx < 0 && (sx % (1 << z[3:0])) != 0) ey = ey - 1; efv = 0; end
      ALU_SLL: begin ey = 16'(int'(x) * (1 << z[3:0])); efv = 0; end
      ALU_VADD: begin ey = {8'((int'(x[15:8]) + int'(z[15:8])) % 256), 8'((int'(x[7:0]) + int'(z[7:0])) % 256)}; efv = 0; end
      ALU_LHB: begin ey = {z[7:0], x[7:0]}; efv = 0; end
      ALU_LLB: begin ey = {x[15:8], z[7:0]}; efv = 0; end
      default: begin ey = x; efv = 0; end
    endcase
    ez = (ey == 0);
    checks++;
    if (y !== ey || flags_valid !== efv || (efv && flags !== {ez, ev, en})) begin
      failures++;
      if (failures < 20)
        $display("%s a=%h b=%h: y=%h flags=%b fv=%b, expected y=%h flags=%b%b%b fv=%b",
                 o.name(), x, z, y, flags, flags_valid, ey, ez, ev, en, efv);
    end
  endtask

  initial begin
    alu_op_t ops[12] = '{ALU_AND, ALU_OR, ALU_XOR, ALU_NOT, ALU_ADD, ALU_SUB,
                         ALU_SRA, ALU_SLL, ALU_VADD, ALU_LHB, ALU_LLB, ALU_PASSA};
    logic [15:0] corner[6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h00FF};
    foreach (ops[i]) begin
      foreach (corner[j]) foreach (corner[k]) check_one(ops[i], corner[j], corner[k]);
      repeat (2000) check_one(ops[i], 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
