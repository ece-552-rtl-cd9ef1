// tb_decoder: every opcode with random fields, checked against the
// instruction formats: which registers are read and written, immediates
// (sign- or zero-extended, branch offsets doubled), memory and flag
// controls, and the control-transfer kind.
module tb_decoder;
  import wisc_pkg::*;

  logic [15:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  decoder dut (.instr, .ctrl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("instr %h %s: %0d (0x%h), expected %0d (0x%h)", instr, what, got, got, exp_v, exp_v);
    end
  endtask

  initial begin
    int op, d, s, t, i8, simm8;
    for (int n = 0; n < 16 * 300; n++) begin
      instr = 16'({n % 16, 12'($urandom)});
      #1;
      op = int'(instr[15:12]); d = int'(instr[11:8]); s = int'(instr[7:4]); t = int'(instr[3:0]);
      i8 = int'(instr[7:0]); simm8 = (i8 > 127) ? i8 - 256 : i8;
      // register write
      expect_eq("reg_we", int'(ctrl.reg_we), (op <= 8 || op == 10 || op == 11 || op == 12 || op == 14) ? 1 : 0);
      if (op <= 7 || op == 12) expect_eq("rd", int'(ctrl.rd), d);
      if (op == 8 || op == 10 || op == 11) expect_eq("rd", int'(ctrl.rd), d);
      if (op == 14) expect_eq("rd", int'(ctrl.rd), 13);
      // flags
      expect_eq("flags_we", int'(ctrl.flags_we), (op <= 5) ? 1 : 0);
      // memory
      expect_eq("mem_re", int'(ctrl.mem_re), (op == 8) ? 1 : 0);
      expect_eq("mem_we", int'(ctrl.mem_we), (op == 9) ? 1 : 0);
      // control transfer
      expect_eq("is_branch", int'(ctrl.is_branch), (op == 13) ? 1 : 0);
      expect_eq("is_call", int'(ctrl.is_call), (op == 14) ? 1 : 0);
      expect_eq("is_ret", int'(ctrl.is_ret), (op == 15) ? 1 : 0);
      // sources
      if (op <= 7 || op == 12) begin
        expect_eq("ra", int'(ctrl.ra), s);
        expect_eq("use_a", int'(ctrl.use_a), 1);
      end
      if (op <= 5 && op != 3 || op == 12) begin
        expect_eq("rb", int'(ctrl.rb), t);
        expect_eq("use_b", int'(ctrl.use_b), 1);
        expect_eq("b_is_imm", int'(ctrl.b_is_imm), 0);
      end
      if (op == 3) expect_eq("use_b", int'(ctrl.use_b), 0);
      if (op == 6 || op == 7) begin
        expect_eq("b_is_imm", int'(ctrl.b_is_imm), 1);
        expect_eq("imm", int'(ctrl.imm), t);
      end
      if (op == 8 || op == 9) begin
        expect_eq("ra", int'(ctrl.ra), 14);
        expect_eq("imm", int'($signed(ctrl.imm)), simm8);
        expect_eq("b_is_imm", int'(ctrl.b_is_imm), 1);
        expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_ADD));
      end
      if (op == 9) begin
        expect_eq("rb", int'(ctrl.rb), d);
        expect_eq("use_b", int'(ctrl.use_b), 1);
      end
      if (op == 10 || op == 11) begin
        expect_eq("ra", int'(ctrl.ra), d);
        expect_eq("use_a", int'(ctrl.use_a), 1);
        expect_eq("imm", int'(ctrl.imm), i8);
        expect_eq("alu_op", int'(ctrl.alu_op), int'(op == 10 ? ALU_LHB : ALU_LLB));
      end
      if (op == 13) begin
        expect_eq("cond", int'(ctrl.cond), int'(instr[10:8]));
        expect_eq("imm", int'($signed(ctrl.imm)), 2 * simm8);
        expect_eq("use_a", int'(ctrl.use_a), 0);
      end
      if (op == 14) expect_eq("use_a", int'(ctrl.use_a), 0);
      if (op == 15) begin
        expect_eq("ra", int'(ctrl.ra), 13);
        expect_eq("use_a", int'(ctrl.use_a), 1);
      end
      case (op)
        0: expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_AND));
        1: expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_OR));
        2: expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_XOR));
        3: expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_NOT));
        4: expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_ADD));
        5: expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_SUB));
        6: expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_SRA));
        7: expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_SLL));
        12: expect_eq("alu_op", int'(ctrl.alu_op), int'(ALU_VADD));
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
