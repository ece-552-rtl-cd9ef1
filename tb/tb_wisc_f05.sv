// tb_wisc_f05: end-to-end test of the WISC-F05 processor at its default
// parameters.
//
// For each of NPROG runs the bench generates a random program, loads it
// through the load port, runs it to completion and compares the register
// file, the FLAG register and the data region with a reference
// instruction-set simulator written here from the architecture's rules.
//
// Program shape: every register gets a random value (LLB/LHB), R14 points
// at a data segment near 0x8000, R15 = 1 and R12 counts loop iterations.
// The loop body is random arithmetic, VADD, shifts, LW/SW relative to R14,
// LHB/LLB, forward conditional branches and CALLs to two subroutines placed
// at 0x0400 and 0x0440 (same cache index as the start of the main code),
// which end in RET. The loop closes with SUB R12,R12,R15 and B NE back, and
// the program ends in a branch-to-self (0xD7FF) which marks completion.
// Every third run is reset once part way through (the data segment is
// reloaded while reset is high), so the restart from PC 0 is checked too.
//
// Before the random runs, a directed counted loop checks timing at the
// default parameters: 21 cycles for the cold miss on the first block (four
// 5-cycle bus beats and one lookup), 9 cycles per warm pass of a 7-instruction
// loop ending in a taken branch, and a further miss on the first pass when
// the loop crosses into the second block.
//
// The bench counts how often each pipeline mechanism happened (interlock
// stalls, load-use stalls, taken and untaken branches, CALL and RET
// redirects, cache misses and hits, loads, stores, overflow flags, VADD,
// mid-run resets) and counts a failure for any that never happened.
module tb_wisc_f05;
  import wisc_pkg::*;

  localparam int NPROG    = 40;
  localparam int BODY_LEN = 64;
  localparam int CODE_WORDS = 256;          // loaded code image, words 0..255
  localparam int SUB0 = 'h0200;           // word index of subroutine 0
  localparam int SUB1 = 'h0220;
  localparam int DATA_LO = 'h3F00;        // data words loaded (byte 0x7E00..)
  localparam int DATA_HI = 'h4100;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        load_we = 1'b0;
  logic [15:0] load_addr = '0;
  logic [15:0] load_data = '0;
  logic [15:0] pc;

  int checks = 0, failures = 0;

  wisc_f05 dut (.clk, .rst, .load_we, .load_addr, .load_data, .pc);

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program image and reference model ----------------
  logic [15:0] img   [32768];   // instruction image (halfword index)
  logic [15:0] dinit [32768];   // initial data image
  logic [15:0] dref  [32768];   // reference data memory
  logic [15:0] rref  [16];
  logic        zf, vf, nf;
  int          halt_word;

  function automatic logic [15:0] rnd16();
    return 16'($urandom);
  endfunction

  function automatic logic [15:0] enc_r(int op, int d, int s, int t);
    return 16'((op << 12) | (d << 8) | (s << 4) | t);
  endfunction

  function automatic logic [15:0] enc_i(int op, int t, int imm8);
    return 16'((op << 12) | (t << 8) | (imm8 & 'hff));
  endfunction

  // one random "plain" instruction: no control flow, no write to R12..R15
  function automatic logic [15:0] rand_plain();
    int k, d, s, t;
    int ops[9];
    ops = '{0, 1, 2, 3, 4, 5, 6, 7, 12};
    k = int'($urandom_range(0, 99));
    d = int'($urandom_range(0, 11));
    s = int'($urandom_range(0, 15));
    t = int'($urandom_range(0, 15));
    if (k < 66)      return enc_r(ops[$urandom_range(0, 8)], d, s, t);
    else if (k < 78) return enc_i(8, d, int'($urandom_range(0, 255)));   // LW
    else if (k < 90) return enc_i(9, t, int'($urandom_range(0, 255)));   // SW
    else             return enc_i(10 + int'($urandom_range(0, 1)), d, int'($urandom_range(0, 255)));
  endfunction

  task automatic gen_program();
    int p;
    int loop_top, rem, off;
    p = 0;
    for (int i = 0; i < 32768; i++) img[i] = 16'h0000;
    for (int i = 0; i < 32768; i++) dinit[i] = (i >= DATA_LO && i < DATA_HI) ? rnd16() : 16'h0000;
    for (int r = 0; r < 16; r++) begin
      img[p++] = enc_i(11, r, int'($urandom_range(0, 255)));
      img[p++] = enc_i(10, r, int'($urandom_range(0, 255)));
    end
    img[p++] = enc_i(11, 14, int'($urandom_range(0, 255)));
    img[p++] = enc_i(10, 14, 'h80);
    img[p++] = enc_i(11, 15, 1);
    img[p++] = enc_i(10, 15, 0);
    img[p++] = enc_i(11, 12, int'($urandom_range(2, 3)));
    img[p++] = enc_i(10, 12, 0);
    loop_top = p;
    for (int i = 0; i < BODY_LEN; i++) begin
      int k;
      k = int'($urandom_range(0, 99));
      rem = BODY_LEN - 1 - i;
      if (k < 12) begin
        off = int'($urandom_range(0, 3));
        if (off > rem) off = rem;
        img[p++] = 16'('hD000 | ($urandom_range(0, 7) << 8) | off);
      end else if (k < 17) begin
        img[p++] = 16'('hE000 | ((((k & 1) != 0) ? SUB1 : SUB0) * 2));
      end else begin
        img[p++] = rand_plain();
      end
    end
    img[p] = enc_r(5, 12, 12, 15); p++;                            // SUB R12,R12,R15
    img[p] = 16'('hD400 | ((loop_top - (p + 1)) & 'hff)); p++;  // B NE loop_top
    halt_word = p;
    img[p++] = 16'hD7FF;                                           // B TRUE, self
    for (int i = 0; i < 6; i++) begin
      img[SUB0 + i] = rand_plain();
      img[SUB1 + i] = rand_plain();
    end
    img[SUB0 + 6] = 16'hF000;
    img[SUB1 + 6] = 16'hF000;
  endtask

  function automatic logic cond_true(int c);
    logic lt;
    lt = nf && !vf;
    case (c)
      0: return zf;
      1: return lt;
      2: return !zf && !nf && !vf;
      3: return vf;
      4: return !zf;
      5: return !lt;
      6: return lt || zf;
      default: return 1'b1;
    endcase
  endfunction

  // reference run from PC 0 with cleared registers and flags
  task automatic iss_run(output int steps);
    logic [15:0] pcv;
    pcv = 16'h0000;
    steps = 0;
    for (int r = 0; r < 16; r++) rref[r] = 16'h0000;
    zf = 0; vf = 0; nf = 0;
    for (int i = 0; i < 32768; i++) dref[i] = dinit[i];
    while (int'(pcv[15:1]) != halt_word && steps < 100000) begin
      logic [15:0] w, pc2, a, b, y, ea;
      logic [16:0] wide;
      int op, d, s, t;
      w   = img[pcv[15:1]];
      pc2 = pcv + 16'd2;
      op  = int'(w[15:12]);
      d   = int'(w[11:8]);
      s   = int'(w[7:4]);
      t   = int'(w[3:0]);
      a   = rref[s];
      b   = rref[t];
      ea  = rref[14] + {{8{w[7]}}, w[7:0]};
      steps++;
      pcv = pc2;
      case (op)
        0, 1, 2, 3: begin
          y = (op == 0) ? (a & b) : (op == 1) ? (a | b) : (op == 2) ? (a ^ b) : ~a;
          rref[d] = y; zf = (y == 0); vf = 0; nf = 0;
        end
        4: begin
          y = a + b; rref[d] = y; zf = (y == 0); nf = y[15];
          vf = (a[15] == b[15]) && (y[15] != a[15]);
        end
        5: begin
          y = a - b; rref[d] = y; zf = (y == 0); nf = y[15];
          vf = (a[15] != b[15]) && (y[15] != a[15]);
        end
        6: rref[d] = 16'($signed(a) >>> t);
        7: rref[d] = a << t;
        8: rref[d] = dref[ea[15:1]];
        9: dref[ea[15:1]] = rref[d];
        10: rref[d] = {w[7:0], rref[d][7:0]};
        11: rref[d] = {rref[d][15:8], w[7:0]};
        12: begin
          wide = 17'(a[15:8] + b[15:8]);
          rref[d] = {wide[7:0], 8'(a[7:0] + b[7:0])};
        end
        13: if (cond_true(int'(w[10:8]))) pcv = pc2 + {{7{w[7]}}, w[7:0], 1'b0};
        14: begin rref[13] = pc2; pcv = {pc2[15:12], w[11:0]}; end
        default: pcv = rref[13];
      endcase
    end
  endtask

  // ---------------- DUT loading ----------------
  task automatic load_word(input int widx, input logic [15:0] v);
    load_we   <= 1'b1;
    load_addr <= 16'(widx * 2);
    load_data <= v;
    @(posedge clk);
  endtask

  task automatic load_all(input bit code);
    rst <= 1'b1;
    @(posedge clk);
    if (code) begin
      for (int i = 0; i < CODE_WORDS; i++) load_word(i, img[i]);
      for (int i = SUB0; i < SUB1 + 16; i++) load_word(i, img[i]);
    end
    for (int i = DATA_LO; i < DATA_HI; i++) load_word(i, dinit[i]);
    load_we <= 1'b0;
    @(posedge clk);
    rst <= 1'b0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall, n_loaduse, n_taken, n_nottaken, n_call, n_ret, n_miss, n_hit;
  int n_load, n_store, n_ovf, n_vadd, n_midreset, n_cycles, n_retired;
  int mech_counts[13];

  always @(posedge clk) if (!rst) begin
    n_cycles++;
    if (dut.u_cpu.stall) n_stall++;
    if (dut.u_cpu.stall && dut.u_cpu.exmem_valid && dut.u_cpu.exmem_mem_re) n_loaduse++;
    if (dut.u_cpu.ex_redirect) n_taken++;
    if (dut.u_cpu.idex_valid && dut.u_cpu.idex_ctrl.is_branch && !dut.u_cpu.br_taken) n_nottaken++;
    if (dut.u_cpu.id_redirect && dut.u_cpu.id_ctrl.is_call) n_call++;
    if (dut.u_cpu.id_redirect && dut.u_cpu.id_ctrl.is_ret) n_ret++;
    if (dut.u_icache.miss_start) n_miss++;
    if (dut.u_icache.hit) n_hit++;
    if (dut.u_cpu.dm_re) n_load++;
    if (dut.u_cpu.dm_we) n_store++;
    if (dut.u_cpu.idex_valid && dut.u_cpu.idex_ctrl.flags_we && dut.u_cpu.alu_flags.v) n_ovf++;
    if (dut.u_cpu.idex_valid && dut.u_cpu.idex_ctrl.alu_op == ALU_VADD) n_vadd++;
    if (dut.u_cpu.memwb_valid) n_retired++;
  end

  // ---------------- runs ----------------
  // Directed timing run: a counted loop of 7 instructions (5 independent
  // LLBs, SUB, B NE) spanning cache blocks 0 and 1. After reset the first
  // instruction misses (4 x 5 + 1 = 21 cycles) and reaches EX 2 cycles after
  // it hits. The first pass also misses on block 1; later passes hit and take
  // 7 cycles plus 2 for the taken branch.
  int loop_ex [4];
  int loop_n, first_ex, tcycle;
  bit timing_run;
  always @(posedge clk) begin
    if (rst) tcycle <= 0;
    else     tcycle <= tcycle + 1;
    if (timing_run && !rst && dut.u_cpu.idex_valid) begin
      if (first_ex < 0) first_ex = tcycle;
      if (dut.u_cpu.idex_pc2 == 16'h000A && loop_n < 4) begin
        loop_ex[loop_n] = tcycle;
        loop_n++;
      end
    end
  end

  task automatic check_timing(string what, int got, int exp_c);
    checks++;
    if (got != exp_c) begin
      failures++;
      $display("%s: %0d cycles, expected %0d", what, got, exp_c);
    end
  endtask

  task automatic timing_test();
    for (int i = 0; i < 32768; i++) begin img[i] = 16'h0000; dinit[i] = 16'h0000; end
    img[0] = enc_i(11, 12, 4);  img[1] = enc_i(10, 12, 0);
    img[2] = enc_i(11, 15, 1);  img[3] = enc_i(10, 15, 0);
    for (int r = 1; r <= 5; r++) img[3 + r] = enc_i(11, r, r);   // 0x08..0x10
    img[9]  = enc_r(5, 12, 12, 15);                               // 0x12 SUB
    img[10] = 16'hD4F9;                                           // 0x14 B NE,-7
    img[11] = 16'hD7FF;                                           // 0x16 end
    halt_word = 11;
    loop_n = 0; first_ex = -1; timing_run = 1;
    load_all(1'b1);
    repeat (150) @(posedge clk);
    timing_run = 0;
    check_timing("reset to first instruction in EX", first_ex, 4 * 5 + 1 + 2);
    checks++;
    if (loop_n != 4) begin
      failures++;
      $display("loop ran %0d times, expected 4", loop_n);
    end else begin
      check_timing("first pass (miss on block 1)", loop_ex[1] - loop_ex[0], 9 + 4 * 5 + 1);
      check_timing("second pass", loop_ex[2] - loop_ex[1], 9);
      check_timing("third pass", loop_ex[3] - loop_ex[2], 9);
    end
    for (int r = 1; r <= 5; r++) begin
      checks++;
      if (dut.u_cpu.u_rf.regs[r] !== 16'(r)) begin
        failures++;
        $display("timing run: R%0d = %h", r, dut.u_cpu.u_rf.regs[r]);
      end
    end
  endtask

  initial begin
    int steps, cyc;
    bit done;
    timing_run = 0;
    timing_test();
    for (int run = 0; run < NPROG; run++) begin
      gen_program();
      iss_run(steps);
      checks++;
      if (steps >= 100000) begin
        failures++;
        $display("run %0d: reference model did not halt", run);
      end
      load_all(1'b1);
      if (run % 3 == 1) begin
        repeat (30 + $urandom_range(0, 200)) @(posedge clk);
        n_midreset++;
        load_all(1'b0);
      end
      done = 0;
      cyc = 0;
      while (!done && cyc < 30000) begin
        @(posedge clk);
        cyc++;
        if (dut.u_cpu.ex_redirect && dut.u_cpu.idex_pc2 == 16'(halt_word * 2 + 2)) done = 1;
      end
      repeat (4) @(posedge clk);
      checks++;
      if (!done) begin
        failures++;
        $display("run %0d: processor did not reach the end of the program", run);
      end
      for (int r = 0; r < 16; r++) begin
        checks++;
        if (dut.u_cpu.u_rf.regs[r] !== rref[r]) begin
          failures++;
          $display("run %0d: R%0d = %h, expected %h", run, r, dut.u_cpu.u_rf.regs[r], rref[r]);
        end
      end
      checks++;
      if (dut.u_cpu.flags !== {zf, vf, nf}) begin
        failures++;
        $display("run %0d: flags ZVN = %b, expected %b%b%b", run, dut.u_cpu.flags, zf, vf, nf);
      end
      for (int i = DATA_LO; i < DATA_HI; i++) begin
        checks++;
        if (dut.u_dcache.mem[i] !== dref[i]) begin
          failures++;
          if (failures < 20)
            $display("run %0d: mem[%h] = %h, expected %h", run, i * 2, dut.u_dcache.mem[i], dref[i]);
        end
      end
      $display("run %0d: %0d instructions, %0d cycles", run, steps, cyc);
    end

    $display("stalls=%0d load_use=%0d taken=%0d not_taken=%0d call=%0d ret=%0d",
             n_stall, n_loaduse, n_taken, n_nottaken, n_call, n_ret);
    $display("icache_miss=%0d icache_hit=%0d loads=%0d stores=%0d overflow=%0d vadd=%0d mid_reset=%0d",
             n_miss, n_hit, n_load, n_store, n_ovf, n_vadd, n_midreset);
    mech_counts = '{n_stall, n_loaduse, n_taken, n_nottaken, n_call, n_ret,
                    n_miss, n_hit, n_load, n_store, n_ovf, n_vadd, n_midreset};
    foreach (mech_counts[i]) begin
      checks++;
      if (mech_counts[i] == 0) begin
        failures++;
        $display("mechanism %0d never happened", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


endmodule
