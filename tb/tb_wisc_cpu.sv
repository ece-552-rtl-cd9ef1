// tb_wisc_cpu: directed test of the pipelined core with ideal memories.
//
// The instruction memory is a table that answers every fetch in the same
// cycle (no cache misses) and the data memory answers one cycle after the
// memory stage. A short program exercises independent instructions, RAW
// interlocks at distance 1 and 2, a load-use interlock, a taken and an
// untaken branch, CALL and RET. The bench records the cycle in which each
// instruction enters the execute stage and checks the spacing the pipeline
// must give: 1 cycle when independent, 3 after a distance-1 dependence, 2
// after a distance-2 dependence, 3 after a taken branch, 1 after an
// untaken one and 2 after CALL or RET. It then checks the architectural
// results. A second run repeats the program with fetch misses injected at
// random (the fetch port withholds hit) and checks the same results.
module tb_wisc_cpu;
  import wisc_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        if_req, if_hit;
  logic [15:0] if_addr, if_instr;
  logic        dm_re, dm_we;
  logic [15:0] dm_addr, dm_wdata, dm_rdata;
  logic        inject_miss;

  int checks = 0, failures = 0;

  wisc_cpu dut (.clk, .rst, .if_req, .if_addr, .if_hit, .if_instr,
                .dm_re, .dm_we, .dm_addr, .dm_wdata, .dm_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ideal memories ----------------
  logic [15:0] rom [128];
  logic [15:0] ram [256];
  logic        miss_now;

  initial begin
    for (int i = 0; i < 128; i++) rom[i] = 16'hD7FF;
    rom['h00 >> 1] = 16'hB105;  // LLB R1,5
    rom['h02 >> 1] = 16'hB207;  // LLB R2,7
    rom['h04 >> 1] = 16'hB309;  // LLB R3,9
    rom['h06 >> 1] = 16'hB580;  // LLB R5,0x80
    rom['h08 >> 1] = 16'h4412;  // ADD R4,R1,R2
    rom['h0A >> 1] = 16'h5643;  // SUB R6,R4,R3
    rom['h0C >> 1] = 16'hB803;  // LLB R8,3
    rom['h0E >> 1] = 16'h2761;  // XOR R7,R6,R1
    rom['h10 >> 1] = 16'hBE00;  // LLB R14,0
    rom['h12 >> 1] = 16'hAE01;  // LHB R14,1
    rom['h14 >> 1] = 16'h9704;  // SW  R7,4
    rom['h16 >> 1] = 16'h8904;  // LW  R9,4
    rom['h18 >> 1] = 16'h4A99;  // ADD R10,R9,R9
    rom['h1A >> 1] = 16'h5B11;  // SUB R11,R1,R1
    rom['h1C >> 1] = 16'hD001;  // B EQ,+1
    rom['h1E >> 1] = 16'hBCEE;  // LLB R12,0xEE (skipped)
    rom['h20 >> 1] = 16'hD405;  // B NE,+5 (not taken)
    rom['h22 >> 1] = 16'hE040;  // CALL 0x040
    rom['h24 >> 1] = 16'hBF42;  // LLB R15,0x42
    rom['h26 >> 1] = 16'hD7FF;  // B TRUE,-1 (end)
    rom['h40 >> 1] = 16'h4012;  // ADD R0,R1,R2
    rom['h42 >> 1] = 16'hF000;  // RET
  end

  always_comb begin
    miss_now = inject_miss && ($urandom_range(0, 1) == 0);
    if_hit   = if_req && !miss_now;
    if_instr = rom[if_addr[7:1]];
  end

  always @(posedge clk) begin
    if (dm_we) ram[dm_addr[8:1]] <= dm_wdata;
    if (dm_re) dm_rdata <= ram[dm_addr[8:1]];
  end

  // ---------------- execute-stage timestamps ----------------
  int cycle;
  int ex_time [128];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (dut.idex_valid && ex_time[(dut.idex_pc2 - 16'd2) >> 1] < 0)
      ex_time[(dut.idex_pc2 - 16'd2) >> 1] = cycle;
  end

  function automatic int ext(int byte_addr);
    return ex_time[byte_addr >> 1];
  endfunction

  task automatic check_gap(int from, int to, int gap, string what);
    checks++;
    if (ext(to) - ext(from) != gap) begin
      failures++;
      $display("%s: %0d cycles, expected %0d", what, ext(to) - ext(from), gap);
    end
  endtask

  task automatic check_reg(int r, logic [15:0] v);
    checks++;
    if (dut.u_rf.regs[r] !== v) begin
      failures++;
      $display("R%0d = %h, expected %h", r, dut.u_rf.regs[r], v);
    end
  endtask

  task automatic run_program();
    for (int i = 0; i < 128; i++) ex_time[i] = -1;
    for (int i = 0; i < 256; i++) ram[i] = 16'h0000;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    repeat (120) @(posedge clk);
  endtask

  task automatic check_results();
    check_reg(0, 16'd12);
    check_reg(1, 16'd5);
    check_reg(2, 16'd7);
    check_reg(3, 16'd9);
    check_reg(4, 16'd12);
    check_reg(5, 16'h0080);
    check_reg(6, 16'd3);
    check_reg(7, 16'd6);
    check_reg(8, 16'd3);
    check_reg(9, 16'd6);
    check_reg(10, 16'd12);
    check_reg(11, 16'd0);
    check_reg(12, 16'd0);
    check_reg(13, 16'h0024);
    check_reg(14, 16'h0100);
    check_reg(15, 16'h0042);
    checks++;
    if (ram['h104 >> 1] !== 16'd6) begin
      failures++;
      $display("memory word 0x104 = %h, expected 0006", ram['h104 >> 1]);
    end
    checks++;
    if (dut.flags !== 3'b000) begin
      failures++;
      $display("flags ZVN = %b, expected 000", dut.flags);
    end
    checks++;
    if (ext('h1E) != -1) begin
      failures++;
      $display("instruction after the taken branch was executed");
    end
  endtask

  initial begin
    cycle = 0;
    inject_miss = 1'b0;
    run_program();
    check_gap('h00, 'h02, 1, "independent");
    check_gap('h06, 'h08, 1, "distance-3 dependence");
    check_gap('h08, 'h0A, 3, "distance-1 dependence");
    check_gap('h0C, 'h0E, 2, "distance-2 dependence");
    check_gap('h10, 'h12, 3, "LHB reads its own register");
    check_gap('h12, 'h14, 3, "store waits for R14");
    check_gap('h14, 'h16, 1, "load after store");
    check_gap('h16, 'h18, 3, "load-use");
    check_gap('h1C, 'h20, 3, "taken branch");
    check_gap('h20, 'h22, 1, "untaken branch");
    check_gap('h22, 'h40, 2, "CALL");
    check_gap('h40, 'h42, 1, "procedure body");
    check_gap('h42, 'h24, 2, "RET");
    check_results();

    inject_miss = 1'b1;
    run_program();
    check_results();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
