// tb_icache: the instruction cache in front of the main memory model.
// Checks that a cold access misses and hits exactly 4 x LATENCY cycles
// later plus one cycle to look the refilled block up again (four 4-byte
// beats at 5 cycles each), that the other seven
// instructions of the block then hit at once, that all returned
// instructions match memory, that an address with the same index and
// another tag evicts the block, that blocks with different indexes stay
// resident together (8 blocks, 128 bytes) and that reset empties the cache.
module tb_icache;

  localparam int LAT = 5;

  logic        clk = 1'b0, rst;
  logic        req, hit, mem_req, mem_ready, load_we;
  logic [15:0] addr, instr, mem_addr, load_addr, load_data;
  logic [31:0] mem_rdata;
  logic [15:0] model [4096];   // first 8 KB of memory
  int checks = 0, failures = 0;

  icache dut (.clk, .rst, .req, .addr, .hit, .instr,
              .mem_req, .mem_addr, .mem_ready, .mem_rdata);
  main_memory #(.ADDR_W(16), .LATENCY(LAT)) u_mem (
    .clk, .rst, .req(mem_req), .addr(mem_addr), .ready(mem_ready), .rdata(mem_rdata),
    .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // present an address until it hits; return the cycles it took
  task automatic fetch(input logic [15:0] a, output int cycles);
    req = 1; addr = a; cycles = 0;
    #1;
    while (!hit && cycles < 200) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (instr !== model[a[12:1]]) begin
      failures++;
      if (failures < 10) $display("addr %h: instr %h, expected %h", a, instr, model[a[12:1]]);
    end
    @(posedge clk); #1;
  endtask

  task automatic expect_cycles(logic [15:0] a, int got, int exp_c);
    checks++;
    if (got != exp_c) begin
      failures++;
      $display("addr %h: %0d cycles to hit, expected %0d", a, got, exp_c);
    end
  endtask

  initial begin
    int c;
    rst = 1; req = 0; addr = '0; load_we = 0; load_addr = '0; load_data = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 4096; i++) begin
      model[i] = 16'($urandom);
      load_we = 1; load_addr = 16'(2 * i); load_data = model[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    rst = 0;
    @(posedge clk); #1;

    // cold miss, then the rest of the block
    fetch(16'h0104, c); expect_cycles(16'h0104, c, 4 * LAT + 1);
    for (int i = 0; i < 8; i++) begin
      fetch(16'h0100 + 16'(2 * i), c); expect_cycles(16'h0100 + 16'(2 * i), c, 0);
    end
    // fill all eight blocks 0x0100..0x017F
    for (int b = 1; b < 8; b++) begin
      fetch(16'h0100 + 16'(16 * b), c); expect_cycles(16'h0100 + 16'(16 * b), c, 4 * LAT + 1);
    end
    // all resident: 64 hits
    for (int i = 0; i < 64; i++) begin
      fetch(16'h0100 + 16'(2 * i), c); expect_cycles(16'h0100 + 16'(2 * i), c, 0);
    end
    // same index (3), other tag: conflict miss, then the old block misses again
    fetch(16'h0B30, c); expect_cycles(16'h0B30, c, 4 * LAT + 1);
    fetch(16'h0132, c); expect_cycles(16'h0132, c, 4 * LAT + 1);
    fetch(16'h0140, c); expect_cycles(16'h0140, c, 0);
    // random walk over 1 KB, compared with a tag model
    begin
      logic [8:0] tagm [8];
      logic       vm   [8];
      logic [15:0] a;
      for (int k = 0; k < 8; k++) vm[k] = 0;
      // reset empties the cache
      rst = 1; @(posedge clk); #1; rst = 0;
      fetch(16'h0100, c); expect_cycles(16'h0100, c, 4 * LAT + 1);
      vm[0] = 1; tagm[0] = 9'h002;
      repeat (400) begin
        a = 16'($urandom_range(0, 511) * 2);
        fetch(a, c);
        expect_cycles(a, c, (vm[a[6:4]] && tagm[a[6:4]] == a[15:7]) ? 0 : 4 * LAT + 1);
        vm[a[6:4]] = 1; tagm[a[6:4]] = a[15:7];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
