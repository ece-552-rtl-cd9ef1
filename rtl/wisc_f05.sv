// wisc_f05: the complete WISC-F05 processor with its memory system.
//
// The pipelined core fetches through the 128-byte direct-mapped instruction
// cache, which refills 16-byte blocks from the 64 KB main memory over a
// 4-byte bus (50 ns per beat: MEM_LATENCY cycles of the assumed 10 ns
// clock). Loads and stores go to the data cache, which is as large as main
// memory and always hits in one cycle.
//
// Program loading: while rst is high, load_we writes the halfword load_data
// at byte address load_addr into both main memory (the instruction image)
// and the data cache (the initial data image), so one image serves both, as
// it would in a single 64 KB memory. Stores by the program update only the
// data cache; programs must not modify their own code.
//
// Ports: clk, rst (synchronous, active high; clears the PC and starts fetch
// at address 0), the load port, and pc, the address currently fetched, for
// observation.
module wisc_f05 #(
  parameter int unsigned MEM_LATENCY = 5,    // 50 ns main memory / 10 ns clock
  parameter int unsigned ICACHE_BYTES = 128,
  parameter int unsigned ICACHE_BLOCKS = 8,
  parameter int unsigned BUS_BYTES = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [15:0] load_addr,
  input  logic [15:0] load_data,
  output logic [15:0] pc
);

  logic        if_req, if_hit;
  logic [15:0] if_addr, if_instr;
  logic        mem_req, mem_ready;
  logic [15:0] mem_addr;
  logic [31:0] mem_rdata;
  logic        dm_re, dm_we;
  logic [15:0] dm_addr, dm_wdata, dm_rdata;

  wisc_cpu u_cpu (
    .clk, .rst,
    .if_req, .if_addr, .if_hit, .if_instr,
    .dm_re, .dm_we, .dm_addr, .dm_wdata, .dm_rdata
  );

  icache #(
    .CACHE_BYTES(ICACHE_BYTES), .BLOCKS(ICACHE_BLOCKS), .BUS_BYTES(BUS_BYTES)
  ) u_icache (
    .clk, .rst,
    .req(if_req), .addr(if_addr), .hit(if_hit), .instr(if_instr),
    .mem_req, .mem_addr, .mem_ready, .mem_rdata
  );

  main_memory #(.ADDR_W(16), .LATENCY(MEM_LATENCY)) u_mem (
    .clk, .rst,
    .req(mem_req), .addr(mem_addr), .ready(mem_ready), .rdata(mem_rdata),
    .load_we, .load_addr, .load_data
  );

  data_cache #(.ADDR_W(16)) u_dcache (
    .clk, .re(dm_re), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata),
    .rdata(dm_rdata),
    .load_we, .load_addr, .load_data
  );

  assign pc = if_addr;

endmodule
