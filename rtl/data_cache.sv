// data_cache: the WISC-F05 data cache, as large as main memory.
//
// The architecture makes every data access a hit with the access time of
// the instruction cache, so the block is a 64 KB memory of 16-bit words
// with a one-cycle access: the address and write data are taken at the
// clock edge that ends the memory stage, and read data is valid in the
// following cycle (the write-back stage). Addresses are byte addresses;
// bit 0 is ignored, so every access is an aligned 16-bit word (the
// architecture only moves whole registers to and from memory).
// A read of the word being written in the same cycle returns the old value.
// The load port writes one word for program/data loading before the run.
module data_cache #(
  parameter int unsigned ADDR_W = 16   // byte address width: 64 KB
) (
  input  logic              clk,
  input  logic              re,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  // program / data load port
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [15:0]       load_data
);

  localparam int unsigned WORDS = 2 ** (ADDR_W - 1);

  logic [15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we)  mem[load_addr[ADDR_W-1:1]] <= load_data;
    else if (we)  mem[addr[ADDR_W-1:1]]      <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[addr[ADDR_W-1:1]];
  end

endmodule
