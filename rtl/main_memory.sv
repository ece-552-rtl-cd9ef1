// main_memory: the 64 KB main memory behind the instruction cache.
//
// Byte-addressed, read over a 4-byte (32-bit) bus. The storage is two
// banks of 16-bit halfwords (bank 0 holds the halfword at address bit 1 = 0,
// the lower half of the bus word), so one bus read returns the two
// instructions of an aligned 4-byte word, little-endian by halfword.
//
// Read timing: a request is accepted when the memory is idle or is
// delivering in that same cycle (req && (!busy || ready)); rdata is valid
// with ready exactly LATENCY cycles after the request was accepted. With the
// 10 ns clock this design assumes, the default LATENCY of 5 gives the
// architecture's 50 ns access time. A requester may issue the next request
// in the cycle ready is high, so back-to-back beats come every LATENCY
// cycles.
//
// The load port writes one halfword in one cycle; it is how a program image
// is placed in memory before the processor leaves reset. The processor
// itself never writes main memory (stores go to the data cache, and the
// instruction cache is never written by the program).
module main_memory #(
  parameter int unsigned ADDR_W  = 16,  // byte address width: 64 KB
  parameter int unsigned LATENCY = 5    // cycles per 4-byte access
) (
  input  logic              clk,
  input  logic              rst,
  // read port (instruction cache refill)
  input  logic              req,
  input  logic [ADDR_W-1:0] addr,      // byte address, bits [1:0] ignored
  output logic              ready,
  output logic [31:0]       rdata,
  // program load port
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr, // byte address, bit 0 ignored
  input  logic [15:0]       load_data
);

  localparam int unsigned WORDS = 2 ** (ADDR_W - 2);
  localparam int unsigned CNT_W = (LATENCY > 1) ? $clog2(LATENCY) : 1;

  logic [15:0] bank0 [WORDS];
  logic [15:0] bank1 [WORDS];

  logic              busy;
  logic [CNT_W-1:0]  cnt;
  logic [ADDR_W-3:0] word_q;
  logic              accept;

  assign ready  = busy && (cnt == '0);
  assign accept = req && (!busy || ready);
  assign rdata  = {bank1[word_q], bank0[word_q]};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      cnt    <= '0;
      word_q <= '0;
    end else if (accept) begin
      busy   <= 1'b1;
      cnt    <= CNT_W'(LATENCY - 1);
      word_q <= addr[ADDR_W-1:2];
    end else if (ready) begin
      busy   <= 1'b0;
    end else if (busy) begin
      cnt    <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (load_we) begin
      if (load_addr[1]) bank1[load_addr[ADDR_W-1:2]] <= load_data;
      else              bank0[load_addr[ADDR_W-1:2]] <= load_data;
    end
  end

  // A request may only arrive when the memory can take it.
  a_no_drop : assert property (@(posedge clk) disable iff (rst)
                               req |-> (!busy || ready));

endmodule
