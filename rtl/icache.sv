// icache: the WISC-F05 direct-mapped instruction cache.
//
// 128 bytes in 8 blocks of 16 bytes (eight 16-bit instructions per block),
// refilled from main memory over a 4-byte bus, so a refill is 4 bus beats.
// The 16-bit byte address splits into tag [15:7], index [6:4] and block
// offset [3:0]. Lookup is combinational: hit and instr are valid in the
// cycle the address is presented, the one-cycle (10 ns) cache access.
//
// On a miss the cache issues the first bus request in the same cycle,
// invalidates the block it is about to overwrite and then fetches the four
// 4-byte words in order, each new request issued in the cycle the previous
// word arrives. The block becomes valid at the clock edge that writes the
// last word, and the next lookup hits, so an address that misses hits
// 4 x LATENCY + 1 cycles after its first lookup (21 cycles, 210 ns, with
// the default 50 ns memory and 10 ns clock: four bus beats plus one cache
// access). A refill, once started, always completes,
// even if the processor moves on to another address; lookups of other
// blocks may hit while it runs. The program never writes the cache.
// Valid bits clear on reset.
//
// The block count, block size and bus width follow the architecture; the
// critical-word handling (none: the whole block is fetched before the hit)
// and the in-order beat sequence are this design's choice.
module icache #(
  parameter int unsigned CACHE_BYTES = 128,
  parameter int unsigned BLOCKS      = 8,
  parameter int unsigned BUS_BYTES   = 4
) (
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic        req,
  input  logic [15:0] addr,
  output logic        hit,
  output logic [15:0] instr,
  // main memory side
  output logic        mem_req,
  output logic [15:0] mem_addr,
  input  logic        mem_ready,
  input  logic [31:0] mem_rdata
);

  localparam int unsigned BLOCK_BYTES = CACHE_BYTES / BLOCKS;
  localparam int unsigned BEATS       = BLOCK_BYTES / BUS_BYTES;
  localparam int unsigned OFF_W       = $clog2(BLOCK_BYTES);
  localparam int unsigned IDX_W       = $clog2(BLOCKS);
  localparam int unsigned TAG_W       = 16 - OFF_W - IDX_W;
  localparam int unsigned BEAT_W      = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int unsigned BUSW_W      = $clog2(BUS_BYTES);

  typedef enum logic {S_IDLE, S_FILL} state_t;

  logic [8*BUS_BYTES-1:0] data  [BLOCKS*BEATS];
  logic [TAG_W-1:0]       tags  [BLOCKS];
  logic [BLOCKS-1:0]      valid;

  state_t            state;
  logic [IDX_W-1:0]  fill_idx;
  logic [TAG_W-1:0]  fill_tag;
  logic [BEAT_W-1:0] beat;        // beat outstanding on the bus

  logic [IDX_W-1:0]       idx;
  logic [TAG_W-1:0]       tag;
  logic [BEAT_W-1:0]      word;
  logic [8*BUS_BYTES-1:0] line_word;
  logic                   miss_start;
  logic                   last_beat;

  always_comb begin
    idx  = addr[OFF_W+IDX_W-1:OFF_W];
    tag  = addr[15:OFF_W+IDX_W];
    word = BEAT_W'(addr[OFF_W-1:BUSW_W]);
    line_word = data[{idx, word}];
    hit   = valid[idx] && tags[idx] == tag;
    instr = line_word[16*addr[BUSW_W-1:1] +: 16];

    miss_start = (state == S_IDLE) && req && !hit;
    last_beat  = (beat == BEAT_W'(BEATS - 1));
    mem_req    = miss_start || ((state == S_FILL) && mem_ready && !last_beat);
    if (miss_start)
      mem_addr = {tag, idx, {OFF_W{1'b0}}};
    else
      mem_addr = {fill_tag, fill_idx, OFF_W'({beat + 1'b1, {BUSW_W{1'b0}}})};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      valid    <= '0;
      beat     <= '0;
      fill_idx <= '0;
      fill_tag <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (miss_start) begin
          state         <= S_FILL;
          fill_idx      <= idx;
          fill_tag      <= tag;
          beat          <= '0;
          valid[idx]    <= 1'b0;
        end
        S_FILL: if (mem_ready) begin
          if (last_beat) begin
            state            <= S_IDLE;
            valid[fill_idx]  <= 1'b1;
            tags[fill_idx]   <= fill_tag;
          end
          beat <= beat + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && state == S_FILL && mem_ready)
      data[{fill_idx, beat}] <= mem_rdata;
  end

  // The refill only ever talks to the memory while it owns the bus.
  a_req_in_fill : assert property (@(posedge clk) disable iff (rst)
                                   mem_req |-> (miss_start || state == S_FILL));

endmodule
