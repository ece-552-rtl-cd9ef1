// regfile: the sixteen 16-bit general registers of WISC-F05.
//
// Two asynchronous read ports (a, b) and one synchronous write port. A read
// of the register being written in the same cycle returns the new value
// (write-through), which models the usual "write in the first half of the
// cycle, read in the second half" register file: an instruction in decode
// sees the result of the instruction in write-back without any forwarding
// network. No register is hard-wired; R13 and R14 get their special roles
// (link and data segment) from the instructions that use them, not from
// this block. All registers clear on reset, a choice of this design (the
// architecture only requires the program counter to clear).
module regfile #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] ra_addr,
  output logic [WIDTH-1:0]         ra_data,
  input  logic [$clog2(NREGS)-1:0] rb_addr,
  output logic [WIDTH-1:0]         rb_data,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] w_addr,
  input  logic [WIDTH-1:0]         w_data
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[w_addr] <= w_data;
    end
  end

  always_comb begin
    ra_data = (we && w_addr == ra_addr) ? w_data : regs[ra_addr];
    rb_data = (we && w_addr == rb_addr) ? w_data : regs[rb_addr];
  end

endmodule
