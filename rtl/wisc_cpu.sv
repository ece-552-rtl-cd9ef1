// wisc_cpu: the five-stage pipelined WISC-F05 core.
//
// Stages: fetch (IF), decode and register read (ID), execute (EX), memory
// (MEM) and write-back (WB). The core talks to an instruction cache with a
// combinational lookup (if_hit / if_instr in the cycle if_addr is shown) and
// to a data cache whose read data arrives one cycle after the MEM stage
// presents the address, i.e. in WB.
//
// Hazards are resolved without forwarding, as the architecture allows:
//  * read-after-write: decode stalls (PC and IF/ID hold, a bubble enters
//    EX) while an instruction in EX or MEM will write one of its source
//    registers. The register file passes a WB write straight to its read
//    ports, so a dependent instruction issues as soon as the producer
//    reaches WB (at most two stall cycles, loads included).
//  * branches (B) are resolved in EX against the FLAG register, which the
//    flag-setting instructions write as they leave EX, so a branch sees the
//    flags of every older instruction. There is no delay slot: a taken
//    branch squashes the two younger instructions in IF and ID. Fetch is
//    otherwise sequential (an untaken branch costs nothing).
//  * CALL and RET redirect fetch from ID (target known there; RET reads R13
//    through the normal interlock), squashing the one instruction in IF.
//    CALL writes PC+2 into R13 through the pipeline.
//  * an instruction cache miss holds the PC and sends bubbles into ID until
//    the block has been refilled.
// The target rules follow the architecture: B goes to PC+2 + 2*offset; CALL
// keeps the top four bits of PC+2 and takes the low twelve from the
// instruction; RET goes to R13.
//
// Reset (synchronous, active high) clears the PC, as the architecture
// requires, and also empties the pipeline and clears the FLAG register and
// the register file (this design's choice). Instructions run while rst is
// low; fetch starts at address 0.
module wisc_cpu
  import wisc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // instruction cache
  output logic        if_req,
  output logic [15:0] if_addr,
  input  logic        if_hit,
  input  logic [15:0] if_instr,
  // data cache
  output logic        dm_re,
  output logic        dm_we,
  output logic [15:0] dm_addr,
  output logic [15:0] dm_wdata,
  input  logic [15:0] dm_rdata
);

  // ---------------- state ----------------
  logic [15:0] pc;
  flags_t      flags;

  logic        ifid_valid;
  logic [15:0] ifid_instr;
  logic [15:0] ifid_pc2;

  logic        idex_valid;
  ctrl_t       idex_ctrl;
  logic [15:0] idex_a, idex_b, idex_pc2;

  logic        exmem_valid;
  logic        exmem_reg_we, exmem_mem_re, exmem_mem_we;
  logic [3:0]  exmem_rd;
  logic [15:0] exmem_result, exmem_store;

  logic        memwb_valid;
  logic        memwb_reg_we, memwb_mem_re;
  logic [3:0]  memwb_rd;
  logic [15:0] memwb_result;

  // ---------------- IF ----------------
  logic [15:0] pc_plus2;
  assign pc_plus2 = pc + 16'd2;
  assign if_addr  = pc;
  assign if_req   = !rst;

  // ---------------- ID ----------------
  ctrl_t       id_ctrl;
  logic [15:0] ra_data, rb_data;
  logic        stall;
  logic        id_redirect;
  logic [15:0] id_target;
  logic        wb_we;
  logic [15:0] wb_data;

  decoder u_dec (.instr(ifid_instr), .ctrl(id_ctrl));

  regfile u_rf (
    .clk, .rst,
    .ra_addr(id_ctrl.ra), .ra_data,
    .rb_addr(id_ctrl.rb), .rb_data,
    .we(wb_we), .w_addr(memwb_rd), .w_data(wb_data)
  );

  hazard_unit u_hz (
    .id_valid(ifid_valid),
    .id_ra(id_ctrl.ra), .id_use_a(id_ctrl.use_a),
    .id_rb(id_ctrl.rb), .id_use_b(id_ctrl.use_b),
    .ex_we(idex_valid && idex_ctrl.reg_we),   .ex_rd(idex_ctrl.rd),
    .mem_we(exmem_valid && exmem_reg_we),      .mem_rd(exmem_rd),
    .stall
  );

  // ---------------- EX ----------------
  logic [15:0] alu_a, alu_b, alu_y;
  flags_t      alu_flags;
  logic        alu_flags_valid;
  logic        br_taken;
  logic        ex_redirect;
  logic [15:0] ex_target;

  assign alu_a = idex_ctrl.a_is_pc  ? idex_pc2      : idex_a;
  assign alu_b = idex_ctrl.b_is_imm ? idex_ctrl.imm : idex_b;

  alu u_alu (.op(idex_ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y),
             .flags(alu_flags), .flags_valid(alu_flags_valid));

  branch_cond u_bc (.cond(idex_ctrl.cond), .flags(flags), .taken(br_taken));

  assign ex_redirect = idex_valid && idex_ctrl.is_branch && br_taken;
  assign ex_target   = idex_pc2 + idex_ctrl.imm;

  assign id_redirect = ifid_valid && !stall && !ex_redirect &&
                       (id_ctrl.is_call || id_ctrl.is_ret);
  assign id_target   = id_ctrl.is_call ? {ifid_pc2[15:12], ifid_instr[11:0]} : ra_data;

  // ---------------- MEM / WB ----------------
  assign dm_re    = exmem_valid && exmem_mem_re;
  assign dm_we    = exmem_valid && exmem_mem_we;
  assign dm_addr  = exmem_result;
  assign dm_wdata = exmem_store;

  assign wb_we   = memwb_valid && memwb_reg_we;
  assign wb_data = memwb_mem_re ? dm_rdata : memwb_result;

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= '0;
    end else if (ex_redirect) begin
      pc <= ex_target;
    end else if (id_redirect) begin
      pc <= id_target;
    end else if (!stall && if_hit) begin
      pc <= pc_plus2;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || ex_redirect || id_redirect) begin
      ifid_valid <= 1'b0;
    end else if (!stall) begin
      ifid_valid <= if_hit;
      ifid_instr <= if_instr;
      ifid_pc2   <= pc_plus2;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || ex_redirect || stall) begin
      idex_valid <= 1'b0;
      idex_ctrl  <= CTRL_NOP;
    end else begin
      idex_valid <= ifid_valid;
      idex_ctrl  <= ifid_valid ? id_ctrl : CTRL_NOP;
      idex_a     <= ra_data;
      idex_b     <= rb_data;
      idex_pc2   <= ifid_pc2;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      flags <= '0;
    end else if (idex_valid && idex_ctrl.flags_we && alu_flags_valid) begin
      flags <= alu_flags;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      exmem_valid  <= 1'b0;
      exmem_reg_we <= 1'b0;
      exmem_mem_re <= 1'b0;
      exmem_mem_we <= 1'b0;
    end else begin
      exmem_valid  <= idex_valid;
      exmem_reg_we <= idex_ctrl.reg_we;
      exmem_mem_re <= idex_ctrl.mem_re;
      exmem_mem_we <= idex_ctrl.mem_we;
      exmem_rd     <= idex_ctrl.rd;
      exmem_result <= alu_y;
      exmem_store  <= idex_b;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      memwb_valid  <= 1'b0;
      memwb_reg_we <= 1'b0;
      memwb_mem_re <= 1'b0;
    end else begin
      memwb_valid  <= exmem_valid;
      memwb_reg_we <= exmem_reg_we;
      memwb_mem_re <= exmem_mem_re;
      memwb_rd     <= exmem_rd;
      memwb_result <= exmem_result;
    end
  end

  // An interlocked instruction stays in decode: the PC and IF/ID hold
  // unless an older branch redirects fetch.
  a_stall_holds : assert property (@(posedge clk) disable iff (rst)
                                   (stall && !ex_redirect) |=> ($stable(pc) && $stable(ifid_instr)));

  // Only AND, OR, XOR, NOT, ADD and SUB change the FLAG register.
  a_flags_only_alu : assert property (@(posedge clk) disable iff (rst)
                                      !(idex_valid && idex_ctrl.flags_we) |=> $stable(flags));

endmodule
