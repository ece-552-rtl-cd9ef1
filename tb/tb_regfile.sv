// tb_regfile: the register file against an array model: reset clears all
// sixteen registers, random writes land in the addressed register only,
// both read ports return the stored value and a read of the register being
// written returns the new value in the same cycle.
module tb_regfile;

  logic        clk = 1'b0, rst;
  logic [3:0]  ra_addr, rb_addr, w_addr;
  logic [15:0] ra_data, rb_data, w_data;
  logic        we;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ra_addr, .ra_data, .rb_addr, .rb_data, .we, .w_addr, .w_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ea, eb;
    rst = 1'b1; we = 1'b0; w_addr = '0; w_data = '0; ra_addr = '0; rb_addr = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 16; i++) model[i] = 16'h0000;
    for (int i = 0; i < 16; i++) begin
      ra_addr = 4'(i); rb_addr = 4'(15 - i); #1;
      checks++;
      if (ra_data !== 16'h0 || rb_data !== 16'h0) begin
        failures++;
        $display("register %0d not cleared by reset", i);
      end
    end
    repeat (3000) begin
      we      = ($urandom_range(0, 3) != 0);
      w_addr  = 4'($urandom);
      w_data  = 16'($urandom);
      ra_addr = ($urandom_range(0, 3) == 0) ? w_addr : 4'($urandom);
      rb_addr = 4'($urandom);
      #1;
      ea = (we && w_addr == ra_addr) ? w_data : model[ra_addr];
      eb = (we && w_addr == rb_addr) ? w_data : model[rb_addr];
      checks++;
      if (ra_data !== ea || rb_data !== eb) begin
        failures++;
        if (failures < 10)
          $display("read R%0d=%h R%0d=%h, expected %h %h", ra_addr, ra_data, rb_addr, rb_data, ea, eb);
      end
      @(posedge clk);
      if (we) model[w_addr] = w_data;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
