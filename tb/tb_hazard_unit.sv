// tb_hazard_unit: random test of the read-after-write interlock against a
// reference that walks the older instructions one by one: stall when a used
// source register of the valid decode-stage instruction will be written by
// the instruction in execute or in memory.
module tb_hazard_unit;

  logic       id_valid, id_use_a, id_use_b, ex_we, mem_we, stall;
  logic [3:0] id_ra, id_rb, ex_rd, mem_rd;
  int checks = 0, failures = 0;

  hazard_unit dut (.id_valid, .id_ra, .id_use_a, .id_rb, .id_use_b,
                   .ex_we, .ex_rd, .mem_we, .mem_rd, .stall);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_s;
    logic [3:0] srcs [2];
    logic       uses [2];
    repeat (5000) begin
      {id_valid, id_use_a, id_use_b, ex_we, mem_we} = 5'($urandom);
      // small register range so that matches are frequent
      id_ra = 4'($urandom_range(0, 3)); id_rb = 4'($urandom_range(0, 3));
      ex_rd = 4'($urandom_range(0, 3)); mem_rd = 4'($urandom_range(0, 3));
      #1;
      srcs = '{id_ra, id_rb};
      uses = '{id_use_a, id_use_b};
      exp_s = 1'b0;
      for (int s = 0; s < 2; s++) begin
        if (uses[s] && ex_we  && srcs[s] == ex_rd)  exp_s = 1'b1;
        if (uses[s] && mem_we && srcs[s] == mem_rd) exp_s = 1'b1;
      end
      exp_s = exp_s && id_valid;
      checks++;
      if (stall !== exp_s) begin
        failures++;
        if (failures < 10) $display("stall=%b expected %b", stall, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
