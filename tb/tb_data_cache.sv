// tb_data_cache: random loads and stores against a word-array model. Read
// data must be valid right after the clock edge that took the address (a
// one-cycle access), stores must land in the addressed word only, and
// words written through the load port must read back.
module tb_data_cache;

  logic        clk = 1'b0;
  logic        re, we, load_we;
  logic [15:0] addr, wdata, rdata, load_addr, load_data;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  data_cache dut (.clk, .re, .we, .addr, .wdata, .rdata, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accesses stay in the top 512 bytes of the address space
  function automatic logic [15:0] a_of(int w);
    return 16'hFE00 + 16'(w * 2);
  endfunction

  initial begin
    int w;
    re = 0; we = 0; load_we = 0; addr = '0; wdata = '0; load_addr = '0; load_data = '0;
    for (int i = 0; i < 256; i++) begin
      model[i] = 16'($urandom);
      load_we = 1; load_addr = a_of(i) | 16'($urandom_range(0, 1)); load_data = model[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    repeat (4000) begin
      w     = int'($urandom_range(0, 255));
      re    = $urandom_range(0, 1) == 1;
      we    = !re && ($urandom_range(0, 1) == 1);
      addr  = a_of(w) | 16'($urandom_range(0, 1));
      wdata = 16'($urandom);
      @(posedge clk); #1;
      if (we) model[w] = wdata;
      if (re) begin
        checks++;
        if (rdata !== model[w]) begin
          failures++;
          if (failures < 10) $display("read %h at %h, expected %h", rdata, addr, model[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
