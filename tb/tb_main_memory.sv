// tb_main_memory: loads random halfwords, then reads 4-byte words both one
// at a time and back to back. Each read must return the two halfwords of
// the aligned word (lower address in the low half) with ready exactly
// LATENCY cycles after the request (5 cycles, 50 ns at a 10 ns clock).
module tb_main_memory;

  localparam int LAT = 5;

  logic        clk = 1'b0, rst;
  logic        req, ready, load_we;
  logic [15:0] addr, load_addr, load_data;
  logic [31:0] rdata;
  logic [15:0] model [512];
  int checks = 0, failures = 0;

  main_memory #(.ADDR_W(16), .LATENCY(LAT)) dut (
    .clk, .rst, .req, .addr, .ready, .rdata, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // words live at 0x4000..0x43FF
  initial begin
    int w, lat;
    logic [31:0] exp_d;
    rst = 1; req = 0; addr = '0; load_we = 0; load_addr = '0; load_data = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 512; i++) begin
      model[i] = 16'($urandom);
      load_we = 1; load_addr = 16'h4000 + 16'(2 * i); load_data = model[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    rst = 0;
    @(posedge clk); #1;
    repeat (300) begin
      w = 2 * int'($urandom_range(0, 255));
      exp_d = {model[w + 1], model[w]};
      req = 1; addr = 16'h4000 + 16'(2 * w) + 16'($urandom_range(0, 3));
      lat = 0;
      // back-to-back: a new request goes out in the cycle ready is seen
      do begin
        @(posedge clk); #1;
        req = 0;
        lat++;
      end while (!ready && lat < 50);
      checks++;
      if (lat != LAT || rdata !== exp_d) begin
        failures++;
        if (failures < 10) $display("word %0d: latency %0d data %h, expected %0d %h", w, lat, rdata, LAT, exp_d);
      end
      if ($urandom_range(0, 1) == 1) begin
        @(posedge clk); #1;   // an idle cycle between some requests
        checks++;
        if (ready) begin failures++; $display("ready while idle"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
