// tb_boot_rom: checks the boot ROM against its initialisation file. The file
// tb/boot_rom_test.hex holds 32 words, word i = (i * 0x1357 + 0x2468) mod 2^16;
// the rest of the ROM must read as zero. Each read must be acknowledged one
// clock after the request.
module tb_boot_rom;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  logic req, ack; logic [7:0] addr; logic [15:0] data;
  boot_rom #(.INIT_FILE("tb/boot_rom_test.hex")) dut (.clk, .rst_n, .req, .addr, .data, .ack);
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    req = 0; addr = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 256; i += 1 + (i >= 32 ? 7 : 0)) begin
      logic [15:0] e;
      e = (i < 32) ? 16'(i * 16'h1357 + 16'h2468) : 16'h0;
      @(negedge clk); req = 1; addr = 8'(i);
      #1 chk(!ack, "no ack in the request clock");
      @(negedge clk);
      chk(ack && data == e, $sformatf("word %0d: %h expected %h", i, data, e));
      req = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
