// tb_sys_ctrl: self-checking test of the reconfiguration hand-off registers:
// bitstream location, the one-clock cache flush pulse, the IDE release bit, the
// wake line (which also releases the IDE cable and freezes the registers) and
// the uc_ready status bit.
module tb_sys_ctrl;
  import rdisk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp;
  logic [27:0] cfg_lba; logic uc_wake, uc_ready, ide_release, icache_flush;
  sys_ctrl dut (.clk, .rst_n, .req, .rsp, .cfg_lba, .uc_wake, .uc_ready, .ide_release, .icache_flush);
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic bw(input logic [1:0] a, input logic [15:0] d);
    @(negedge clk); req = '{valid:1, we:1, addr:25'h100_5000 | 25'(a), wdata:d};
    #1 chk(rsp.ready, "write answered at once");
    @(negedge clk); req = '0;
  endtask
  task automatic br(input logic [1:0] a, output logic [15:0] d);
    @(negedge clk); req = '{valid:1, we:0, addr:25'h100_5000 | 25'(a), wdata:0};
    #1 d = rsp.rdata;
    @(negedge clk); req = '0;
  endtask
  int pulses = 0;
  always @(negedge clk) if (icache_flush) pulses++;
  logic [15:0] d;
  initial begin
    req = '0; uc_ready = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    chk(!uc_wake && !ide_release, "idle after reset");
    bw(0, 16'hBEEF); bw(1, 16'hF123);
    chk(cfg_lba == 28'h123BEEF, "bitstream location");
    br(1, d); chk(d == 16'h0123, "location high readback");
    bw(2, 16'h0004); repeat (3) @(negedge clk);
    chk(pulses == 1, "flush is a single pulse");
    bw(2, 16'h0002); chk(ide_release && !uc_wake, "IDE release alone");
    bw(2, 16'h0000); chk(!ide_release, "IDE back to the FPGA");
    bw(2, 16'h0001); chk(uc_wake && ide_release, "wake releases the IDE cable");
    bw(0, 16'h0000); chk(cfg_lba == 28'h123BEEF, "location frozen while waking");
    uc_ready = 1; br(2, d); chk(d[3] && d[0], "status bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
