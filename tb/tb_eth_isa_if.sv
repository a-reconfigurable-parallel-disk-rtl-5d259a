// tb_eth_isa_if: self-checking test of the ISA bridge with a model of the
// Ethernet chip's I/O registers. It writes and reads back register values,
// streams words through the data port, checks that IOCHRDY wait states stretch
// the strobe (12 wait clocks give a 14-clock strobe instead of 8), measures the strobe width and the cycle length, and checks the
// interrupt and reset registers.
module tb_eth_isa_if;
  import rdisk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  bus_req_t req; bus_rsp_t rsp;
  logic [4:0] sa; logic ior_n, iow_n, sd_oe, iochrdy, irq, isa_reset, eth_irq;
  logic [15:0] sd_o, sd_i;
  int strobes, waits;
  eth_isa_if dut (.clk, .rst_n, .req, .rsp, .isa_sa(sa), .isa_ior_n(ior_n), .isa_iow_n(iow_n),
    .isa_sd_o(sd_o), .isa_sd_oe(sd_oe), .isa_sd_i(sd_i), .isa_iochrdy(iochrdy), .isa_irq(irq),
    .isa_reset, .eth_irq);
  isa_eth_model #(.WAIT_CYCLES(12)) chip (.clk, .sa, .ior_n, .iow_n, .sd_host(sd_o), .sd_dev(sd_i),
    .iochrdy, .strobes, .waits);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic bw(input logic [5:0] a, input logic [15:0] d, output int cyc);
    cyc = 0;
    @(negedge clk); req = '{valid:1, we:1, addr:25'(a), wdata:d};
    #1; while (!rsp.ready) begin @(negedge clk); cyc++; end
    @(negedge clk); req = '0;
  endtask
  task automatic br(input logic [5:0] a, output logic [15:0] d);
    @(negedge clk); req = '{valid:1, we:0, addr:25'(a), wdata:0};
    #1; while (!rsp.ready) @(negedge clk);
    d = rsp.rdata;
    @(negedge clk); req = '0;
  endtask

  int low = 0;
  always @(posedge clk) if (!ior_n) low++;
  logic [15:0] d; int cyc;
  initial begin
    req = '0; irq = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    br(6'h05, d); chk(d == 16'h0505, "initial chip register");
    for (int r = 0; r < 16; r++) begin
      bw(6'(r), 16'(r * 7 + 16'h1000), cyc);
      chk(cyc == 2 + 14 + 1, $sformatf("write cycle %0d clocks", cyc));
    end
    for (int r = 0; r < 16; r++) begin br(6'(r), d); chk(d == 16'(r * 7 + 16'h1000), "register readback"); end
    for (int k = 0; k < 8; k++) bw(6'h10, 16'(16'hBEE0 + k), cyc);
    low = 0;
    for (int k = 0; k < 8; k++) begin br(6'h10, d); chk(d == 16'(16'hBEE0 + k), "data port FIFO order"); end
    chk(low == 8 * 14, $sformatf("strobe stretched by IOCHRDY: %0d", low));
    chk(waits > 0, "wait states happened");
    br(6'h20, d); chk(d[0] == 0 && !eth_irq, "irq low");
    irq = 1; br(6'h20, d); chk(d[0] == 1 && eth_irq, "irq high");
    bw(6'h21, 16'd1, cyc); chk(isa_reset, "chip reset asserted");
    bw(6'h21, 16'd0, cyc); chk(!isa_reset, "chip reset released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
