// isa_eth_model: behavioural model of the ISA side of an NE2000-compatible
// Ethernet controller, for simulation only. It holds 32 16-bit I/O registers
// written on the rising edge of IOW- and read while IOR- is low, and it can pull
// IOCHRDY low for a few clocks at the start of each strobe (WAIT_CYCLES).
// Register 0x10 (the data port) is a FIFO of words: writes append, reads pop.
// The counts of strobes and of wait clocks are outputs for the testbench.
module isa_eth_model #(
  parameter int unsigned WAIT_CYCLES = 3
) (
  input  logic        clk,
  input  logic [4:0]  sa,
  input  logic        ior_n,
  input  logic        iow_n,
  input  logic [15:0] sd_host,
  output logic [15:0] sd_dev,
  output logic        iochrdy,
  output int          strobes,
  output int          waits
);
  logic [15:0] regs [32];
  logic [15:0] fifo [$];
  logic        ior_q = 1, iow_q = 1;
  int          wcnt = 0;
  initial begin
    for (int i = 0; i < 32; i++) regs[i] = 16'(i * 16'h0101);
    strobes = 0; waits = 0;
  end
  assign iochrdy = (wcnt == 0) || (ior_n && iow_n);
  always_comb sd_dev = (sa == 5'h10) ? ((fifo.size() > 0) ? fifo[0] : 16'hDEAD) : regs[sa];
  always @(posedge clk) begin
    ior_q <= ior_n; iow_q <= iow_n;
    if ((ior_q && !ior_n) || (iow_q && !iow_n)) begin wcnt <= WAIT_CYCLES; strobes <= strobes + 1; end
    else if (wcnt != 0) begin wcnt <= wcnt - 1; waits <= waits + 1; end
    if (!iow_q && iow_n) begin
      if (sa == 5'h10) fifo.push_back(sd_host); else regs[sa] <= sd_host;
    end
    if (!ior_q && ior_n && sa == 5'h10 && fifo.size() > 0) void'(fifo.pop_front());
  end
endmodule
