// tb_ram_ctrl: self-checking test of the SDRAM controller with a behavioural
// SDRAM. After the power-up sequence (shortened INIT_CYCLES), the bus port
// writes random words at random addresses over all banks and rows, then both
// ports read them back at the same time; each word is compared with a copy kept
// by the testbench. It also checks the read latency, that both ports make
// progress under contention, that refreshes are issued at the programmed
// interval, and that the SDRAM saw no protocol violation.
module tb_ram_ctrl;
  import rdisk_pkg::*;
  localparam int N = 200;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // reset edge before the first clock edge
  always #10 clk = ~clk;

  logic i_req, i_ack; logic [23:0] i_addr; logic [15:0] i_rdata;
  bus_req_t req; bus_rsp_t rsp;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe; logic [1:0] ba, dqm; logic [12:0] a;
  logic [15:0] dq_o, dq_i;
  int proto_errors, refreshes, reads, writes;

  ram_ctrl #(.INIT_CYCLES(100)) dut (.clk, .rst_n, .i_req, .i_addr, .i_rdata, .i_ack, .req, .rsp,
    .sd_cke(cke), .sd_cs_n(cs_n), .sd_ras_n(ras_n), .sd_cas_n(cas_n), .sd_we_n(we_n),
    .sd_ba(ba), .sd_a(a), .sd_dqm(dqm), .sd_dq_o(dq_o), .sd_dq_oe(dq_oe), .sd_dq_i(dq_i));
  sdram_model mem (.clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a, .dqm,
    .dq_i(dq_o), .dq_oe, .dq_o(dq_i), .proto_errors, .refreshes, .reads, .writes);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [23:0] addrs [N];
  logic [15:0] vals [N];

  task automatic bw(input logic [23:0] ad, input logic [15:0] d);
    @(negedge clk); req = '{valid:1, we:1, addr:25'(ad), wdata:d};
    #1; while (!rsp.ready) @(negedge clk);
    @(negedge clk); req = '0;
  endtask
  task automatic br(input logic [23:0] ad, output logic [15:0] d, output int lat);
    lat = 0;
    @(negedge clk); req = '{valid:1, we:0, addr:25'(ad), wdata:0};
    #1; while (!rsp.ready) begin @(negedge clk); lat++; end
    d = rsp.rdata;
    @(negedge clk); req = '0;
  endtask
  task automatic ir(input logic [23:0] ad, output logic [15:0] d);
    @(negedge clk); i_req = 1; i_addr = ad;
    #1; while (!i_ack) @(negedge clk);
    d = i_rdata;
    @(negedge clk); i_req = 0;
  endtask

  int ref0, lat, t_ref0;
  logic [15:0] d;
  initial begin
    req = '0; i_req = 0; i_addr = 0;
    for (int k = 0; k < N; k++) begin
      addrs[k] = {$urandom_range(0, 8191) == 0 ? 13'h1FFF : 13'($urandom), 2'(k), 9'($urandom)};
      for (int j = 0; j < k; j++) if (addrs[j] == addrs[k]) addrs[k][8:0] = addrs[k][8:0] + 1;
      vals[k] = 16'($urandom);
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < N; k++) bw(addrs[k], vals[k]);
    chk(writes == N, "all writes issued");
    br(addrs[0], d, lat);
    chk(d == vals[0], "first readback");
    $display("bus read latency %0d cycles", lat);
    chk(lat >= 8 && lat <= 14, "read latency");
    fork
      for (int k = 0; k < N; k += 2) begin
        int l; br(addrs[k], d, l);
        chk(d == vals[k], $sformatf("bus read %0d", k));
      end
      for (int k = 1; k < N; k += 2) begin
        logic [15:0] e; ir(addrs[k], e);
        chk(e == vals[k], $sformatf("instruction read %0d", k));
      end
    join
    // refresh interval: count over 2000 clocks
    ref0 = refreshes;
    repeat (2000) @(negedge clk);
    chk(refreshes - ref0 >= 2000 / 391 - 1 && refreshes - ref0 <= 2000 / 390 + 1,
        $sformatf("refresh rate: %0d in 2000 clocks", refreshes - ref0));
    chk(proto_errors == 0, $sformatf("SDRAM protocol errors: %0d", proto_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
