// tb_sys_bus: self-checking test of the system-bus decoder. Each slave is a
// register model that answers after a slave-specific delay with a tag of its
// own; random accesses over the whole map check that exactly the decoded slave
// sees the request, that its answer reaches the master, that unmapped
// addresses complete at once reading zero and set the sticky error flag.
module tb_sys_bus;
  import rdisk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  bus_req_t m_req; bus_rsp_t m_rsp;
  bus_req_t s_req [NSLAVES]; bus_rsp_t s_rsp [NSLAVES];
  logic bus_error;
  sys_bus dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp, .bus_error);

  int seen [NSLAVES];
  for (genvar s = 0; s < NSLAVES; s++) begin : g_sl
    int cnt = 0;
    always @(posedge clk) begin
      if (s_req[s].valid) begin
        if (cnt == s) cnt <= 0; else cnt <= cnt + 1;
      end else cnt <= 0;
    end
    always_comb begin
      s_rsp[s].ready = s_req[s].valid && (cnt == s);
      s_rsp[s].rdata = 16'(s * 16'h1111) ^ s_req[s].addr[15:0];
    end
    always @(posedge clk) if (s_rsp[s].ready) seen[s]++;
  end

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
    int exp_seen [NSLAVES];
    for (int s = 0; s < NSLAVES; s++) begin seen[s] = 0; exp_seen[s] = 0; end
    m_req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [24:0] a; int s; int lat; logic [15:0] d;
      lat = 0;
      a = 25'($urandom);
      if ($urandom_range(0, 1)) a[24] = 0; else a[24] = 1;
      if (a[24]) a[15:12] = 4'($urandom_range(1, 5));
      s = a[24] ? int'(a[15:12]) : 0;
      exp_seen[s]++;
      @(negedge clk); m_req = '{valid:1, we:1'($urandom), addr:a, wdata:16'($urandom)};
      #1;
      for (int k = 0; k < NSLAVES; k++) chk(s_req[k].valid == (k == s), "only the decoded slave is selected");
      while (!m_rsp.ready) begin @(negedge clk); lat++; end
      d = m_rsp.rdata;
      chk(d == (16'(s * 16'h1111) ^ a[15:0]) && lat == s, $sformatf("access to slave %0d: lat %0d d %h", s, lat, d));
      @(negedge clk); m_req = '0;
    end
    for (int s = 0; s < NSLAVES; s++) chk(seen[s] == exp_seen[s], "slave access count");
    chk(!bus_error, "no error on mapped accesses");
    @(negedge clk); m_req = '{valid:1, we:0, addr:25'h100_7000, wdata:0};
    #1 chk(m_rsp.ready && m_rsp.rdata == 0, "unmapped access completes at once");
    @(negedge clk); m_req = '0;
    chk(bus_error, "bus error flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
