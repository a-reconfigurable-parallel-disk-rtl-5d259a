// tb_icache: self-checking test of the instruction cache. A memory model
// answers line refills after a random delay with data = f(address). Random
// fetches over a small footprint (so lines are reused and evicted) are compared
// with f(address), and the number of misses is compared with a reference
// direct-mapped tag model kept by the testbench. Checks that a hit is answered
// in the fetch's own clock, that a refill reads exactly one line, and that
// flush forces misses.
module tb_icache;
  localparam int AW = 24, LINES = 128, LW = 4;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  logic flush, f_req, f_ack, m_req, m_ack;
  logic [AW-1:0] f_addr, m_addr; logic [15:0] f_data, m_rdata;

  icache dut (.clk, .rst_n, .flush, .f_req, .f_addr, .f_data, .f_ack, .m_req, .m_addr, .m_rdata, .m_ack);

  function automatic logic [15:0] f(logic [AW-1:0] a);
    return a[15:0] ^ {a[23:16], a[23:16]} ^ 16'hA5C3;
  endfunction

  int mem_reads = 0;
  // memory: ack after 2..6 clocks
  initial begin
    m_ack = 0; m_rdata = 0;
    forever begin
      @(negedge clk);
      m_ack = 0;
      if (m_req) begin
        repeat ($urandom_range(1, 5)) @(negedge clk);
        m_rdata = f(m_addr); m_ack = 1; mem_reads++;
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #4000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic        rv [LINES];
  logic [AW-1:0] rt [LINES];
  int exp_miss = 0, got_miss = 0;

  task automatic fetch(input logic [AW-1:0] a);
    int idx; logic [AW-1:0] lt; int waited = 0; int r0;
    idx = int'(a[8:2]); lt = a >> 9;
    if (!(rv[idx] && rt[idx] == lt)) begin exp_miss++; rv[idx] = 1; rt[idx] = lt; end
    r0 = mem_reads;
    @(negedge clk); f_req = 1; f_addr = a;
    #1; while (!f_ack) begin @(negedge clk); waited++; end
    chk(f_data == f(a), $sformatf("fetch %h data %h", a, f_data));
    if (waited > 0) begin
      got_miss++;
      chk(mem_reads - r0 == LW, "refill reads one line");
    end
    @(negedge clk); f_req = 0;
  endtask

  initial begin
    flush = 0; f_req = 0; f_addr = 0;
    for (int i = 0; i < LINES; i++) rv[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      // footprint of 2 KB in two regions that alias in the cache
      logic [AW-1:0] a;
      a = {($urandom_range(0, 1) ? 15'h0012 : 15'h0345), 9'($urandom_range(0, 511))};
      fetch(a);
    end
    chk(got_miss == exp_miss, $sformatf("misses %0d expected %0d", got_miss, exp_miss));
    // sequential run: one miss per line
    got_miss = 0; exp_miss = 0;
    for (int w = 0; w < 64; w++) fetch(24'h40_0000 + 24'(w));
    chk(got_miss == 16 && exp_miss == 16, "sequential code: one miss per 4 words");
    // hit in the same clock
    @(negedge clk); f_req = 1; f_addr = 24'h40_0005; #1;
    chk(f_ack && f_data == f(24'h40_0005), "hit answered in the same clock");
    @(negedge clk); f_req = 0;
    // flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int i = 0; i < LINES; i++) rv[i] = 0;
    got_miss = 0; exp_miss = 0;
    fetch(24'h40_0005);
    chk(got_miss == 1, "flush invalidates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
