// tb_anchor_filter: self-checking test of the anchor filter at its default
// size (300-nt query, 11-nt anchors).
// A random bank is generated with copies of query segments planted in it; the
// expected anchor reports are computed by brute force (an anchor ends at bank
// position p and query position i when the W-long windows ending there are equal
// and the match does not extend one base further back). The bank is fed with
// random gaps while a reader drains the result FIFO with random delays, so the
// FIFO fills and back-pressure is exercised. It also checks the 1 byte/cycle
// rate, the pause bit, register reads and the soft reset.
module tb_anchor_filter;
  import rdisk_pkg::*;

  localparam int QLEN = 300;
  localparam int W    = 11;
  localparam int NB   = 600;           // bank bytes

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid; logic [7:0] in_data; logic in_ready;
  bus_req_t creq, oreq; bus_rsp_t crsp, orsp;
  logic hit_irq;

  anchor_filter dut (.clk, .rst_n, .in_valid, .in_data, .in_ready,
    .ctrl_req(creq), .ctrl_rsp(crsp), .out_req(oreq), .out_rsp(orsp), .hit_irq);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] qry [QLEN];
  logic [1:0] bank [NB*4];

  typedef struct { int pos; bit multi; int qpos; } rec_t;
  rec_t expq[$];

  task automatic cwr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); creq = '{valid:1, we:1, addr:25'(a), wdata:d};
    @(negedge clk); creq = '0;
  endtask
  task automatic crd(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk); creq = '{valid:1, we:0, addr:25'(a), wdata:0};
    #1 d = crsp.rdata;
    @(negedge clk); creq = '0;
  endtask
  task automatic ord(input logic [1:0] a, output logic [15:0] d);
    oreq = '{valid:1, we:0, addr:25'(a), wdata:0};
    #1 d = orsp.rdata;
    @(negedge clk); oreq = '0;
  endtask

  function automatic bit anchor_at(int p, int i);
    if (p < W-1 || i < W-1) return 0;
    for (int k = 0; k < W; k++) if (bank[p-k] != qry[i-k]) return 0;
    if (p >= W && i >= W && bank[p-W] == qry[i-W]) return 0;
    return 1;
  endfunction

  // expected record for bank byte b
  task automatic expect_byte(int b);
    int n = 0; rec_t r; bit got = 0;
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < QLEN; i++)
        if (anchor_at(4*b+k, i)) begin
          n++;
          if (!got) begin got = 1; r.pos = 4*b+k; r.qpos = i; end
        end
    if (got) begin r.multi = (n > 1); expq.push_back(r); end
  endtask

  int nrec = 0, stalls = 0;
  bit feeding, paused = 0;
  logic [15:0] d, lo, hi, qp;

  initial begin
    in_valid = 0; in_data = 0; creq = '0; oreq = '0;
    for (int i = 0; i < QLEN; i++) qry[i] = 2'($urandom);
    for (int p = 0; p < NB*4; p++) bank[p] = 2'($urandom);
    // plant query segments of length W-1 .. W+6
    for (int s = 0; s < 80; s++) begin
      int len, qs, bs;
      len = W - 1 + $urandom_range(0, 7);
      qs  = $urandom_range(0, QLEN - len);
      bs  = $urandom_range(0, NB*4 - len);
      for (int k = 0; k < len; k++) bank[bs+k] = qry[qs+k];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load query
    for (int w = 0; w < (QLEN+7)/8; w++) begin
      logic [15:0] v = 0;
      for (int j = 0; j < 8; j++) if (w*8+j < QLEN) v[2*j +: 2] = qry[w*8+j];
      cwr(8'h80 + 8'(w), v);
    end
    crd(8'h83, d); chk(d[1:0] == qry[24] && d[15:14] == qry[31], "query readback");
    crd(8'h06, d); chk(d == W, "W register");
    crd(8'h07, d); chk(d == QLEN, "QLEN register");
    // paused: no byte accepted
    @(negedge clk); in_valid = 1; in_data = 8'h00;
    repeat (3) @(negedge clk);
    chk(!in_ready, "paused filter holds off data");
    in_valid = 0;
    cwr(8'h00, 16'h0002);     // run
    for (int b = 0; b < NB; b++) expect_byte(b);
    $display("expected records: %0d", expq.size());
    chk(expq.size() > 10, "enough planted anchors");
    feeding = 1;
    fork
      begin
        for (int b = 0; b < NB; b++) begin
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1;
          for (int k = 0; k < 4; k++) in_data[2*k +: 2] = bank[4*b+k];
          @(posedge clk);
          while (!in_ready) begin stalls++; @(posedge clk); end
          @(negedge clk); in_valid = 0;
        end
        feeding = 0;
      end
      begin
        while (feeding || hit_irq) begin
          @(negedge clk);
          if (nrec == 3 && !paused) begin paused = 1; repeat (600) @(negedge clk); end  // let the FIFO fill up
          if (hit_irq && $urandom_range(0, 2) == 0) begin
            rec_t e;
            oreq = '{valid:1, we:0, addr:25'd0, wdata:0}; #1 lo = orsp.rdata;
            oreq.addr = 25'd1; #1 hi = orsp.rdata;
            oreq.addr = 25'd2; #1 qp = orsp.rdata;
            @(negedge clk); oreq = '0;
            if (expq.size() == 0) chk(0, "unexpected record");
            else begin
              e = expq.pop_front();
              chk({hi, lo} == 32'(e.pos) && qp[14:0] == 15'(e.qpos) && qp[15] == e.multi,
                  $sformatf("record %0d: got pos %0d q %0d m %0d exp pos %0d q %0d m %0d",
                            nrec, {hi, lo}, qp[14:0], qp[15], e.pos, e.qpos, e.multi));
            end
            nrec++;
          end
        end
      end
    join
    chk(expq.size() == 0, "all expected records read");
    chk(stalls > 0, "FIFO-full back-pressure occurred");
    $display("records %0d, stall cycles %0d", nrec, stalls);
    crd(8'h02, lo); crd(8'h03, hi); chk({hi, lo} == NB*4, "bank position counter");
    crd(8'h04, lo); chk(lo == nrec, "hit counter");
    ord(2'd2, d); chk(d == 16'hFFFF, "empty FIFO read");
    // rate: 64 bytes with no hits at one byte per clock
    // query of all A against a bank of all T: no anchors
    for (int w = 0; w < (QLEN+7)/8; w++) cwr(8'h80 + 8'(w), 16'h0000);
    cwr(8'h00, 16'h0003);     // soft reset, keep running
    begin
      @(negedge clk); in_valid = 1; in_data = 8'hFF;
      repeat (64) @(negedge clk);
      in_valid = 0;
      crd(8'h02, lo);
      chk(lo == 4*64, $sformatf("1 byte/cycle rate: %0d nt in 64 cycles", lo));
      crd(8'h04, lo); chk(lo == 0, "no hits on unmatched data");
    end
    cwr(8'h00, 16'h0001);
    crd(8'h02, lo); chk(lo == 0, "soft reset clears position");
    crd(8'h00, d); chk(d[1] == 0 && d[4] == 0, "stopped and empty after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
