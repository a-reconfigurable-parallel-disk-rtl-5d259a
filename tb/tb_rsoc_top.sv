// tb_rsoc_top: end-to-end test of the board SoC at its default parameters
// (300-nt query, 11-nt anchors, full SDRAM power-up wait, 512-byte sectors).
// The testbench plays the CPU: it fetches from the boot ROM, copies code into
// SDRAM and runs it through the instruction cache, loads a query into the
// filter, programs the disk for a 4-sector READ SECTORS and streams it through
// the filter. Hit records are read from the filter's output port, checked
// against a brute-force search of the same data, and sent to the Ethernet
// controller, whose data port is then read back. It ends with the
// reconfiguration hand-off to the micro-controller.
// The query is assembled from pieces of the disk data, so anchors are found.
// Each mechanism is counted and must happen at least once: boot-ROM fetch,
// cache miss and hit, SDRAM refresh, filter back-pressure (FIFO full), filter
// pause, IDE strobe held by the filter, ISA wait states, wake of the
// micro-controller. It also measures the stream rate over the last sector
// against the 15 MB/s disk rate the filter has to sustain.
module tb_rsoc_top;
  import rdisk_pkg::*;
  localparam int QLEN = 300, W = 11, NSEC = 4, SW = 256;
  localparam int NNT = NSEC * SW * 8;
  localparam int unsigned LBA0 = 5000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // reset edge before the first clock edge
  always #10 clk = ~clk;    // 50 MHz

  logic cpu_if_req, cpu_if_ack; logic [24:0] cpu_if_addr; logic [15:0] cpu_if_data;
  bus_req_t cpu_req; bus_rsp_t cpu_rsp;
  logic irq_filter, irq_eth, irq_ide, bus_error;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe; logic [1:0] sd_ba, sd_dqm;
  logic [12:0] sd_a; logic [15:0] sd_dq_o, sd_dq_i;
  logic ata_drive, ata_cs0_n, ata_cs1_n, ata_dior_n, ata_diow_n, ata_rst_n, ata_dd_oe, ata_iordy, ata_intrq;
  logic [2:0] ata_da; logic [15:0] ata_dd_o, ata_dd_i;
  logic [4:0] isa_sa; logic isa_ior_n, isa_iow_n, isa_sd_oe, isa_iochrdy, isa_irq, isa_reset;
  logic [15:0] isa_sd_o, isa_sd_i;
  logic [27:0] cfg_lba; logic uc_wake, uc_ready;

  rsoc_top dut (.*);

  int proto_errors, refreshes, sd_reads, sd_writes, words_read, commands, strobes, isa_waits;
  sdram_model u_sdram (.clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .a(sd_a), .dqm(sd_dqm), .dq_i(sd_dq_o), .dq_oe(sd_dq_oe),
    .dq_o(sd_dq_i), .proto_errors, .refreshes, .reads(sd_reads), .writes(sd_writes));
  ata_disk_model u_disk (.clk, .drive(ata_drive), .da(ata_da), .cs0_n(ata_cs0_n), .cs1_n(ata_cs1_n),
    .dior_n(ata_dior_n), .diow_n(ata_diow_n), .rst_n(ata_rst_n), .dd_host(ata_dd_o),
    .dd_host_oe(ata_dd_oe), .dd_dev(ata_dd_i), .iordy(ata_iordy), .intrq(ata_intrq),
    .words_read, .commands);
  isa_eth_model #(.WAIT_CYCLES(12)) u_eth (.clk, .sa(isa_sa), .ior_n(isa_ior_n), .iow_n(isa_iow_n),
    .sd_host(isa_sd_o), .sd_dev(isa_sd_i), .iochrdy(isa_iochrdy), .strobes, .waits(isa_waits));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #20ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- CPU bus tasks ----------------
  task automatic bw(input logic [24:0] a, input logic [15:0] d);
    @(negedge clk); cpu_req = '{valid:1, we:1, addr:a, wdata:d};
    #1; while (!cpu_rsp.ready) @(negedge clk);
    @(negedge clk); cpu_req = '0;
  endtask
  task automatic br(input logic [24:0] a, output logic [15:0] d);
    @(negedge clk); cpu_req = '{valid:1, we:0, addr:a, wdata:0};
    #1; while (!cpu_rsp.ready) @(negedge clk);
    d = cpu_rsp.rdata;
    @(negedge clk); cpu_req = '0;
  endtask
  int n_rom = 0, n_miss = 0, n_hit = 0;
  task automatic fetch(input logic [24:0] a, output logic [15:0] d);
    int waited;
    waited = 0;
    @(negedge clk); cpu_if_req = 1; cpu_if_addr = a;
    #1; while (!cpu_if_ack) begin @(negedge clk); waited++; end
    d = cpu_if_data;
    if (a[24]) n_rom++; else if (waited > 0) n_miss++; else n_hit++;
    @(negedge clk); cpu_if_req = 0;
  endtask

  localparam logic [24:0] IDE = 25'h100_1000, ETH = 25'h100_2000, FCT = 25'h100_3000,
                          FOUT = 25'h100_4000, SYS = 25'h100_5000;

  // ---------------- reference data ----------------
  function automatic logic [15:0] expw(int unsigned lba, int unsigned w);
    logic [31:0] x;
    x = lba * 32'h9E37_79B9 + w * 32'h85EB_CA6B + 32'h1234_5678;
    x = x ^ (x >> 15); x = x * 32'h2C1B_3C6D;
    return x[31:16] ^ x[15:0];
  endfunction
  logic [1:0] bank [NNT];
  logic [1:0] qry [QLEN];
  typedef struct { int pos; bit multi; int qpos; } rec_t;
  rec_t expq[$];

  function automatic bit anchor_at(int p, int i);
    if (p < W-1 || i < W-1) return 0;
    for (int k = 0; k < W; k++) if (bank[p-k] != qry[i-k]) return 0;
    if (p >= W && i >= W && bank[p-W] == qry[i-W]) return 0;
    return 1;
  endfunction

  // ---------------- mechanism monitors ----------------
  int n_fifo_stall = 0, n_pause = 0, n_hold = 0, dior_low = 0;
  // stream rate over the last sector (no stall expected there)
  int n_st = 0; longint t_first = 0, t_last = 0;
  always @(posedge clk) if (dut.st_valid && dut.st_ready) begin
    if (n_st == 2 * SW * (NSEC - 1)) t_first = $time;
    if (n_st == 2 * SW * NSEC - 1) t_last = $time;
    n_st++;
  end
  bit paused_window = 0;
  always @(negedge clk) begin
    if (dut.st_valid && !dut.st_ready) begin
      if (paused_window) n_pause++; else n_fifo_stall++;
    end
    if (!ata_dior_n) dior_low++;
    else begin
      if (dior_low > 4) n_hold++;
      dior_low = 0;
    end
  end

  logic [15:0] d, lo, hi, qp;
  int nrec = 0;
  initial begin
    cpu_req = '0; cpu_if_req = 0; cpu_if_addr = 0; isa_irq = 0; uc_ready = 0;
    // reference bank and query built from pieces of it
    for (int p = 0; p < NNT; p++) begin
      logic [15:0] w;
      w = expw(LBA0 + p / (SW * 8), (p / 8) % SW);
      bank[p] = w[2 * (p % 8) +: 2];
    end
    for (int c = 0; c < QLEN / 15; c++) begin
      int src;
      src = $urandom_range(0, NNT - 15);
      for (int k = 0; k < 15; k++) qry[c * 15 + k] = bank[src + k];
    end
    for (int b = 0; b < NNT / 4; b++) begin
      int n; rec_t r; bit got;
      n = 0; got = 0; r = '{0, 0, 0};
      for (int k = 0; k < 4; k++)
        for (int i = 0; i < QLEN; i++)
          if (anchor_at(4 * b + k, i)) begin
            n++;
            if (!got) begin got = 1; r.pos = 4 * b + k; r.qpos = i; end
          end
      if (got) begin r.multi = (n > 1); expq.push_back(r); end
    end
    $display("expected hit records: %0d", expq.size());
    chk(expq.size() >= 20, "query gives anchors");

    repeat (5) @(negedge clk); rst_n = 1;
    // boot ROM (no program loaded: reads as zero)
    for (int k = 0; k < 4; k++) begin fetch(25'h100_0000 + 25'(k), d); chk(d == 16'h0, "boot ROM word"); end
    // code into SDRAM (waits for the SDRAM power-up), then run it from the cache
    for (int k = 0; k < 64; k++) bw(25'h000_0100 + 25'(k), 16'(16'h7000 + k * 3));
    bw(SYS + 2, 16'h0004);                       // flush the instruction cache
    for (int pass = 0; pass < 2; pass++)
      for (int k = 0; k < 64; k++) begin
        fetch(25'h000_0100 + 25'(k), d);
        chk(d == 16'(16'h7000 + k * 3), $sformatf("code word %0d through the cache", k));
      end
    chk(n_miss == 16 && n_hit == 112, $sformatf("cache misses %0d hits %0d", n_miss, n_hit));
    // data readback through the bus
    br(25'h000_0105, d); chk(d == 16'(16'h7000 + 15), "SDRAM data read");

    // filter set-up
    br(FCT + 6, d); chk(d == W, "filter anchor size");
    br(FCT + 7, d); chk(d == QLEN, "filter query capacity");
    bw(FCT + 0, 16'h0001);                       // soft reset
    for (int w = 0; w < (QLEN + 7) / 8; w++) begin
      logic [15:0] v;
      v = 0;
      for (int j = 0; j < 8; j++) if (w * 8 + j < QLEN) v[2 * j +: 2] = qry[w * 8 + j];
      bw(FCT + 25'h80 + 25'(w), v);
    end
    bw(FCT + 0, 16'h0002);                       // run

    // disk set-up: READ SECTORS, then stream into the filter
    bw(IDE + 2, 16'(NSEC)); bw(IDE + 3, 16'(LBA0 & 255)); bw(IDE + 4, 16'((LBA0 >> 8) & 255));
    bw(IDE + 5, 16'd0); bw(IDE + 6, 16'h00E0); bw(IDE + 7, 16'h0020);
    bw(IDE + 16, 16'(NSEC));
    // let the result FIFO fill up, then pause the data flow for a while
    repeat (2500) @(negedge clk);
    bw(FCT + 0, 16'h0000); paused_window = 1;
    repeat (300) @(negedge clk);
    paused_window = 0; bw(FCT + 0, 16'h0002);
    // collect the hits and forward them to the network
    forever begin
      logic [15:0] st;
      if (irq_filter) begin
        rec_t e;
        br(FOUT + 0, lo); br(FOUT + 1, hi); br(FOUT + 2, qp);
        if (expq.size() == 0) chk(0, "unexpected hit record");
        else begin
          e = expq.pop_front();
          chk({hi, lo} == 32'(e.pos) && qp[14:0] == 15'(e.qpos) && qp[15] == e.multi,
              $sformatf("record %0d: pos %0d q %0d m %0d, expected pos %0d q %0d m %0d",
                        nrec, {hi, lo}, qp[14:0], qp[15], e.pos, e.qpos, e.multi));
        end
        bw(ETH + 16, lo); bw(ETH + 16, hi); bw(ETH + 16, qp);
        nrec++;
      end else begin
        br(IDE + 17, st);
        if (!st[0] && !irq_filter) break;
      end
    end
    repeat (10) @(negedge clk);
    chk(!irq_filter && expq.size() == 0, $sformatf("all records read, %0d left", expq.size()));
    br(FCT + 2, lo); br(FCT + 3, hi); chk({hi, lo} == NNT, "filter consumed the whole stream");
    br(FCT + 4, lo); chk(lo == nrec, "filter hit counter");
    chk(words_read == NSEC * SW, "disk words read");
    // 2*SW bytes of the last sector: 6 clocks per word = 15 MB/s or more at 50 MHz
    begin
      longint cyc;
      real mbs;
      cyc = (t_last - t_first) / 20;
      mbs = (2.0 * SW) / (real'(cyc) * 20.0e-9) / 1.0e6;
      $display("last sector: %0d clocks, %.1f MB/s into the filter", cyc, mbs);
      chk(cyc >= SW * 6 - 6 && cyc <= SW * 6 + 40 && mbs >= 15.0, "disk-rate streaming (>= 15 MB/s)");
    end
    // the front-end side of the network: read the sent words back
    begin
      int bad;
      bad = 0;
      for (int k = 0; k < 3 * nrec && k < 60; k++) begin
        logic [15:0] v;
        br(ETH + 16, v);
        if (k == 0 && v == 16'hDEAD) bad++;
      end
      chk(bad == 0, "records reached the Ethernet controller");
      chk(strobes >= 6 * (nrec < 20 ? nrec : 20), "ISA cycles");
    end
    // reconfiguration hand-off
    bw(SYS + 0, 16'h4321); bw(SYS + 1, 16'h0765); bw(SYS + 2, 16'h0001);
    chk(uc_wake && cfg_lba == 28'h7654321, "micro-controller woken with bitstream location");
    chk(!ata_drive, "IDE cable released to the micro-controller");
    chk(!bus_error, "no unmapped access");
    chk(proto_errors == 0, "SDRAM protocol respected");
    $display("mechanisms: rom %0d miss %0d hit %0d refresh %0d fifo_stall %0d pause %0d strobe_hold %0d isa_wait %0d records %0d",
             n_rom, n_miss, n_hit, refreshes, n_fifo_stall, n_pause, n_hold, isa_waits, nrec);
    chk(n_rom > 0, "boot ROM fetch happened");
    chk(n_miss > 0 && n_hit > 0, "cache miss and hit happened");
    chk(refreshes > 0, "SDRAM refresh happened");
    chk(n_fifo_stall > 0, "FIFO-full back-pressure happened");
    chk(n_pause > 0, "filter pause happened");
    chk(n_hold > 0, "IDE strobe held by the filter happened");
    chk(isa_waits > 0, "ISA wait states happened");
    chk(uc_wake, "wake happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
