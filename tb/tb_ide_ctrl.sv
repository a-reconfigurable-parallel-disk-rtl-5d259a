// tb_ide_ctrl: self-checking test of the IDE controller against a behavioural
// ATA disk. The CPU side writes the task file (LBA, sector count, READ SECTORS)
// through the bus, then starts a 3-sector stream. The stream sink compares each
// byte with the disk's generated data (low byte first), stalls at random to
// exercise the held strobe, and the test checks the PIO rate without stalls
// (one word per T_ACT + T_REC clocks), the local registers, an aborted command
// (ERR) and the bus release to the micro-controller.
module tb_ide_ctrl;
  import rdisk_pkg::*;
  localparam int SW = 256;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  bus_req_t req; bus_rsp_t rsp;
  logic release_i;
  logic drive, cs0_n, cs1_n, dior_n, diow_n, arst_n, dd_oe, iordy, intrq;
  logic [2:0] da; logic [15:0] dd_o, dd_i;
  logic st_valid, st_ready; logic [7:0] st_data;
  int words_read, commands;

  ide_ctrl dut (.clk, .rst_n, .req, .rsp, .release_i, .ata_drive(drive), .ata_da(da),
    .ata_cs0_n(cs0_n), .ata_cs1_n(cs1_n), .ata_dior_n(dior_n), .ata_diow_n(diow_n),
    .ata_rst_n(arst_n), .ata_dd_o(dd_o), .ata_dd_oe(dd_oe), .ata_dd_i(dd_i),
    .ata_iordy(iordy), .ata_intrq(intrq), .st_valid, .st_data, .st_ready);
  ata_disk_model #(.SECTOR_WORDS(SW)) disk (.clk, .drive, .da, .cs0_n, .cs1_n, .dior_n, .diow_n,
    .rst_n(arst_n), .dd_host(dd_o), .dd_host_oe(dd_oe), .dd_dev(dd_i), .iordy, .intrq,
    .words_read, .commands);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #4000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // same generator as the disk, written out again for the check
  function automatic logic [15:0] expw(int unsigned lba, int unsigned w);
    logic [31:0] x;
    x = lba * 32'h9E37_79B9 + w * 32'h85EB_CA6B + 32'h1234_5678;
    x = x ^ (x >> 15); x = x * 32'h2C1B_3C6D;
    return x[31:16] ^ x[15:0];
  endfunction

  task automatic bw(input logic [4:0] a, input logic [15:0] d);
    @(negedge clk); req = '{valid:1, we:1, addr:25'(a), wdata:d};
    #1; while (!rsp.ready) @(negedge clk);
    @(negedge clk); req = '0;
  endtask
  task automatic br(input logic [4:0] a, output logic [15:0] d);
    @(negedge clk); req = '{valid:1, we:0, addr:25'(a), wdata:0};
    #1; while (!rsp.ready) @(negedge clk);
    d = rsp.rdata;
    @(negedge clk); req = '0;
  endtask

  int nbytes = 0, stall_mode = 1, first_t = 0, last_t = 0, sinkerr = 0;
  int unsigned base_lba = 1000;
  always @(posedge clk) if (st_valid && st_ready) begin
    int wi; logic [15:0] w;
    wi = nbytes / 2;
    w  = expw(base_lba + wi / SW, wi % SW);
    if (st_data != ((nbytes % 2 == 0) ? w[7:0] : w[15:8])) sinkerr++;
    if (nbytes == 2*SW) first_t = $time;     // start of sector 2 (index 1)
    if (nbytes == 4*SW - 1) last_t = $time;
    nbytes++;
  end
  always @(negedge clk) st_ready <= (stall_mode != 0) ? ($urandom_range(0, 4) != 0) : 1'b1;

  logic [15:0] d;
  initial begin
    req = '0; release_i = 0; st_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    br(5'h07, d); chk(d[7:0] == 8'h50, "drive status ready");
    bw(5'h02, 16'd3); bw(5'h03, 16'(base_lba & 8'hFF)); bw(5'h04, 16'(base_lba >> 8));
    bw(5'h05, 16'd0); bw(5'h06, 16'h00E0);
    br(5'h03, d); chk(d[7:0] == 8'(base_lba), "LBA register readback");
    bw(5'h07, 16'h0020);                   // READ SECTORS
    repeat (3) @(negedge clk);
    chk(commands == 1, "command reached the drive");
    bw(5'h10, 16'd3);                      // stream 3 sectors
    br(5'h11, d); chk(d[0] == 1, "streaming flag");
    // sector 0 with random sink stalls, then full speed
    wait (nbytes >= 2*SW); stall_mode = 0;
    wait (nbytes == 6*SW);
    repeat (20) @(negedge clk);
    chk(sinkerr == 0, $sformatf("stream data errors: %0d", sinkerr));
    chk(words_read == 3*SW, "word count");
    br(5'h11, d); chk(d[0] == 0 && d[3] == 0, "stream finished without error");
    br(5'h10, d); chk(d == 0, "no sectors left");
    // sector 1 ran at full speed: 2*SW-1 bytes after its first byte = SW words
    $display("sector time %0d cycles", (last_t - first_t) / 20);
    chk((last_t - first_t) / 20 <= SW * 6 + 60 && (last_t - first_t) / 20 >= SW * 6 - 6,
        "PIO rate: 6 clocks per word at full speed");
    // unknown command: ERR stops a stream
    bw(5'h07, 16'h00EE);
    bw(5'h10, 16'd1);
    repeat (40) @(negedge clk);
    br(5'h11, d); chk(d[3] == 1 && d[0] == 0, "ERR ends stream");
    // device control via CS1
    br(5'h0E, d); chk(d[0] == 1, "alt status via CS1");
    // hand the cable to the micro-controller
    release_i = 1; @(negedge clk);
    chk(!drive && dior_n && diow_n, "bus released");
    br(5'h11, d); chk(d[2] == 1, "release visible in status");
    release_i = 0;
    bw(5'h12, 16'd1); @(negedge clk); chk(!arst_n, "drive reset line");
    bw(5'h12, 16'd0); chk(arst_n, "reset released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
