// ata_disk_model: behavioural model of an ATA disk drive for simulation only.
// It implements the command-block registers (sector count, LBA 0-27, device,
// status/command), the READ SECTORS command (0x20) in PIO mode, and a simple
// BSY period before each sector. Sector data are generated, not stored:
// word w of sector lba is disk_word(lba, w). Strobes are sampled on clk, so
// the model sees the cable as a host controller clocked by the same clock drives
// it. Only the reads and writes a PIO host makes are modelled.
module ata_disk_model #(
  parameter int unsigned BUSY_CYCLES = 20,
  parameter int unsigned SECTOR_WORDS = 256
) (
  input  logic        clk,
  input  logic        drive,
  input  logic [2:0]  da,
  input  logic        cs0_n,
  input  logic        cs1_n,
  input  logic        dior_n,
  input  logic        diow_n,
  input  logic        rst_n,
  input  logic [15:0] dd_host,
  input  logic        dd_host_oe,
  output logic [15:0] dd_dev,
  output logic        iordy,
  output logic        intrq,
  output int          words_read,
  output int          commands
);
  function automatic logic [15:0] disk_word(int unsigned lba, int unsigned w);
    logic [31:0] x;
    x = lba * 32'h9E37_79B9 + w * 32'h85EB_CA6B + 32'h1234_5678;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    return x[31:16] ^ x[15:0];
  endfunction

  logic [7:0]  seccnt, lba0, lba1, lba2, dev, status, err;
  int unsigned cur_lba, left, widx, bsy;
  logic        dior_q = 1'b1, diow_q = 1'b1;

  initial begin
    seccnt = 0; lba0 = 0; lba1 = 0; lba2 = 0; dev = 8'hE0; status = 8'h50; err = 0;
    cur_lba = 0; left = 0; widx = 0; bsy = 0; intrq = 0; words_read = 0; commands = 0;
  end
  assign iordy = 1'b1;

  always_comb begin
    dd_dev = 16'h0000;
    if (!cs0_n)
      case (da)
        3'd0: dd_dev = disk_word(cur_lba, widx);
        3'd1: dd_dev = {8'h00, err};
        3'd2: dd_dev = {8'h00, seccnt};
        3'd3: dd_dev = {8'h00, lba0};
        3'd4: dd_dev = {8'h00, lba1};
        3'd5: dd_dev = {8'h00, lba2};
        3'd6: dd_dev = {8'h00, dev};
        default: dd_dev = {8'h00, status};
      endcase
    else if (!cs1_n && da == 3'd6) dd_dev = {8'h00, status};
  end

  always @(posedge clk) begin
    dior_q <= dior_n;
    diow_q <= diow_n;
    if (!rst_n) begin
      status <= 8'h50; left <= 0; bsy <= 0;
    end else if (drive) begin
      if (bsy != 0) begin
        bsy <= bsy - 1;
        if (bsy == 1) begin status <= 8'h58; intrq <= 1'b1; end   // DRDY|DSC|DRQ
      end
      // end of a read strobe
      if (!dior_q && dior_n && !cs0_n) begin
        if (da == 3'd7) intrq <= 1'b0;
        if (da == 3'd0 && status[3]) begin
          words_read <= words_read + 1;
          if (widx == SECTOR_WORDS - 1) begin
            widx    <= 0;
            cur_lba <= cur_lba + 1;
            left    <= left - 1;
            if (left == 1) status <= 8'h50;
            else begin status <= 8'hD0; bsy <= BUSY_CYCLES; end
          end else widx <= widx + 1;
        end
      end
      // end of a write strobe
      if (!diow_q && diow_n && !cs0_n && dd_host_oe) begin
        case (da)
          3'd2: seccnt <= dd_host[7:0];
          3'd3: lba0 <= dd_host[7:0];
          3'd4: lba1 <= dd_host[7:0];
          3'd5: lba2 <= dd_host[7:0];
          3'd6: dev <= dd_host[7:0];
          3'd7: begin
            commands <= commands + 1;
            if (dd_host[7:0] == 8'h20) begin
              cur_lba <= {dev[3:0], lba2, lba1, lba0};
              left    <= (seccnt == 0) ? 256 : seccnt;
              widx    <= 0;
              status  <= 8'hD0;
              bsy     <= BUSY_CYCLES;
            end else begin
              status <= 8'h51; err <= 8'h04;     // abort unknown commands
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
