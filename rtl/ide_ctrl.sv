// ide_ctrl: ATA/IDE host controller in PIO mode with a direct stream to the
// filter.
//
// The board reads the genomic banks from its disk in PIO mode and pushes the
// data straight into the filter's input port, without passing through the CPU
// or memory; the CPU only sets up the transfer through the task-file registers.
// That split follows the system this RTL implements. The register layout, the
// PIO timing and the sector polling are this design's own choices, based on the
// ATA standard.
//
// Bus slave registers (word address, low 5 bits):
//   0x00-0x07  ATA command block (CS0-, DA = addr[2:0]); 0x00 is the 16-bit data
//              register. Each access runs one PIO cycle on the cable.
//   0x08-0x0F  ATA control block (CS1-, DA = addr[2:0]); 0x0E is alt status /
//              device control.
//   0x10       STREAM: write N to stream N sectors into the filter; read gives the
//              sectors left.
//   0x11       STATUS (ro): bit0 streaming, bit1 INTRQ, bit2 bus released,
//              bit3 device reported ERR during a stream.
//   0x12       CTRL: bit0 drives the ATA RESET- line (1 = reset asserted).
// Task-file accesses wait (rsp.ready low) while a stream is running; the local
// registers answer in the cycle they are presented.
//
// Stream: for each sector the engine polls the status register until BSY = 0
// and DRQ = 1 (ERR stops the stream), then reads SECTOR_WORDS data words. Each
// word gives two bytes to the filter, low byte first. The next PIO read starts
// while the two bytes drain; if the filter stalls, the read strobe is held
// until the byte buffer is empty. With the default timing at 50 MHz a data word
// takes T_ACT + T_REC = 6 clocks (120 ns, PIO mode 4, 16.7 MB/s); address setup
// (T_SETUP) is only inserted when the register address changes.
//
// release_i hands the cable to the board micro-controller: ata_drive drops
// (the pads must then float) and no new PIO cycle starts.
module ide_ctrl
  import rdisk_pkg::*;
#(
  parameter int unsigned T_SETUP      = 2,
  parameter int unsigned T_ACT        = 4,
  parameter int unsigned T_REC        = 2,
  parameter int unsigned SECTOR_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  input  logic        release_i,
  // ATA cable
  output logic        ata_drive,
  output logic [2:0]  ata_da,
  output logic        ata_cs0_n,
  output logic        ata_cs1_n,
  output logic        ata_dior_n,
  output logic        ata_diow_n,
  output logic        ata_rst_n,
  output logic [15:0] ata_dd_o,
  output logic        ata_dd_oe,
  input  logic [15:0] ata_dd_i,
  input  logic        ata_iordy,
  input  logic        ata_intrq,
  // stream to the filter input port
  output logic        st_valid,
  output logic [7:0]  st_data,
  input  logic        st_ready
);

  localparam int unsigned CW = 4;
  localparam int unsigned WW = $clog2(SECTOR_WORDS + 1);

  // ---------------- PIO cycle engine ----------------
  typedef enum logic [1:0] {P_IDLE, P_SETUP, P_ACT, P_REC} pio_st_t;
  pio_st_t        pst;
  logic [CW-1:0]  pcnt;
  logic           op_start, op_we, op_cs1, op_hold, op_done;
  logic [2:0]     op_da;
  logic [15:0]    op_wdata;
  logic           cur_we, cur_cs1, cur_valid;
  logic [2:0]     cur_da;
  logic [15:0]    cur_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst       <= P_IDLE;
      pcnt      <= '0;
      cur_we    <= 1'b0;
      cur_cs1   <= 1'b0;
      cur_da    <= '0;
      cur_wdata <= '0;
      cur_valid <= 1'b0;
    end else begin
      unique case (pst)
        P_IDLE, P_REC: begin
          if (pst == P_REC && pcnt != '0) pcnt <= pcnt - 1'b1;
          else if (op_start) begin
            cur_we    <= op_we;
            cur_cs1   <= op_cs1;
            cur_da    <= op_da;
            cur_wdata <= op_wdata;
            cur_valid <= 1'b1;
            if (cur_valid && cur_cs1 == op_cs1 && cur_da == op_da && !cur_we && !op_we) begin
              pst  <= P_ACT;
              pcnt <= CW'(T_ACT - 1);
            end else begin
              pst  <= P_SETUP;
              pcnt <= CW'(T_SETUP - 1);
            end
          end else pst <= P_IDLE;
        end
        P_SETUP: begin
          if (pcnt != '0) pcnt <= pcnt - 1'b1;
          else begin
            pst  <= P_ACT;
            pcnt <= CW'(T_ACT - 1);
          end
        end
        P_ACT: begin
          if (pcnt != '0) pcnt <= pcnt - 1'b1;
          else if (ata_iordy && !op_hold) begin
            pst      <= P_REC;
            pcnt     <= CW'(T_REC - 1);
          end
        end
        default: pst <= P_IDLE;
      endcase
    end
  end

  assign op_done = (pst == P_ACT) && (pcnt == '0) && ata_iordy && !op_hold;

  // op_start is only honoured in P_IDLE or at the end of P_REC
  logic pio_free;
  assign pio_free = (pst == P_IDLE) || (pst == P_REC && pcnt == '0);

  // ---------------- stream engine and registers ----------------
  typedef enum logic [1:0] {S_IDLE, S_POLL, S_DATA} st_state_t;
  st_state_t      sst;
  logic [15:0]    nsec;
  logic [WW-1:0]  wcnt;
  logic           issued;          // a stream PIO op is in flight
  logic [15:0]    bbuf;
  logic [1:0]     bcnt;
  logic           err_r, rst_r;
  logic           cpu_pend;        // CPU task-file op in flight

  logic  tf_acc, loc_acc;
  assign tf_acc  = req.valid && (req.addr[4] == 1'b0);
  assign loc_acc = req.valid && (req.addr[4] == 1'b1);

  // who starts the next PIO cycle
  always_comb begin
    op_start = 1'b0;
    op_we    = 1'b0;
    op_cs1   = 1'b0;
    op_da    = 3'd0;
    op_wdata = req.wdata;
    if (!release_i && pio_free) begin
      if (sst == S_POLL && !issued) begin
        op_start = 1'b1;
        op_da    = 3'd7;
      end else if (sst == S_DATA && !issued && wcnt != '0) begin
        op_start = 1'b1;
        op_da    = 3'd0;
      end else if (sst == S_IDLE && tf_acc && !cpu_pend) begin
        op_start = 1'b1;
        op_we    = req.we;
        op_cs1   = req.addr[3];
        op_da    = req.addr[2:0];
      end
    end
  end

  assign op_hold  = (sst == S_DATA) && (cur_da == 3'd0) && (bcnt != 2'd0);
  assign st_valid = (bcnt != 2'd0);
  assign st_data  = (bcnt == 2'd2) ? bbuf[7:0] : bbuf[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sst      <= S_IDLE;
      nsec     <= '0;
      wcnt     <= '0;
      issued   <= 1'b0;
      bbuf     <= '0;
      bcnt     <= '0;
      err_r    <= 1'b0;
      rst_r    <= 1'b0;
      cpu_pend <= 1'b0;
    end else begin
      if (st_valid && st_ready) bcnt <= bcnt - 1'b1;
      if (op_start && sst == S_IDLE) cpu_pend <= 1'b1;
      if (op_done && cpu_pend) cpu_pend <= 1'b0;
      if (op_start && sst != S_IDLE) issued <= 1'b1;
      if (loc_acc && req.we && req.addr[4:0] == 5'h12) rst_r <= req.wdata[0];
      unique case (sst)
        S_IDLE: begin
          if (loc_acc && req.we && req.addr[4:0] == 5'h10 && req.wdata != '0 && !cpu_pend) begin
            nsec  <= req.wdata;
            sst   <= S_POLL;
            err_r <= 1'b0;
          end
        end
        S_POLL: begin
          if (op_done) begin
            issued <= 1'b0;
            if (ata_dd_i[ATA_BSY]) begin
              // still busy: poll again
            end else if (ata_dd_i[ATA_ERR]) begin
              err_r <= 1'b1;
              nsec  <= '0;
              sst   <= S_IDLE;
            end else if (ata_dd_i[ATA_DRQ]) begin
              wcnt <= WW'(SECTOR_WORDS);
              sst  <= S_DATA;
            end
          end
        end
        S_DATA: begin
          if (op_done) begin
            issued <= 1'b0;
            bbuf   <= ata_dd_i;
            bcnt   <= 2'd2;
            wcnt   <= wcnt - 1'b1;
            if (wcnt == WW'(1)) begin
              nsec <= nsec - 1'b1;
              sst  <= (nsec == 16'd1) ? S_IDLE : S_POLL;
            end
          end
        end
        default: sst <= S_IDLE;
      endcase
    end
  end

  // ---------------- bus response ----------------
  always_comb begin
    rsp.ready = 1'b0;
    rsp.rdata = '0;
    if (loc_acc) begin
      rsp.ready = 1'b1;
      unique case (req.addr[4:0])
        5'h10:   rsp.rdata = nsec;
        5'h11:   rsp.rdata = {12'd0, err_r, release_i, ata_intrq, sst != S_IDLE};
        5'h12:   rsp.rdata = {15'd0, rst_r};
        default: rsp.rdata = '0;
      endcase
    end else if (tf_acc && cpu_pend && op_done) begin
      rsp.ready = 1'b1;
      rsp.rdata = ata_dd_i;
    end
  end

  // ---------------- cable ----------------
  assign ata_drive  = !release_i;
  assign ata_rst_n  = !rst_r;
  assign ata_da     = cur_da;
  assign ata_cs0_n  = !(pst != P_IDLE && !cur_cs1);
  assign ata_cs1_n  = !(pst != P_IDLE && cur_cs1);
  assign ata_dior_n = !(pst == P_ACT && !cur_we);
  assign ata_diow_n = !(pst == P_ACT && cur_we);
  assign ata_dd_o   = cur_wdata;
  assign ata_dd_oe  = cur_we && (pst == P_ACT || pst == P_REC) && !release_i;

  // a task-file request must stay put until it is answered
  assert property (@(posedge clk) disable iff (!rst_n)
    (tf_acc && !rsp.ready) |=> (req.valid && $stable(req.addr) && $stable(req.we)));

endmodule
