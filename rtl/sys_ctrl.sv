// sys_ctrl: reconfiguration hand-off and system control registers.
//
// When a query needs a different filter, the FPGA wakes the board's
// micro-controller and tells it where on the disk the next bitstream is; the
// micro-controller then reads it from the disk and reconfigures the FPGA. That
// sequence follows the board; the register layout and the parallel location
// bus to the micro-controller are this design's own choices.
//
// Bus slave registers (word address, low 2 bits):
//   0  bitstream LBA bits [15:0]
//   1  bitstream LBA bits [27:16]
//   2  CTRL: w bit0 = 1 wakes the micro-controller (sticky until reset),
//      bit1 = release the IDE cable, bit2 = 1 flushes the instruction cache
//      (one-clock pulse); r bit0 wake, bit1 release, bit3 uc_ready.
// While uc_wake is high the IDE cable is released whatever bit1 says, so the
// micro-controller can read the bitstream from the disk. cfg_lba is stable
// from the write of CTRL bit0 on. All accesses complete in their own clock.
module sys_ctrl
  import rdisk_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  output logic [27:0] cfg_lba,
  output logic        uc_wake,
  input  logic        uc_ready,
  output logic        ide_release,
  output logic        icache_flush
);
  logic rel_r;
  logic wr;
  assign wr = req.valid && req.we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_lba      <= '0;
      uc_wake      <= 1'b0;
      rel_r        <= 1'b0;
      icache_flush <= 1'b0;
    end else begin
      icache_flush <= 1'b0;
      if (wr && !uc_wake) begin
        unique case (req.addr[1:0])
          2'd0: cfg_lba[15:0]  <= req.wdata;
          2'd1: cfg_lba[27:16] <= req.wdata[11:0];
          2'd2: begin
            uc_wake      <= req.wdata[0];
            rel_r        <= req.wdata[1];
            icache_flush <= req.wdata[2];
          end
          default: ;
        endcase
      end
    end
  end

  assign ide_release = rel_r || uc_wake;

  always_comb begin
    rsp.ready = req.valid;
    unique case (req.addr[1:0])
      2'd0:    rsp.rdata = cfg_lba[15:0];
      2'd1:    rsp.rdata = {4'd0, cfg_lba[27:16]};
      2'd2:    rsp.rdata = {12'd0, uc_ready, 1'b0, rel_r, uc_wake};
      default: rsp.rdata = '0;
    endcase
  end
endmodule
