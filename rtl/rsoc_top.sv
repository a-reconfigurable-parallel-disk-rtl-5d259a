// rsoc_top: the reconfigurable system-on-chip of one disk board, less its CPU.
//
// One board couples a hard disk to an FPGA that filters the genomic banks as
// they come off the disk, so that only the few promising places reach the
// front-end computer over Ethernet. Inside the FPGA, a common part (memory
// controller, instruction cache, boot ROM, IDE and Ethernet interfaces, system
// bus) serves every application, and an application part, the filter, is
// swapped by reconfiguration. The filter is fed straight from the IDE
// controller; its control and output ports sit on the system bus. This
// structure follows the system this RTL implements.
//
// The 16-bit RISC CPU core of the SoC is an existing third-party design and is
// not part of this RTL: its two memory ports are the top's ports.
//   cpu_if_*  instruction fetch, word address. addr[24] = 0 fetches SDRAM
//             through the instruction cache (a hit answers in the same clock),
//             addr[24] = 1 fetches the boot ROM (one clock).
//   cpu_req / cpu_rsp  data side, the system-bus master (map in rdisk_pkg).
// Interrupt-style outputs: irq_filter (hit records waiting), irq_eth,
// irq_ide, bus_error. The board-level pins are those of the SDRAM, the ATA
// cable, the ISA bus to the Ethernet chip and the micro-controller hand-off
// (bitstream location, wake, ready). Bidirectional pins are split into
// _o/_i/_oe for the pad ring.
module rsoc_top
  import rdisk_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU instruction port
  input  logic        cpu_if_req,
  input  logic [BUS_AW-1:0] cpu_if_addr,
  output logic [15:0] cpu_if_data,
  output logic        cpu_if_ack,
  // CPU data port
  input  bus_req_t    cpu_req,
  output bus_rsp_t    cpu_rsp,
  output logic        irq_filter,
  output logic        irq_eth,
  output logic        irq_ide,
  output logic        bus_error,
  // SDRAM
  output logic        sd_cke,
  output logic        sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic [1:0]  sd_ba,
  output logic [12:0] sd_a,
  output logic [1:0]  sd_dqm,
  output logic [15:0] sd_dq_o,
  output logic        sd_dq_oe,
  input  logic [15:0] sd_dq_i,
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
  // ISA bus to the Ethernet controller
  output logic [4:0]  isa_sa,
  output logic        isa_ior_n,
  output logic        isa_iow_n,
  output logic [15:0] isa_sd_o,
  output logic        isa_sd_oe,
  input  logic [15:0] isa_sd_i,
  input  logic        isa_iochrdy,
  input  logic        isa_irq,
  output logic        isa_reset,
  // micro-controller hand-off
  output logic [27:0] cfg_lba,
  output logic        uc_wake,
  input  logic        uc_ready
);

  bus_req_t s_req [NSLAVES];
  bus_rsp_t s_rsp [NSLAVES];

  sys_bus u_bus (
    .clk, .rst_n, .m_req(cpu_req), .m_rsp(cpu_rsp), .s_req, .s_rsp, .bus_error
  );

  // ---------------- instruction side ----------------
  logic        ic_req, ic_ack, rom_req, rom_ack, flush;
  logic [15:0] ic_data, rom_data;
  logic        m_req, m_ack;
  logic [SDRAM_AW-1:0] m_addr;
  logic [15:0] m_rdata;

  assign rom_req     = cpu_if_req &&  cpu_if_addr[24];
  assign ic_req      = cpu_if_req && !cpu_if_addr[24];
  assign cpu_if_ack  = cpu_if_addr[24] ? rom_ack : ic_ack;
  assign cpu_if_data = cpu_if_addr[24] ? rom_data : ic_data;

  boot_rom u_rom (
    .clk, .rst_n, .req(rom_req), .addr(cpu_if_addr[7:0]), .data(rom_data), .ack(rom_ack)
  );

  icache u_icache (
    .clk, .rst_n, .flush, .f_req(ic_req), .f_addr(cpu_if_addr[SDRAM_AW-1:0]),
    .f_data(ic_data), .f_ack(ic_ack), .m_req, .m_addr, .m_rdata, .m_ack
  );

  ram_ctrl u_ram (
    .clk, .rst_n, .i_req(m_req), .i_addr(m_addr), .i_rdata(m_rdata), .i_ack(m_ack),
    .req(s_req[SL_SDRAM]), .rsp(s_rsp[SL_SDRAM]),
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i
  );

  // ---------------- disk to filter ----------------
  logic       ide_release;
  logic       st_valid, st_ready;
  logic [7:0] st_data;

  ide_ctrl u_ide (
    .clk, .rst_n, .req(s_req[SL_IDE]), .rsp(s_rsp[SL_IDE]), .release_i(ide_release),
    .ata_drive, .ata_da, .ata_cs0_n, .ata_cs1_n, .ata_dior_n, .ata_diow_n, .ata_rst_n,
    .ata_dd_o, .ata_dd_oe, .ata_dd_i, .ata_iordy, .ata_intrq,
    .st_valid, .st_data, .st_ready
  );
  assign irq_ide = ata_intrq;

  anchor_filter u_filter (
    .clk, .rst_n, .in_valid(st_valid), .in_data(st_data), .in_ready(st_ready),
    .ctrl_req(s_req[SL_FCTRL]), .ctrl_rsp(s_rsp[SL_FCTRL]),
    .out_req(s_req[SL_FOUT]), .out_rsp(s_rsp[SL_FOUT]), .hit_irq(irq_filter)
  );

  // ---------------- network and system control ----------------
  eth_isa_if u_eth (
    .clk, .rst_n, .req(s_req[SL_ETH]), .rsp(s_rsp[SL_ETH]),
    .isa_sa, .isa_ior_n, .isa_iow_n, .isa_sd_o, .isa_sd_oe, .isa_sd_i,
    .isa_iochrdy, .isa_irq, .isa_reset, .eth_irq(irq_eth)
  );

  sys_ctrl u_sys (
    .clk, .rst_n, .req(s_req[SL_SYS]), .rsp(s_rsp[SL_SYS]),
    .cfg_lba, .uc_wake, .uc_ready, .ide_release, .icache_flush(flush)
  );

endmodule
