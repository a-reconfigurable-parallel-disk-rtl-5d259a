// rdisk_pkg: types and constants shared by the blocks of the reconfigurable
// disk-board SoC.
//
// The system bus is a single-master request/response bus of 16-bit words.
// A master raises req.valid with addr/we/wdata stable and holds them until the
// selected slave answers with rsp.ready for exactly one cycle; on a read,
// rsp.rdata is valid in that cycle. The 16-bit data width follows the 16-bit
// CPU and the 16-bit SDRAM; the address width (25 word-address bits) and the
// address map below are this design's own choice.
//
// Address map (word addresses):
//   0x000_0000 .. 0x0FF_FFFF  SDRAM, 16M x 16 bits (32 MB)
//   0x100_0000 | sel<<12      I/O page: sel 1 IDE, 2 Ethernet, 3 filter control,
//                             4 filter output, 5 system control
//   Instruction fetch: bit 24 = 0 is SDRAM (through the instruction cache),
//   bit 24 = 1 is the boot ROM.
//
// Nucleotides are coded on 2 bits (A=0, C=1, G=2, T=3), four per byte, the
// first nucleotide of a byte in bits [1:0].
package rdisk_pkg;

  localparam int unsigned BUS_AW = 25;
  localparam int unsigned BUS_DW = 16;
  localparam int unsigned SDRAM_AW = 24;

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [BUS_AW-1:0] addr;
    logic [BUS_DW-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              ready;
    logic [BUS_DW-1:0] rdata;
  } bus_rsp_t;

  typedef enum logic [1:0] {
    NT_A = 2'd0,
    NT_C = 2'd1,
    NT_G = 2'd2,
    NT_T = 2'd3
  } nt_t;

  // I/O page selectors (addr[15:12] when addr[24] = 1)
  localparam int unsigned NSLAVES  = 6;
  localparam int unsigned SL_SDRAM = 0;
  localparam int unsigned SL_IDE   = 1;
  localparam int unsigned SL_ETH   = 2;
  localparam int unsigned SL_FCTRL = 3;
  localparam int unsigned SL_FOUT  = 4;
  localparam int unsigned SL_SYS   = 5;

  // ATA status register bits
  localparam int unsigned ATA_BSY = 7;
  localparam int unsigned ATA_DRQ = 3;
  localparam int unsigned ATA_ERR = 0;

endpackage
