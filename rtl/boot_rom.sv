// boot_rom: small on-chip ROM holding the CPU's boot program.
//
// In the SoC this ROM is part of the FPGA bitstream; the program in it loads a
// larger code from the disk into SDRAM. Its contents are the boot program of
// the software, so they are given here by a hex file (INIT_FILE, one 16-bit
// word per line, read with $readmemh); with no file the ROM reads as zero.
// DEPTH (256 words) is this design's own choice, small enough for one block RAM.
//
// Port: the CPU's instruction fetch holds req and addr; the word is returned
// with ack one clock later (synchronous block-RAM read).
module boot_rom #(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [15:0]              data,
  output logic                     ack
);
  logic [15:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = 16'h0000;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) data <= rom[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack <= 1'b0;
    else        ack <= req && !ack;
  end
endmodule
