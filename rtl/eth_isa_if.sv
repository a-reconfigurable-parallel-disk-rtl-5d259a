// eth_isa_if: system-bus to ISA bridge for the board's Fast-Ethernet controller.
//
// The Ethernet controller (an NE2000-compatible MAC/PHY chip) sits on a plain
// ISA bus next to the FPGA. Each bus access to the Ethernet window becomes one
// 16-bit ISA I/O cycle: address setup, IOR- or IOW- strobe held while the chip
// pulls IOCHRDY low, then a hold time. The use of an ISA bus and an
// NE2000-compatible chip follows the board; the cycle timing and the registers
// are this design's own (defaults give 40 ns setup, 160 ns strobe, 40 ns hold at
// 50 MHz, within ISA I/O timing).
//
// Bus slave registers (word address, low 6 bits):
//   0x00-0x1F  chip register at ISA address 0x00-0x1F (NE2000 layout: 0x10 data
//              port, 0x1F reset port). 16-bit data; byte registers use bits [7:0].
//   0x20       STATUS (ro): bit0 chip interrupt line.
//   0x21       CTRL: bit0 drives the chip's RESET line.
// An ISA access answers with rsp.ready one clock after the strobe ends; the
// local registers answer at once. eth_irq forwards the chip's interrupt.
module eth_isa_if
  import rdisk_pkg::*;
#(
  parameter int unsigned T_SETUP  = 2,
  parameter int unsigned T_STROBE = 8,
  parameter int unsigned T_HOLD   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  output logic [4:0]  isa_sa,
  output logic        isa_ior_n,
  output logic        isa_iow_n,
  output logic [15:0] isa_sd_o,
  output logic        isa_sd_oe,
  input  logic [15:0] isa_sd_i,
  input  logic        isa_iochrdy,
  input  logic        isa_irq,
  output logic        isa_reset,
  output logic        eth_irq
);
  typedef enum logic [1:0] {I_IDLE, I_SETUP, I_STROBE, I_HOLD} ist_t;
  ist_t        st;
  logic [3:0]  cnt;
  logic        we_r, ack_r, rst_r;
  logic [15:0] rdata_r;

  logic isa_acc, loc_acc;
  assign isa_acc = req.valid && !req.addr[5];
  assign loc_acc = req.valid &&  req.addr[5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= I_IDLE;
      cnt      <= '0;
      we_r     <= 1'b0;
      ack_r    <= 1'b0;
      rst_r    <= 1'b0;
      rdata_r  <= '0;
      isa_sa   <= '0;
      isa_sd_o <= '0;
    end else begin
      ack_r <= 1'b0;
      if (loc_acc && req.we && req.addr[5:0] == 6'h21) rst_r <= req.wdata[0];
      unique case (st)
        I_IDLE: if (isa_acc) begin
          isa_sa   <= req.addr[4:0];
          isa_sd_o <= req.wdata;
          we_r     <= req.we;
          cnt      <= 4'(T_SETUP - 1);
          st       <= I_SETUP;
        end
        I_SETUP: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            cnt <= 4'(T_STROBE - 1);
            st  <= I_STROBE;
          end
        end
        I_STROBE: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else if (isa_iochrdy) begin
            rdata_r <= isa_sd_i;
            ack_r   <= 1'b1;
            cnt     <= 4'(T_HOLD - 1);
            st      <= I_HOLD;
          end
        end
        I_HOLD: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else st <= I_IDLE;
        end
        default: st <= I_IDLE;
      endcase
    end
  end

  assign isa_ior_n = !(st == I_STROBE && !we_r);
  assign isa_iow_n = !(st == I_STROBE &&  we_r);
  assign isa_sd_oe = we_r && (st != I_IDLE);
  assign isa_reset = rst_r;
  assign eth_irq   = isa_irq;

  always_comb begin
    rsp.ready = 1'b0;
    rsp.rdata = rdata_r;
    if (loc_acc) begin
      rsp.ready = 1'b1;
      rsp.rdata = (req.addr[5:0] == 6'h20) ? {15'd0, isa_irq} :
                  (req.addr[5:0] == 6'h21) ? {15'd0, rst_r} : 16'd0;
    end else if (isa_acc && ack_r) begin
      rsp.ready = 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    (isa_acc && !rsp.ready) |=> (req.valid && $stable(req.addr)));

endmodule
