// ram_ctrl: SDRAM controller for the board's 32 MB memory (16M words of 16 bits).
//
// Two clients share the memory, as in the SoC block diagram: the CPU's
// instruction side (through the instruction cache, i_* port) and the system
// bus (req/rsp, SDRAM window of the address map). Requests are served one
// word at a time, alternating between the two ports when both wait. The size
// and width of the memory follow the board; the controller itself (closed-page
// policy, burst length 1, timing) is this design's own, sized for a
// 256 Mbit x16 SDRAM (4 banks x 8192 rows x 512 columns) clocked at 50 MHz.
//
// Word address mapping: {row[12:0], bank[1:0], column[8:0]}.
// Power-up: wait INIT_CYCLES, PRECHARGE ALL, two AUTO REFRESH, LOAD MODE
// REGISTER (burst length 1, sequential, CAS latency CAS_LAT). One AUTO REFRESH
// is issued every REFRESH_CYCLES (390 clocks = 7.8 us at 50 MHz).
// Access: ACTIVE, T_RCD later READ or WRITE with auto-precharge (A10 = 1).
// A read returns its word CAS_LAT + 1 clocks after the READ command is
// registered; the port sees ready (i_ack or rsp.ready) one clock later. A read
// takes T_RCD + CAS_LAT + 4 clocks from the request (7 at the defaults)
// plus T_RP of precharge before the next access; a write is acknowledged when
// its command is issued.
// CKE is tied high (no power-down) and is therefore a constant output.
// Commands are registered outputs; the SDRAM clock is assumed to be the
// controller clock, and the pads' DQ direction follows sd_dq_oe.
module ram_ctrl
  import rdisk_pkg::*;
#(
  parameter int unsigned INIT_CYCLES    = 10000,
  parameter int unsigned REFRESH_CYCLES = 390,
  parameter int unsigned CAS_LAT        = 2,
  parameter int unsigned T_RCD          = 1,
  parameter int unsigned T_RP           = 1,
  parameter int unsigned T_RFC          = 4,
  parameter int unsigned T_WR           = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // instruction port (read only)
  input  logic                i_req,
  input  logic [SDRAM_AW-1:0] i_addr,
  output logic [15:0]         i_rdata,
  output logic                i_ack,
  // system bus port
  input  bus_req_t            req,
  output bus_rsp_t            rsp,
  // SDRAM
  output logic                sd_cke,
  output logic                sd_cs_n,
  output logic                sd_ras_n,
  output logic                sd_cas_n,
  output logic                sd_we_n,
  output logic [1:0]          sd_ba,
  output logic [12:0]         sd_a,
  output logic [1:0]          sd_dqm,
  output logic [15:0]         sd_dq_o,
  output logic                sd_dq_oe,
  input  logic [15:0]         sd_dq_i
);

  typedef enum logic [3:0] {
    CMD_MRS = 4'b0000, CMD_REF = 4'b0001, CMD_PRE = 4'b0010, CMD_ACT = 4'b0011,
    CMD_WR  = 4'b0100, CMD_RD  = 4'b0101, CMD_NOP = 4'b0111
  } cmd_t;

  typedef enum logic [3:0] {
    ST_INIT, ST_PREALL, ST_REF1, ST_REF2, ST_MRS, ST_IDLE, ST_REF,
    ST_ACT, ST_RW, ST_RDWAIT, ST_WAIT
  } state_t;

  localparam int unsigned CW = $clog2(INIT_CYCLES + 1) > 10 ? $clog2(INIT_CYCLES + 1) : 10;
  localparam logic [12:0] MODE_REG = 13'(((CAS_LAT & 7) << 4));   // BL=1, sequential

  state_t          st, st_next_wait;
  logic [CW-1:0]   cnt;
  logic [9:0]      ref_cnt;
  logic            ref_due;
  cmd_t            cmd;
  logic            cur_i, cur_we, last_i;
  logic [SDRAM_AW-1:0] cur_addr;
  logic [15:0]     cur_wdata;
  logic            i_ack_r, d_ack_r;
  logic [15:0]     rdata_r;

  logic d_req, take_i;
  assign d_req  = req.valid && !d_ack_r;
  // instruction port wins unless it was served last and the bus is waiting
  assign take_i = (i_req && !i_ack_r) && !(d_req && last_i);

  assign {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} = cmd;
  assign sd_cke  = 1'b1;
  assign i_ack   = i_ack_r;
  assign i_rdata = rdata_r;
  assign rsp.ready = d_ack_r;
  assign rsp.rdata = rdata_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= ST_INIT;
      st_next_wait <= ST_IDLE;
      cnt          <= CW'(INIT_CYCLES);
      ref_cnt      <= 10'(REFRESH_CYCLES);
      ref_due      <= 1'b0;
      cmd          <= CMD_NOP;
      sd_ba        <= '0;
      sd_a         <= '0;
      sd_dqm       <= 2'b11;
      sd_dq_o      <= '0;
      sd_dq_oe     <= 1'b0;
      cur_i        <= 1'b0;
      cur_we       <= 1'b0;
      last_i       <= 1'b0;
      cur_addr     <= '0;
      cur_wdata    <= '0;
      i_ack_r      <= 1'b0;
      d_ack_r      <= 1'b0;
      rdata_r      <= '0;
    end else begin
      cmd      <= CMD_NOP;
      sd_dq_oe <= 1'b0;
      i_ack_r  <= 1'b0;
      d_ack_r  <= 1'b0;
      if (st != ST_INIT) begin
        if (ref_cnt == '0) begin
          ref_cnt <= 10'(REFRESH_CYCLES);
          ref_due <= 1'b1;
        end else ref_cnt <= ref_cnt - 1'b1;
      end
      unique case (st)
        ST_INIT: begin
          if (cnt == '0) st <= ST_PREALL;
          else cnt <= cnt - 1'b1;
        end
        ST_PREALL: begin
          cmd          <= CMD_PRE;
          sd_a[10]     <= 1'b1;
          cnt          <= CW'(T_RP);
          st           <= ST_WAIT;
          st_next_wait <= ST_REF1;
        end
        ST_REF1, ST_REF2: begin
          cmd          <= CMD_REF;
          cnt          <= CW'(T_RFC);
          st           <= ST_WAIT;
          st_next_wait <= (st == ST_REF1) ? ST_REF2 : ST_MRS;
        end
        ST_MRS: begin
          cmd          <= CMD_MRS;
          sd_ba        <= '0;
          sd_a         <= MODE_REG;
          cnt          <= CW'(2);
          st           <= ST_WAIT;
          st_next_wait <= ST_IDLE;
        end
        ST_IDLE: begin
          if (ref_due) begin
            ref_due      <= 1'b0;
            cmd          <= CMD_REF;
            cnt          <= CW'(T_RFC);
            st           <= ST_WAIT;
            st_next_wait <= ST_IDLE;
          end else if ((i_req && !i_ack_r) || d_req) begin
            cur_i     <= take_i;
            last_i    <= take_i;
            cur_we    <= take_i ? 1'b0 : req.we;
            cur_addr  <= take_i ? i_addr : req.addr[SDRAM_AW-1:0];
            cur_wdata <= req.wdata;
            st        <= ST_ACT;
          end
        end
        ST_ACT: begin
          cmd   <= CMD_ACT;
          sd_ba <= cur_addr[10:9];
          sd_a  <= cur_addr[23:11];
          cnt   <= CW'(T_RCD - 1);
          st    <= ST_RW;
        end
        ST_RW: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            sd_a     <= {2'b00, 1'b1, 1'b0, cur_addr[8:0]};   // A10: auto-precharge
            sd_dqm   <= 2'b00;
            if (cur_we) begin
              cmd          <= CMD_WR;
              sd_dq_o      <= cur_wdata;
              sd_dq_oe     <= 1'b1;
              d_ack_r      <= 1'b1;
              cnt          <= CW'(T_WR + T_RP);
              st           <= ST_WAIT;
              st_next_wait <= ST_IDLE;
            end else begin
              cmd <= CMD_RD;
              cnt <= CW'(CAS_LAT);
              st  <= ST_RDWAIT;
            end
          end
        end
        ST_RDWAIT: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            rdata_r      <= sd_dq_i;
            i_ack_r      <= cur_i;
            d_ack_r      <= !cur_i;
            cnt          <= CW'(T_RP);
            st           <= ST_WAIT;
            st_next_wait <= ST_IDLE;
          end
        end
        ST_WAIT: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else st <= st_next_wait;
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  // the bus master must hold a request until it is answered
  assert property (@(posedge clk) disable iff (!rst_n)
    (req.valid && !rsp.ready) |=> req.valid);

endmodule
