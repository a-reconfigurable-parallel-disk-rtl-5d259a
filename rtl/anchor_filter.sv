// anchor_filter: on-the-fly anchor detector for genomic data streamed from disk.
//
// The filter holds a query of up to QLEN nucleotides and scans the bank as it
// comes off the disk. An anchor is a word of W consecutive nucleotides that
// occurs both in the query and in the bank (the first step of BLAST-like
// searches); the filter reports where anchors end and leaves the alignment work
// to the processor. The 300-nucleotide query, the default anchor size of 11 and
// the packing of four 2-bit nucleotides per byte follow the system this RTL
// implements; the way the detector works is this design's own choice.
//
// How it works: one run counter per query position i holds the length of the
// current exact match that ends at query position i and at the latest bank
// nucleotide (a diagonal of the dot plot). For each new bank nucleotide c:
//     run[i] <= (q[i] == c) ? min(run[i-1] + 1, W) : 0
// An anchor ends at (bank position p, query position i) when run[i] reaches W
// (from W-1); a longer match therefore gives one report, not one per base.
// Four such steps are unrolled, so one byte (4 nt) is consumed per clock.
//
// Ports (the three ports of the filter):
//   in  : in_valid/in_data/in_ready, one byte per transfer, fed directly by the
//         IDE controller. in_ready is low when the filter is paused or its
//         result FIFO is full (back-pressure rather than loss).
//   ctrl: bus slave. Word 0 CTRL (w: bit0 soft reset, bit1 run; r: bit1 run,
//         bit3 FIFO full, bit4 FIFO not empty), 1 QLEN_ACT (active query length),
//         2/3 bank position lo/hi (nt), 4/5 hit-record count lo/hi, 6 W (ro),
//         7 QLEN (ro), 0x80+k query nucleotides 8k..8k+7 (nt 8k in bits [1:0]).
//   out : bus slave reading the result FIFO: word 0/1 position lo/hi of the
//         oldest record, 2 {multi, qpos[14:0]} and pops it (0xFFFF when empty),
//         3 number of records held. hit_irq is high while the FIFO holds a record.
// A record gives the bank nucleotide index of the earliest anchor end in a byte
// and the lowest query index among the anchors ending there; multi is set when
// the byte held more than one anchor end. All bus accesses complete in the
// cycle they are presented. A record is in the FIFO one cycle after its byte
// is accepted.
module anchor_filter
  import rdisk_pkg::*;
#(
  parameter int unsigned QLEN       = 300,
  parameter int unsigned W          = 11,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned POSW       = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  logic [7:0] in_data,
  output logic     in_ready,
  input  bus_req_t ctrl_req,
  output bus_rsp_t ctrl_rsp,
  input  bus_req_t out_req,
  output bus_rsp_t out_rsp,
  output logic     hit_irq
);

  localparam int unsigned RW    = $clog2(W + 1);
  localparam int unsigned QW    = $clog2(QLEN + 1);
  localparam int unsigned FAW   = $clog2(FIFO_DEPTH);

  typedef struct packed {
    logic [POSW-1:0] pos;
    logic            multi;
    logic [14:0]     qpos;
  } hit_rec_t;

  // ---------------- query and control registers ----------------
  logic [1:0]      q      [QLEN];
  logic [QW-1:0]   qlen_r;
  logic            run_r;
  logic [POSW-1:0] pos_r;
  logic [31:0]     hits_r;
  logic [RW-1:0]   run_q  [QLEN];

  // ---------------- result FIFO ----------------
  hit_rec_t        fifo   [FIFO_DEPTH];
  logic [FAW-1:0]  wr_ptr, rd_ptr;
  logic [FAW:0]    count;
  logic            fifo_full, fifo_empty;

  assign fifo_full  = (count == FIFO_DEPTH[FAW:0]);
  assign fifo_empty = (count == '0);
  assign in_ready   = run_r && !fifo_full;
  assign hit_irq    = !fifo_empty;

  // ---------------- detector datapath ----------------
  logic [RW-1:0]   stage [5][QLEN];
  logic [QLEN-1:0] hitv  [4];
  logic            found, multi;
  logic [1:0]      hk;
  logic [14:0]     hq;

  always_comb begin
    logic [RW-1:0] prev;
    logic          m;
    logic [2:0]    nk;
    for (int i = 0; i < QLEN; i++) stage[0][i] = run_q[i];
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < QLEN; i++) begin
        prev = (i == 0) ? '0 : stage[k][i-1];
        m    = (q[i] == in_data[2*k +: 2]) && (i < int'(qlen_r));
        stage[k+1][i] = !m ? '0 : (prev == RW'(W)) ? RW'(W) : prev + 1'b1;
        hitv[k][i]    = m && (prev == RW'(W - 1));
      end
    end
    found = 1'b0;
    hk    = '0;
    hq    = '0;
    nk    = '0;
    for (int k = 0; k < 4; k++) begin
      if (hitv[k] != '0) begin
        nk = nk + 1'b1;
        if (!found) begin
          found = 1'b1;
          hk    = 2'(k);
          for (int i = QLEN - 1; i >= 0; i--)
            if (hitv[k][i]) hq = 15'(i);
        end
      end
    end
    multi = (nk > 3'd1) || ((hitv[hk] & (hitv[hk] - 1'b1)) != '0);
  end

  // ---------------- bus decoding ----------------
  logic accept, push, pop, soft_rst;
  logic [7:0] ca, oa;

  assign ca       = ctrl_req.addr[7:0];
  assign oa       = out_req.addr[7:0];
  assign accept   = in_valid && in_ready;
  assign push     = accept && found;
  assign pop      = out_req.valid && !out_req.we && (oa[1:0] == 2'd2) && !fifo_empty;
  assign soft_rst = ctrl_req.valid && ctrl_req.we && (ca == 8'h00) && ctrl_req.wdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qlen_r <= QW'(QLEN);
      run_r  <= 1'b0;
      for (int i = 0; i < QLEN; i++) q[i] <= 2'd0;
    end else if (ctrl_req.valid && ctrl_req.we) begin
      if (ca == 8'h00) run_r <= ctrl_req.wdata[1];
      if (ca == 8'h01) qlen_r <= (ctrl_req.wdata > 16'(QLEN)) ? QW'(QLEN) : QW'(ctrl_req.wdata);
      if (ca[7]) begin
        for (int j = 0; j < 8; j++)
          if (int'(ca[6:0]) * 8 + j < QLEN)
            q[int'(ca[6:0]) * 8 + j] <= ctrl_req.wdata[2*j +: 2];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_r  <= '0;
      hits_r <= '0;
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < QLEN; i++) run_q[i] <= '0;
    end else if (soft_rst) begin
      pos_r  <= '0;
      hits_r <= '0;
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < QLEN; i++) run_q[i] <= '0;
    end else begin
      if (accept) begin
        for (int i = 0; i < QLEN; i++) run_q[i] <= stage[4][i];
        pos_r <= pos_r + POSW'(4);
      end
      if (push) begin
        fifo[wr_ptr] <= '{pos: pos_r + POSW'(hk), multi: multi, qpos: hq};
        wr_ptr       <= wr_ptr + 1'b1;
        hits_r       <= hits_r + 1'b1;
      end
      if (pop) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (FAW+1)'(push) - (FAW+1)'(pop);
    end
  end

  // ---------------- read data ----------------
  always_comb begin
    ctrl_rsp.ready = ctrl_req.valid;
    ctrl_rsp.rdata = '0;
    if (ca[7]) begin
      for (int j = 0; j < 8; j++)
        if (int'(ca[6:0]) * 8 + j < QLEN)
          ctrl_rsp.rdata[2*j +: 2] = q[int'(ca[6:0]) * 8 + j];
    end else begin
      case (ca)
        8'h00: ctrl_rsp.rdata = {11'd0, !fifo_empty, fifo_full, 1'b0, run_r, 1'b0};
        8'h01: ctrl_rsp.rdata = 16'(qlen_r);
        8'h02: ctrl_rsp.rdata = pos_r[15:0];
        8'h03: ctrl_rsp.rdata = 16'(pos_r >> 16);
        8'h04: ctrl_rsp.rdata = hits_r[15:0];
        8'h05: ctrl_rsp.rdata = hits_r[31:16];
        8'h06: ctrl_rsp.rdata = 16'(W);
        8'h07: ctrl_rsp.rdata = 16'(QLEN);
        default: ctrl_rsp.rdata = '0;
      endcase
    end
  end

  always_comb begin
    hit_rec_t head;
    head          = fifo[rd_ptr];
    out_rsp.ready = out_req.valid;
    out_rsp.rdata = 16'hFFFF;
    if (!fifo_empty || oa[1:0] == 2'd3) begin
      case (oa[1:0])
        2'd0: out_rsp.rdata = head.pos[15:0];
        2'd1: out_rsp.rdata = 16'(head.pos >> 16);
        2'd2: out_rsp.rdata = {head.multi, head.qpos};
        default: out_rsp.rdata = 16'(count);
      endcase
    end
  end

  // A record can only be pushed when the FIFO has room: in_ready guarantees it.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !fifo_full);
  // Bus writes to the output port are not defined.
  assert property (@(posedge clk) disable iff (!rst_n) out_req.valid |-> !out_req.we);

endmodule
