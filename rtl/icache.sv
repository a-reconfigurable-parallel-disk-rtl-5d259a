// icache: direct-mapped, read-only instruction cache between the CPU's
// instruction fetches and the SDRAM controller.
//
// The SoC adds an instruction cache in front of the external SDRAM to keep
// the 16-bit CPU fed; its organisation is not given, so this one is the simplest
// that does the job: LINES lines of LINE_WORDS 16-bit words (128 x 4 words =
// 1 KB by default, two Spartan-II block RAMs), a tag and a valid bit per line.
//
// Fetch port: the CPU holds f_req and f_addr (word address) until f_ack. A
// hit is answered in the same clock (f_ack combinational from the arrays). A
// miss refills the whole line, word 0 first, with LINE_WORDS single reads on
// the memory port (m_req held, m_addr stepping, one m_ack per word), then
// answers as a hit. flush clears every valid bit (used after new code has been
// loaded from disk into memory). The cache never writes memory.
module icache #(
  parameter int unsigned AW         = 24,
  parameter int unsigned LINES      = 128,
  parameter int unsigned LINE_WORDS = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          f_req,
  input  logic [AW-1:0] f_addr,
  output logic [15:0]   f_data,
  output logic          f_ack,
  output logic          m_req,
  output logic [AW-1:0] m_addr,
  input  logic [15:0]   m_rdata,
  input  logic          m_ack
);
  localparam int unsigned OW = $clog2(LINE_WORDS);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = AW - IW - OW;

  logic [15:0]   data  [LINES * LINE_WORDS];
  logic [TW-1:0] tags  [LINES];
  logic [LINES-1:0] valid;

  logic [OW-1:0] off;
  logic [IW-1:0] idx;
  logic [TW-1:0] tag;
  assign {tag, idx, off} = f_addr;

  logic          refill;
  logic [OW-1:0] wcnt;
  logic          hit;

  assign hit    = valid[idx] && (tags[idx] == tag);
  assign f_ack  = f_req && !refill && hit;
  assign f_data = data[{idx, off}];
  assign m_req  = refill;
  assign m_addr = {tag, idx, wcnt};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      refill <= 1'b0;
      wcnt   <= '0;
    end else if (flush) begin
      valid  <= '0;
      refill <= 1'b0;
      wcnt   <= '0;
    end else if (!refill) begin
      if (f_req && !hit) begin
        refill     <= 1'b1;
        wcnt       <= '0;
        valid[idx] <= 1'b0;
      end
    end else if (m_ack) begin
      wcnt <= wcnt + 1'b1;
      if (wcnt == OW'(LINE_WORDS - 1)) begin
        refill     <= 1'b0;
        valid[idx] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (refill && m_ack) begin
      data[{idx, wcnt}] <= m_rdata;
      if (wcnt == OW'(LINE_WORDS - 1)) tags[idx] <= tag;
    end
  end

  // the fetch address must not change while a miss is being served
  assert property (@(posedge clk) disable iff (!rst_n || flush)
    refill |-> (f_req && $stable(f_addr)));

endmodule
