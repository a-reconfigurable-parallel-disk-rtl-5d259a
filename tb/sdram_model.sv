// sdram_model: behavioural model of a 16M x 16 SDRAM (4 banks, 8192 rows,
// 512 columns) for simulation only. It decodes the commands on each clock
// edge, keeps the open row per bank, returns read data CAS latency clocks after
// the READ command (latency taken from the mode register), and closes the bank
// on auto-precharge. It counts protocol violations (access to a closed bank or
// the wrong row, ACTIVE to an open bank, REFRESH with a bank open, access before
// the mode register is set) in proto_errors. Memory is sparse; unwritten words
// read as 0.
module sdram_model (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] a,
  input  logic [1:0]  dqm,
  input  logic [15:0] dq_i,
  input  logic        dq_oe,
  output logic [15:0] dq_o,
  output int          proto_errors,
  output int          refreshes,
  output int          reads,
  output int          writes
);
  logic [15:0] mem [int];
  logic        open_b [4];
  logic [12:0] row_b [4];
  logic        mode_set;
  int          cl;
  logic [15:0] pipe_d [4];

  initial begin
    proto_errors = 0; refreshes = 0; reads = 0; writes = 0; mode_set = 0; cl = 2;
    for (int i = 0; i < 4; i++) begin open_b[i] = 0; row_b[i] = 0; pipe_d[i] = 0; end
  end
  assign dq_o = pipe_d[cl-1];

  always @(posedge clk) begin
    logic [15:0] rd;
    int key;
    rd = 16'h0;
    key = {row_b[ba], ba, a[8:0]};
    if (cke && !cs_n) begin
      case ({ras_n, cas_n, we_n})
        3'b000: begin mode_set <= 1; cl <= int'(a[6:4]); end
        3'b001: begin
          refreshes <= refreshes + 1;
          for (int i = 0; i < 4; i++) if (open_b[i]) proto_errors <= proto_errors + 1;
        end
        3'b010: begin
          if (a[10]) for (int i = 0; i < 4; i++) open_b[i] <= 0;
          else open_b[ba] <= 0;
        end
        3'b011: begin
          if (open_b[ba] || !mode_set) proto_errors <= proto_errors + 1;
          open_b[ba] <= 1; row_b[ba] <= a;
        end
        3'b101: begin
          if (!open_b[ba]) proto_errors <= proto_errors + 1;
          rd = mem.exists(key) ? mem[key] : 16'h0;
          reads <= reads + 1;
          if (a[10]) open_b[ba] <= 0;
        end
        3'b100: begin
          if (!open_b[ba] || !dq_oe) proto_errors <= proto_errors + 1;
          if (dqm == 2'b00) mem[key] = dq_i;
          writes <= writes + 1;
          if (a[10]) open_b[ba] <= 0;
        end
        default: ;
      endcase
    end
    pipe_d[0] <= rd;
    for (int i = 1; i < 4; i++) pipe_d[i] <= pipe_d[i-1];
  end
endmodule
