// sys_bus: the SoC's system bus, one master (the CPU's data side) and the
// slaves of the block diagram: the SDRAM controller, the IDE interface, the
// Ethernet interface, the filter's control and output ports, and the system
// control registers.
//
// The bus is a decoder and a response multiplexer (see rdisk_pkg for the
// handshake and the address map): addr[24] = 0 selects the SDRAM; otherwise
// addr[15:12] selects an I/O slave. Only the selected slave sees req.valid.
// An access to an unmapped address completes at once and reads as zero, so a
// wrong address cannot hang the CPU; such accesses are counted in a sticky
// bus_error flag until reset. The decoder adds no clock of latency.
module sys_bus
  import rdisk_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req,
  output bus_rsp_t m_rsp,
  output bus_req_t s_req [NSLAVES],
  input  bus_rsp_t s_rsp [NSLAVES],
  output logic     bus_error
);
  logic [NSLAVES-1:0] sel;
  logic               unmapped;

  always_comb begin
    sel = '0;
    if (!m_req.addr[24]) sel[SL_SDRAM] = 1'b1;
    else
      unique case (m_req.addr[15:12])
        4'd1: sel[SL_IDE]   = 1'b1;
        4'd2: sel[SL_ETH]   = 1'b1;
        4'd3: sel[SL_FCTRL] = 1'b1;
        4'd4: sel[SL_FOUT]  = 1'b1;
        4'd5: sel[SL_SYS]   = 1'b1;
        default: ;
      endcase
    unmapped = m_req.valid && (sel == '0);
  end

  always_comb begin
    m_rsp = '{ready: unmapped, rdata: '0};
    for (int s = 0; s < NSLAVES; s++) begin
      s_req[s]       = m_req;
      s_req[s].valid = m_req.valid && sel[s];
      if (sel[s]) m_rsp = s_rsp[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        bus_error <= 1'b0;
    else if (unmapped) bus_error <= 1'b1;
  end

  // at most one slave is selected
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));

endmodule
