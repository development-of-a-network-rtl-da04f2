// wb_intercon: Wishbone interconnect of a node's FPGA logic.
//
// Two bus masters share the node's Wishbone bus: master 0 is the PCIe bridge
// to the host PC, master 1 the Etherbone core, through which a remote node
// reads and writes this node's registers over the White Rabbit network. The
// interconnect grants the bus to one master at a time and routes its
// requests to one of NS slaves by address.
//
// Arbitration: when the bus is free and masters raise cyc, the grant goes to
// the requester; if both request, to the one that did not have the bus last
// (round robin). The grant takes one cycle and holds until its master drops
// cyc. Decoding: slave i is selected when (adr & MASK_i) == BASE_i, with
// BASE and MASK packed 32 bits per slave, slave 0 in the low bits. A request
// that hits no slave is acknowledged by the interconnect with zero data one
// cycle later, so a stray access cannot hang a master.
//
// The role of the block follows the design (it links the PCIe bridge, the
// Etherbone core, the WR core and the fine-delay core); its arbitration and
// decoding rules are this implementation's choices.
module wb_intercon
  import timing_pkg::*;
#(
  parameter int unsigned      NS   = 2,
  parameter logic [NS*32-1:0] BASE = {32'h0000_0100, 32'h0000_0000},
  parameter logic [NS*32-1:0] MASK = {32'hFFFF_FF00, 32'hFFFF_FF00}
) (
  input  logic            clk,
  input  logic            rst_n,
  input  wb_m2s_t [1:0]   m_i,
  output wb_s2m_t [1:0]   m_o,
  output wb_m2s_t [NS-1:0] s_o,
  input  wb_s2m_t [NS-1:0] s_i
);

  logic    granted;
  logic    owner;
  logic    last_owner;
  wb_m2s_t req;
  logic [NS-1:0] hit;
  wb_s2m_t rsp;
  logic    err_ack;

  assign req = granted ? m_i[owner] : '0;

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      hit[i] = ((req.adr & MASK[i*32 +: 32]) == BASE[i*32 +: 32]);
      s_o[i] = req;
      s_o[i].cyc = req.cyc && hit[i];
      s_o[i].stb = req.stb && hit[i];
    end
  end

  always_comb begin
    rsp = '0;
    for (int i = 0; i < NS; i++) begin
      if (hit[i]) begin
        rsp.ack = rsp.ack | s_i[i].ack;
        rsp.dat = rsp.dat | s_i[i].dat;
      end
    end
    rsp.ack = rsp.ack | err_ack;
  end

  always_comb begin
    m_o = '0;
    if (granted) m_o[owner] = rsp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      granted    <= 1'b0;
      owner      <= 1'b0;
      last_owner <= 1'b1;
      err_ack    <= 1'b0;
    end else begin
      err_ack <= req.cyc && req.stb && (hit == '0) && !err_ack;
      if (!granted) begin
        if (m_i[0].cyc && m_i[1].cyc) begin
          granted <= 1'b1;
          owner   <= !last_owner;
        end else if (m_i[0].cyc || m_i[1].cyc) begin
          granted <= 1'b1;
          owner   <= m_i[1].cyc;
        end
      end else if (!m_i[owner].cyc) begin
        granted    <= 1'b0;
        last_owner <= owner;
      end
    end
  end

  // At most one slave may be selected by any address.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit));

endmodule
