// spec_top_master: FPGA logic of the master node (carrier card with the
// fine-delay mezzanine, running a White Rabbit node).
//
// The zero-address (revolution) signal is time-stamped by the fine-delay
// card; each time stamp T_I enters here on tdc_valid/tdc_ts. The master delay
// calculation turns one in every D of them into a tag message {T_N, D, shot}
// with T_N = T_I + N turns, and hands it to the Etherbone master core, which
// writes it into the slave node's registers over the WR network. N, D and the
// enable bit live in the main register bank, reachable from the host PC
// (PCIe bridge, Wishbone master 0) and from the network (Etherbone slave
// core, Wishbone master 1) through the interconnect at byte address
// 0x0000_0000..0x0000_00FF.
//
// The WR core, the transceiver, the PCIe bridge, the Etherbone cores and the
// time-to-digital converter of the fine-delay card are outside this module:
// their signals are its ports. tx_* is the valid-ready message stream to the
// Etherbone master; tx_valid rises one cycle after the time stamp that
// produced it.
//
// The partition follows the design's block diagram of the improved master;
// the port-level interfaces are this implementation's choices.
module spec_top_master
  import timing_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // Wishbone masters: host PC through PCIe, remote node through Etherbone
  input  wb_m2s_t  host_wb_i,
  output wb_s2m_t  host_wb_o,
  input  wb_m2s_t  eb_wb_i,
  output wb_s2m_t  eb_wb_o,
  // zero-address time stamps from the fine-delay card
  input  logic     tdc_valid,
  input  wr_time_t tdc_ts,
  // tag messages to the Etherbone master
  output logic     tx_valid,
  input  logic     tx_ready,
  output tag_msg_t tx_msg
);

  wb_m2s_t [1:0] m_req;
  wb_s2m_t [1:0] m_rsp;
  wb_m2s_t [0:0] s_req;
  wb_s2m_t [0:0] s_rsp;

  logic           enable;
  logic [N_W-1:0] n;
  logic [D_W-1:0] d;
  wr_time_t       ti_last, tn_last;
  logic [31:0]    za_count, tx_count, drop_count;

  assign m_req[0]  = host_wb_i;
  assign m_req[1]  = eb_wb_i;
  assign host_wb_o = m_rsp[0];
  assign eb_wb_o   = m_rsp[1];

  wb_intercon #(
    .NS   (1),
    .BASE (32'h0000_0000),
    .MASK (32'hFFFF_FF00)
  ) u_intercon (
    .clk, .rst_n,
    .m_i (m_req), .m_o (m_rsp),
    .s_o (s_req), .s_i (s_rsp)
  );

  fd_main_wb_slave_master u_fd_main (
    .clk, .rst_n,
    .wb_i (s_req[0]), .wb_o (s_rsp[0]),
    .enable, .n, .d,
    .ti_last, .tn_last, .za_count, .tx_count, .drop_count
  );

  delay_calc_master u_delay_calc (
    .clk, .rst_n,
    .enable, .n, .d,
    .ts_valid  (tdc_valid),
    .ts        (tdc_ts),
    .msg_valid (tx_valid),
    .msg_ready (tx_ready),
    .msg       (tx_msg),
    .ti_last, .tn_last, .za_count, .tx_count, .drop_count
  );

endmodule
