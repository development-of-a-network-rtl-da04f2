// timing_dist_top: revolution-frequency and tag distribution over a White
// Rabbit network, master and slave node logic side by side.
//
// The master node time-stamps the storage ring's zero-address signal, treats
// it as a pre-trigger N turns ahead and, once every D turns, sends the output
// time T_N, the decimation rate D and a shot number to the slave node. The
// slave adds the target bunch address K (in RF buckets) and a fine delay F,
// outputs a pulse at that absolute WR time and fills the D-1 turns up to the
// next message with a pulse train at the revolution period, giving a
// continuous ~208.8 kHz signal locked to the chosen bunch.
//
// The path between the nodes (Etherbone master core, WR switches and fibre,
// Etherbone slave core) is not part of this logic: the master's message
// stream (m_tx_*) and the slave's Etherbone Wishbone port (s_eb_wb_*) are
// ports, as are both nodes' host (PCIe) Wishbone ports, the master's
// zero-address time stamps and the slave's WR time. Each node runs on its own
// 125 MHz WR reference clock; White Rabbit keeps the two time bases aligned.
//
// The system structure follows the design; port-level choices are
// documented in the two node modules.
module timing_dist_top
  import timing_pkg::*;
(
  // master node
  input  logic        m_clk,
  input  logic        m_rst_n,
  input  wb_m2s_t     m_host_wb_i,
  output wb_s2m_t     m_host_wb_o,
  input  wb_m2s_t     m_eb_wb_i,
  output wb_s2m_t     m_eb_wb_o,
  input  logic        m_tdc_valid,
  input  wr_time_t    m_tdc_ts,
  output logic        m_tx_valid,
  input  logic        m_tx_ready,
  output tag_msg_t    m_tx_msg,
  // slave node
  input  logic        s_clk,
  input  logic        s_rst_n,
  input  logic [39:0] s_tm_sec,
  input  logic [27:0] s_tm_cycles,
  input  wb_m2s_t     s_host_wb_i,
  output wb_s2m_t     s_host_wb_o,
  input  wb_m2s_t     s_eb_wb_i,
  output wb_s2m_t     s_eb_wb_o,
  output logic        s_strobe_o,
  output logic [12:0] s_fine_o,
  output logic        s_pulse_o,
  output wr_time_t    s_pulse_time_o,
  output logic [SHOT_W-1:0] s_shot_o
);

  spec_top_master u_master (
    .clk       (m_clk),
    .rst_n     (m_rst_n),
    .host_wb_i (m_host_wb_i),
    .host_wb_o (m_host_wb_o),
    .eb_wb_i   (m_eb_wb_i),
    .eb_wb_o   (m_eb_wb_o),
    .tdc_valid (m_tdc_valid),
    .tdc_ts    (m_tdc_ts),
    .tx_valid  (m_tx_valid),
    .tx_ready  (m_tx_ready),
    .tx_msg    (m_tx_msg)
  );

  spec_top_slave u_slave (
    .clk          (s_clk),
    .rst_n        (s_rst_n),
    .tm_sec       (s_tm_sec),
    .tm_cycles    (s_tm_cycles),
    .host_wb_i    (s_host_wb_i),
    .host_wb_o    (s_host_wb_o),
    .eb_wb_i      (s_eb_wb_i),
    .eb_wb_o      (s_eb_wb_o),
    .strobe_o     (s_strobe_o),
    .fine_o       (s_fine_o),
    .pulse_o      (s_pulse_o),
    .pulse_time_o (s_pulse_time_o),
    .shot_o       (s_shot_o)
  );

endmodule
