// spec_top_slave: FPGA logic of the slave node (carrier card with the
// fine-delay mezzanine, running a White Rabbit node).
//
// Tag messages from the master arrive as Wishbone writes from the Etherbone
// slave core (Wishbone master 1) into the main register bank; the write of D
// commits each message. The slave delay calculation adds the target bunch
// offset K RF buckets and the fine delay F to T_N, queues the resulting
// train {T_O, D, shot} and passes it to the output channel, which emits the
// first pulse at T_O and D-1 more at the (fine-tuned) revolution period. The
// output is a coarse strobe with a picosecond fine delay for the delay line
// of the fine-delay card, a WIDTH-cycle pulse, the scheduled time and the
// tag of each pulse.
//
// Address map on the node's Wishbone bus (host PC through PCIe is master 0):
//   0x0000_0000..0x0000_00FF  main register bank (K, F, mailbox, status)
//   0x0000_0100..0x0000_01FF  channel register bank (width, tuning, status)
// tm_sec/tm_cycles is the WR time of the current clock cycle (125 MHz) from
// the WR core, which is outside this module.
//
// The partition follows the design's block diagram of the slave; the
// interfaces and the address map are this implementation's choices.
module spec_top_slave
  import timing_pkg::*;
#(
  parameter int unsigned QDEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [39:0] tm_sec,
  input  logic [27:0] tm_cycles,
  // Wishbone masters: host PC through PCIe, master node through Etherbone
  input  wb_m2s_t     host_wb_i,
  output wb_s2m_t     host_wb_o,
  input  wb_m2s_t     eb_wb_i,
  output wb_s2m_t     eb_wb_o,
  // output towards the delay line of the fine-delay card
  output logic        strobe_o,
  output logic [12:0] fine_o,
  output logic        pulse_o,
  output wr_time_t    pulse_time_o,
  output logic [SHOT_W-1:0] shot_o
);

  localparam int unsigned LW = $clog2(QDEPTH + 1);

  wb_m2s_t [1:0] m_req;
  wb_s2m_t [1:0] m_rsp;
  wb_m2s_t [1:0] s_req;
  wb_s2m_t [1:0] s_rsp;

  logic           enable;
  logic [K_W-1:0] k;
  logic [F_W-1:0] f;
  logic           msg_valid;
  tag_msg_t       msg;
  logic [LW-1:0]  level;
  logic [31:0]    overflow_count, underrun_count;
  logic           train_valid, train_ready, train_done, flush;
  out_train_t     train;

  assign m_req[0]  = host_wb_i;
  assign m_req[1]  = eb_wb_i;
  assign host_wb_o = m_rsp[0];
  assign eb_wb_o   = m_rsp[1];

  wb_intercon #(
    .NS   (2),
    .BASE ({32'h0000_0100, 32'h0000_0000}),
    .MASK ({32'hFFFF_FF00, 32'hFFFF_FF00})
  ) u_intercon (
    .clk, .rst_n,
    .m_i (m_req), .m_o (m_rsp),
    .s_o (s_req), .s_i (s_rsp)
  );

  fd_main_wb_slave_slave #(.QLEVEL_W(LW)) u_fd_main (
    .clk, .rst_n,
    .wb_i (s_req[0]), .wb_o (s_rsp[0]),
    .enable, .k, .f, .msg_valid, .msg,
    .level, .overflow_count, .underrun_count
  );

  delay_calc_slave #(.DEPTH(QDEPTH)) u_delay_calc (
    .clk, .rst_n,
    .enable, .k, .f, .msg_valid, .msg,
    .train_valid, .train_ready, .train, .train_done, .flush,
    .level, .overflow_count, .underrun_count
  );

  fd_channel_wb_slave u_channel (
    .clk, .rst_n,
    .tm_sec, .tm_cycles,
    .wb_i (s_req[1]), .wb_o (s_rsp[1]),
    .train_valid, .train_ready, .train, .train_done, .flush,
    .strobe_o, .fine_o, .pulse_o, .pulse_time_o, .shot_o
  );

endmodule
