// fd_channel_wb_slave: output channel of the modified fine-delay core in the
// slave node, with its Wishbone register bank.
//
// The channel turns a scheduled train {first time T_O, count D, tag} into D
// output pulses. The first pulse is placed at the absolute WR time T_O; the
// following D-1 pulses continue at the revolution period (HARMONIC RF
// buckets) plus a programmable fine tuning of the period, so that together
// with the next train, whose T_O lies D turns later, the output is a
// continuous revolution-frequency signal. This mirrors the two output sources
// of the design: "output by absolute time" and "output by pulse generation".
//
// Pulse placement: the WR time of the current clock cycle is
// tm_sec + tm_cycles * 8 ns. When a pending pulse time falls inside the 8 ns
// window of the current cycle, the channel raises strobe_o on the next clock
// edge with fine_o = the pulse time's offset (ps) inside that window; the
// analog delay line of the fine-delay card adds fine_o to the coarse strobe.
// A pulse time that already lies in the past when it becomes due is counted
// as missed and skipped. pulse_o is a WIDTH-cycle wide version of the strobe.
// pulse_time_o is the exact scheduled time of the pulse being strobed and
// shot_o its tag (train shot number + index within the train).
//
// The period is accumulated with PERIOD_FRAC_BITS fractional picosecond bits,
// so a train does not drift through rounding; the time of each pulse is the
// accumulated value truncated to whole picoseconds.
//
// Registers (byte offsets, 32-bit): 0x00 WIDTH (cycles, R/W), 0x04 TUNE
// (signed period correction in 1/256 ps, R/W), 0x08 pulse count (RO),
// 0x0C missed count (RO), 0x10 status: bit 0 busy (RO). Wishbone classic,
// ack one cycle after the request.
//
// Train handshake: train_ready is high while the channel is idle; a train is
// taken when train_valid && train_ready. train_done pulses for one cycle when
// the last pulse of a train has been placed or skipped. flush returns the
// channel to idle at once.
//
// The absolute-time-plus-pulse-train scheme, the period and the frequency
// fine tuning follow the design; the register map, the units, the pulse
// width and the late-pulse policy are this implementation's choices.
//
// Byte selects (sel) are ignored: every register is written as a whole word.
module fd_channel_wb_slave
  import timing_pkg::*;
#(
  parameter int unsigned WIDTH_RESET = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // WR time of the current cycle
  input  logic [39:0] tm_sec,
  input  logic [27:0] tm_cycles,
  // register access
  input  wb_m2s_t     wb_i,
  output wb_s2m_t     wb_o,
  // scheduled trains
  input  logic        train_valid,
  output logic        train_ready,
  input  out_train_t  train,
  output logic        train_done,
  input  logic        flush,
  // output towards the delay line
  output logic        strobe_o,
  output logic [12:0] fine_o,
  output logic        pulse_o,
  output wr_time_t    pulse_time_o,
  output logic [SHOT_W-1:0] shot_o
);

  localparam logic [PSQ_W-1:0] SEC_Q = PSQ_W'(PS_PER_SEC) << PERIOD_FRAC_BITS;

  // ------------------------------------------------------------- registers
  logic [15:0] width_r;
  logic signed [31:0] tune_r;
  logic [31:0] pulse_count, missed_count;

  // ----------------------------------------------------------- train state
  logic              busy;
  logic [39:0]       tgt_sec;
  logic [PSQ_W-1:0] tgt_psq;     // ps with PERIOD_FRAC_BITS fraction bits
  logic [D_W-1:0]    remaining;
  logic [SHOT_W-1:0] cur_shot;
  logic [15:0]       width_cnt;

  logic [39:0]       now_ps;
  logic [39:0]       tgt_ps;
  logic [PSQ_W-1:0] period_q;
  logic              is_past, in_window;
  logic [PSQ_W-1:0] next_psq;
  logic [PSQ_W-1:0] adv_psq;

  assign now_ps   = 40'(tm_cycles) * 40'(CLK_PERIOD_PS);
  assign tgt_ps   = tgt_psq[PERIOD_FRAC_BITS +: 40];
  assign period_q = REV_PERIOD_Q + PSQ_W'(signed'(PSQ_W'(tune_r)) <<< (PERIOD_FRAC_BITS - 8));
  assign is_past  = (tgt_sec < tm_sec) || ((tgt_sec == tm_sec) && (tgt_ps < now_ps));
  assign in_window = (tgt_sec == tm_sec) && !is_past &&
                     ((tgt_ps - now_ps) < 40'(CLK_PERIOD_PS));
  assign adv_psq  = tgt_psq + period_q;
  assign next_psq = (adv_psq >= SEC_Q) ? adv_psq - SEC_Q : adv_psq;

  assign train_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      tgt_sec      <= '0;
      tgt_psq      <= '0;
      remaining    <= '0;
      cur_shot     <= '0;
      strobe_o     <= 1'b0;
      fine_o       <= '0;
      pulse_time_o <= '0;
      shot_o       <= '0;
      train_done   <= 1'b0;
      pulse_count  <= '0;
      missed_count <= '0;
      width_cnt    <= '0;
    end else begin
      strobe_o   <= 1'b0;
      train_done <= 1'b0;
      if (width_cnt != '0) width_cnt <= width_cnt - 16'd1;

      if (flush) begin
        busy <= 1'b0;
      end else if (!busy) begin
        if (train_valid && train.d != '0) begin
          busy      <= 1'b1;
          tgt_sec   <= train.t_o.sec;
          tgt_psq   <= {train.t_o.ps, {PERIOD_FRAC_BITS{1'b0}}};
          remaining <= train.d;
          cur_shot  <= train.shot;
        end
      end else if (is_past || in_window) begin
        if (in_window) begin
          strobe_o     <= 1'b1;
          fine_o       <= 13'(tgt_ps - now_ps);
          pulse_time_o <= '{sec: tgt_sec, ps: tgt_ps};
          shot_o       <= cur_shot;
          width_cnt    <= (width_r == '0) ? 16'd1 : width_r;
          pulse_count  <= pulse_count + 32'd1;
        end else begin
          missed_count <= missed_count + 32'd1;
        end
        tgt_psq   <= next_psq;
        tgt_sec   <= (adv_psq >= SEC_Q) ? tgt_sec + 40'd1 : tgt_sec;
        cur_shot  <= cur_shot + SHOT_W'(1);
        remaining <= remaining - D_W'(1);
        if (remaining == D_W'(1)) begin
          busy       <= 1'b0;
          train_done <= 1'b1;
        end
      end
    end
  end

  assign pulse_o = (width_cnt != '0);

  // ------------------------------------------------------- Wishbone slave
  logic [2:0] widx;
  assign widx = wb_i.adr[4:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      width_r <= 16'(WIDTH_RESET);
      tune_r  <= '0;
      wb_o    <= '0;
    end else begin
      wb_o.ack <= 1'b0;
      if (wb_i.cyc && wb_i.stb && !wb_o.ack) begin
        wb_o.ack <= 1'b1;
        if (wb_i.we) begin
          case (widx)
            3'd0: width_r <= wb_i.dat[15:0];
            3'd1: tune_r  <= signed'(wb_i.dat);
            default: ;
          endcase
        end
        case (widx)
          3'd0:    wb_o.dat <= 32'(width_r);
          3'd1:    wb_o.dat <= tune_r;
          3'd2:    wb_o.dat <= pulse_count;
          3'd3:    wb_o.dat <= missed_count;
          3'd4:    wb_o.dat <= {31'd0, busy};
          default: wb_o.dat <= '0;
        endcase
      end
    end
  end

  // Wishbone rule: an acknowledge only ever answers a request of the
  // previous cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wb_o.ack |-> $past(wb_i.cyc && wb_i.stb));

endmodule
