// delay_calc_master: master delay calculation of the modified fine-delay core.
//
// Every zero-address (revolution) signal arrives as an absolute WR time stamp
// T_I from the time-to-digital converter of the fine-delay card. The block
// treats it as a pre-trigger for an output N turns later and computes
//     T_N = T_I + N * HARMONIC * T_RF            (Eq. 1, N turns later)
// It sends T_N together with the decimation rate D only for one zero-address
// signal in every D: the first after enabling, then every D-th one; the
// others are counted and otherwise ignored ("no operation"). Each message also
// carries a shot number, which is the index of its zero-address signal since
// the block was enabled.
//
// Interface: ts_valid/ts is a one-cycle strobe with the time stamp.
// msg_valid/msg_ready/msg is a valid-ready handshake towards the network
// transmitter; a message waits in a single output register until accepted.
// If the register is still full when the next message is due, the new one is
// dropped and drop_count increments. n, d and enable are static while enabled;
// D = 0 is treated as D = 1. Clearing enable restarts the decimation phase and
// the shot count.
//
// Timing: msg_valid rises on the clock edge after the ts_valid strobe that
// produced it (one cycle latency); one time stamp can be taken every cycle.
//
// The formula and the decimation follow the design; the shot-number
// definition, the drop policy and the handshake are this implementation's
// choices.
module delay_calc_master
  import timing_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic [N_W-1:0]      n,
  input  logic [D_W-1:0]      d,
  // zero-address time stamps
  input  logic                ts_valid,
  input  wr_time_t            ts,
  // tag messages towards the network
  output logic                msg_valid,
  input  logic                msg_ready,
  output tag_msg_t            msg,
  // status
  output wr_time_t            ti_last,
  output wr_time_t            tn_last,
  output logic [31:0]         za_count,
  output logic [31:0]         tx_count,
  output logic [31:0]         drop_count
);

  logic [D_W-1:0] phase;
  logic [D_W-1:0] d_eff;
  wr_time_t       tn_calc;
  logic           slot_free;

  assign d_eff     = (d == '0) ? D_W'(1) : d;
  assign tn_calc   = time_add_ps(ts, buckets_to_ps(32'(n) * 32'(HARMONIC)));
  assign slot_free = !msg_valid || msg_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      msg_valid  <= 1'b0;
      msg        <= '0;
      ti_last    <= '0;
      tn_last    <= '0;
      za_count   <= '0;
      tx_count   <= '0;
      drop_count <= '0;
    end else begin
      if (msg_valid && msg_ready) msg_valid <= 1'b0;

      if (!enable) begin
        phase    <= '0;
        za_count <= '0;
      end else if (ts_valid) begin
        za_count <= za_count + 32'd1;
        ti_last  <= ts;
        phase    <= (phase + D_W'(1) >= d_eff) ? '0 : phase + D_W'(1);
        if (phase == '0) begin
          tn_last <= tn_calc;
          if (slot_free) begin
            msg_valid <= 1'b1;
            msg.tn    <= tn_calc;
            msg.d     <= d_eff;
            msg.shot  <= za_count;
            tx_count  <= tx_count + 32'd1;
          end else begin
            drop_count <= drop_count + 32'd1;
          end
        end
      end
    end
  end

  // A message held in the output register must stay unchanged until taken.
  property p_msg_stable;
    @(posedge clk) disable iff (!rst_n)
      (msg_valid && !msg_ready) |=> (msg_valid && $stable(msg));
  endproperty
  assert property (p_msg_stable);

endmodule
