// delay_calc_slave: slave delay calculation of the modified fine-delay core.
//
// For each tag message {T_N, D, shot} received from the master it computes the
// output time of the target bunch
//     T_O = T_N + K * T_RF + F                   (Eq. 2 plus fine delay F)
// and appends the train {T_O, D, shot} to a queue. The output channel takes
// trains from the head of the queue one at a time and emits D pulses for each.
//
// The queue is what makes D < N work: the master sends T_N as soon as the
// zero-address pre-trigger is seen, N turns ahead of the output, while it
// sends a new message every D turns. With D < N about ceil(N/D) messages are
// therefore in flight inside the slave before the first of them is due.
// With D > N at most one is waiting. DEPTH bounds N/D.
//
// Interface: msg_valid is a one-cycle strobe with msg (from the main register
// bank). k, f and enable are static while enabled; clearing enable empties the
// queue and makes the channel drop its current train (flush). train_* is a
// valid-ready handshake to the channel; train_done comes back from it.
// Status: level (entries waiting), overflow_count (messages lost because the
// queue was full) and underrun_count (trains that ended with nothing queued
// behind them while enabled, i.e. the output stopped).
//
// Timing: a message is in the queue, and at the head if the queue was empty,
// on the clock edge after its strobe.
//
// Eq. 2 and the support for D < N follow the design; the queue, its depth and
// the status counters are this implementation's choices.
module delay_calc_slave
  import timing_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [K_W-1:0]    k,
  input  logic [F_W-1:0]    f,
  input  logic              msg_valid,
  input  tag_msg_t          msg,
  output logic              train_valid,
  input  logic              train_ready,
  output out_train_t        train,
  input  logic              train_done,
  output logic              flush,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic [31:0]       overflow_count,
  output logic [31:0]       underrun_count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  out_train_t    mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  out_train_t    calc;
  logic          push, pop;

  always_comb begin
    calc.t_o  = time_add_ps(time_add_ps(msg.tn, buckets_to_ps(32'(k))), 40'(f));
    calc.d    = msg.d;
    calc.shot = msg.shot;
  end

  assign flush       = !enable;
  assign train_valid = (level != '0);
  assign train       = mem[rd_ptr];
  assign pop         = train_valid && train_ready;
  assign push        = enable && msg_valid && (level != ($clog2(DEPTH+1))'(DEPTH) || pop);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= calc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr         <= '0;
      rd_ptr         <= '0;
      level          <= '0;
      overflow_count <= '0;
      underrun_count <= '0;
    end else if (!enable) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      case ({push, pop})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: ;
      endcase
      if (msg_valid && !push) overflow_count <= overflow_count + 32'd1;
      if (train_done && level == '0) underrun_count <= underrun_count + 32'd1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) level <= ($clog2(DEPTH+1))'(DEPTH));

endmodule
