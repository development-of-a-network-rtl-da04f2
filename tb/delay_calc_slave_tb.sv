// delay_calc_slave_tb: checks the slave delay calculation and its train
// queue, with the output channel replaced by a handshake driven here.
// Checked: T_O = T_N + K / 508.58 MHz + F (real arithmetic, within 1 ps) with
// a carry into the next second, first-in first-out order of several queued
// trains (the D < N situation), the level count, the overflow of a full
// queue, the underrun count when a train ends with nothing queued, and the
// flush on disable. The queue depth is reduced to 4 to reach overflow.
`timescale 1ns/1ps
module delay_calc_slave_tb;
  import timing_pkg::*;

  localparam real T_RF = 1.0e12 / 508.58e6;
  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic enable = 0;
  logic [K_W-1:0] k = 0;
  logic [F_W-1:0] f = 0;
  logic msg_valid = 0;
  tag_msg_t msg = '0;
  logic train_valid, train_ready = 0, train_done = 0, flush;
  out_train_t train;
  logic [$clog2(DEPTH+1)-1:0] level;
  logic [31:0] overflow_count, underrun_count;

  delay_calc_slave #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic real t_abs(wr_time_t t);
    return real'(t.sec) * 1.0e12 + real'(t.ps);
  endfunction

  task automatic send(input wr_time_t tn, input int dd, input int shot);
    @(negedge clk);
    msg_valid = 1;
    msg = '{tn: tn, d: 16'(dd), shot: 32'(shot)};
    @(negedge clk);
    msg_valid = 0;
  endtask

  task automatic take(input wr_time_t tn, input int dd, input int shot);
    real expv;
    @(negedge clk);
    check(train_valid, "train available");
    expv = t_abs(tn) + real'(k) * T_RF + real'(f);
    check(t_abs(train.t_o) - expv < 1.0 && expv - t_abs(train.t_o) < 1.0,
          $sformatf("T_O %.1f expected %.1f", t_abs(train.t_o), expv));
    check(train.t_o.ps < 40'd1_000_000_000_000, "T_O normalised");
    check(train.d == 16'(dd) && train.shot == 32'(shot), $sformatf("train d/shot %0d/%0d", train.d, train.shot));
    train_ready = 1;
    @(negedge clk);
    train_ready = 0;
  endtask

  initial begin
    wr_time_t tn [6];
    repeat (3) @(negedge clk);
    rst_n = 1;
    k = 12'd1234; f = 32'd5000; enable = 1;
    for (int i = 0; i < 6; i++)
      tn[i] = '{sec: 40'd50, ps: 40'd999_990_000_000 + 40'(i) * 40'd4_789_806};
    // three messages before the first output: D < N
    for (int i = 0; i < 3; i++) send(tn[i], 2, 10 * i);
    check(level == 3, $sformatf("level %0d after three messages", level));
    take(tn[0], 2, 0);
    take(tn[1], 2, 10);
    check(level == 1, "level after two pops");
    // fill up and overflow
    for (int i = 3; i < 6; i++) send(tn[i], 2, 10 * i);
    check(level == 4, "queue full");
    send(tn[0], 2, 99);
    check(overflow_count == 1, "overflow counted");
    check(level == 4, "level stays at depth");
    take(tn[2], 2, 20);
    take(tn[3], 2, 30);
    take(tn[4], 2, 40);
    take(tn[5], 2, 50);
    check(!train_valid && level == 0, "queue empty");
    // carry: T_N late in the second plus K and F crosses into the next one
    f = 32'd20_000_000;
    send('{sec: 40'd7, ps: 40'd999_999_999_000}, 3, 7);
    @(negedge clk);
    check(train.t_o.sec == 40'd8, "carry into next second");
    take('{sec: 40'd7, ps: 40'd999_999_999_000}, 3, 7);
    // underrun: the channel reports end of train with nothing queued
    train_done = 1;
    @(negedge clk);
    train_done = 0;
    check(underrun_count == 1, "underrun counted");
    // flush on disable
    send(tn[0], 2, 1);
    check(level == 1, "queued before disable");
    enable = 0;
    @(negedge clk);
    check(flush, "flush while disabled");
    @(negedge clk);
    check(level == 0 && !train_valid, "queue emptied by disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
