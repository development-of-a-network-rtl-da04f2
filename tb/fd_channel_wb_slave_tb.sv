// fd_channel_wb_slave_tb: checks the output channel on its own with a WR time
// base started just before a second boundary.
// Each strobe's time (window of the cycle before the strobe + fine_o) is
// compared with T_O + i * (2436 / 508.58 MHz + tune), computed here in real
// arithmetic, within 1 ps; also pulse_time_o, shot_o, the pulse width set
// through the WIDTH register, train_done and train_ready, the skip and count
// of pulses whose time has already passed, the pulse and missed counters read
// over Wishbone, and flush.
`timescale 1ns/1ps
module fd_channel_wb_slave_tb;
  import timing_pkg::*;

  localparam real T_REV = 2436.0 * 1.0e12 / 508.58e6;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic [39:0] tm_sec = 40'd3;
  logic [27:0] tm_cycles = 28'd124_998_000;
  always @(posedge clk) begin
    if (tm_cycles == 28'd124_999_999) begin
      tm_cycles <= '0; tm_sec <= tm_sec + 1;
    end else tm_cycles <= tm_cycles + 1;
  end
  function automatic real now_abs();
    return real'(tm_sec) * 1.0e12 + real'(tm_cycles) * 8000.0;
  endfunction
  function automatic real t_abs(wr_time_t t);
    return real'(t.sec) * 1.0e12 + real'(t.ps);
  endfunction
  function automatic wr_time_t to_time(real a);
    longint r;
    r = longint'(a);
    return '{sec: 40'(r / 64'd1_000_000_000_000), ps: 40'(r % 64'd1_000_000_000_000)};
  endfunction

  wb_m2s_t wb_i = '0;
  wb_s2m_t wb_o;
  logic train_valid = 0, train_ready, train_done, flush = 0;
  out_train_t train = '0;
  logic strobe_o, pulse_o;
  logic [12:0] fine_o;
  wr_time_t pulse_time_o;
  logic [SHOT_W-1:0] shot_o;

  fd_channel_wb_slave dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wb(input bit we, input logic [31:0] adr, input logic [31:0] dat,
                    output logic [31:0] r);
    @(negedge clk);
    wb_i = '{cyc: 1, stb: 1, we: we, adr: adr, dat: dat, sel: 4'hF};
    @(negedge clk);
    check(wb_o.ack, "register ack after one cycle");
    r = wb_o.dat;
    wb_i = '0;
  endtask

  // pulse monitor
  real t0; int tune_q8 = 0; int shot0 = 0; int width = 4;
  int seen = 0, hi_cycles = 0;
  always @(negedge clk) begin
    if (rst_n && pulse_o) hi_cycles++;
    if (rst_n && strobe_o) begin
      real meas, expv;
      int i;
      meas = now_abs() - 8000.0 + real'(fine_o);
      i = int'(shot_o) - shot0;
      expv = t0 + real'(i) * (T_REV + real'(tune_q8) / 256.0);
      check(meas - expv < 1.0 && expv - meas < 1.0,
            $sformatf("pulse %0d at %.1f expected %.1f", i, meas, expv));
      check(t_abs(pulse_time_o) == meas, "pulse_time_o");
      seen++;
    end
  end

  task automatic run_train(input real start, input int d, input int shot);
    t0 = start; shot0 = shot;
    @(negedge clk);
    check(train_ready, "idle channel ready");
    train_valid = 1;
    train = '{t_o: to_time(start), d: 16'(d), shot: 32'(shot)};
    @(negedge clk);
    train_valid = 0;
    check(!train_ready, "busy after load");
  endtask

  initial begin
    logic [31:0] r;
    int done_seen;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wb(1, 32'h00, 32'd6, r);
    width = 6;
    wb(0, 32'h00, 0, r);
    check(r == 6, "WIDTH read back");

    // train of 5 crossing the second boundary
    seen = 0; hi_cycles = 0; done_seen = 0;
    run_train(now_abs() + 100_000.0 + 777.0, 5, 100);
    fork
      begin
        for (int c = 0; c < 5 * 700; c++) begin
          @(negedge clk);
          if (train_done) done_seen++;
        end
      end
    join
    check(seen == 5, $sformatf("5 pulses, saw %0d", seen));
    check(hi_cycles == 5 * 6, $sformatf("pulse width: %0d high cycles", hi_cycles));
    check(done_seen == 1, "one train_done");
    check(train_ready, "idle after train");
    check(tm_sec == 40'd4, "run crossed the second boundary");

    // fine tuning of the period: -31.2 ps in 1/256 ps units
    tune_q8 = -7987;
    wb(1, 32'h04, 32'(tune_q8), r);
    seen = 0;
    run_train(now_abs() + 100_000.0 + 3.0, 4, 7);
    repeat (4 * 700) @(negedge clk);
    check(seen == 4, "tuned train pulses");

    // late start: first two pulse times already past
    seen = 0;
    run_train(now_abs() - 2.5 * T_REV, 5, 0);
    repeat (4 * 700) @(negedge clk);
    check(seen == 2, $sformatf("late train: %0d pulses fired", seen));
    wb(0, 32'h0C, 0, r);
    check(r == 3, $sformatf("missed count %0d", r));
    wb(0, 32'h08, 0, r);
    check(r == 11, $sformatf("pulse count %0d", r));

    // flush drops a running train
    seen = 0;
    run_train(now_abs() + 100_000.0, 10, 0);
    repeat (400) @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    check(train_ready, "idle after flush");
    repeat (1400) @(negedge clk);
    check(seen == 1, $sformatf("flushed train stopped after %0d pulses", seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
