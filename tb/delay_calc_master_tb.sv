// delay_calc_master_tb: checks the master delay calculation on its own.
// Time stamps are fed every few cycles; for each one the testbench knows
// whether it must produce a message (one in D, starting with the first after
// enable) and computes T_N = T_I + N * 2436 / 508.58 MHz in real arithmetic.
// Checked: message present exactly one cycle after the stamp, T_N within
// 1 ps, D and shot number, carry into the next second, counters, the drop of
// a message while the previous one is still unaccepted, and restart of the
// decimation phase on re-enable.
`timescale 1ns/1ps
module delay_calc_master_tb;
  import timing_pkg::*;

  localparam real T_REV = 2436.0 * 1.0e12 / 508.58e6;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic enable = 0;
  logic [N_W-1:0] n = 0;
  logic [D_W-1:0] d = 0;
  logic ts_valid = 0;
  wr_time_t ts = '0;
  logic msg_valid, msg_ready;
  tag_msg_t msg;
  wr_time_t ti_last, tn_last;
  logic [31:0] za_count, tx_count, drop_count;

  delay_calc_master dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real t_abs(wr_time_t t);
    return real'(t.sec) * 1.0e12 + real'(t.ps);
  endfunction

  // Feed one stamp; msg_ready is held at rdy. Returns whether a message
  // appeared on the next cycle and checks it if one was expected.
  task automatic stamp(input wr_time_t t, input bit expect_msg, input int exp_shot);
    real expv;
    @(negedge clk);
    ts_valid = 1; ts = t;
    @(negedge clk);
    ts_valid = 0;
    check(msg_valid == expect_msg, $sformatf("message presence (expected %0b)", expect_msg));
    if (expect_msg && msg_valid) begin
      expv = t_abs(t) + real'(n) * T_REV;
      check(t_abs(msg.tn) - expv < 1.0 && expv - t_abs(msg.tn) < 1.0,
            $sformatf("T_N %.1f expected %.1f", t_abs(msg.tn), expv));
      check(msg.tn.ps < 40'd1_000_000_000_000, "T_N normalised");
      check(msg.d == ((d == 0) ? 16'd1 : d), "D in message");
      check(msg.shot == 32'(exp_shot), $sformatf("shot %0d expected %0d", msg.shot, exp_shot));
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    wr_time_t t;
    msg_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n = 1000; d = 3; enable = 1;
    t = '{sec: 40'd100, ps: 40'd123_456_789};
    for (int i = 0; i < 9; i++) begin
      stamp(t, (i % 3) == 0, i);
      t.ps = t.ps + 40'd4_789_806;
    end
    check(za_count == 9, "zero-address count");
    check(tx_count == 3, "message count");
    check(ti_last == '{sec: 40'd100, ps: 40'd123_456_789 + 8 * 40'd4_789_806}, "T_I read-back");

    // carry into the next second
    t = '{sec: 40'd100, ps: 40'd999_999_000_000};
    stamp(t, 1, 9);
    check(msg.tn.sec == 40'd101, "T_N seconds carry");

    // message not accepted: the next due one is dropped
    msg_ready = 0;
    enable = 0;
    @(negedge clk);
    enable = 1; d = 1; n = 1;
    t = '{sec: 40'd5, ps: 40'd0};
    @(negedge clk);
    ts_valid = 1; ts = t;
    @(negedge clk);
    ts_valid = 0;
    check(msg_valid && msg.shot == 0, "first message after re-enable has shot 0");
    ts_valid = 1; ts.ps = 40'd4_789_806;
    @(negedge clk);
    ts_valid = 0;
    check(drop_count == 1, "message dropped while output busy");
    check(msg.shot == 0, "held message unchanged");
    msg_ready = 1;
    @(negedge clk);
    check(!msg_valid, "message taken");

    // D = 0 behaves as D = 1
    d = 0;
    stamp('{sec: 40'd6, ps: 40'd0}, 1, 2);
    stamp('{sec: 40'd6, ps: 40'd4_789_806}, 1, 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
