// spec_top_slave_tb: checks the slave node logic through its ports. The host
// port sets K, F and the pulse width; the Etherbone port delivers three tag
// messages with D = 2 whose output times lie in the future (so several wait
// in the queue, as with D < N). The slave must emit 6 pulses: for message m
// and pulse i, at T_N(m) + K / 508.58 MHz + F + i * 2436 / 508.58 MHz (real
// arithmetic, within 2 ps), tagged shot(m) + i, and the status registers
// must show the queue level and, after the last train, one output stop.
`timescale 1ns/1ps
module spec_top_slave_tb;
  import timing_pkg::*;

  localparam real T_RF  = 1.0e12 / 508.58e6;
  localparam real T_REV = 2436.0 * T_RF;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic [39:0] tm_sec = 40'd20;
  logic [27:0] tm_cycles = 28'd1000;
  always @(posedge clk) tm_cycles <= tm_cycles + 1;
  function automatic real now_abs();
    return real'(tm_sec) * 1.0e12 + real'(tm_cycles) * 8000.0;
  endfunction

  wb_m2s_t host_wb_i = '0, eb_wb_i = '0;
  wb_s2m_t host_wb_o, eb_wb_o;
  logic strobe_o, pulse_o;
  logic [12:0] fine_o;
  wr_time_t pulse_time_o;
  logic [SHOT_W-1:0] shot_o;

  spec_top_slave dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wb(input bit eb, input bit we, input logic [31:0] adr,
                    input logic [31:0] dat, output logic [31:0] r);
    wb_m2s_t q;
    q = '{cyc: 1, stb: 1, we: we, adr: adr, dat: dat, sel: 4'hF};
    @(negedge clk);
    if (eb) eb_wb_i = q; else host_wb_i = q;
    for (int w = 0; w < 20; w++) begin
      @(negedge clk);
      if ((eb ? eb_wb_o.ack : host_wb_o.ack)) break;
    end
    check(eb ? eb_wb_o.ack : host_wb_o.ack, $sformatf("ack for %h", adr));
    r = eb ? eb_wb_o.dat : host_wb_o.dat;
    if (eb) eb_wb_i = '0; else host_wb_i = '0;
  endtask

  real tn [3];
  int  seen = 0;
  always @(negedge clk) begin
    if (rst_n && strobe_o) begin
      real meas, expv;
      int m, i;
      meas = now_abs() - 8000.0 + real'(fine_o);
      m = int'(shot_o) / 100;
      i = int'(shot_o) % 100;
      expv = tn[m] + 100.0 * T_RF + 2500.0 + real'(i) * T_REV;
      check(seen < 6 && m < 3 && i < 2, $sformatf("unexpected pulse shot %0d", shot_o));
      check(meas - expv < 2.0 && expv - meas < 2.0,
            $sformatf("pulse %0d at %.1f expected %.1f", shot_o, meas, expv));
      seen++;
    end
  end

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wb(0, 1, 32'h04, 32'd100, r);   // K
    wb(0, 1, 32'h08, 32'd2500, r);  // F
    wb(0, 1, 32'h100, 32'd3, r);    // pulse width
    wb(0, 1, 32'h00, 32'd1, r);     // enable
    for (int m = 0; m < 3; m++) begin
      longint t;
      tn[m] = now_abs() + 50_000.0 + 0.0 + real'(2 * m) * T_REV + 333.0;
      if (m > 0) tn[m] = tn[0] + real'(2 * m) * T_REV;
      t = longint'(tn[m]);
      tn[m] = real'(t);
      wb(1, 1, 32'h0C, 32'(t / 64'd1_000_000_000_000 >> 32), r);
      wb(1, 1, 32'h10, 32'(t / 64'd1_000_000_000_000), r);
      wb(1, 1, 32'h14, 32'((t % 64'd1_000_000_000_000) >> 32), r);
      wb(1, 1, 32'h18, 32'(t % 64'd1_000_000_000_000), r);
      wb(1, 1, 32'h1C, 32'(100 * m), r);
      wb(1, 1, 32'h20, 32'd2, r);
    end
    wb(0, 0, 32'h24, 0, r);
    check(r == 2, $sformatf("two trains waiting behind the active one, level %0d", r));
    repeat (7 * 600) @(negedge clk);
    check(seen == 6, $sformatf("6 pulses, saw %0d", seen));
    wb(0, 0, 32'h2C, 0, r); check(r == 1, "one output stop after the last train");
    wb(0, 0, 32'h108, 0, r); check(r == 6, "channel pulse count");
    wb(0, 0, 32'h10C, 0, r); check(r == 0, "no missed pulses");
    wb(0, 0, 32'h30, 0, r); check(r == 3, "messages received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
