// spec_top_master_tb: checks the master node logic through its ports. The
// host port sets N and D, the Etherbone port enables the node and reads the
// status (both masters share the bus through the interconnect). Zero-address
// stamps one revolution apart are fed in; every message must carry
// T_N = T_I + N turns (real arithmetic, within 1 ps) for stamps 0, D, 2D...,
// arrive one cycle after its stamp, and the counters must agree.
`timescale 1ns/1ps
module spec_top_master_tb;
  import timing_pkg::*;

  localparam real T_REV = 2436.0 * 1.0e12 / 508.58e6;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  wb_m2s_t host_wb_i = '0, eb_wb_i = '0;
  wb_s2m_t host_wb_o, eb_wb_o;
  logic tdc_valid = 0;
  wr_time_t tdc_ts = '0;
  logic tx_valid, tx_ready = 1;
  tag_msg_t tx_msg;

  spec_top_master dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic real t_abs(wr_time_t t);
    return real'(t.sec) * 1.0e12 + real'(t.ps);
  endfunction

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

  initial begin
    logic [31:0] r;
    real ti;
    int msgs = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wb(0, 1, 32'h04, 32'd200, r);   // N
    wb(0, 1, 32'h08, 32'd4, r);     // D
    wb(1, 1, 32'h00, 32'd1, r);     // enable from the network side
    for (int i = 0; i < 12; i++) begin
      ti = 9.0e12 + 5.0e11 + real'(i) * T_REV;
      @(negedge clk);
      tdc_valid = 1;
      tdc_ts = '{sec: 40'd9, ps: 40'(longint'(ti - 9.0e12))};
      @(negedge clk);
      tdc_valid = 0;
      check(tx_valid == ((i % 4) == 0), $sformatf("message after stamp %0d", i));
      if (tx_valid) begin
        real expv;
        msgs++;
        expv = real'(longint'(ti - 9.0e12)) + 9.0e12 + 200.0 * T_REV;
        check(t_abs(tx_msg.tn) - expv < 1.0 && expv - t_abs(tx_msg.tn) < 1.0,
              $sformatf("T_N %.1f expected %.1f", t_abs(tx_msg.tn), expv));
        check(tx_msg.d == 4 && tx_msg.shot == 32'(i), "D and shot");
      end
      repeat (5) @(negedge clk);
    end
    wb(1, 0, 32'h2C, 0, r); check(r == 12, "zero-address count");
    wb(0, 0, 32'h30, 0, r); check(r == 3 && msgs == 3, "message count");
    wb(1, 0, 32'h34, 0, r); check(r == 0, "no drops");
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
