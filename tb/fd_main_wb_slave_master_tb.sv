// fd_main_wb_slave_master_tb: checks the master's main register bank:
// reset values of N and D, write and read-back of CTRL, N and D, read-only
// status words (T_I, T_N split into 8 + 32 bit halves, counters) that ignore
// writes, and the one-cycle acknowledge.
`timescale 1ns/1ps
module fd_main_wb_slave_master_tb;
  import timing_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  wb_m2s_t wb_i = '0;
  wb_s2m_t wb_o;
  logic enable;
  logic [N_W-1:0] n;
  logic [D_W-1:0] d;
  wr_time_t ti_last = '{sec: 40'hAB_1234_5678, ps: 40'hCD_8765_4321};
  wr_time_t tn_last = '{sec: 40'h12_0000_0001, ps: 40'h34_0000_0002};
  logic [31:0] za_count = 32'd777, tx_count = 32'd16, drop_count = 32'd3;

  fd_main_wb_slave_master dut (.*);

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
    check(wb_o.ack, "ack after one cycle");
    r = wb_o.dat;
    wb_i = '0;
    @(negedge clk);
    check(!wb_o.ack, "single ack");
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(n == 16'd1000 && d == 16'd50 && !enable, "reset values");
    wb(1, 32'h04, 32'd900, r);
    wb(1, 32'h08, 32'd1000, r);
    wb(1, 32'h00, 32'd1, r);
    check(n == 16'd900 && d == 16'd1000 && enable, "N, D, enable written");
    wb(0, 32'h04, 0, r); check(r == 900, "N read");
    wb(0, 32'h08, 0, r); check(r == 1000, "D read");
    wb(0, 32'h00, 0, r); check(r == 1, "CTRL read");
    wb(0, 32'h0C, 0, r); check(r == 32'hAB, "T_I sec high");
    wb(0, 32'h10, 0, r); check(r == 32'h1234_5678, "T_I sec low");
    wb(0, 32'h14, 0, r); check(r == 32'hCD, "T_I ps high");
    wb(0, 32'h18, 0, r); check(r == 32'h8765_4321, "T_I ps low");
    wb(0, 32'h1C, 0, r); check(r == 32'h12, "T_N sec high");
    wb(0, 32'h20, 0, r); check(r == 32'h1, "T_N sec low");
    wb(0, 32'h24, 0, r); check(r == 32'h34, "T_N ps high");
    wb(0, 32'h28, 0, r); check(r == 32'h2, "T_N ps low");
    wb(0, 32'h2C, 0, r); check(r == 777, "zero-address count");
    wb(0, 32'h30, 0, r); check(r == 16, "message count");
    wb(0, 32'h34, 0, r); check(r == 3, "drop count");
    wb(1, 32'h2C, 32'd5, r);
    wb(0, 32'h2C, 0, r); check(r == 777, "status ignores writes");
    check(n == 16'd900 && d == 16'd1000, "parameters unchanged by status write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
