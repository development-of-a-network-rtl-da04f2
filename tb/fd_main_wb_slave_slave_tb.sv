// fd_main_wb_slave_slave_tb: checks the slave's main register bank: K, F
// and CTRL write/read, the mailbox words, the commit of a message by the
// write of D (one msg_valid strobe carrying the mailbox contents, none for
// the other writes, also over a run of random messages written in random
// word order), the received-message counter and the status inputs.
`timescale 1ns/1ps
module fd_main_wb_slave_slave_tb;
  import timing_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  wb_m2s_t wb_i = '0;
  wb_s2m_t wb_o;
  logic enable;
  logic [K_W-1:0] k;
  logic [F_W-1:0] f;
  logic msg_valid;
  tag_msg_t msg;
  logic [5:0] level = 6'd17;
  logic [31:0] overflow_count = 32'd2, underrun_count = 32'd9;

  fd_main_wb_slave_slave dut (.*);

  int checks = 0, failures = 0, strobes = 0;
  tag_msg_t got;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (rst_n && msg_valid) begin strobes++; got = msg; end

  task automatic wb(input bit we, input logic [31:0] adr, input logic [31:0] dat,
                    output logic [31:0] r);
    @(negedge clk);
    wb_i = '{cyc: 1, stb: 1, we: we, adr: adr, dat: dat, sel: 4'hF};
    @(negedge clk);
    check(wb_o.ack, "ack after one cycle");
    r = wb_o.dat;
    wb_i = '0;
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!enable && k == 0 && f == 0, "reset values");
    wb(1, 32'h04, 32'd2435, r);
    wb(1, 32'h08, 32'd123456, r);
    wb(1, 32'h00, 32'd1, r);
    check(enable && k == 12'd2435 && f == 32'd123456, "K, F, enable written");
    wb(0, 32'h04, 0, r); check(r == 2435, "K read");
    wb(0, 32'h08, 0, r); check(r == 123456, "F read");
    // mailbox
    wb(1, 32'h0C, 32'h0000_0042, r);
    wb(1, 32'h10, 32'hDEAD_BEEF, r);
    wb(1, 32'h14, 32'h0000_00E8, r);
    wb(1, 32'h18, 32'hD4A5_0FFF, r);
    wb(1, 32'h1C, 32'd31337, r);
    check(strobes == 0, "no commit before D");
    wb(1, 32'h20, 32'd50, r);
    @(negedge clk);
    check(strobes == 1, "one commit on D");
    check(got.tn.sec == 40'h42_DEAD_BEEF, "committed seconds");
    check(got.tn.ps == 40'hE8_D4A5_0FFF, "committed picoseconds");
    check(got.shot == 32'd31337 && got.d == 16'd50, "committed shot and D");
    wb(0, 32'h20, 0, r); check(r == 50, "D read");
    wb(0, 32'h24, 0, r); check(r == 17, "level read");
    wb(0, 32'h28, 0, r); check(r == 2, "overflow read");
    wb(0, 32'h2C, 0, r); check(r == 9, "underrun read");
    wb(0, 32'h30, 0, r); check(r == 1, "received count");
    check(strobes == 1, "reads commit nothing");
    // a run of random messages: the five data words in a random order, each
    // followed by a check that nothing was committed, then D
    for (int m = 0; m < 12; m++) begin
      logic [31:0] w [5];
      int order [5];
      int n_before;
      foreach (w[i]) w[i] = $urandom;
      w[0][31:8] = '0;  // seconds high byte
      w[2][31:8] = '0;  // picoseconds high byte
      foreach (order[i]) order[i] = i;
      order.shuffle();
      n_before = strobes;
      foreach (order[i]) begin
        wb(1, 32'h0C + 32'(order[i] * 4), w[order[i]], r);
        @(negedge clk);
        check(strobes == n_before, "no commit on a data word");
      end
      wb(1, 32'h20, 32'(m + 1), r);
      @(negedge clk);
      check(strobes == n_before + 1, "one commit per D write");
      check(got.tn.sec == {w[0][7:0], w[1]} && got.tn.ps == {w[2][7:0], w[3]},
            "random message time");
      check(got.shot == w[4] && got.d == 16'(m + 1), "random message shot and D");
    end
    wb(0, 32'h30, 0, r); check(r == 13, "received count after the run");
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
