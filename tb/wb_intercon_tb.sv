// wb_intercon_tb: checks the Wishbone interconnect with two masters and two
// simple register slaves modelled here. Checked: address decoding (each
// slave only sees its window), read data routing back to the requesting
// master, the error acknowledge for an unmapped address, and round-robin
// arbitration when both masters request in the same cycle.
`timescale 1ns/1ps
module wb_intercon_tb;
  import timing_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  wb_m2s_t [1:0] m_i;
  wb_s2m_t [1:0] m_o;
  wb_m2s_t [1:0] s_o;
  wb_s2m_t [1:0] s_i;

  wb_intercon dut (.*);

  // two slaves: a 4-word memory each, ack one cycle after the request
  logic [31:0] mem [2][4];
  int unsigned hits [2];
  always_ff @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      s_i[s].ack <= 1'b0;
      if (s_o[s].cyc && s_o[s].stb && !s_i[s].ack) begin
        s_i[s].ack <= 1'b1;
        hits[s] <= hits[s] + 1;
        if (s_o[s].we) mem[s][s_o[s].adr[3:2]] <= s_o[s].dat;
        s_i[s].dat <= mem[s][s_o[s].adr[3:2]];
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input int p, input bit we, input logic [31:0] adr,
                      input logic [31:0] dat, output logic [31:0] rdat);
    @(negedge clk);
    m_i[p] = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat, sel: 4'hF};
    for (int w = 0; w < 50; w++) begin
      @(negedge clk);
      if (m_o[p].ack) break;
    end
    check(m_o[p].ack, $sformatf("master %0d ack for %h", p, adr));
    rdat = m_o[p].dat;
    m_i[p] = '0;
  endtask

  int order [$];
  task automatic race_xfer(input int p, input logic [31:0] adr);
    logic [31:0] r;
    xfer(p, 1'b0, adr, 0, r);
    order.push_back(p);
  endtask

  initial begin
    logic [31:0] r;
    m_i = '0;
    hits = '{0, 0};
    for (int s = 0; s < 2; s++) for (int w = 0; w < 4; w++) mem[s][w] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    xfer(0, 1, 32'h0000_0004, 32'hA5A5_0001, r);
    xfer(1, 1, 32'h0000_0104, 32'h5A5A_0002, r);
    check(mem[0][1] == 32'hA5A5_0001, "write reached slave 0");
    check(mem[1][1] == 32'h5A5A_0002, "write reached slave 1");
    check(hits[0] == 1 && hits[1] == 1, "each slave hit once");
    xfer(1, 0, 32'h0000_0004, 0, r);
    check(r == 32'hA5A5_0001, "master 1 reads slave 0");
    xfer(0, 0, 32'h0000_0104, 0, r);
    check(r == 32'h5A5A_0002, "master 0 reads slave 1");
    xfer(0, 0, 32'h0000_0804, 0, r);
    check(r == 0, "unmapped address reads zero");
    check(hits[0] == 2 && hits[1] == 2, "unmapped access reached no slave");

    // both request together: alternate grants (last owner was master 0)
    for (int k = 0; k < 4; k++) begin
      fork
        race_xfer(0, 32'h0000_0004);
        race_xfer(1, 32'h0000_0104);
      join
    end
    check(order.size() == 8, "all racing transfers done");
    for (int k = 0; k < 4; k++)
      check(order[2*k] == 1 && order[2*k+1] == 0,
            $sformatf("round %0d: grant order %0d,%0d", k, order[2*k], order[2*k+1]));
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
