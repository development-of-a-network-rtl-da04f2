// timing_dist_top_tb: end-to-end test of the master and slave node logic.
//
// The testbench plays the parts outside the FPGA logic:
//  * a WR time base shared by both nodes (125 MHz, seconds + cycle count),
//    started shortly before a second boundary so that times carry across it;
//  * the zero-address signal, one every HARMONIC RF periods, time-stamped to
//    the picosecond as the fine-delay card's TDC would do;
//  * the network: each tag message leaves the master, is delayed by a fixed
//    latency and is written into the slave's mailbox registers through the
//    slave's Etherbone Wishbone port;
//  * the host PCs, which configure both nodes and poll status registers
//    while traffic runs (so host and network contend for the slave's bus).
//
// Expected values are computed here in real arithmetic from the RF frequency
// and harmonic number, independently of the fixed-point constants of the RTL:
//  * every message: T_N = T_I + N * T_rev for the zero-address stamp it came
//    from, consecutive messages D stamps apart, shot = stamp index;
//  * every output pulse: time = T_N(train) + K * T_RF + F + i * (T_rev + tune)
//    for pulse i of its train, pulse_time_o equal to the strobe window plus
//    fine_o, and shot_o = train shot + i.
// Phases: (1) D=50, N=1000, K=0, F=0 (D < N, the improved system's case),
// ending with the master stopped so the slave's output runs dry; (2) D=300,
// N=200, K=1234, F=5 ns, tune -31.2 ps (D > N); (3) D=1, N=100, more messages
// in flight than the queue holds (overflow); (4) N=1, D=10, messages arrive
// after their output time (late pulses skipped).
// Each mechanism is counted and must occur at least once. All RTL parameters
// are at their defaults.
`timescale 1ns/1ps
module timing_dist_top_tb;
  import timing_pkg::*;

  localparam real RF_HZ    = 508.58e6;
  localparam real T_RF     = 1.0e12 / RF_HZ;        // ps
  localparam real T_REV    = 2436.0 * T_RF;         // ps
  localparam longint CYC_PER_SEC = 125_000_000;
  localparam longint NET_LAT = 2000;                // cycles, network latency
  localparam longint WATCHDOG = 4_000_000;

  logic clk = 0;
  logic rst_n = 0;
  always #4 clk = ~clk;

  // ----------------------------------------------------------- WR time base
  logic [39:0] tm_sec = 40'd7;
  logic [27:0] tm_cycles = 28'(CYC_PER_SEC - 650_000);
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tm_cycles == 28'(CYC_PER_SEC - 1)) begin
      tm_cycles <= '0;
      tm_sec    <= tm_sec + 40'd1;
    end else begin
      tm_cycles <= tm_cycles + 28'd1;
    end
  end
  function automatic real now_abs();  // start of the current cycle's window
    return real'(tm_sec) * 1.0e12 + real'(tm_cycles) * 8000.0;
  endfunction
  function automatic real t_abs(wr_time_t t);
    return real'(t.sec) * 1.0e12 + real'(t.ps);
  endfunction
  function automatic wr_time_t to_time(longint ps_abs);
    wr_time_t t;
    t.sec = 40'(ps_abs / 64'd1_000_000_000_000);
    t.ps  = 40'(ps_abs % 64'd1_000_000_000_000);
    return t;
  endfunction

  // ------------------------------------------------------------------- DUT
  wb_m2s_t  req [3];   // 0 master host, 1 slave host, 2 slave Etherbone
  wb_s2m_t  rsp [3];
  wb_s2m_t  m_eb_wb_o;
  logic     m_tdc_valid = 0;
  wr_time_t m_tdc_ts = '0;
  logic     m_tx_valid, m_tx_ready;
  tag_msg_t m_tx_msg;
  logic     s_strobe, s_pulse;
  logic [12:0] s_fine;
  wr_time_t s_pulse_time;
  logic [SHOT_W-1:0] s_shot;

  timing_dist_top dut (
    .m_clk (clk), .m_rst_n (rst_n),
    .m_host_wb_i (req[0]), .m_host_wb_o (rsp[0]),
    .m_eb_wb_i ('0), .m_eb_wb_o (m_eb_wb_o),
    .m_tdc_valid, .m_tdc_ts,
    .m_tx_valid, .m_tx_ready, .m_tx_msg,
    .s_clk (clk), .s_rst_n (rst_n),
    .s_tm_sec (tm_sec), .s_tm_cycles (tm_cycles),
    .s_host_wb_i (req[1]), .s_host_wb_o (rsp[1]),
    .s_eb_wb_i (req[2]), .s_eb_wb_o (rsp[2]),
    .s_strobe_o (s_strobe), .s_fine_o (s_fine), .s_pulse_o (s_pulse),
    .s_pulse_time_o (s_pulse_time), .s_shot_o (s_shot)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------- Wishbone masters
  initial for (int i = 0; i < 3; i++) req[i] = '0;
  task automatic wb_xfer(input int p, input bit we, input logic [31:0] adr,
                         input logic [31:0] dat, output logic [31:0] rdat);
    @(negedge clk);
    req[p] = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat, sel: 4'hF};
    for (int w = 0; ; w++) begin
      @(negedge clk);
      if (rsp[p].ack) break;
      if (w > 100) begin
        failures++;
        $display("Wishbone port %0d: no acknowledge for address %h", p, adr);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    rdat = rsp[p].dat;
    req[p] = '0;
  endtask
  task automatic wb_wr(input int p, input logic [31:0] adr, input logic [31:0] dat);
    logic [31:0] r;
    wb_xfer(p, 1'b1, adr, dat, r);
  endtask
  task automatic wb_rd(input int p, input logic [31:0] adr, output logic [31:0] dat);
    wb_xfer(p, 1'b0, adr, 32'd0, dat);
  endtask

  // ------------------------------------------------- zero-address stamping
  real za0;
  longint za_idx = 0;
  bit  za_on = 0;
  real stamp_of [longint];         // stamp index -> exact time
  longint idx_of_ps [longint];     // rounded stamp time -> index
  always @(negedge clk) begin
    m_tdc_valid <= 1'b0;
    if (za_on) begin
      real t;
      t = za0 + real'(za_idx) * T_REV;
      if (t < now_abs() + 8000.0) begin
        longint r;
        r = longint'(t);
        m_tdc_valid <= 1'b1;
        m_tdc_ts    <= to_time(r);
        stamp_of[za_idx] = t;
        idx_of_ps[r] = za_idx;
        za_idx++;
      end
    end
  end

  // --------------------------------------------------------------- network
  int unsigned cur_n = 1000, cur_d = 50, cur_k = 0, cur_f = 0;
  int signed   cur_tune = 0;
  typedef struct { longint due; tag_msg_t m; } net_item_t;
  net_item_t net_q [$];
  int unsigned msg_count = 0, carry_msgs = 0;
  longint      last_msg_idx = -1;
  wr_time_t    last_tn;
  real         tn_of_shot [longint];
  int unsigned d_of_shot [longint];
  assign m_tx_ready = 1'b1;

  always @(posedge clk) begin
    if (rst_n && m_tx_valid && m_tx_ready) begin
      net_item_t it;
      real ti;
      longint key;
      bit found;
      it.due = cyc + NET_LAT;
      it.m   = m_tx_msg;
      net_q.push_back(it);
      msg_count++;
      last_tn = m_tx_msg.tn;
      // locate the stamp this message was computed from
      ti = t_abs(m_tx_msg.tn) - real'(cur_n) * T_REV;
      found = 0;
      for (longint dd = -2; dd <= 2; dd++) begin
        key = longint'(ti) + dd;
        if (idx_of_ps.exists(key) && !found) begin
          found = 1;
          check(m_tx_msg.tn.ps < 40'd1_000_000_000_000, "T_N not normalised");
          check(m_tx_msg.d == 16'(cur_d), "message D");
          if (last_msg_idx >= 0)
            check(idx_of_ps[key] - last_msg_idx == longint'(cur_d),
                  $sformatf("decimation: stamps %0d -> %0d, D=%0d", last_msg_idx, idx_of_ps[key], cur_d));
          last_msg_idx = idx_of_ps[key];
          if (stamp_of[last_msg_idx] < real'(m_tx_msg.tn.sec) * 1.0e12)
            carry_msgs++;
        end
      end
      check(found, $sformatf("T_N does not match T_I + N turns (shot %0d)", m_tx_msg.shot));
      tn_of_shot[longint'(m_tx_msg.shot)] = t_abs(m_tx_msg.tn);
      d_of_shot[longint'(m_tx_msg.shot)]  = m_tx_msg.d;
    end
  end

  // Etherbone slave model: writes each delivered message into the mailbox.
  initial begin
    forever begin
      @(negedge clk);
      if (net_q.size() > 0 && net_q[0].due <= cyc) begin
        net_item_t it;
        it = net_q.pop_front();
        wb_wr(2, 32'h0C, 32'(it.m.tn.sec[39:32]));
        wb_wr(2, 32'h10, it.m.tn.sec[31:0]);
        wb_wr(2, 32'h14, 32'(it.m.tn.ps[39:32]));
        wb_wr(2, 32'h18, it.m.tn.ps[31:0]);
        wb_wr(2, 32'h1C, it.m.shot);
        wb_wr(2, 32'h20, 32'(it.m.d));
      end
    end
  end

  // -------------------------------------------------------- output checker
  int unsigned pulses = 0, abs_pulses = 0, train_pulses = 0, sec2_pulses = 0;
  longint last_shot = -1;
  bit chk_on = 1;
  always @(negedge clk) begin
    if (rst_n && s_strobe && chk_on) begin
      real meas, expv, t0;
      longint s, s0;
      int unsigned i;
      meas = now_abs() - 8000.0 + real'(s_fine);
      pulses++;
      check(t_abs(s_pulse_time) == meas, "pulse_time_o differs from strobe window + fine");
      check(s_fine < 13'd8000, "fine delay outside the clock period");
      s = longint'(s_shot);
      s0 = s;
      while (s0 > 0 && s0 > s - 70000 && !tn_of_shot.exists(s0)) s0--;
      if (tn_of_shot.exists(s0) && s0 <= s && s - s0 < longint'(d_of_shot[s0])) begin
        i = int'(s - s0);
        t0 = tn_of_shot[s0] + real'(cur_k) * T_RF + real'(cur_f);
        expv = t0 + real'(i) * (T_REV + real'(cur_tune) / 256.0);
        check(meas - expv < 3.0 && expv - meas < 3.0,
              $sformatf("pulse shot %0d at %.1f ps, expected %.1f (diff %.2f)", s, meas, expv, meas - expv));
        if (i == 0) abs_pulses++; else train_pulses++;
      end else begin
        check(0, $sformatf("pulse with unknown shot %0d", s));
      end
      if (s_pulse_time.sec == 40'd8) sec2_pulses++;
      last_shot = s;
    end
  end

  // ------------------------------------------------------------- contention
  int unsigned contention = 0;
  always @(posedge clk) if (req[1].cyc && req[2].cyc) contention++;

  // ------------------------------------------------------------ host polls
  int unsigned max_level = 0;
  bit poll_on = 0;
  initial begin
    logic [31:0] r;
    forever begin
      repeat (97) @(negedge clk);
      if (poll_on) begin
        wb_rd(1, 32'h24, r);
        if (r > max_level) max_level = r;
      end
    end
  end

  task automatic wait_turns(input int t);
    repeat (int'(real'(t) * T_REV / 8000.0)) @(negedge clk);
  endtask

  task automatic configure(input int n, input int d, input int k, input int f, input int tune);
    cur_n = n; cur_d = d; cur_k = k; cur_f = f; cur_tune = tune;
    last_msg_idx = -1;
    tn_of_shot.delete();
    d_of_shot.delete();
    wb_wr(0, 32'h04, 32'(n));
    wb_wr(0, 32'h08, 32'(d));
    wb_wr(1, 32'h04, 32'(k));
    wb_wr(1, 32'h08, 32'(f));
    wb_wr(1, 32'h104, 32'(tune));
    wb_wr(1, 32'h00, 32'd1);      // slave enable
    wb_wr(0, 32'h00, 32'd1);      // master enable
  endtask

  task automatic stop_all();
    wb_wr(0, 32'h00, 32'd0);
    repeat (NET_LAT + 400) @(negedge clk);
    wb_wr(1, 32'h00, 32'd0);
    repeat (10) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- phases
  int unsigned underruns = 0, overflows = 0, missed = 0, noops = 0;
  initial begin
    logic [31:0] r, za_n, tx_n;
    int unsigned p1_pulses;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    za0 = now_abs() + 20000.0 + 123.4;
    za_on = 1;
    poll_on = 1;

    // Phase 1: D = 50, N = 1000, K = 0, F = 0
    configure(1000, 50, 0, 0, 0);
    wait_turns(1000 + 3 * 50 + 10);
    wb_rd(0, 32'h2C, za_n);
    wb_rd(0, 32'h30, tx_n);
    check(tx_n == (za_n + 49) / 50, $sformatf("messages sent %0d for %0d stamps", tx_n, za_n));
    noops = za_n - tx_n;
    wb_rd(0, 32'h20, r);
    check(r == last_tn.sec[31:0], "T_N seconds read back");
    wb_rd(0, 32'h28, r);
    check(r == last_tn.ps[31:0], "T_N picoseconds read back");
    // stop the master; the slave plays out what is queued, then stops
    wb_wr(0, 32'h00, 32'd0);
    wait_turns(1000 + 100);
    wb_rd(1, 32'h2C, r);
    underruns = r;
    check(r == 32'd1, $sformatf("underrun count %0d", r));
    p1_pulses = pulses;
    check(p1_pulses >= 1000, $sformatf("phase 1 pulses %0d", p1_pulses));
    wb_wr(1, 32'h00, 32'd0);
    repeat (10) @(negedge clk);

    // Phase 2: D = 300, N = 200, K = 1234, F = 5 ns, tune -31.2 ps
    configure(200, 300, 1234, 5000, -7987);
    wait_turns(200 + 2 * 300 + 20);
    check(pulses - p1_pulses >= 500, $sformatf("phase 2 pulses %0d", pulses - p1_pulses));
    stop_all();

    // Phase 3: D = 1, N = 100: more trains in flight than the queue holds
    configure(100, 1, 0, 0, 0);
    wait_turns(140);
    wb_rd(1, 32'h28, r);
    overflows = r;
    check(r > 0, "no queue overflow with N/D = 100");
    stop_all();

    // Phase 4: N = 1, D = 10: messages arrive after their output time
    configure(1, 10, 0, 0, 0);
    wait_turns(60);
    wb_rd(1, 32'h10C, r);
    missed = r;
    check(r > 0, "no late pulse with N = 1");
    wb_rd(1, 32'h108, r);
    check(r == pulses, $sformatf("channel pulse count %0d vs %0d seen", r, pulses));
    stop_all();

    $display("mechanisms: decimation no-ops=%0d  max queue level (D<N)=%0d  underruns=%0d  overflows=%0d",
             noops, max_level, underruns, overflows);
    $display("            late pulses skipped=%0d  absolute-time pulses=%0d  pulse-train pulses=%0d",
             missed, abs_pulses, train_pulses);
    $display("            bus contention cycles=%0d  messages=%0d  messages across a second=%0d  pulses in 2nd second=%0d",
             contention, msg_count, carry_msgs, sec2_pulses);
    check(noops > 0, "decimation never skipped a stamp");
    check(max_level >= 2, "queue never held more than one train (D < N)");
    check(abs_pulses > 0, "no absolute-time pulse");
    check(train_pulses > 0, "no pulse-train pulse");
    check(contention > 0, "host and network never contended");
    check(carry_msgs > 0, "no T_N across a second boundary");
    check(sec2_pulses > 0, "no pulse after the second boundary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
