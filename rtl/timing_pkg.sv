// timing_pkg: types, constants and time arithmetic shared by the master and
// slave FPGA logic of the White Rabbit based revolution-frequency / tag
// distribution system.
//
// Absolute (WR/TAI) time is carried as a pair {seconds, picoseconds within the
// second}. All offsets the system adds to a time stamp are whole numbers of RF
// buckets: N turns is N * HARMONIC buckets (Eq. 1 of the design, T_N = T_I +
// N / f_rev with f_rev = f_RF / HARMONIC) and the target bunch address K is
// K buckets (Eq. 2, T_K = T_N + K / f_RF). A bucket count is converted to
// picoseconds with one multiplication by the RF period held as a fixed-point
// constant with PERIOD_FRAC_BITS (32) fractional bits; its rounding error
// (7e-11 ps per bucket) stays below 0.02 ps even for the largest offset,
// 65535 turns.
//
// The RF frequency (508.58 MHz) and the harmonic number (2436) follow the
// design; the time format, the fixed-point precision, the 125 MHz reference
// clock and the register/message layout are this implementation's choices.
package timing_pkg;

  // ---------------------------------------------------------------- constants
  localparam longint unsigned RF_FREQ_HZ   = 64'd508_580_000; // storage-ring RF
  localparam int unsigned     HARMONIC     = 2436;            // buckets per turn
  localparam longint unsigned PS_PER_SEC   = 64'd1_000_000_000_000;
  localparam int unsigned     CLK_PERIOD_PS = 8000;           // 125 MHz WR reference clock

  localparam int unsigned     PERIOD_FRAC_BITS = 32;
  // Width of a picosecond value with PERIOD_FRAC_BITS fraction bits.
  localparam int unsigned     PSQ_W = 40 + PERIOD_FRAC_BITS;
  // RF period in ps, unsigned fixed point with PERIOD_FRAC_BITS fraction bits,
  // rounded to nearest: round(1e12 * 2^32 / f_RF).
  localparam logic [127:0] RF_PERIOD_Q_WIDE =
      ((128'(PS_PER_SEC) << PERIOD_FRAC_BITS) + 128'(RF_FREQ_HZ / 2)) / 128'(RF_FREQ_HZ);
  localparam logic [PSQ_W-1:0] RF_PERIOD_Q  = RF_PERIOD_Q_WIDE[PSQ_W-1:0];
  // Revolution period (HARMONIC buckets), same fixed-point format.
  localparam logic [127:0] REV_PERIOD_Q_WIDE =
      ((128'(PS_PER_SEC) * 128'(HARMONIC) << PERIOD_FRAC_BITS) + 128'(RF_FREQ_HZ / 2))
      / 128'(RF_FREQ_HZ);
  localparam logic [PSQ_W-1:0] REV_PERIOD_Q = REV_PERIOD_Q_WIDE[PSQ_W-1:0];

  // Widths of the operation parameters.
  localparam int unsigned N_W    = 16;  // turns between zero-address input and output
  localparam int unsigned D_W    = 16;  // decimation rate
  localparam int unsigned K_W    = 12;  // target bunch address, 0..HARMONIC-1
  localparam int unsigned F_W    = 32;  // fine delay F in ps
  localparam int unsigned SHOT_W = 32;  // tag (shot number)

  // -------------------------------------------------------------------- types
  typedef struct packed {
    logic [39:0] sec;  // TAI seconds
    logic [39:0] ps;   // picoseconds within the second, 0 .. 1e12-1
  } wr_time_t;

  // Tag message sent from the master to the slave once every D zero-address
  // signals: output time T_N, decimation rate D and the shot number.
  typedef struct packed {
    wr_time_t           tn;
    logic [D_W-1:0]     d;
    logic [SHOT_W-1:0]  shot;
  } tag_msg_t;

  // One scheduled output train in the slave: first pulse time and pulse count.
  typedef struct packed {
    wr_time_t           t_o;
    logic [D_W-1:0]     d;
    logic [SHOT_W-1:0]  shot;
  } out_train_t;

  // Wishbone (classic, 32-bit data, byte address) request and response.
  typedef struct packed {
    logic        cyc;
    logic        stb;
    logic        we;
    logic [31:0] adr;
    logic [31:0] dat;
    logic [3:0]  sel;
  } wb_m2s_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] dat;
  } wb_s2m_t;

  // ---------------------------------------------------------------- functions
  // Picoseconds (rounded) spanned by a number of RF buckets.
  function automatic logic [39:0] buckets_to_ps(input logic [31:0] buckets);
    logic [PSQ_W+31:0] prod;
    prod = (PSQ_W+32)'(buckets) * (PSQ_W+32)'(RF_PERIOD_Q)
         + ((PSQ_W+32)'(1) << (PERIOD_FRAC_BITS - 1));
    return prod[PERIOD_FRAC_BITS +: 40];
  endfunction

  // Add an offset shorter than one second to a normalised time.
  function automatic wr_time_t time_add_ps(input wr_time_t t, input logic [39:0] off_ps);
    wr_time_t   r;
    logic [40:0] s;
    s = 41'(t.ps) + 41'(off_ps);
    if (s >= 41'(PS_PER_SEC)) begin
      r.ps  = 40'(s - 41'(PS_PER_SEC));
      r.sec = t.sec + 40'd1;
    end else begin
      r.ps  = s[39:0];
      r.sec = t.sec;
    end
    return r;
  endfunction

  // a < b for normalised times.
  function automatic logic time_lt(input wr_time_t a, input wr_time_t b);
    return (a.sec < b.sec) || ((a.sec == b.sec) && (a.ps < b.ps));
  endfunction

endpackage
