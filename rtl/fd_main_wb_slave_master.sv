// fd_main_wb_slave_master: main Wishbone register bank of the modified
// fine-delay core in the master node.
//
// It holds the operation parameters of the master delay calculation, which
// the host (over PCIe) or a remote node (over Etherbone) sets, and makes the
// last zero-address time stamp T_I, the last computed output time T_N and the
// event counters readable.
//
// Registers (byte offset, 32 bit):
//   0x00 CTRL       bit 0 enable (R/W)
//   0x04 N          turns from pre-trigger to output (R/W, 16 bit)
//   0x08 D          decimation rate (R/W, 16 bit)
//   0x0C/0x10       T_I seconds [39:32] / [31:0] (RO)
//   0x14/0x18       T_I picoseconds [39:32] / [31:0] (RO)
//   0x1C/0x20       T_N seconds [39:32] / [31:0] (RO)
//   0x24/0x28       T_N picoseconds [39:32] / [31:0] (RO)
//   0x2C            zero-address signals seen (RO)
//   0x30            messages sent (RO)
//   0x34            messages dropped (RO)
// Wishbone classic: ack one cycle after cyc&stb, read data with the ack.
// Writes to read-only registers are ignored; the reset values of N and D
// are parameters.
//
// The register set follows the parameters named in the design (N, D, T_I,
// T_N); the layout is this implementation's choice.
//
// Byte selects (sel) are ignored: every register is written as a whole word.
module fd_main_wb_slave_master
  import timing_pkg::*;
#(
  parameter int unsigned N_RESET = 1000,
  parameter int unsigned D_RESET = 50
) (
  input  logic           clk,
  input  logic           rst_n,
  input  wb_m2s_t        wb_i,
  output wb_s2m_t        wb_o,
  output logic           enable,
  output logic [N_W-1:0] n,
  output logic [D_W-1:0] d,
  input  wr_time_t       ti_last,
  input  wr_time_t       tn_last,
  input  logic [31:0]    za_count,
  input  logic [31:0]    tx_count,
  input  logic [31:0]    drop_count
);

  logic [3:0]  widx;
  logic [31:0] rdata;

  assign widx = wb_i.adr[5:2];

  always_comb begin
    unique case (widx)
      4'd0:    rdata = {31'd0, enable};
      4'd1:    rdata = 32'(n);
      4'd2:    rdata = 32'(d);
      4'd3:    rdata = 32'(ti_last.sec[39:32]);
      4'd4:    rdata = ti_last.sec[31:0];
      4'd5:    rdata = 32'(ti_last.ps[39:32]);
      4'd6:    rdata = ti_last.ps[31:0];
      4'd7:    rdata = 32'(tn_last.sec[39:32]);
      4'd8:    rdata = tn_last.sec[31:0];
      4'd9:    rdata = 32'(tn_last.ps[39:32]);
      4'd10:   rdata = tn_last.ps[31:0];
      4'd11:   rdata = za_count;
      4'd12:   rdata = tx_count;
      4'd13:   rdata = drop_count;
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= 1'b0;
      n      <= N_W'(N_RESET);
      d      <= D_W'(D_RESET);
      wb_o   <= '0;
    end else begin
      wb_o.ack <= 1'b0;
      if (wb_i.cyc && wb_i.stb && !wb_o.ack) begin
        wb_o.ack <= 1'b1;
        wb_o.dat <= rdata;
        if (wb_i.we) begin
          case (widx)
            4'd0: enable <= wb_i.dat[0];
            4'd1: n      <= wb_i.dat[N_W-1:0];
            4'd2: d      <= wb_i.dat[D_W-1:0];
            default: ;
          endcase
        end
      end
    end
  end

  // Wishbone rule: an acknowledge only ever answers a request of the
  // previous cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wb_o.ack |-> $past(wb_i.cyc && wb_i.stb));

endmodule
