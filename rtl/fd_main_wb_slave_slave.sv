// fd_main_wb_slave_slave: main Wishbone register bank of the modified
// fine-delay core in the slave node.
//
// It holds the slave's operation parameters (target bunch address K, fine
// delay F, enable) and the mailbox into which the master's tag message is
// written over the network: the master's Etherbone master performs Wishbone
// writes that arrive here through the slave's Etherbone slave core and the
// interconnect. The last mailbox word, D, commits the message: writing it
// pulses msg_valid for one cycle with {T_N, D, shot} from the mailbox.
//
// Registers (byte offset, 32 bit):
//   0x00 CTRL       bit 0 enable (R/W)
//   0x04 K          target bunch address, 0..2435 (R/W, 12 bit)
//   0x08 F          fine delay in ps (R/W)
//   0x0C/0x10       T_N seconds [39:32] / [31:0] (R/W mailbox)
//   0x14/0x18       T_N picoseconds [39:32] / [31:0] (R/W mailbox)
//   0x1C            shot number (R/W mailbox)
//   0x20            D; a write commits the message (R/W)
//   0x24            trains waiting in the queue (RO)
//   0x28            messages lost to a full queue (RO)
//   0x2C            output stops: trains ending with nothing queued (RO)
//   0x30            messages received (RO)
// Wishbone classic: ack one cycle after cyc&stb, read data with the ack.
// msg_valid rises on the same clock edge as the ack of the D write.
//
// K, F, T_N and D follow the design; the mailbox layout and the commit on D
// are this implementation's choices.
//
// Byte selects (sel) are ignored: every register is written as a whole word.
module fd_main_wb_slave_slave
  import timing_pkg::*;
#(
  parameter int unsigned QLEVEL_W = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  wb_m2s_t             wb_i,
  output wb_s2m_t             wb_o,
  output logic                enable,
  output logic [K_W-1:0]      k,
  output logic [F_W-1:0]      f,
  output logic                msg_valid,
  output tag_msg_t            msg,
  input  logic [QLEVEL_W-1:0] level,
  input  logic [31:0]         overflow_count,
  input  logic [31:0]         underrun_count
);

  logic [3:0]  widx;
  logic [31:0] rdata;
  logic [31:0] rx_count;

  assign widx = wb_i.adr[5:2];

  always_comb begin
    unique case (widx)
      4'd0:    rdata = {31'd0, enable};
      4'd1:    rdata = 32'(k);
      4'd2:    rdata = 32'(f);
      4'd3:    rdata = 32'(msg.tn.sec[39:32]);
      4'd4:    rdata = msg.tn.sec[31:0];
      4'd5:    rdata = 32'(msg.tn.ps[39:32]);
      4'd6:    rdata = msg.tn.ps[31:0];
      4'd7:    rdata = msg.shot;
      4'd8:    rdata = 32'(msg.d);
      4'd9:    rdata = 32'(level);
      4'd10:   rdata = overflow_count;
      4'd11:   rdata = underrun_count;
      4'd12:   rdata = rx_count;
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable    <= 1'b0;
      k         <= '0;
      f         <= '0;
      msg       <= '0;
      msg_valid <= 1'b0;
      rx_count  <= '0;
      wb_o      <= '0;
    end else begin
      wb_o.ack  <= 1'b0;
      msg_valid <= 1'b0;
      if (wb_i.cyc && wb_i.stb && !wb_o.ack) begin
        wb_o.ack <= 1'b1;
        wb_o.dat <= rdata;
        if (wb_i.we) begin
          case (widx)
            4'd0: enable          <= wb_i.dat[0];
            4'd1: k               <= wb_i.dat[K_W-1:0];
            4'd2: f               <= wb_i.dat[F_W-1:0];
            4'd3: msg.tn.sec[39:32] <= wb_i.dat[7:0];
            4'd4: msg.tn.sec[31:0]  <= wb_i.dat;
            4'd5: msg.tn.ps[39:32]  <= wb_i.dat[7:0];
            4'd6: msg.tn.ps[31:0]   <= wb_i.dat;
            4'd7: msg.shot          <= wb_i.dat;
            4'd8: begin
              msg.d     <= wb_i.dat[D_W-1:0];
              msg_valid <= 1'b1;
              rx_count  <= rx_count + 32'd1;
            end
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
