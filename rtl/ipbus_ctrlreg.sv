// ipbus_ctrlreg: IPbus slave with a bank of control and status registers.
//
// N_CTRL read/write control registers sit at addresses 0..N_CTRL-1 and drive
// ctrl_o; N_STAT read-only status registers follow at N_CTRL..N_CTRL+N_STAT-1
// and show stat_i. With one of each, as in the link-test address table,
// control is at 0x0 and status at 0x1; single bits are picked out by masks
// in software.
//
// Bus cycle: the master raises strobe (with write for a write) and holds it;
// one cycle later the slave answers with a one-cycle ack, or err for a write
// to a status register or an address outside the bank. A write takes effect
// with the ack; read data is valid with the ack. Control registers reset to
// zero. The address map, handshake timing and reset values are this design's
// choices; the bank itself is the register slave named by the link test.
module ipbus_ctrlreg
  import ipbus_pkg::*;
#(
  parameter int unsigned N_CTRL = 1,
  parameter int unsigned N_STAT = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  ipb_wbus_t   ipb_i,
  output ipb_rbus_t   ipb_o,
  output logic [31:0] ctrl_o [N_CTRL],
  input  logic [31:0] stat_i [N_STAT]
);

  logic        is_ctrl, is_stat;
  logic [31:0] ctrl_q [N_CTRL];

  assign is_ctrl = ipb_i.addr < 32'(N_CTRL);
  assign is_stat = !is_ctrl && ipb_i.addr < 32'(N_CTRL + N_STAT);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_CTRL; i++) ctrl_q[i] <= '0;
      ipb_o <= '0;
    end else begin
      ipb_o.ack <= 1'b0;
      ipb_o.err <= 1'b0;
      // A strobe is answered once; a strobe still high after the answer
      // is the master's next transaction.
      if (ipb_i.strobe && !ipb_o.ack && !ipb_o.err) begin
        if (is_ctrl) begin
          for (int i = 0; i < N_CTRL; i++) begin
            if (ipb_i.addr == 32'(i)) begin
              if (ipb_i.write) ctrl_q[i] <= ipb_i.wdata;
              ipb_o.rdata <= ipb_i.write ? ipb_i.wdata : ctrl_q[i];
            end
          end
          ipb_o.ack <= 1'b1;
        end else if (is_stat && !ipb_i.write) begin
          for (int i = 0; i < N_STAT; i++)
            if (ipb_i.addr == 32'(N_CTRL + i)) ipb_o.rdata <= stat_i[i];
          ipb_o.ack <= 1'b1;
        end else begin
          ipb_o.err <= 1'b1;
        end
      end
    end
  end

  assign ctrl_o = ctrl_q;

endmodule
