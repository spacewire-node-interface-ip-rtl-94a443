// Packet Formatter of the CPTP engine (transmit).
//
// Reads one packet at a time from the Tx FIFO, laid out by the Commands
// Controller as a 4-byte control word (tx_ctrl_t), hdr_len header bytes and
// pay_len payload bytes, and sends it as SpaceWire characters:
//   - header bytes unchanged (the target address, logical address, protocol
//     identifier and so on; they are outside the check),
//   - payload bytes, folded into a CRC and a PEC as they pass,
//   - for a CPTP packet only, the selected check (CRC or PEC), two bytes,
//     most significant first; for a raw packet the check field is ignored,
//   - the terminator: EOP, EEP, or none (the packet is left open and the
//     next one continues it, as the control word allows).
// Characters pass straight from the FIFO to the output with no register in
// between (valid/ready on both sides). `done` pulses when a packet has been
// sent; `irq` pulses with it if the control word's interrupt enable is set.
// The control bits are those the document lists for the Tx header; their
// positions are this design's.
module cptp_pkt_formatter
  import spw_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] fifo_data,
  input  logic       fifo_valid,
  output logic       fifo_ready,
  output spw_char_t  tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  output logic       done,
  output logic       irq
);

  typedef enum logic [2:0] {S_CTRL, S_START, S_HDR, S_PAY, S_CK1, S_CK2, S_TERM, S_DONE} state_e;

  state_e      st;
  logic [31:0] ctrl_sh;
  tx_ctrl_t    ctrl;
  logic [1:0]  cbyte;
  logic [16:0] left;
  logic        crc_en, crc_clr;
  logic [15:0] crc, pec, ck;
  logic        crc_ok, pec_ok;
  logic        fire;
  logic        with_ck;
  state_e      st_after_pay;

  assign ctrl    = tx_ctrl_t'(ctrl_sh);
  assign with_ck = ctrl.cptp && (ctrl.chk == CHK_CRC || ctrl.chk == CHK_PEC);
  assign ck      = (ctrl.chk == CHK_PEC) ? pec : crc;
  assign fire    = tx_valid && tx_ready;
  assign crc_clr = (st == S_START);
  assign crc_en  = (st == S_PAY) && fire;
  assign st_after_pay = with_ck ? S_CK1 : (ctrl.term == TERM_NONE) ? S_DONE : S_TERM;

  cptp_crc u_crc (.clk, .rst_n, .clr(crc_clr), .en(crc_en), .din(fifo_data), .crc(crc), .ok(crc_ok));
  cptp_pec u_pec (.clk, .rst_n, .clr(crc_clr), .en(crc_en), .din(fifo_data), .pec(pec), .ok(pec_ok));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_CTRL;
      ctrl_sh <= '0;
      cbyte   <= '0;
      left    <= '0;
    end else begin
      unique case (st)
        S_CTRL:  if (fifo_valid) begin
                   ctrl_sh <= {ctrl_sh[23:0], fifo_data};
                   cbyte   <= cbyte + 1'b1;
                   if (cbyte == 2'd3) st <= S_START;
                 end
        S_START: if (ctrl.hdr_len != 7'd0) begin
                   left <= {10'd0, ctrl.hdr_len};
                   st   <= S_HDR;
                 end else if (ctrl.pay_len != 17'd0) begin
                   left <= ctrl.pay_len;
                   st   <= S_PAY;
                 end else begin
                   st   <= st_after_pay;
                 end
        S_HDR:   if (fire) begin
                   left <= left - 17'd1;
                   if (left == 17'd1) begin
                     if (ctrl.pay_len != 17'd0) begin
                       left <= ctrl.pay_len;
                       st   <= S_PAY;
                     end else begin
                       st   <= st_after_pay;
                     end
                   end
                 end
        S_PAY:   if (fire) begin
                   left <= left - 17'd1;
                   if (left == 17'd1) st <= st_after_pay;
                 end
        S_CK1:   if (fire) st <= S_CK2;
        S_CK2:   if (fire) st <= (ctrl.term == TERM_NONE) ? S_DONE : S_TERM;
        S_TERM:  if (fire) st <= S_DONE;
        S_DONE:  st <= S_CTRL;
        default: st <= S_CTRL;
      endcase
    end
  end

  always_comb begin
    tx_valid   = 1'b0;
    tx_data    = '0;
    fifo_ready = 1'b0;
    unique case (st)
      S_CTRL:        fifo_ready = 1'b1;
      S_HDR, S_PAY:  begin
                       tx_valid   = fifo_valid;
                       tx_data    = {1'b0, fifo_data};
                       fifo_ready = tx_ready;
                     end
      S_CK1:         begin tx_valid = 1'b1; tx_data = {1'b0, ck[15:8]}; end
      S_CK2:         begin tx_valid = 1'b1; tx_data = {1'b0, ck[7:0]}; end
      S_TERM:        begin tx_valid = 1'b1; tx_data = (ctrl.term == TERM_EEP) ? SPW_EEP : SPW_EOP; end
      default: ;
    endcase
  end

  assign done = (st == S_DONE);
  assign irq  = (st == S_DONE) && ctrl.irq_en;

endmodule
