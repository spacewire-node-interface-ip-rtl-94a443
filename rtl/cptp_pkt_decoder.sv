// Packet Decoder of the CPTP engine (receive).
//
// Takes whole packets, starting with the target logical address, from the
// protocol demultiplexer. The header is held here until the packet ends:
// 4 characters (logical address, protocol identifier, reserved, user
// application) for a CPTP packet, recognised by protocol identifier 2 in the
// second character, and 2 (logical address, protocol identifier) for a raw
// packet. Payload characters go into the Rx FIFO for the Packet Handler and,
// for a CPTP packet, through a CRC and a PEC. Payload beyond `max_len` bytes
// is dropped and the packet marked truncated. At the end of the packet an
// end marker (bit 8 set) is pushed into the FIFO, and the status word
// (rx_stat_t) and header (bytes left-aligned, first in bits 31:24) are
// offered with `hdr_valid` until the Packet Handler answers `hdr_done`; the
// next packet is taken only then.
//
// A packet is only started while an Rx descriptor is available. If none is
// and `discard_en` is set, the packet is read and dropped, with an
// `ev_discard` pulse; otherwise the input waits.
//
// Checks (CPTP packets only): CRC or PEC, as `chk` selects, over the whole
// payload including its two final check bytes; CCSDS packet length, the
// packet data length field (payload bytes 4-5) plus 7 against the payload
// bytes received; secondary header flag, payload byte 0 bit 3. The status
// bits are those the document lists for the Rx header; the header lengths,
// positions and the CCSDS field locations are this design's reading.
module cptp_pkt_decoder
  import spw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // packets from the demultiplexer
  input  spw_char_t   rx_data,
  input  logic        rx_valid,
  output logic        rx_ready,
  // configuration
  input  chk_e        chk,
  input  logic        discard_en,
  input  logic [16:0] max_len,
  input  logic        desc_avail,
  // payload to the Rx FIFO
  output logic [8:0]  fifo_data,
  output logic        fifo_valid,
  input  logic        fifo_ready,
  // header and status to the Packet Handler
  output logic        hdr_valid,
  output rx_stat_t    stat,
  output logic [31:0] hdr,
  input  logic        hdr_done,
  output logic        ev_discard
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_PAY, S_END, S_WAIT, S_DISCARD} state_e;

  state_e      st;
  logic [31:0] hdr_q;
  logic [7:0]  hcnt, hlen;
  logic [16:0] stored;     // payload bytes put into the FIFO
  logic [16:0] rcvd;       // payload bytes received (saturating)
  logic        cptp_q, eep_q, trunc_q, sec_q;
  logic [15:0] len_field;
  logic        is_ctl, fire;
  logic        crc_clr, crc_en, crc_ok, pec_ok;
  logic [15:0] crc_v, pec_v;

  assign is_ctl  = rx_data[8];
  assign fire    = rx_valid && rx_ready;
  assign crc_clr = (st == S_IDLE);
  assign crc_en  = (st == S_PAY) && fire && !is_ctl && (stored < max_len);

  cptp_crc u_crc (.clk, .rst_n, .clr(crc_clr), .en(crc_en), .din(rx_data[7:0]), .crc(crc_v), .ok(crc_ok));
  cptp_pec u_pec (.clk, .rst_n, .clr(crc_clr), .en(crc_en), .din(rx_data[7:0]), .pec(pec_v), .ok(pec_ok));

  always_comb begin
    rx_ready   = 1'b0;
    fifo_valid = 1'b0;
    fifo_data  = {1'b0, rx_data[7:0]};
    unique case (st)
      S_IDLE:    rx_ready = desc_avail || discard_en || (rx_valid && is_ctl);
      S_HDR:     rx_ready = 1'b1;
      S_PAY:     if (is_ctl || stored >= max_len) rx_ready = 1'b1;
                 else begin
                   fifo_valid = rx_valid;
                   rx_ready   = fifo_ready;
                 end
      S_END:     begin fifo_valid = 1'b1; fifo_data = 9'h100; end
      S_DISCARD: rx_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      hdr_q      <= '0;
      hcnt       <= '0;
      hlen       <= 8'd2;
      stored     <= '0;
      rcvd       <= '0;
      cptp_q     <= 1'b0;
      eep_q      <= 1'b0;
      trunc_q    <= 1'b0;
      sec_q      <= 1'b0;
      len_field  <= '0;
      ev_discard <= 1'b0;
    end else begin
      ev_discard <= 1'b0;
      unique case (st)
        S_IDLE: if (fire && !is_ctl) begin      // a lone EOP/EEP is dropped
                  hdr_q   <= {rx_data[7:0], 24'd0};
                  hcnt    <= 8'd1;
                  hlen    <= 8'd2;
                  stored  <= '0;
                  rcvd    <= '0;
                  cptp_q  <= 1'b0;
                  eep_q   <= 1'b0;
                  trunc_q <= 1'b0;
                  sec_q   <= 1'b0;
                  len_field <= '0;
                  if (!desc_avail) st <= S_DISCARD;
                  else             st <= S_HDR;
                end
        S_HDR:  if (fire) begin
                  if (is_ctl) begin
                    eep_q <= rx_data[0];
                    st    <= S_END;
                  end else begin
                    hdr_q[31 - 8*hcnt[1:0] -: 8] <= rx_data[7:0];
                    hcnt <= hcnt + 8'd1;
                    if (hcnt == 8'd1) begin
                      cptp_q <= (rx_data[7:0] == PID_CPTP);
                      hlen   <= (rx_data[7:0] == PID_CPTP) ? 8'd4 : 8'd2;
                      if (rx_data[7:0] != PID_CPTP) st <= S_PAY;
                    end else if (hcnt + 8'd1 == hlen) begin
                      st <= S_PAY;
                    end
                  end
                end
        S_PAY:  if (fire) begin
                  if (is_ctl) begin
                    eep_q <= rx_data[0];
                    st    <= S_END;
                  end else begin
                    if (rcvd != 17'h1FFFF) rcvd <= rcvd + 17'd1;
                    if (stored < max_len) begin
                      stored <= stored + 17'd1;
                      if (stored == 17'd0) sec_q <= rx_data[3];
                      if (stored == 17'd4) len_field[15:8] <= rx_data[7:0];
                      if (stored == 17'd5) len_field[7:0]  <= rx_data[7:0];
                    end else begin
                      trunc_q <= 1'b1;
                    end
                  end
                end
        S_END:  if (fifo_ready) st <= S_WAIT;
        S_WAIT: if (hdr_done) st <= S_IDLE;
        S_DISCARD: if (fire && is_ctl) begin
                  ev_discard <= 1'b1;
                  st         <= S_IDLE;
                end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    stat         = '0;
    stat.eep     = eep_q;
    stat.cptp    = cptp_q;
    stat.no_pay  = (stored == 17'd0);
    stat.len_err = cptp_q && ({1'b0, len_field} + 17'd7 != rcvd);
    stat.sec_hdr = cptp_q && (stored != 17'd0) && sec_q;
    stat.trunc   = trunc_q;
    stat.chk_err = cptp_q && ((chk == CHK_CRC && !crc_ok) || (chk == CHK_PEC && !pec_ok));
    stat.hdr_len = 7'((hcnt < hlen) ? hcnt : hlen);
    stat.pay_len = stored;
  end

  assign hdr_valid = (st == S_WAIT);
  assign hdr       = hdr_q;

endmodule
