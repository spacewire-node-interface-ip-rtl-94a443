// CPTP / raw SpaceWire packet engine.
//
// Moves CCSDS Packet Transfer Protocol packets, and raw packets whose
// protocol no other engine handles, between SpaceWire and system memory
// without processor work per packet. Software prepares headers, payloads
// and descriptor tables in memory, writes the table addresses once, and
// afterwards only writes how many descriptors may be used (see
// cptp_desc_reg for the register map).
//
// Transmit: cptp_cmd_ctrl fetches descriptor, header and payload by DMA
// into the Tx FIFO; cptp_pkt_formatter sends the packet, adding CRC or PEC
// and EOP/EEP as the header's control word asks.
// Receive: cptp_pkt_decoder holds the header, checks CRC/PEC and CCSDS
// length, truncates and discards; the payload goes through the Rx FIFO to
// cptp_pkt_handler, which stores it and then the header with its status
// word.
//
// Interfaces: register write/read port, SpaceWire character streams in and
// out (valid/ready), one DMA client port per direction, one interrupt.
// Block split and functions follow the document; FIFO depths and formats
// are this design's.
module cptp
  import spw_pkg::*;
#(
  parameter int unsigned NDESC       = 16,
  parameter int unsigned MAX_PKT_LEN = 65536,
  parameter int unsigned TX_FIFO_DEPTH = 512,
  parameter int unsigned RX_FIFO_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  reg_wr_t     reg_wr,
  input  logic [7:0]  reg_raddr,
  output logic [31:0] reg_rdata,
  input  spw_char_t   rx_data,
  input  logic        rx_valid,
  output logic        rx_ready,
  output spw_char_t   tx_data,
  output logic        tx_valid,
  input  logic        tx_ready,
  output dma_req_t    dma_tx_req,
  input  dma_rsp_t    dma_tx_rsp,
  output dma_req_t    dma_rx_req,
  input  dma_rsp_t    dma_rx_rsp,
  output logic        irq
);

  logic        tx_avail, rx_avail, tx_consume, rx_consume;
  logic [31:0] tx_desc_addr, rx_desc_addr;
  chk_e        rx_chk;
  logic        rx_discard_en;
  logic [16:0] rx_max_len;
  logic        tx_done, tx_irq, rx_done, rx_discard;

  logic [7:0]  txf_in_data, txf_out_data;
  logic        txf_in_valid, txf_in_ready, txf_out_valid, txf_out_ready;
  logic [8:0]  rxf_in_data, rxf_out_data;
  logic        rxf_in_valid, rxf_in_ready, rxf_out_valid, rxf_out_ready;
  logic        hdr_valid, hdr_done;
  rx_stat_t    stat;
  logic        rx_err;

  // a received packet with a failed check, a wrong length or truncation
  assign rx_err = hdr_valid && hdr_done && (stat.chk_err || stat.len_err || stat.trunc);
  logic [31:0] hdr;

  cptp_desc_reg #(.NDESC(NDESC), .MAX_PKT_LEN(MAX_PKT_LEN)) u_desc (
    .clk, .rst_n, .reg_wr, .reg_raddr, .reg_rdata,
    .tx_avail, .tx_desc_addr, .tx_consume,
    .rx_avail, .rx_desc_addr, .rx_consume,
    .rx_chk, .rx_discard_en, .rx_max_len,
    .ev_tx_irq(tx_irq), .ev_rx_done(rx_done), .ev_rx_discard(rx_discard),
    .ev_tx_done(tx_done), .ev_rx_err(rx_err), .irq
  );

  cptp_cmd_ctrl u_cmd (
    .clk, .rst_n,
    .desc_avail(tx_avail), .desc_addr(tx_desc_addr), .desc_consume(tx_consume),
    .dma_req(dma_tx_req), .dma_rsp(dma_tx_rsp),
    .fifo_data(txf_in_data), .fifo_valid(txf_in_valid), .fifo_ready(txf_in_ready)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(TX_FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .clr(1'b0),
    .in_data(txf_in_data), .in_valid(txf_in_valid), .in_ready(txf_in_ready),
    .out_data(txf_out_data), .out_valid(txf_out_valid), .out_ready(txf_out_ready),
    .level()
  );

  cptp_pkt_formatter u_fmt (
    .clk, .rst_n,
    .fifo_data(txf_out_data), .fifo_valid(txf_out_valid), .fifo_ready(txf_out_ready),
    .tx_data, .tx_valid, .tx_ready, .done(tx_done), .irq(tx_irq)
  );

  cptp_pkt_decoder u_dec (
    .clk, .rst_n,
    .rx_data, .rx_valid, .rx_ready,
    .chk(rx_chk), .discard_en(rx_discard_en), .max_len(rx_max_len), .desc_avail(rx_avail),
    .fifo_data(rxf_in_data), .fifo_valid(rxf_in_valid), .fifo_ready(rxf_in_ready),
    .hdr_valid, .stat, .hdr, .hdr_done, .ev_discard(rx_discard)
  );

  sync_fifo #(.WIDTH(9), .DEPTH(RX_FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .clr(1'b0),
    .in_data(rxf_in_data), .in_valid(rxf_in_valid), .in_ready(rxf_in_ready),
    .out_data(rxf_out_data), .out_valid(rxf_out_valid), .out_ready(rxf_out_ready),
    .level()
  );

  cptp_pkt_handler u_hnd (
    .clk, .rst_n,
    .desc_avail(rx_avail), .desc_addr(rx_desc_addr), .desc_consume(rx_consume),
    .fifo_data(rxf_out_data), .fifo_valid(rxf_out_valid), .fifo_ready(rxf_out_ready),
    .hdr_valid, .stat, .hdr, .hdr_done,
    .dma_req(dma_rx_req), .dma_rsp(dma_rx_rsp), .done(rx_done)
  );

endmodule
