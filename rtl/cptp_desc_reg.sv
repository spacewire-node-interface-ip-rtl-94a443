// Descriptors Register of the CPTP engine.
//
// Software keeps, in system memory, a table of NDESC descriptors for each
// direction; a descriptor is two words, the address of a packet header area
// and the address of a payload area. This block holds, per direction, the
// base address of that table, the number of descriptors software has made
// available and a circular index. It offers the address of the current
// descriptor (base + 8 * index) while the count is non-zero; a `consume`
// pulse from the engine using it decrements the count and advances the
// index modulo NDESC. Because the index wraps, software prepares the table
// once and afterwards only writes how many more descriptors may be used.
// Writing a base address restarts that direction at index 0.
//
// It also holds the engine's configuration and interrupt registers
// (byte offsets):
//   0x00 TX_BASE   0x04 TX_COUNT (write adds, saturating at NDESC)
//   0x08 RX_BASE   0x0C RX_COUNT (write adds, saturating at NDESC)
//   0x10 CTRL      [1:0] Rx check (0 none, 1 CRC, 2 PEC), [2] discard a
//                  packet when no Rx descriptor is available
//   0x14 RX_MAX    longest payload stored, longer packets are truncated
//   0x18 INDEX     [15:0] Tx index, [31:16] Rx index (read only)
//   0x1C IRQ_STAT  [0] Tx packet sent, [1] Rx packet stored, [2] Rx packet
//                  discarded, [3] Rx packet with a protocol error (check
//                  failed, length mismatch or truncated), [4] N Tx packets
//                  sent, [5] N Rx packets stored; write one to clear
//   0x20 IRQ_MASK  same bits; irq = |(IRQ_STAT & IRQ_MASK)
//   0x24 IRQ_NPKT  [15:0] N for Tx, [31:16] N for Rx (0 = off); bits 4
//                  and 5 set on every N-th packet, counted from the write
// Writes take effect on the clock edge; reads are combinational. The
// descriptor table, the counts and the circular use follow the document;
// the register map and widths are this design's.
module cptp_desc_reg
  import spw_pkg::*;
#(
  parameter int unsigned NDESC       = 16,
  parameter int unsigned MAX_PKT_LEN = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  reg_wr_t     reg_wr,
  input  logic [7:0]  reg_raddr,
  output logic [31:0] reg_rdata,
  // Tx descriptors
  output logic        tx_avail,
  output logic [31:0] tx_desc_addr,
  input  logic        tx_consume,
  // Rx descriptors
  output logic        rx_avail,
  output logic [31:0] rx_desc_addr,
  input  logic        rx_consume,
  // configuration
  output chk_e        rx_chk,
  output logic        rx_discard_en,
  output logic [16:0] rx_max_len,
  // events and interrupt
  input  logic        ev_tx_irq,      // packet sent, its header asked for an interrupt
  input  logic        ev_rx_done,     // packet stored
  input  logic        ev_rx_discard,  // packet dropped for lack of a descriptor
  input  logic        ev_tx_done,     // any packet sent
  input  logic        ev_rx_err,      // packet stored with a protocol error
  output logic        irq
);

  localparam int unsigned IW = $clog2(NDESC);
  localparam int unsigned CW = $clog2(NDESC + 1);

  logic [31:0] tx_base, rx_base;
  logic [CW-1:0] tx_cnt, rx_cnt;
  logic [IW-1:0] tx_idx, rx_idx;
  logic [2:0]  ctrl;
  logic [16:0] max_len;
  logic [5:0]  irq_stat, irq_mask;
  logic [15:0] tx_n, rx_n, tx_pc, rx_pc;
  logic        tx_hit, rx_hit;

  // packet-count interrupt: counter reaches N, then starts again
  assign tx_hit = ev_tx_done && tx_n != '0 && tx_pc + 16'd1 == tx_n;
  assign rx_hit = ev_rx_done && rx_n != '0 && rx_pc + 16'd1 == rx_n;

  function automatic logic [CW-1:0] cnt_next(input logic [CW-1:0] c, input logic add,
                                             input logic [31:0] n, input logic dec);
    logic [32:0] t;
    t = {{(33-CW){1'b0}}, c};
    if (add) t = t + {1'b0, n};
    if (dec && t != 0) t = t - 1;
    if (t > 33'(NDESC)) t = 33'(NDESC);
    return t[CW-1:0];
  endfunction

  function automatic logic [IW-1:0] idx_next(input logic [IW-1:0] i);
    return (32'(i) == NDESC - 1) ? '0 : i + 1'b1;
  endfunction

  wire wr_txb = reg_wr.wr && reg_wr.addr[7:0] == 8'h00;
  wire wr_txc = reg_wr.wr && reg_wr.addr[7:0] == 8'h04;
  wire wr_rxb = reg_wr.wr && reg_wr.addr[7:0] == 8'h08;
  wire wr_rxc = reg_wr.wr && reg_wr.addr[7:0] == 8'h0C;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_base  <= '0;
      rx_base  <= '0;
      tx_cnt   <= '0;
      rx_cnt   <= '0;
      tx_idx   <= '0;
      rx_idx   <= '0;
      ctrl     <= '0;
      max_len  <= 17'(MAX_PKT_LEN);
      irq_stat <= '0;
      irq_mask <= '0;
      tx_n     <= '0;
      rx_n     <= '0;
      tx_pc    <= '0;
      rx_pc    <= '0;
    end else begin
      if (wr_txb) tx_base <= reg_wr.wdata;
      if (wr_rxb) rx_base <= reg_wr.wdata;
      tx_cnt <= cnt_next(tx_cnt, wr_txc, reg_wr.wdata, tx_consume);
      rx_cnt <= cnt_next(rx_cnt, wr_rxc, reg_wr.wdata, rx_consume);
      if (wr_txb)          tx_idx <= '0;
      else if (tx_consume) tx_idx <= idx_next(tx_idx);
      if (wr_rxb)          rx_idx <= '0;
      else if (rx_consume) rx_idx <= idx_next(rx_idx);
      if (reg_wr.wr && reg_wr.addr[7:0] == 8'h10) ctrl <= reg_wr.wdata[2:0];
      if (reg_wr.wr && reg_wr.addr[7:0] == 8'h14)
        max_len <= (reg_wr.wdata > 32'(MAX_PKT_LEN)) ? 17'(MAX_PKT_LEN) : reg_wr.wdata[16:0];
      if (reg_wr.wr && reg_wr.addr[7:0] == 8'h20) irq_mask <= reg_wr.wdata[5:0];
      irq_stat <= (irq_stat & ~((reg_wr.wr && reg_wr.addr[7:0] == 8'h1C) ? reg_wr.wdata[5:0] : 6'b000000))
                | {rx_hit, tx_hit, ev_rx_err, ev_rx_discard, ev_rx_done, ev_tx_irq};
      if (reg_wr.wr && reg_wr.addr[7:0] == 8'h24) begin
        tx_n  <= reg_wr.wdata[15:0];
        rx_n  <= reg_wr.wdata[31:16];
        tx_pc <= '0;
        rx_pc <= '0;
      end else begin
        if (ev_tx_done) tx_pc <= tx_hit ? '0 : tx_pc + 16'd1;
        if (ev_rx_done) rx_pc <= rx_hit ? '0 : rx_pc + 16'd1;
      end
    end
  end

  assign tx_avail      = (tx_cnt != '0);
  assign rx_avail      = (rx_cnt != '0);
  assign tx_desc_addr  = tx_base + {{(32-IW-3){1'b0}}, tx_idx, 3'b000};
  assign rx_desc_addr  = rx_base + {{(32-IW-3){1'b0}}, rx_idx, 3'b000};
  assign rx_chk        = chk_e'(ctrl[1:0]);
  assign rx_discard_en = ctrl[2];
  assign rx_max_len    = max_len;
  assign irq           = |(irq_stat & irq_mask);

  always_comb begin
    unique case (reg_raddr)
      8'h00:   reg_rdata = tx_base;
      8'h04:   reg_rdata = 32'(tx_cnt);
      8'h08:   reg_rdata = rx_base;
      8'h0C:   reg_rdata = 32'(rx_cnt);
      8'h10:   reg_rdata = {29'd0, ctrl};
      8'h14:   reg_rdata = {15'd0, max_len};
      8'h18:   reg_rdata = {16'(rx_idx), 16'(tx_idx)};
      8'h1C:   reg_rdata = {26'd0, irq_stat};
      8'h20:   reg_rdata = {26'd0, irq_mask};
      8'h24:   reg_rdata = {rx_n, tx_n};
      default: reg_rdata = '0;
    endcase
  end

endmodule
