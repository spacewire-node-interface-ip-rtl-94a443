// Packet Handler of the CPTP engine (receive store).
//
// When the Rx FIFO starts to fill, this block reads the current Rx
// descriptor (word 0: header address, word 1: payload address), then writes
// each payload byte from the FIFO to consecutive bytes from the payload
// address. At the FIFO's end marker it waits for the Packet Decoder's
// header, then writes two words at the header address: the status word
// (spw_pkg::rx_stat_t, the error information) and the header characters
// (first one in bits 31:24). It then hands the descriptor back
// (`desc_consume`), tells the decoder it is finished (`hdr_done`) and pulses
// `done`, the interrupt source. Memory is reached through one DMA client
// port, byte writes for the payload, word writes for the header. The order
// (payload first, header with error information last) follows the
// document; the layout is this design's.
module cptp_pkt_handler
  import spw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        desc_avail,
  input  logic [31:0] desc_addr,
  output logic        desc_consume,
  input  logic [8:0]  fifo_data,
  input  logic        fifo_valid,
  output logic        fifo_ready,
  input  logic        hdr_valid,
  input  rx_stat_t    stat,
  input  logic [31:0] hdr,
  output logic        hdr_done,
  output dma_req_t    dma_req,
  input  dma_rsp_t    dma_rsp,
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_RD_HP, S_RD_PP, S_POP, S_WR_BYTE, S_WAIT_HDR, S_WR_STAT, S_WR_HDR} state_e;

  state_e      st;
  logic [31:0] hp, addr;
  logic [7:0]  byte_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      hp           <= '0;
      addr         <= '0;
      byte_q       <= '0;
      desc_consume <= 1'b0;
      hdr_done     <= 1'b0;
      done         <= 1'b0;
    end else begin
      desc_consume <= 1'b0;
      hdr_done     <= 1'b0;
      done         <= 1'b0;
      unique case (st)
        S_IDLE:     if (fifo_valid && desc_avail) st <= S_RD_HP;
        S_RD_HP:    if (dma_rsp.ack) begin hp <= dma_rsp.rdata; st <= S_RD_PP; end
        S_RD_PP:    if (dma_rsp.ack) begin addr <= dma_rsp.rdata; st <= S_POP; end
        S_POP:      if (fifo_valid) begin
                      if (fifo_data[8]) st <= S_WAIT_HDR;
                      else begin
                        byte_q <= fifo_data[7:0];
                        st     <= S_WR_BYTE;
                      end
                    end
        S_WR_BYTE:  if (dma_rsp.ack) begin addr <= addr + 32'd1; st <= S_POP; end
        S_WAIT_HDR: if (hdr_valid) st <= S_WR_STAT;
        S_WR_STAT:  if (dma_rsp.ack) st <= S_WR_HDR;
        S_WR_HDR:   if (dma_rsp.ack) begin
                      desc_consume <= 1'b1;
                      hdr_done     <= 1'b1;
                      done         <= 1'b1;
                      st           <= S_IDLE;
                    end
        default:    st <= S_IDLE;
      endcase
    end
  end

  assign fifo_ready = (st == S_POP);

  always_comb begin
    dma_req      = '0;
    dma_req.size = DMA_WORD;
    unique case (st)
      S_RD_HP:   begin dma_req.req = 1'b1; dma_req.addr = desc_addr; end
      S_RD_PP:   begin dma_req.req = 1'b1; dma_req.addr = desc_addr + 32'd4; end
      S_WR_BYTE: begin
                   dma_req.req = 1'b1; dma_req.we = 1'b1; dma_req.size = DMA_BYTE;
                   dma_req.addr = addr; dma_req.wdata = {24'd0, byte_q};
                 end
      S_WR_STAT: begin dma_req.req = 1'b1; dma_req.we = 1'b1; dma_req.addr = hp; dma_req.wdata = stat; end
      S_WR_HDR:  begin dma_req.req = 1'b1; dma_req.we = 1'b1; dma_req.addr = hp + 32'd4; dma_req.wdata = hdr; end
      default: ;
    endcase
  end

endmodule
