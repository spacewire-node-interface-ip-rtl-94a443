// Commands Controller of the CPTP engine (transmit fetch).
//
// While the Descriptors Register reports a Tx descriptor, this block reads
// it from memory (word 0: header address, word 1: payload address), hands
// it back with `desc_consume`, then reads the Tx header and the payload and
// pushes them, a byte at a time, into the Tx FIFO for the Packet Formatter:
//   4 bytes  control word (tx_ctrl_t, most significant byte first)
//   hdr_len  header bytes, read from header address + 4
//   pay_len  payload bytes, read from the payload address
// Memory is reached through one DMA client port (spw_pkg::dma_req_t); the
// header control word is a word read, header and payload bytes are byte
// reads, so neither area needs any alignment beyond the control word.
// One packet is fetched at a time; the FIFO decouples fetching from
// transmission. The fetch order follows the document; the memory layout of
// descriptors and headers is this design's.
module cptp_cmd_ctrl
  import spw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        desc_avail,
  input  logic [31:0] desc_addr,
  output logic        desc_consume,
  output dma_req_t    dma_req,
  input  dma_rsp_t    dma_rsp,
  output logic [7:0]  fifo_data,
  output logic        fifo_valid,
  input  logic        fifo_ready
);

  typedef enum logic [2:0] {
    S_IDLE, S_RD_HP, S_RD_PP, S_RD_CTRL, S_PUSH_CTRL, S_RD_BYTE, S_PUSH_BYTE
  } state_e;

  state_e      st;
  logic [31:0] hp, pp, addr;
  tx_ctrl_t    ctrl;
  logic [31:0] ctrl_sh;
  logic [1:0]  cbyte;
  logic [16:0] left;
  logic        in_pay;   // reading payload (else header)
  logic [7:0]  byte_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      hp           <= '0;
      pp           <= '0;
      addr         <= '0;
      ctrl         <= '0;
      ctrl_sh      <= '0;
      cbyte        <= '0;
      left         <= '0;
      in_pay       <= 1'b0;
      byte_q       <= '0;
      desc_consume <= 1'b0;
    end else begin
      desc_consume <= 1'b0;
      unique case (st)
        S_IDLE:    if (desc_avail) st <= S_RD_HP;
        S_RD_HP:   if (dma_rsp.ack) begin hp <= dma_rsp.rdata; st <= S_RD_PP; end
        S_RD_PP:   if (dma_rsp.ack) begin
                     pp           <= dma_rsp.rdata;
                     desc_consume <= 1'b1;
                     st           <= S_RD_CTRL;
                   end
        S_RD_CTRL: if (dma_rsp.ack) begin
                     ctrl    <= tx_ctrl_t'(dma_rsp.rdata);
                     ctrl_sh <= dma_rsp.rdata;
                     cbyte   <= '0;
                     st      <= S_PUSH_CTRL;
                   end
        S_PUSH_CTRL: if (fifo_ready) begin
                     ctrl_sh <= {ctrl_sh[23:0], 8'h00};
                     cbyte   <= cbyte + 1'b1;
                     if (cbyte == 2'd3) begin
                       if (ctrl.hdr_len != 7'd0) begin
                         in_pay <= 1'b0;
                         addr   <= hp + 32'd4;
                         left   <= {10'd0, ctrl.hdr_len};
                         st     <= S_RD_BYTE;
                       end else if (ctrl.pay_len != 17'd0) begin
                         in_pay <= 1'b1;
                         addr   <= pp;
                         left   <= ctrl.pay_len;
                         st     <= S_RD_BYTE;
                       end else begin
                         st <= S_IDLE;
                       end
                     end
                   end
        S_RD_BYTE: if (dma_rsp.ack) begin
                     byte_q <= dma_rsp.rdata[7:0];
                     st     <= S_PUSH_BYTE;
                   end
        S_PUSH_BYTE: if (fifo_ready) begin
                     addr <= addr + 32'd1;
                     left <= left - 17'd1;
                     st   <= S_RD_BYTE;
                     if (left == 17'd1) begin
                       if (!in_pay && ctrl.pay_len != 17'd0) begin
                         in_pay <= 1'b1;
                         addr   <= pp;
                         left   <= ctrl.pay_len;
                       end else begin
                         st <= S_IDLE;
                       end
                     end
                   end
        default:   st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    dma_req       = '0;
    dma_req.size  = DMA_WORD;
    unique case (st)
      S_RD_HP:   begin dma_req.req = 1'b1; dma_req.addr = desc_addr; end
      S_RD_PP:   begin dma_req.req = 1'b1; dma_req.addr = desc_addr + 32'd4; end
      S_RD_CTRL: begin dma_req.req = 1'b1; dma_req.addr = hp; end
      S_RD_BYTE: begin dma_req.req = 1'b1; dma_req.addr = addr; dma_req.size = DMA_BYTE; end
      default: ;
    endcase
  end

  assign fifo_valid = (st == S_PUSH_CTRL) || (st == S_PUSH_BYTE);
  assign fifo_data  = (st == S_PUSH_CTRL) ? ctrl_sh[31:24] : byte_q;

endmodule
