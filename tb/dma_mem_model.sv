// Behavioural memory serving spw_pkg DMA client ports, for testbenches.
//
// A byte array of 2**AW bytes, big-endian words. NPORT client ports are
// served one transfer at a time, lowest port first, each after 0..MAXWAIT
// idle clocks chosen at random; `ack` is a one-cycle pulse, with the read
// data right-aligned. Testbenches preload and inspect `mem` directly.
module dma_mem_model
  import spw_pkg::*;
#(
  parameter int unsigned NPORT   = 1,
  parameter int unsigned AW      = 16,
  parameter int unsigned MAXWAIT = 3
) (
  input  logic                 clk,
  input  dma_req_t [NPORT-1:0] req,
  output dma_rsp_t [NPORT-1:0] rsp
);

  logic [7:0] mem [2**AW];
  int         wait_cnt = 0;
  int         cur      = -1;
  int unsigned n_xfer  = 0;

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    rsp = '0;
  end

  function automatic int unsigned nbytes(dma_size_e s);
    return (s == DMA_BYTE) ? 1 : (s == DMA_HALF) ? 2 : 4;
  endfunction

  always @(posedge clk) begin
    logic any_ack;
    any_ack = 1'b0;
    for (int p = 0; p < int'(NPORT); p++) begin
      any_ack |= rsp[p].ack;
      rsp[p].ack <= 1'b0;
    end
    if (cur >= 0 && !req[cur].req) cur = -1;   // request withdrawn (reset)
    if (cur >= 0) begin
      if (wait_cnt > 0) wait_cnt--;
      else begin
        dma_req_t r;
        logic [31:0] d;
        int unsigned n;
        r = req[cur];
        n = nbytes(r.size);
        d = '0;
        if (r.we) begin
          for (int unsigned b = 0; b < n; b++)
            mem[(r.addr + b) % (2**AW)] = r.wdata[8*(n-1-b) +: 8];
        end else begin
          for (int unsigned b = 0; b < n; b++)
            d[8*(n-1-b) +: 8] = mem[(r.addr + b) % (2**AW)];
        end
        rsp[cur].ack   <= 1'b1;
        rsp[cur].err   <= 1'b0;
        rsp[cur].rdata <= d;
        n_xfer++;
        cur = -1;
      end
    end else if (!any_ack) begin
      for (int p = int'(NPORT) - 1; p >= 0; p--)
        if (req[p].req) cur = p;
      if (cur >= 0) wait_cnt = $urandom_range(MAXWAIT, 0);
    end
  end

endmodule
