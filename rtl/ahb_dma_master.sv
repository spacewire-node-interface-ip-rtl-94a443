// AHB master shared by the DMA clients of the node.
//
// NCLI clients (protocol engines) ask for single reads and writes with the
// spw_pkg::dma_req_t bundle. The master serves one client at a time and
// keeps serving it while it keeps asking, for at most MAX_BEATS transfers,
// so that no engine monopolises the bus; then, or when the client stops
// asking, the next client is chosen round-robin. A client asking for a
// locked sequence (req.lock, used for read-modify-write and compare-and-swap)
// keeps the bus whatever the count, with HMASTLOCK high, for at most
// LOCK_BEATS transfers, which an assertion checks.
//
// Bus side: AMBA 2.0 AHB master with HBUSREQ/HGRANT. Transfers are
// NONSEQ/SINGLE and not overlapped: an address phase, accepted on a clock
// edge where the master owns the bus and HREADY is high, then a data phase
// that ends when HREADY is high again. Byte and halfword data are moved to
// their big-endian byte lanes. The client's `ack` is high in the cycle that
// data phase ends, with the read data and `err` (HRESP ERROR); the client
// sees it and moves on at the same clock edge.
// One master, several DMA clients, a programmable limit and locked
// transfers of up to 8 beats follow the document; the rest is this design's.
module ahb_dma_master
  import spw_pkg::*;
#(
  parameter int unsigned NCLI       = 3,
  parameter int unsigned MAX_BEATS  = 32,   // 128 bytes of 32-bit words
  parameter int unsigned LOCK_BEATS = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  dma_req_t [NCLI-1:0]    cli_req,
  output dma_rsp_t [NCLI-1:0]    cli_rsp,
  // AHB
  output logic                   hbusreq,
  output logic                   hlock,
  input  logic                   hgrant,
  output logic [31:0]            haddr,
  output logic [1:0]             htrans,
  output logic                   hwrite,
  output logic [2:0]             hsize,
  output logic [2:0]             hburst,
  output logic [3:0]             hprot,
  output logic                   hmastlock,
  output logic [31:0]            hwdata,
  input  logic [31:0]            hrdata,
  input  logic                   hready,
  input  logic [1:0]             hresp
);

  localparam int unsigned CW = (NCLI > 1) ? $clog2(NCLI) : 1;
  localparam logic [1:0] HTRANS_IDLE = 2'b00, HTRANS_NONSEQ = 2'b10;

  typedef enum logic [1:0] {S_ARB, S_ADDR, S_DATA} state_e;

  state_e        st;
  logic [CW-1:0] owner, pick;
  logic          pick_ok;
  logic          owned;       // this master drives the address bus this cycle
  logic [15:0]   beats;
  dma_req_t      r;           // owner's request
  dma_req_t      r_d;         // request of the transfer in data phase
  logic          keep;

  assign r    = cli_req[owner];
  assign keep = r.req && (r.lock ? (beats < 16'(LOCK_BEATS)) : (beats < 16'(MAX_BEATS)));

  always_comb begin
    pick    = owner;
    pick_ok = 1'b0;
    for (int k = 1; k <= int'(NCLI); k++) begin
      int unsigned i;
      i = (int'(owner) + k) % NCLI;
      if (!pick_ok && cli_req[i].req) begin
        pick    = CW'(i);
        pick_ok = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_ARB;
      owner <= CW'(NCLI - 1);
      owned <= 1'b0;
      beats <= '0;
      r_d   <= '0;
    end else begin
      if (hready) owned <= hgrant;
      unique case (st)
        S_ARB:  if (keep) st <= S_ADDR;
                else if (pick_ok) begin
                  owner <= pick;
                  beats <= '0;
                  st    <= S_ADDR;
                end
        S_ADDR: if (owned && hready) begin
                  r_d <= r;
                  st  <= S_DATA;
                end
        S_DATA: if (hready) begin
                  beats <= beats + 16'd1;
                  st    <= S_ARB;
                end
        default: st <= S_ARB;
      endcase
    end
  end

  // big-endian lane placement
  function automatic logic [31:0] place(input logic [31:0] d, input dma_size_e sz, input logic [1:0] a);
    unique case (sz)
      DMA_BYTE: return {24'd0, d[7:0]}  << (8 * (3 - int'(a)));
      DMA_HALF: return {16'd0, d[15:0]} << (a[1] ? 0 : 16);
      default:  return d;
    endcase
  endfunction

  function automatic logic [31:0] extract(input logic [31:0] d, input dma_size_e sz, input logic [1:0] a);
    logic [31:0] s;
    unique case (sz)
      DMA_BYTE: begin s = d >> (8 * (3 - int'(a))); return {24'd0, s[7:0]}; end
      DMA_HALF: begin s = a[1] ? d : (d >> 16); return {16'd0, s[15:0]}; end
      default:  return d;
    endcase
  endfunction

  always_comb begin
    haddr     = r.addr;
    hwrite    = r.we;
    hsize     = {1'b0, r.size};
    hburst    = 3'b000;            // SINGLE
    hprot     = 4'b0011;           // data access, privileged
    htrans    = (st == S_ADDR && owned) ? HTRANS_NONSEQ : HTRANS_IDLE;
    hmastlock = (st == S_ADDR) ? r.lock : (st == S_DATA && r_d.lock && r.lock);
    hlock     = (st != S_ARB) ? r.lock : 1'b0;
    hbusreq   = (st == S_ADDR) || (st == S_ARB && (keep || pick_ok));
    hwdata    = place(r_d.wdata, r_d.size, r_d.addr[1:0]);
  end

  always_comb begin
    for (int i = 0; i < int'(NCLI); i++) begin
      cli_rsp[i]       = '0;
      cli_rsp[i].rdata = extract(hrdata, r_d.size, r_d.addr[1:0]);
    end
    cli_rsp[owner].ack = (st == S_DATA) && hready;
    cli_rsp[owner].err = (st == S_DATA) && hready && (hresp == 2'b01);
  end

  // a locked sequence holds the bus for at most LOCK_BEATS transfers
  assert property (@(posedge clk) disable iff (!rst_n)
                   (st == S_DATA && hready && r_d.lock) |-> (beats < 16'(LOCK_BEATS)))
    else $error("ahb_dma_master: locked sequence longer than %0d beats", LOCK_BEATS);

endmodule
