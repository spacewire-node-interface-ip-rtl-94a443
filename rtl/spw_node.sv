// SpaceWire node interface: protocol engines, AHB/APB, optional switch.
//
// The node sits between SpaceWire codecs and a LEON-style system bus. With
// N_EXT_PORTS = 0 it has a single link; with N_EXT_PORTS = n (2..31) a
// switch with n external links sits in front of the node, the node on
// switch port 0, and codec port k is switch port k+1.
// The switch keeps its own NDCP address translation block, a ROM whose
// contents are parameters, looked up through the swn_lk_* ports.
// Received packets from the codec's 9-bit character interface go through
// the protocol demultiplexer to the RMAP engine (RMAP and NDCP commands),
// the time distribution engine, or the CPTP/raw engine. Packets from the
// engines are merged by the protocol multiplexer back into the codec, with
// an EEP inserted on truncation or when an engine is reset mid-packet. All
// engines reach memory through one AHB master (DMA client 0 RMAP, 1 CPTP
// transmit, 2 CPTP receive). Software configures the CPTP engine and the
// NDCP address translation table through APB (or, with NDCP_ROM = 1, the
// table is fixed by parameters).
//
// The codec, the RMAP engine and the time distribution engine are existing
// designs outside this RTL: their connections are ports of this module.
// The RMAP engine's NDCP lookups go to the address translation here.
//
// APB map (byte offsets of paddr[13:0]): 0x0000-0x00FF CPTP registers
// (see cptp_desc_reg), 0x1000-0x1FFF NDCP translation (see
// ndcp_addr_xlate), 0x2000-0x2FFF switch routing table and counters
// (see spw_switch), 0x3000-0x3FFF the switch's NDCP translation table
// (ROM, read only; only its OWNER register is writable). APB writes take
// effect at the end of the access phase; reads are combinational. `eng_rst` resets one engine (bit 0 RMAP, 1 TDP,
// 2 CPTP); the CPTP engine is held in reset with it.
// The composition follows the document's top-level description; the bus
// maps and the client order are this design's.
module spw_node
  import spw_pkg::*;
#(
  parameter int unsigned NDESC         = 16,
  parameter int unsigned MAX_PKT_LEN   = 65536,
  parameter int unsigned NDCP_DEPTH    = 64,
  parameter bit          NDCP_ROM      = 1'b0,
  parameter ndcp_entry_t NDCP_ROM_TABLE [NDCP_DEPTH] = '{default: '0},
  parameter int unsigned NDCP_ROM_NUM  = 0,
  parameter int unsigned MAX_DMA_BEATS = 32,
  parameter int unsigned FIFO_DEPTH    = 512,
  parameter int unsigned MAX_SPW_LEN   = 65536 + 16,
  parameter int unsigned N_EXT_PORTS   = 0,
  parameter int unsigned SW_TIMEOUT    = 4096,
  parameter int unsigned SW_NDCP_DEPTH = 16,
  parameter ndcp_entry_t SW_NDCP_TABLE [SW_NDCP_DEPTH] = '{default: '0},
  parameter int unsigned SW_NDCP_NUM   = 0,
  localparam int unsigned NLINK        = (N_EXT_PORTS == 0) ? 1 : N_EXT_PORTS
) (
  input  logic        clk,
  input  logic        rst_n,
  // codec character interfaces, one per link
  input  spw_char_t [NLINK-1:0] cdc_rx_data,
  input  logic      [NLINK-1:0] cdc_rx_valid,
  output logic      [NLINK-1:0] cdc_rx_ready,
  output spw_char_t [NLINK-1:0] cdc_tx_data,
  output logic      [NLINK-1:0] cdc_tx_valid,
  input  logic      [NLINK-1:0] cdc_tx_ready,
  // RMAP engine
  output spw_char_t   rmap_rx_data,
  output logic        rmap_rx_valid,
  input  logic        rmap_rx_ready,
  input  spw_char_t   rmap_tx_data,
  input  logic        rmap_tx_valid,
  output logic        rmap_tx_ready,
  input  dma_req_t    rmap_dma_req,
  output dma_rsp_t    rmap_dma_rsp,
  input  logic        ndcp_lk_req,
  input  logic [31:0] ndcp_lk_addr,
  input  logic [7:0]  ndcp_lk_nfields,
  input  logic [1:0]  ndcp_lk_op,
  input  logic [7:0]  ndcp_lk_src,
  output logic        ndcp_lk_done,
  output logic        ndcp_lk_grant,
  output logic        ndcp_lk_rsv,
  output logic [31:0] ndcp_lk_phys,
  // the switch's own NDCP address translation (ROM), for the RMAP target
  // that configures the switch; unused without a switch
  input  logic        swn_lk_req,
  input  logic [31:0] swn_lk_addr,
  input  logic [7:0]  swn_lk_nfields,
  input  logic [1:0]  swn_lk_op,
  input  logic [7:0]  swn_lk_src,
  output logic        swn_lk_done,
  output logic        swn_lk_grant,
  output logic        swn_lk_rsv,
  output logic [31:0] swn_lk_phys,
  // time distribution engine
  output spw_char_t   tdp_rx_data,
  output logic        tdp_rx_valid,
  input  logic        tdp_rx_ready,
  input  spw_char_t   tdp_tx_data,
  input  logic        tdp_tx_valid,
  output logic        tdp_tx_ready,
  input  logic [2:0]  eng_rst,
  // APB slave
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [13:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  // AHB master
  output logic        hbusreq,
  output logic        hlock,
  input  logic        hgrant,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [3:0]  hprot,
  output logic        hmastlock,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic [1:0]  hresp,
  // interrupt and events
  output logic        irq,
  output logic        ev_rx_trunc,
  output logic        ev_tx_trunc,
  output logic        ev_tx_reset_eep,
  output logic        ev_sw_discard,
  output logic        ev_sw_timeout
);

  // ---- APB decode
  reg_wr_t     cptp_wr, ndcp_wr, sw_wr, swn_wr;
  logic [31:0] cptp_rdata, ndcp_rdata, sw_rdata, swn_rdata;
  wire         apb_wr = psel && penable && pwrite;

  always_comb begin
    cptp_wr       = '0;
    ndcp_wr       = '0;
    sw_wr         = '0;
    cptp_wr.addr  = paddr[11:0];
    ndcp_wr.addr  = paddr[11:0];
    sw_wr.addr    = paddr[11:0];
    cptp_wr.wdata = pwdata;
    ndcp_wr.wdata = pwdata;
    sw_wr.wdata   = pwdata;
    swn_wr        = sw_wr;
    cptp_wr.wr    = apb_wr && !paddr[13] && !paddr[12] && (paddr[11:8] == 4'h0);
    ndcp_wr.wr    = apb_wr && !paddr[13] &&  paddr[12];
    sw_wr.wr      = apb_wr &&  paddr[13] && !paddr[12];
    swn_wr.wr     = apb_wr &&  paddr[13] &&  paddr[12];
    if (paddr[13])      prdata = paddr[12] ? swn_rdata : sw_rdata;
    else if (paddr[12]) prdata = ndcp_rdata;
    else                prdata = (paddr[11:8] == 4'h0) ? cptp_rdata : 32'd0;
  end

  // ---- link side: the node's own link, or a switch in front of it
  spw_char_t  nd_rx_data, nd_tx_data;
  logic       nd_rx_valid, nd_rx_ready, nd_tx_valid, nd_tx_ready;

  if (N_EXT_PORTS == 0) begin : g_single
    assign nd_rx_data      = cdc_rx_data[0];
    assign nd_rx_valid     = cdc_rx_valid[0];
    assign cdc_rx_ready[0] = nd_rx_ready;
    assign cdc_tx_data[0]  = nd_tx_data;
    assign cdc_tx_valid[0] = nd_tx_valid;
    assign nd_tx_ready     = cdc_tx_ready[0];
    assign sw_rdata        = 32'd0;
    assign ev_sw_discard   = 1'b0;
    assign ev_sw_timeout   = 1'b0;
    assign swn_rdata       = 32'd0;
    assign swn_lk_done     = 1'b0;
    assign swn_lk_grant    = 1'b0;
    assign swn_lk_rsv      = 1'b0;
    assign swn_lk_phys     = 32'd0;
  end else begin : g_switch
    spw_char_t [NLINK:0] sw_in_data, sw_out_data;
    logic      [NLINK:0] sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;
    logic      [NLINK:0] sw_discard, sw_timeout;
    logic                sw_route;

    assign sw_in_data   = {cdc_rx_data, nd_tx_data};
    assign sw_in_valid  = {cdc_rx_valid, nd_tx_valid};
    assign sw_out_ready = {cdc_tx_ready, nd_rx_ready};
    assign nd_tx_ready  = sw_in_ready[0];
    assign cdc_rx_ready = sw_in_ready[NLINK:1];
    assign nd_rx_data   = sw_out_data[0];
    assign nd_rx_valid  = sw_out_valid[0];
    assign cdc_tx_data  = sw_out_data[NLINK:1];
    assign cdc_tx_valid = sw_out_valid[NLINK:1];
    assign ev_sw_discard = |sw_discard;
    assign ev_sw_timeout = |sw_timeout;

    spw_switch #(.NPORTS(NLINK + 1), .TIMEOUT(SW_TIMEOUT)) u_switch (
      .clk, .rst_n,
      .in_data(sw_in_data), .in_valid(sw_in_valid), .in_ready(sw_in_ready),
      .out_data(sw_out_data), .out_valid(sw_out_valid), .out_ready(sw_out_ready),
      .reg_wr(sw_wr), .reg_raddr(paddr[11:0]), .reg_rdata(sw_rdata),
      .ev_route(sw_route), .ev_discard(sw_discard), .ev_timeout(sw_timeout)
    );

    ndcp_addr_xlate #(
      .DEPTH(SW_NDCP_DEPTH), .ROM(1'b1), .ROM_TABLE(SW_NDCP_TABLE), .ROM_NUM(SW_NDCP_NUM)
    ) u_sw_ndcp (
      .clk, .rst_n, .reg_wr(swn_wr), .reg_raddr(paddr[11:0]), .reg_rdata(swn_rdata),
      .lk_req(swn_lk_req), .lk_addr(swn_lk_addr), .lk_nfields(swn_lk_nfields),
      .lk_op(swn_lk_op), .lk_src(swn_lk_src),
      .lk_done(swn_lk_done), .lk_grant(swn_lk_grant), .lk_rsv(swn_lk_rsv), .lk_phys(swn_lk_phys)
    );
  end

  // ---- receive side
  spw_char_t  dmx_data;
  logic [2:0] dmx_valid, dmx_ready;
  spw_char_t  cptp_tx_data;
  logic       cptp_tx_valid, cptp_tx_ready, cptp_rx_ready;

  proto_demux #(.MAX_LEN(MAX_SPW_LEN)) u_demux (
    .clk, .rst_n,
    .in_data(nd_rx_data), .in_valid(nd_rx_valid), .in_ready(nd_rx_ready),
    .out_data(dmx_data), .out_valid(dmx_valid), .out_ready(dmx_ready),
    .ev_trunc(ev_rx_trunc)
  );

  assign rmap_rx_data  = dmx_data;
  assign rmap_rx_valid = dmx_valid[0];
  assign tdp_rx_data   = dmx_data;
  assign tdp_rx_valid  = dmx_valid[1];
  assign dmx_ready     = {cptp_rx_ready, tdp_rx_ready, rmap_rx_ready};

  // ---- CPTP / raw engine
  dma_req_t cptp_dtx_req, cptp_drx_req;
  dma_rsp_t cptp_dtx_rsp, cptp_drx_rsp;
  wire      cptp_rst_n = rst_n && !eng_rst[2];

  cptp #(.NDESC(NDESC), .MAX_PKT_LEN(MAX_PKT_LEN),
         .TX_FIFO_DEPTH(FIFO_DEPTH), .RX_FIFO_DEPTH(FIFO_DEPTH)) u_cptp (
    .clk, .rst_n(cptp_rst_n),
    .reg_wr(cptp_wr), .reg_raddr(paddr[7:0]), .reg_rdata(cptp_rdata),
    .rx_data(dmx_data), .rx_valid(dmx_valid[2]), .rx_ready(cptp_rx_ready),
    .tx_data(cptp_tx_data), .tx_valid(cptp_tx_valid), .tx_ready(cptp_tx_ready),
    .dma_tx_req(cptp_dtx_req), .dma_tx_rsp(cptp_dtx_rsp),
    .dma_rx_req(cptp_drx_req), .dma_rx_rsp(cptp_drx_rsp),
    .irq
  );

  // ---- NDCP address translation
  ndcp_addr_xlate #(
    .DEPTH(NDCP_DEPTH), .ROM(NDCP_ROM), .ROM_TABLE(NDCP_ROM_TABLE), .ROM_NUM(NDCP_ROM_NUM)
  ) u_ndcp (
    .clk, .rst_n,
    .reg_wr(ndcp_wr), .reg_raddr(paddr[11:0]), .reg_rdata(ndcp_rdata),
    .lk_req(ndcp_lk_req), .lk_addr(ndcp_lk_addr), .lk_nfields(ndcp_lk_nfields),
    .lk_op(ndcp_lk_op), .lk_src(ndcp_lk_src),
    .lk_done(ndcp_lk_done), .lk_grant(ndcp_lk_grant), .lk_rsv(ndcp_lk_rsv), .lk_phys(ndcp_lk_phys)
  );

  // ---- transmit side
  spw_char_t [2:0] mux_data;
  logic      [2:0] mux_valid, mux_ready;

  assign mux_data      = {cptp_tx_data, tdp_tx_data, rmap_tx_data};
  assign mux_valid     = {cptp_tx_valid, tdp_tx_valid, rmap_tx_valid};
  assign rmap_tx_ready = mux_ready[0];
  assign tdp_tx_ready  = mux_ready[1];
  assign cptp_tx_ready = mux_ready[2];

  proto_mux #(.NSRC(3), .MAX_LEN(MAX_SPW_LEN)) u_mux (
    .clk, .rst_n,
    .in_data(mux_data), .in_valid(mux_valid), .in_ready(mux_ready), .src_rst(eng_rst),
    .out_data(nd_tx_data), .out_valid(nd_tx_valid), .out_ready(nd_tx_ready),
    .ev_trunc(ev_tx_trunc), .ev_reset_eep(ev_tx_reset_eep)
  );

  // ---- DMA
  dma_req_t [2:0] dreq;
  dma_rsp_t [2:0] drsp;

  assign dreq         = {cptp_drx_req, cptp_dtx_req, rmap_dma_req};
  assign rmap_dma_rsp = drsp[0];
  assign cptp_dtx_rsp = drsp[1];
  assign cptp_drx_rsp = drsp[2];

  ahb_dma_master #(.NCLI(3), .MAX_BEATS(MAX_DMA_BEATS)) u_ahb (
    .clk, .rst_n,
    .cli_req(dreq), .cli_rsp(drsp),
    .hbusreq, .hlock, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot,
    .hmastlock, .hwdata, .hrdata, .hready, .hresp
  );

endmodule
