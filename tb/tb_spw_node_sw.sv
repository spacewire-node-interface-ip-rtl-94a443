// End-to-end testbench of spw_node with the switch instantiated and four
// external links, the configuration of a node with a switch. Software sets
// the switch routing table over APB, then packets travel:
//   - from an external link to the node by path address 0 (deleted), and
//     by a logical address whose table entry points at the node (kept);
//     they must reach the RMAP engine port unchanged otherwise
//   - from the node's time distribution engine out of an external link by
//     path address, the address deleted
//   - between two external links through a group of two ports, both busy
//     in turn, so the second port of the group is used
//   - to an address with no route (discarded by the switch)
//   - from an external link that stops sending mid-packet, cut by the
//     switch time-out with an EEP towards the node.
// Then the switch's own NDCP translation ROM answers a granted write, a
// refused write to its read-only region, and reads back over APB.
// Each mechanism is counted and must happen at least once.
module tb_spw_node_sw;
  import spw_pkg::*;
  localparam int NX = 4;
  logic clk = 0, rst_n = 0;
  spw_char_t [NX-1:0] cdc_rx_data, cdc_tx_data;
  logic [NX-1:0] cdc_rx_valid, cdc_rx_ready, cdc_tx_valid, cdc_tx_ready;
  spw_char_t rmap_rx_data, rmap_tx_data = '0, tdp_rx_data, tdp_tx_data;
  logic rmap_rx_valid, rmap_rx_ready = 1, rmap_tx_valid = 0, rmap_tx_ready;
  logic tdp_rx_valid, tdp_rx_ready = 1, tdp_tx_valid, tdp_tx_ready;
  dma_req_t rmap_dma_req = '0;
  dma_rsp_t rmap_dma_rsp;
  logic ndcp_lk_req = 0, ndcp_lk_done, ndcp_lk_grant, ndcp_lk_rsv;
  logic [31:0] ndcp_lk_addr = 0, ndcp_lk_phys;
  logic [7:0] ndcp_lk_nfields = 1, ndcp_lk_src = 0;
  logic [1:0] ndcp_lk_op = 0;
  logic swn_lk_req = 0, swn_lk_done, swn_lk_grant, swn_lk_rsv;
  logic [31:0] swn_lk_addr = 0, swn_lk_phys;
  logic [7:0] swn_lk_nfields = 1, swn_lk_src = 0;
  logic [1:0] swn_lk_op = 0;
  logic [2:0] eng_rst = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [13:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic hbusreq, hlock, hgrant, hwrite, hmastlock, hready;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans, hresp;
  logic [2:0] hsize, hburst;
  logic [3:0] hprot;
  logic irq, ev_rx_trunc, ev_tx_trunc, ev_tx_reset_eep, ev_sw_discard, ev_sw_timeout;
  int checks = 0, failures = 0;
  int n_to_node = 0, n_logical = 0, n_from_node = 0, n_ext = 0, n_gar_alt = 0, n_discard = 0, n_timeout = 0;

  // the switch's NDCP translation ROM: a writable region and a read-only one
  localparam ndcp_entry_t SWT [4] = '{
    '{app: 8'd1, proto: 8'd5, fset: 8'd0, field_lo: 8'd0, fs_len: 8'd4, ro_fl: 1'b1, cas_fl: 1'b0,
      rsv: 1'b0, cas: 1'b0, ro: 1'b0, phys: 32'h0000_2080},
    '{app: 8'd1, proto: 8'd5, fset: 8'd0, field_lo: 8'd4, fs_len: 8'd4, ro_fl: 1'b0, cas_fl: 1'b0,
      rsv: 1'b0, cas: 1'b0, ro: 1'b1, phys: 32'h0000_2800},
    '0, '0};

  spw_node #(.N_EXT_PORTS(NX), .SW_TIMEOUT(200), .SW_NDCP_DEPTH(4), .SW_NDCP_TABLE(SWT), .SW_NDCP_NUM(2)) dut (.*);
  ahb_mem_model #(.AW(12), .MAXWAIT(1)) u_mem (
    .clk, .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hmastlock, .hwdata,
    .hrdata, .hready, .hresp);

  always #4 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- link and engine models
  logic [8:0] lnk_q [NX][$];
  logic [8:0] tx_q [NX][$];
  logic [8:0] tdp_out[$], rmap_in[$];
  logic [NX-1:0] tx_hold = '0;
  int hold_rx = -1;
  always_comb begin
    for (int k = 0; k < NX; k++) begin
      cdc_rx_valid[k] = (lnk_q[k].size() > 0) && (hold_rx != k);
      cdc_rx_data[k]  = (lnk_q[k].size() > 0) ? lnk_q[k][0] : 9'h0;
      cdc_tx_ready[k] = !tx_hold[k];
    end
    tdp_tx_valid = tdp_out.size() > 0;
    tdp_tx_data  = (tdp_out.size() > 0) ? tdp_out[0] : 9'h0;
  end
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NX; k++) begin
      if (cdc_rx_valid[k] && cdc_rx_ready[k]) void'(lnk_q[k].pop_front());
      if (cdc_tx_valid[k] && cdc_tx_ready[k]) tx_q[k].push_back(cdc_tx_data[k]);
    end
    if (tdp_tx_valid && tdp_tx_ready) void'(tdp_out.pop_front());
    if (rmap_rx_valid && rmap_rx_ready) rmap_in.push_back(rmap_rx_data);
    if (ev_sw_discard) n_discard++;
    if (ev_sw_timeout) n_timeout++;
  end

  task automatic apb_wr(input logic [13:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask
  task automatic apb_rd(input logic [13:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask
  task automatic settle(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    logic [8:0] pk[$], e[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // logical 0xFE -> node (port 0); 0x50 -> group of links 2 and 3
    // (switch ports 3 and 4)
    apb_wr(14'h2080 + 14'(4 * (254 - 32)), 32'b00001);
    apb_wr(14'h2080 + 14'(4 * (80 - 32)), 32'b11000);
    apb_rd(14'h2080 + 14'(4 * (80 - 32)), d); check(d == 32'b11000, "switch table read over APB");

    // path address 0 from link 1 to the node, RMAP protocol id
    pk = '{9'h000, 9'h0FE, 9'h001, 9'h04D, 9'h000, 9'h0AA, SPW_EOP};
    foreach (pk[i]) lnk_q[1].push_back(pk[i]);
    settle(100);
    e = pk[1:$];
    check(rmap_in == e, "path-addressed packet reaches the RMAP engine without its address");
    if (rmap_in == e) n_to_node++;
    rmap_in.delete();
    // logical address 0xFE kept
    pk = '{9'h0FE, 9'h001, 9'h04C, 9'h000, 9'h0BB, SPW_EOP};
    foreach (pk[i]) lnk_q[0].push_back(pk[i]);
    settle(100);
    check(rmap_in == pk, "logically addressed packet reaches the RMAP engine");
    if (rmap_in == pk) n_logical++;
    rmap_in.delete();

    // node (time distribution engine) out of link 2 = switch port 3
    pk = '{9'h003, 9'h0FE, 9'h0FB, 9'h012, 9'h034, SPW_EOP};
    foreach (pk[i]) tdp_out.push_back(pk[i]);
    settle(100);
    e = pk[1:$];
    check(tx_q[2] == e, "node packet leaves on link 2 without the path address");
    if (tx_q[2] == e) n_from_node++;
    tx_q[2].delete();

    // link to link through the group 0x50 while link 2 is held busy
    tx_hold[2] = 1;
    pk = '{9'h050, 9'h001, 9'h002, 9'h003, SPW_EOP};
    foreach (pk[i]) lnk_q[0].push_back(pk[i]);
    settle(20);
    foreach (pk[i]) lnk_q[1].push_back(pk[i]);
    settle(100);
    check(tx_q[3] == pk, "second packet of the group uses link 3 while link 2 is busy");
    if (tx_q[3] == pk) n_gar_alt++;
    tx_hold[2] = 0;
    settle(100);
    check(tx_q[2] == pk, "first packet of the group leaves on link 2 when it frees");
    if (tx_q[2] == pk) n_ext++;
    tx_q[2].delete(); tx_q[3].delete();

    // no route
    pk = '{9'h014, 9'h001, SPW_EOP};
    foreach (pk[i]) lnk_q[3].push_back(pk[i]);
    settle(50);
    check(n_discard == 1, "packet with no route discarded");

    // link 1 stops mid-packet towards the node: time-out, EEP to the node
    rmap_in.delete();
    pk = '{9'h000, 9'h0FE, 9'h001, 9'h011, 9'h022, 9'h033, SPW_EOP};
    foreach (pk[i]) lnk_q[1].push_back(pk[i]);
    while (!(lnk_q[1].size() == 3)) @(posedge clk);
    @(negedge clk); hold_rx = 1;
    e = pk[1:pk.size() - 1 - lnk_q[1].size()];
    e.push_back(SPW_EEP);
    settle(600);
    @(negedge clk); hold_rx = -1;
    settle(100);
    check(n_timeout == 1 && rmap_in == e, $sformatf("time-out cuts the packet with EEP (%0d, %p)", n_timeout, rmap_in));
    check(lnk_q[1].size() == 0, "rest of the cut packet spilled");

    // the switch's NDCP translation (ROM)
    @(negedge clk); swn_lk_addr = 32'h0105_0002; swn_lk_op = 2'd1; swn_lk_req = 1;
    @(negedge clk); swn_lk_req = 0;
    while (!swn_lk_done) @(negedge clk);
    check(swn_lk_grant && swn_lk_phys == 32'h0000_2088, $sformatf("switch NDCP write granted at %h", swn_lk_phys));
    @(negedge clk); swn_lk_addr = 32'h0105_0005; swn_lk_req = 1;
    @(negedge clk); swn_lk_req = 0;
    while (!swn_lk_done) @(negedge clk);
    check(!swn_lk_grant, "switch NDCP write to read-only region refused");
    apb_rd(14'h3018, d); check(d == 32'h0000_2800, $sformatf("switch NDCP ROM read over APB %h", d));
    apb_rd(14'h3F00, d); check(d == 2, "switch NDCP ROM entry count");

    $display("mechanisms: to_node=%0d logical=%0d from_node=%0d link_to_link=%0d gar_alt=%0d discard=%0d timeout=%0d",
             n_to_node, n_logical, n_from_node, n_ext, n_gar_alt, n_discard, n_timeout);
    check(n_to_node > 0 && n_logical > 0 && n_from_node > 0 && n_ext > 0 && n_gar_alt > 0 && n_discard > 0 && n_timeout > 0,
          "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
