// End-to-end testbench of spw_node at its default parameters.
//
// Around the node: a behavioural AHB memory (random wait states), an APB
// driver for software, a link model feeding and collecting codec characters,
// and small stand-ins for the external RMAP and time distribution engines
// (they only take packets, send given packets and make DMA transfers). The
// test runs one complete operation of every mechanism and counts each:
//   - received packets dispatched to RMAP, NDCP (to RMAP), TDP and CPTP/raw
//   - CPTP receive with CRC check, stored through AHB with its status word
//   - CPTP receive truncated by the RX_MAX register
//   - receive discard when no descriptor is left (discard enabled)
//   - over-long received packet cut with EEP by the demultiplexer
//   - CPTP transmit with CRC from a memory descriptor, with interrupt
//   - transmit arbitration between engines
//   - over-long transmitted packet cut with EEP by the multiplexer
//   - engine reset in the middle of a packet ending it with EEP
//   - NDCP address translation, grant and refusal
//   - locked read-modify-write by the RMAP engine's DMA port
//   - the largest packet: a 64K-byte payload received into memory and sent
//     back from memory through a transmit descriptor
module tb_spw_node;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  spw_char_t cdc_rx_data, cdc_tx_data, rmap_rx_data, rmap_tx_data, tdp_rx_data, tdp_tx_data;
  logic cdc_rx_valid, cdc_rx_ready, cdc_tx_valid, cdc_tx_ready;
  logic rmap_rx_valid, rmap_rx_ready, rmap_tx_valid, rmap_tx_ready;
  logic tdp_rx_valid, tdp_rx_ready, tdp_tx_valid, tdp_tx_ready;
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

  spw_node dut (.*);
  ahb_mem_model #(.AW(17), .MAXWAIT(1)) u_mem (
    .clk, .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hmastlock, .hwdata,
    .hrdata, .hready, .hresp);

  always #4 clk = ~clk;     // 125 MHz

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters
  int n_rmap_pkts = 0, n_ndcp_pkts = 0, n_tdp_pkts = 0, n_rx_stored = 0, n_rx_trunc_cptp = 0;
  int n_discard = 0, n_rx_trunc = 0, n_tx_trunc = 0, n_reset_eep = 0, n_cptp_tx = 0;
  int n_max_rx = 0, n_max_tx = 0;
  int n_ndcp_grant = 0, n_ndcp_deny = 0, n_locked = 0, n_arb_switch = 0, n_irq = 0;

  always @(posedge clk) if (rst_n) begin
    if (ev_rx_trunc) n_rx_trunc++;
    if (ev_tx_trunc) n_tx_trunc++;
    if (ev_tx_reset_eep) n_reset_eep++;
    if (dut.u_cptp.u_dec.ev_discard) n_discard++;
    if (irq) n_irq++;
  end

  // ---------------- link model
  spw_char_t lnk_q[$];
  spw_char_t out_q[$];           // everything the node transmitted
  logic lg = 1;
  assign cdc_rx_valid = (lnk_q.size() > 0) && lg;
  assign cdc_rx_data  = (lnk_q.size() > 0) ? lnk_q[0] : 9'h0;
  always @(negedge clk) begin
    lg = ($urandom_range(7, 0) != 0);
    cdc_tx_ready = ($urandom_range(7, 0) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (cdc_rx_valid && cdc_rx_ready) void'(lnk_q.pop_front());
    if (cdc_tx_valid && cdc_tx_ready) out_q.push_back(cdc_tx_data);
  end

  // ---------------- engine stand-ins
  spw_char_t rmap_pk[$];
  spw_char_t rmap_in[$], tdp_in[$], rmap_out[$], tdp_out[$];
  assign rmap_rx_ready = 1'b1;
  assign tdp_rx_ready  = 1'b1;
  assign rmap_tx_valid = rmap_out.size() > 0;
  assign rmap_tx_data  = (rmap_out.size() > 0) ? rmap_out[0] : 9'h0;
  assign tdp_tx_valid  = tdp_out.size() > 0;
  assign tdp_tx_data   = (tdp_out.size() > 0) ? tdp_out[0] : 9'h0;
  always @(posedge clk) if (rst_n) begin
    if (rmap_rx_valid) begin
      rmap_in.push_back(rmap_rx_data);
      rmap_pk.push_back(rmap_rx_data);
      if (rmap_rx_data[8]) begin
        if (rmap_pk[1] == 9'(PID_RMAP)) n_rmap_pkts++; else n_ndcp_pkts++;
        rmap_pk.delete();
      end
    end
    if (tdp_rx_valid) begin
      tdp_in.push_back(tdp_rx_data);
      if (tdp_rx_data[8]) n_tdp_pkts++;
    end
    if (rmap_tx_valid && rmap_tx_ready) void'(rmap_out.pop_front());
    if (tdp_tx_valid && tdp_tx_ready) void'(tdp_out.pop_front());
  end

  // ---------------- helpers
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
  task automatic put32(input int a, input logic [31:0] v);
    for (int b = 0; b < 4; b++) u_mem.mem[a + b] = v[31 - 8*b -: 8];
  endtask
  function automatic logic [31:0] get32(input int a);
    logic [31:0] v;
    for (int b = 0; b < 4; b++) v[31 - 8*b -: 8] = u_mem.mem[a + b];
    return v;
  endfunction
  function automatic logic [15:0] ref_crc(input logic [7:0] m[$]);
    logic [15:0] r;
    r = 16'hFFFF;
    foreach (m[i]) begin
      r = r ^ {m[i], 8'h00};
      for (int b = 0; b < 8; b++) r = r[15] ? ((r << 1) ^ 16'h1021) : (r << 1);
    end
    return r;
  endfunction
  task automatic dma(input bit we, input logic [31:0] a, input logic [31:0] wd, input bit lk,
                     output logic [31:0] rd);
    @(negedge clk);
    rmap_dma_req.req = 1; rmap_dma_req.we = we; rmap_dma_req.size = DMA_WORD;
    rmap_dma_req.addr = a; rmap_dma_req.wdata = wd; rmap_dma_req.lock = lk;
    forever begin @(negedge clk); if (rmap_dma_rsp.ack) break; end
    rd = rmap_dma_rsp.rdata;
    if (lk) n_locked++;
    @(posedge clk); #1 rmap_dma_req.req = 0;
  endtask
  task automatic send_link(input logic [7:0] b[$], input bit eep);
    foreach (b[i]) lnk_q.push_back({1'b0, b[i]});
    lnk_q.push_back(eep ? SPW_EEP : SPW_EOP);
  endtask
  task automatic settle(input int n);
    while (!(lnk_q.size() == 0)) @(posedge clk);
    repeat (n) @(posedge clk);
  endtask

  // split the transmitted character stream into packets
  function automatic void packets(output spw_char_t pk[$][$]);
    spw_char_t cur[$];
    pk.delete();
    foreach (out_q[i]) begin
      cur.push_back(out_q[i]);
      if (out_q[i][8]) begin pk.push_back(cur); cur.delete(); end
    end
  endfunction

  initial begin
    logic [7:0] p[$], cc[$];
    logic [31:0] d;
    logic [15:0] k;
    spw_char_t pk[$][$];
    int t0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---- software setup: receive descriptors (2), discard on, CRC check, irq
    for (int i = 0; i < 16; i++) begin
      put32(32'h0200 + 8*i, 32'h4000 + 16*i);
      put32(32'h0204 + 8*i, 32'h5000 + 32'h100*i);
    end
    apb_wr(14'h0008, 32'h0200);
    apb_wr(14'h0010, 32'h5);          // CRC, discard when no descriptor
    apb_wr(14'h0014, 32'd100);        // payload limit 100
    apb_wr(14'h0020, 32'h7);
    apb_wr(14'h000C, 32'd2);
    apb_rd(14'h000C, d); check(d == 2, "Rx count via APB");
    // NDCP table: one writable region and the field set as read-only
    apb_wr(14'h1000, {8'd1, 8'd1, 8'd1, 8'd0}); apb_wr(14'h1004, {8'd2, 24'd0}); apb_wr(14'h1008, 32'h6000);
    apb_wr(14'h1010, {8'd1, 8'd1, 8'd1, 8'd0}); apb_wr(14'h1014, {8'd8, 24'd1}); apb_wr(14'h1018, 32'h6000);
    apb_wr(14'h1F00, 2);
    apb_rd(14'h1014, d); check(d == {8'd8, 24'd1}, "NDCP entry via APB");

    // ---- receive: RMAP, NDCP, TDP, CPTP (good CRC), raw, CPTP truncated
    send_link('{8'hFE, 8'h01, 8'h4C, 8'h00, 8'h11}, 0);                 // RMAP
    send_link('{8'hFE, 8'd250, 8'h4C, 8'h00}, 0);                       // NDCP
    send_link('{8'hFE, 8'd251, 8'h01, 8'h02, 8'h03}, 0);                // TDP
    cc = '{8'h08, 8'h01, 8'hC0, 8'h00, 8'h00, 8'h07, 1, 2, 3, 4, 5, 6};
    k = ref_crc(cc); cc.push_back(k[15:8]); cc.push_back(k[7:0]);
    p = '{8'hFE, 8'h02, 8'h00, 8'h00}; foreach (cc[i]) p.push_back(cc[i]);
    send_link(p, 0);                                                     // CPTP -> desc 0
    p.delete(); p = '{8'hFE, 8'h02, 8'h00, 8'h00};
    for (int i = 0; i < 150; i++) p.push_back(8'(i));
    send_link(p, 0);                                                     // CPTP truncated -> desc 1
    settle(3000);
    p = '{8'hFE, 8'h63, 8'hAA};
    send_link(p, 0);                                                     // raw, no descriptor: discarded
    settle(500);
    check(n_rmap_pkts == 1 && n_ndcp_pkts == 1 && n_tdp_pkts == 1, "RMAP, NDCP, TDP packets dispatched");
    begin
      rx_stat_t s;
      s = rx_stat_t'(get32(32'h4000));
      check(s.cptp && !s.chk_err && !s.len_err && s.sec_hdr && s.pay_len == 14, $sformatf("CPTP rx status %h", s));
      for (int i = 0; i < 14; i++) check(u_mem.mem[32'h5000 + i] == cc[i], $sformatf("CPTP rx byte %0d", i));
      if (s.cptp && s.pay_len == 14) n_rx_stored++;
      s = rx_stat_t'(get32(32'h4010));
      check(s.trunc && s.pay_len == 100, $sformatf("truncated rx status %h", s));
      if (s.trunc) n_rx_trunc_cptp++;
    end
    check(n_discard == 1, $sformatf("discarded packets %0d", n_discard));

    // ---- over-long received packet (to TDP) cut by the demultiplexer
    p.delete(); p.push_back(8'hFE); p.push_back(8'd251);
    for (int i = 0; i < 65536 + 40; i++) p.push_back(8'(i));
    send_link(p, 0);
    settle(100);
    check(n_rx_trunc == 1 && tdp_in[tdp_in.size() - 1] == SPW_EEP, "long packet cut with EEP");
    check(tdp_in.size() == 6 + 65536 + 16 + 1, $sformatf("TDP characters %0d", tdp_in.size()));

    // ---- transmit: CPTP packet with CRC from memory, RMAP and TDP replies at once
    begin
      tx_ctrl_t w;
      logic [7:0] pay[$];
      w = '0; w.irq_en = 1; w.term = TERM_EOP; w.cptp = 1; w.chk = CHK_CRC; w.hdr_len = 4; w.pay_len = 10;
      put32(32'h0100, 32'h1000); put32(32'h0104, 32'h2000);
      put32(32'h1000, w); put32(32'h1004, 32'h21020005);
      for (int i = 0; i < 10; i++) begin u_mem.mem[32'h2000 + i] = 8'(8'h30 + i); pay.push_back(8'(8'h30 + i)); end
      k = ref_crc(pay);
      out_q.delete();
      apb_wr(14'h0000, 32'h0100);
      for (int i = 0; i < 30; i++) rmap_out.push_back(i == 29 ? SPW_EOP : 9'(8'h10));
      for (int i = 0; i < 30; i++) tdp_out.push_back(i == 29 ? SPW_EOP : 9'(8'h20));
      apb_wr(14'h0004, 32'd1);
      t0 = 0;
      while (!(out_q.size() >= 30 + 30 + 17 && t0 < 20000)) begin @(posedge clk); t0++; end
      repeat (20) @(posedge clk);
      packets(pk);
      check(pk.size() == 3, $sformatf("three packets sent, got %0d", pk.size()));
      foreach (pk[i]) begin
        if (pk[i][0] == 9'h021) begin
          spw_char_t e[$];
          e = '{9'h021, 9'h002, 9'h000, 9'h005};
          foreach (pay[j]) e.push_back({1'b0, pay[j]});
          e.push_back({1'b0, k[15:8]}); e.push_back({1'b0, k[7:0]}); e.push_back(SPW_EOP);
          check(pk[i] == e, "CPTP packet with CRC on the link");
          if (pk[i] == e) n_cptp_tx++;
        end else begin
          check(pk[i].size() == 30, "engine packet whole");
        end
        if (i > 0 && pk[i][0] != pk[i-1][0]) n_arb_switch++;
      end
      apb_rd(14'h001C, d); check(d[0], "Tx interrupt status");
    end

    // ---- over-long transmitted packet cut by the multiplexer
    out_q.delete();
    for (int i = 0; i < 65536 + 30; i++) tdp_out.push_back(9'(8'h22));
    tdp_out.push_back(SPW_EOP);
    while (!(tdp_out.size() == 0)) @(posedge clk);
    repeat (20) @(posedge clk);
    check(n_tx_trunc == 1, "transmit truncation");
    check(out_q.size() == 65536 + 16 + 1 && out_q[out_q.size() - 1] == SPW_EEP, $sformatf("cut length %0d", out_q.size()));

    // ---- engine reset mid-packet
    out_q.delete();
    for (int i = 0; i < 2000; i++) rmap_out.push_back(9'(8'h11));
    rmap_out.push_back(SPW_EOP);
    while (!(out_q.size() >= 50)) @(posedge clk);
    @(negedge clk); eng_rst[0] = 1; rmap_out.delete();
    @(negedge clk); eng_rst[0] = 0;
    repeat (30) @(posedge clk);
    check(n_reset_eep == 1 && out_q[out_q.size() - 1] == SPW_EEP, "reset ends the packet with EEP");

    // ---- NDCP lookups from the RMAP engine
    for (int j = 0; j < 2; j++) begin
      @(negedge clk);
      ndcp_lk_addr = {8'd1, 8'd1, 8'd1, 8'd1}; ndcp_lk_op = (j == 0) ? 2'd1 : 2'd0; ndcp_lk_nfields = (j == 0) ? 8'd4 : 8'd1;
      ndcp_lk_req = 1;
      @(negedge clk); ndcp_lk_req = 0;
      while (!ndcp_lk_done) @(negedge clk);
      if (ndcp_lk_grant) n_ndcp_grant++; else n_ndcp_deny++;
      if (j == 1) check(ndcp_lk_grant && ndcp_lk_phys == 32'h6004, "NDCP read translated");
    end
    // the write of 4 fields runs past the 2-field region, nothing follows: granted
    check(n_ndcp_grant == 2, "NDCP grants");
    @(negedge clk);
    ndcp_lk_addr = {8'd1, 8'd1, 8'd1, 8'd5}; ndcp_lk_op = 2'd1; ndcp_lk_nfields = 1; ndcp_lk_req = 1;
    @(negedge clk); ndcp_lk_req = 0;
    while (!ndcp_lk_done) @(negedge clk);
    if (ndcp_lk_grant) n_ndcp_grant++; else n_ndcp_deny++;
    check(n_ndcp_deny == 1, "NDCP write to read-only field refused");

    // ---- locked read-modify-write by the RMAP engine
    put32(32'h3000, 32'd41);
    dma(0, 32'h3000, 0, 1, d);
    dma(1, 32'h3000, d + 1, 1, d);
    check(get32(32'h3000) == 32'd42, "locked read-modify-write");
    check(u_mem.n_locked >= 2, "HMASTLOCK seen on the bus");

    // ---- largest packet: 64K payload received into memory and sent back
    begin
      rx_stat_t s;
      tx_ctrl_t w;
      int bad;
      apb_wr(14'h0014, 32'd65536);
      put32(32'h0214, 32'h10000);
      apb_wr(14'h000C, 32'd1);
      p.delete(); p = '{8'hFE, 8'h63};
      for (int i = 0; i < 65536; i++) p.push_back(8'(i * 7 + (i >> 8)));
      send_link(p, 0);
      t0 = 0;
      while (!(get32(32'h4020) != 32'd0 || t0 > 1500000)) begin @(posedge clk); t0++; end
      settle(10);
      s = rx_stat_t'(get32(32'h4020));
      check(!s.cptp && !s.trunc && !s.eep && s.hdr_len == 2 && s.pay_len == 17'd65536, $sformatf("64K rx status %h", s));
      bad = 0;
      for (int i = 0; i < 65536; i++) if (u_mem.mem[32'h10000 + i] != p[i + 2]) bad++;
      check(bad == 0, $sformatf("64K rx payload, %0d bytes wrong", bad));
      if (bad == 0 && s.pay_len == 17'd65536) n_max_rx++;
      // send the stored payload back as a raw packet
      w = '0; w.term = TERM_EOP; w.hdr_len = 2; w.pay_len = 17'd65536;
      put32(32'h0108, 32'h1100); put32(32'h010C, 32'h10000);
      put32(32'h1100, w); put32(32'h1104, 32'h21630000);
      out_q.delete();
      apb_wr(14'h0004, 32'd1);
      t0 = 0;
      while (!(out_q.size() >= 65536 + 3 || t0 > 1500000)) begin @(posedge clk); t0++; end
      settle(20);
      bad = 0;
      if (out_q.size() != 65536 + 3) bad = 1;
      else begin
        if (out_q[0] != 9'h021 || out_q[1] != 9'h063 || out_q[65538] != SPW_EOP) bad++;
        for (int i = 0; i < 65536; i++) if (out_q[i + 2] != {1'b0, p[i + 2]}) bad++;
      end
      check(bad == 0, $sformatf("64K tx packet (%0d characters)", out_q.size()));
      if (bad == 0) n_max_tx++;
    end

    // ---- every mechanism happened
    check(n_max_rx > 0 && n_max_tx > 0, "mechanism: 64K packet received and sent");
    check(n_rmap_pkts > 0,      "mechanism: RMAP dispatch");
    check(n_ndcp_pkts > 0,      "mechanism: NDCP dispatch");
    check(n_tdp_pkts > 0,       "mechanism: TDP dispatch");
    check(n_rx_stored > 0,      "mechanism: CPTP receive");
    check(n_rx_trunc_cptp > 0,  "mechanism: CPTP receive truncation");
    check(n_discard > 0,        "mechanism: discard without descriptor");
    check(n_rx_trunc > 0,       "mechanism: demultiplexer truncation");
    check(n_cptp_tx > 0,        "mechanism: CPTP transmit with CRC");
    check(n_arb_switch > 0,     "mechanism: transmit arbitration");
    check(n_tx_trunc > 0,       "mechanism: multiplexer truncation");
    check(n_reset_eep > 0,      "mechanism: EEP on engine reset");
    check(n_ndcp_grant > 0 && n_ndcp_deny > 0, "mechanism: NDCP grant and refusal");
    check(n_locked > 0,         "mechanism: locked DMA");
    check(n_irq > 0,            "mechanism: interrupt");
    $display("largest packet: rx=%0d tx=%0d", n_max_rx, n_max_tx);
    $display("mechanisms: rmap=%0d ndcp=%0d tdp=%0d cptp_rx=%0d cptp_rx_trunc=%0d discard=%0d rx_trunc=%0d cptp_tx=%0d arb=%0d tx_trunc=%0d reset_eep=%0d ndcp_grant=%0d ndcp_deny=%0d locked=%0d irq_cycles=%0d",
             n_rmap_pkts, n_ndcp_pkts, n_tdp_pkts, n_rx_stored, n_rx_trunc_cptp, n_discard, n_rx_trunc,
             n_cptp_tx, n_arb_switch, n_tx_trunc, n_reset_eep, n_ndcp_grant, n_ndcp_deny, n_locked, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
