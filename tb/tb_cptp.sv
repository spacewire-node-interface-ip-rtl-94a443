// Testbench for the cptp engine: software-style setup through the register
// port, then transmit and receive at the same time. Transmit: three packets
// (CPTP with CRC, raw with EEP, CPTP with PEC) prepared in memory must leave
// with the right characters and check bytes. Receive: three packets (CPTP
// with good CRC, raw, CPTP truncated by RX_MAX) must land in memory with
// the expected status words. The interrupt must rise, with the truncation
// and every-3-packets status bits set; both descriptor
// indices must advance, and a second transmit round reuses the table with
// only a count write (circular descriptors).
module tb_cptp;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  reg_wr_t reg_wr = '0;
  logic [7:0] reg_raddr = 0;
  logic [31:0] reg_rdata;
  spw_char_t rx_data, tx_data;
  logic rx_valid, rx_ready, tx_valid, tx_ready = 0;
  dma_req_t dma_tx_req, dma_rx_req;
  dma_rsp_t dma_tx_rsp, dma_rx_rsp;
  logic irq;
  int checks = 0, failures = 0;
  spw_char_t src_q[$], exp_q[$];
  dma_req_t [1:0] mreq;
  dma_rsp_t [1:0] mrsp;

  cptp #(.NDESC(4)) dut (.*);
  assign mreq = {dma_rx_req, dma_tx_req};
  assign dma_tx_rsp = mrsp[0];
  assign dma_rx_rsp = mrsp[1];
  dma_mem_model #(.NPORT(2), .AW(16)) u_mem (.clk, .req(mreq), .rsp(mrsp));

  always #5 clk = ~clk;

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

  function automatic logic [15:0] ref_crc(input logic [7:0] m[$]);
    logic [15:0] r;
    r = 16'hFFFF;
    foreach (m[i]) begin
      r = r ^ {m[i], 8'h00};
      for (int b = 0; b < 8; b++) r = r[15] ? ((r << 1) ^ 16'h1021) : (r << 1);
    end
    return r;
  endfunction
  function automatic logic [15:0] ref_pec(input logic [7:0] m[$]);
    int c0, c1, x;
    c0 = 0; c1 = 0;
    foreach (m[i]) begin c0 = (c0 + m[i]) % 255; c1 = (c1 + c0) % 255; end
    x = (510 - c0 - c1) % 255;
    if (x == 0) x = 255;
    return {8'(x), 8'(c1)};
  endfunction

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr.wr = 1; reg_wr.addr = {4'd0, a}; reg_wr.wdata = d;
    @(posedge clk); #1 reg_wr.wr = 0;
  endtask
  task automatic put32(input int a, input logic [31:0] v);
    for (int b = 0; b < 4; b++) u_mem.mem[a + b] = v[31 - 8*b -: 8];
  endtask
  function automatic logic [31:0] get32(input int a);
    logic [31:0] v;
    for (int b = 0; b < 4; b++) v[31 - 8*b -: 8] = u_mem.mem[a + b];
    return v;
  endfunction

  // streams
  logic g1 = 1;
  assign rx_valid = (src_q.size() > 0) && g1;
  assign rx_data  = (src_q.size() > 0) ? src_q[0] : 9'h0;
  always @(negedge clk) begin g1 = ($urandom_range(3, 0) != 0); tx_ready = ($urandom_range(3, 0) != 0); end
  always @(posedge clk) if (rst_n && rx_valid && rx_ready) void'(src_q.pop_front());
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    if (exp_q.size() == 0) check(0, $sformatf("unexpected char %h", tx_data));
    else begin
      spw_char_t e;
      e = exp_q.pop_front();
      check(tx_data == e, $sformatf("tx char %h expected %h", tx_data, e));
    end
  end

  // a Tx descriptor, header and payload in memory plus the expected characters
  task automatic tx_pkt(input int k, input bit cp, input chk_e c, input term_e t, input int hl, input int pl);
    tx_ctrl_t w;
    int hp, pp;
    logic [7:0] pay[$];
    hp = 32'h1000 + 32'h40 * k; pp = 32'h2000 + 32'h100 * k;
    put32(32'h100 + 8 * k, hp); put32(32'h104 + 8 * k, pp);
    w = '0; w.irq_en = 1; w.term = t; w.cptp = cp; w.chk = c; w.hdr_len = 7'(hl); w.pay_len = 17'(pl);
    put32(hp, w);
    for (int i = 0; i < hl; i++) begin u_mem.mem[hp + 4 + i] = 8'(i + 1); exp_q.push_back(9'(i + 1)); end
    for (int i = 0; i < pl; i++) begin
      logic [7:0] v; v = 8'($urandom);
      u_mem.mem[pp + i] = v; pay.push_back(v); exp_q.push_back({1'b0, v});
    end
    if (cp && c == CHK_CRC) begin logic [15:0] x; x = ref_crc(pay); exp_q.push_back({1'b0, x[15:8]}); exp_q.push_back({1'b0, x[7:0]}); end
    if (cp && c == CHK_PEC) begin logic [15:0] x; x = ref_pec(pay); exp_q.push_back({1'b0, x[15:8]}); exp_q.push_back({1'b0, x[7:0]}); end
    if (t == TERM_EOP) exp_q.push_back(SPW_EOP);
    if (t == TERM_EEP) exp_q.push_back(SPW_EEP);
  endtask

  task automatic tx_expect_again(input int k, input bit cp, input chk_e c, input term_e t, input int hl, input int pl);
    int hp, pp;
    logic [7:0] pay[$];
    hp = 32'h1000 + 32'h40 * k; pp = 32'h2000 + 32'h100 * k;
    for (int i = 0; i < hl; i++) exp_q.push_back({1'b0, u_mem.mem[hp + 4 + i]});
    for (int i = 0; i < pl; i++) begin pay.push_back(u_mem.mem[pp + i]); exp_q.push_back({1'b0, u_mem.mem[pp + i]}); end
    if (cp && c == CHK_CRC) begin logic [15:0] x; x = ref_crc(pay); exp_q.push_back({1'b0, x[15:8]}); exp_q.push_back({1'b0, x[7:0]}); end
    if (cp && c == CHK_PEC) begin logic [15:0] x; x = ref_pec(pay); exp_q.push_back({1'b0, x[15:8]}); exp_q.push_back({1'b0, x[7:0]}); end
    if (t == TERM_EOP) exp_q.push_back(SPW_EOP);
    if (t == TERM_EEP) exp_q.push_back(SPW_EEP);
  endtask

  logic [7:0] rxpay[3][$];

  initial begin
    logic [7:0] p[$];
    logic [15:0] k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // receive descriptors
    for (int i = 0; i < 4; i++) begin
      put32(32'h200 + 8 * i, 32'h4000 + 16 * i);
      put32(32'h204 + 8 * i, 32'h5000 + 32'h100 * i);
    end
    tx_pkt(0, 1, CHK_CRC, TERM_EOP, 4, 17);
    tx_pkt(1, 0, CHK_CRC, TERM_EEP, 2, 5);
    tx_pkt(2, 1, CHK_PEC, TERM_EOP, 4, 8);
    wr(8'h00, 32'h100);
    wr(8'h08, 32'h200);
    wr(8'h10, 32'h1);          // Rx CRC
    wr(8'h14, 32'd20);         // Rx payload limit
    wr(8'h20, 32'h3);          // interrupts on
    wr(8'h24, {16'd3, 16'd3}); // interrupt every 3 packets each way
    wr(8'h0C, 32'd3);
    // receive packets: CPTP good CRC (12 bytes), raw (5 bytes), CPTP truncated (30 bytes)
    p = '{8'h08, 8'h01, 8'hC0, 8'h00, 8'h00, 8'h05, 8'hA1, 8'hA2, 8'hA3, 8'hA4};
    k = ref_crc(p); p.push_back(k[15:8]); p.push_back(k[7:0]);
    rxpay[0] = p;
    p = '{8'h10, 8'h20, 8'h30, 8'h40, 8'h50};
    rxpay[1] = p;
    p.delete(); for (int i = 0; i < 30; i++) p.push_back(8'(i));
    p[4] = 8'h00; p[5] = 8'd23;
    rxpay[2] = p;
    for (int n = 0; n < 3; n++) begin
      src_q.push_back(9'h0FE);
      src_q.push_back((n == 1) ? 9'h0C8 : 9'h002);
      if (n != 1) begin src_q.push_back(9'h000); src_q.push_back(9'h007); end
      foreach (rxpay[n][i]) src_q.push_back({1'b0, rxpay[n][i]});
      src_q.push_back(SPW_EOP);
    end
    wr(8'h04, 32'd3);          // start transmitting
    while (!(exp_q.size() == 0 && src_q.size() == 0)) @(posedge clk);
    repeat (300) @(posedge clk);
    check(irq, "interrupt raised");
    reg_raddr = 8'h1C; #1 check(reg_rdata[1:0] == 2'b11, $sformatf("irq status %h", reg_rdata));
    check(reg_rdata[5:3] == 3'b111, $sformatf("truncation and packet-count interrupt status %h", reg_rdata));
    reg_raddr = 8'h18; #1 check(reg_rdata == {16'd3, 16'd3}, $sformatf("indices %h", reg_rdata));
    // stored receive packets
    begin
      rx_stat_t s;
      s = rx_stat_t'(get32(32'h4000));
      check(s.cptp && !s.chk_err && !s.len_err && s.sec_hdr && !s.trunc && s.pay_len == 12 && s.hdr_len == 4,
            $sformatf("rx0 status %h", s));
      check(get32(32'h4004) == 32'hFE020007, "rx0 header");
      s = rx_stat_t'(get32(32'h4010));
      check(!s.cptp && s.pay_len == 5 && s.hdr_len == 2 && !s.eep, $sformatf("rx1 status %h", s));
      check(get32(32'h4014) == 32'hFEC80000, "rx1 header");
      s = rx_stat_t'(get32(32'h4020));
      check(s.cptp && s.trunc && s.pay_len == 20 && !s.len_err, $sformatf("rx2 status %h", s));
      for (int n = 0; n < 3; n++)
        for (int i = 0; i < ((n == 2) ? 20 : rxpay[n].size()); i++)
          check(u_mem.mem[32'h5000 + 32'h100 * n + i] == rxpay[n][i], $sformatf("rx%0d byte %0d", n, i));
    end
    // second round: one count write reuses descriptor 3 then wraps to 0
    tx_pkt(3, 1, CHK_CRC, TERM_EOP, 4, 6);
    tx_expect_again(0, 1, CHK_CRC, TERM_EOP, 4, 17);
    wr(8'h04, 32'd2);
    while (!(exp_q.size() == 0)) @(posedge clk);
    repeat (50) @(posedge clk);
    reg_raddr = 8'h18; #1 check(reg_rdata[15:0] == 16'd1, $sformatf("tx index wrapped %h", reg_rdata));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
