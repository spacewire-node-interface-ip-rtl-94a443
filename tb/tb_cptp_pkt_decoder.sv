// Testbench for cptp_pkt_decoder: CPTP packets (valid CCSDS packets with
// CRC or PEC, some with a corrupted byte or a wrong length field, with and
// without secondary header flag), raw packets, EEP-terminated, truncated,
// header-only and lone-terminator packets, then the two cases without an
// Rx descriptor: dropped with discard enabled, held back without. Payload
// bytes leaving through the FIFO port and the header/status offered to the
// handler side are compared with a model of the expected status word.
module tb_cptp_pkt_decoder;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  spw_char_t rx_data;
  logic rx_valid, rx_ready;
  chk_e chk = CHK_CRC;
  logic discard_en = 0;
  logic [16:0] max_len = 17'd40;
  logic desc_avail = 1;
  logic [8:0] fifo_data;
  logic fifo_valid, fifo_ready = 0;
  logic hdr_valid, hdr_done = 0, ev_discard;
  rx_stat_t stat;
  logic [31:0] hdr;
  int checks = 0, failures = 0;
  spw_char_t src_q[$];
  logic [8:0] exp_fifo[$];
  rx_stat_t exp_stat[$];
  logic [31:0] exp_hdr[$];
  int n_pkts_done = 0, n_discard = 0;
  int n_trunc = 0, n_chkerr = 0, n_lenerr = 0, n_raw = 0, n_sec = 0;

  cptp_pkt_decoder dut (.*);

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

  function automatic bit pec_zero(input logic [7:0] m[$]);
    int c0, c1;
    c0 = 0; c1 = 0;
    foreach (m[i]) begin c0 = (c0 + m[i]) % 255; c1 = (c1 + c0) % 255; end
    return c0 == 0 && c1 == 0;
  endfunction

  function automatic logic [15:0] ref_pec(input logic [7:0] m[$]);
    int c0, c1, x;
    c0 = 0; c1 = 0;
    foreach (m[i]) begin c0 = (c0 + m[i]) % 255; c1 = (c1 + c0) % 255; end
    x = (510 - c0 - c1) % 255;
    if (x == 0) x = 255;
    return {8'(x), 8'(c1)};
  endfunction

  // source and sinks
  logic src_gap = 1;
  assign rx_valid = (src_q.size() > 0) && src_gap;
  assign rx_data  = (src_q.size() > 0) ? src_q[0] : 9'h0;
  always @(negedge clk) begin
    src_gap    = ($urandom_range(4, 0) != 0);
    fifo_ready = ($urandom_range(3, 0) != 0);
  end
  always @(posedge clk) if (rst_n && rx_valid && rx_ready) void'(src_q.pop_front());
  always @(posedge clk) if (rst_n && ev_discard) n_discard++;

  always @(posedge clk) if (rst_n && fifo_valid && fifo_ready) begin
    if (exp_fifo.size() == 0) check(0, $sformatf("unexpected FIFO word %h", fifo_data));
    else begin
      logic [8:0] e;
      e = exp_fifo.pop_front();
      check(fifo_data == e, $sformatf("FIFO %h expected %h", fifo_data, e));
    end
  end

  // handler side: take the header after a random delay
  initial forever begin
    @(posedge clk);
    if (hdr_valid && !hdr_done) begin
      repeat ($urandom_range(3, 0)) @(posedge clk);
      if (exp_stat.size() == 0) check(0, "unexpected header");
      else begin
        rx_stat_t es;
        logic [31:0] eh;
        es = exp_stat.pop_front();
        eh = exp_hdr.pop_front();
        check(stat == es, $sformatf("status %h expected %h", stat, es));
        check(hdr == eh, $sformatf("header %h expected %h", hdr, eh));
      end
      n_pkts_done++;
      @(negedge clk); hdr_done = 1; @(negedge clk); hdr_done = 0;
    end
  end

  // one packet: pid, payload, terminator; expected results from the model
  task automatic send(input logic [7:0] pid, input logic [7:0] pay[$], input bit eep, input bit expect_out);
    int hl, st;
    logic [7:0] hb[$];
    logic [7:0] stored[$];
    rx_stat_t s;
    logic [31:0] h;
    bit cp;
    cp = (pid == PID_CPTP);
    hb.push_back(8'hFE); hb.push_back(pid);
    if (cp) begin hb.push_back(8'h00); hb.push_back(8'h5A); end
    foreach (hb[i]) src_q.push_back({1'b0, hb[i]});
    foreach (pay[i]) src_q.push_back({1'b0, pay[i]});
    src_q.push_back(eep ? SPW_EEP : SPW_EOP);
    if (!expect_out) return;
    st = (pay.size() > int'(max_len)) ? int'(max_len) : pay.size();
    for (int i = 0; i < st; i++) begin stored.push_back(pay[i]); exp_fifo.push_back({1'b0, pay[i]}); end
    exp_fifo.push_back(9'h100);
    h = '0;
    foreach (hb[i]) h[31 - 8*i -: 8] = hb[i];
    s = '0;
    s.eep = eep; s.cptp = cp; s.no_pay = (st == 0);
    s.len_err = cp && (pay.size() < 6 || ({pay[4], pay[5]} + 7 != pay.size()));
    s.sec_hdr = cp && st > 0 && pay[0][3];
    s.trunc = (pay.size() > int'(max_len));
    s.chk_err = cp && ((chk == CHK_CRC && ref_crc(stored) != 0) || (chk == CHK_PEC && !pec_zero(stored)));
    s.hdr_len = 7'(hb.size());
    s.pay_len = 17'(st);
    if (s.trunc) n_trunc++;
    if (s.chk_err) n_chkerr++;
    if (s.len_err) n_lenerr++;
    if (!cp) n_raw++;
    if (s.sec_hdr) n_sec++;
    exp_stat.push_back(s);
    exp_hdr.push_back(h);
  endtask

  // a CCSDS packet with data field of n bytes (check included)
  function automatic void ccsds(output logic [7:0] p[$], input int n, input bit sec, input chk_e c,
                                input bit bad_len, input bit corrupt);
    logic [15:0] k, lf;
    p.delete();
    p.push_back({4'b0000, sec, 3'b010}); p.push_back(8'h11);
    p.push_back(8'hC0); p.push_back(8'h01);
    lf = 16'(n - 1) + (bad_len ? 16'd3 : 16'd0);
    p.push_back(lf[15:8]); p.push_back(lf[7:0]);
    for (int i = 0; i < n - 2; i++) p.push_back(8'($urandom));
    k = (c == CHK_PEC) ? ref_pec(p) : ref_crc(p);
    p.push_back(k[15:8]); p.push_back(k[7:0]);
    if (corrupt) p[7] = p[7] ^ 8'h10;
  endfunction

  initial begin
    logic [7:0] p[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    ccsds(p, 10, 0, CHK_CRC, 0, 0); send(PID_CPTP, p, 0, 1);
    ccsds(p, 12, 1, CHK_CRC, 0, 1); send(PID_CPTP, p, 0, 1);       // CRC error
    ccsds(p, 8,  0, CHK_CRC, 1, 0); send(PID_CPTP, p, 1, 1);       // length error, EEP
    ccsds(p, 60, 0, CHK_CRC, 0, 0); send(PID_CPTP, p, 0, 1);       // truncated at 40
    p.delete(); repeat (9) p.push_back(8'($urandom)); send(8'd77, p, 0, 1);   // raw
    p.delete(); send(8'd77, p, 0, 1);                              // header only
    src_q.push_back(SPW_EOP);                                      // lone EOP: dropped
    while (!(src_q.size() == 0 && exp_stat.size() == 0)) @(posedge clk);
    @(negedge clk); chk = CHK_PEC;
    ccsds(p, 20, 1, CHK_PEC, 0, 0); send(PID_CPTP, p, 0, 1);
    ccsds(p, 20, 0, CHK_PEC, 0, 1); send(PID_CPTP, p, 0, 1);
    for (int k = 0; k < 10; k++) begin
      ccsds(p, $urandom_range(30, 3), $urandom_range(1, 0), CHK_PEC, $urandom_range(1, 0), $urandom_range(1, 0));
      send(PID_CPTP, p, $urandom_range(1, 0), 1);
    end
    while (!(src_q.size() == 0 && exp_stat.size() == 0)) @(posedge clk);
    repeat (5) @(posedge clk);
    // no descriptor, discard enabled: dropped
    @(negedge clk); desc_avail = 0; discard_en = 1;
    p.delete(); repeat (5) p.push_back(8'h33); send(8'd9, p, 0, 0);
    while (!(src_q.size() == 0)) @(posedge clk);
    repeat (5) @(posedge clk);
    check(n_discard == 1, $sformatf("discard pulses %0d", n_discard));
    // no descriptor, discard disabled: held until one appears
    @(negedge clk); discard_en = 0;
    p.delete(); repeat (5) p.push_back(8'h44); send(8'd9, p, 0, 1);
    repeat (50) @(posedge clk);
    check(src_q.size() == 8, $sformatf("input held back, %0d left", src_q.size()));
    @(negedge clk); desc_avail = 1;
    while (!(src_q.size() == 0 && exp_stat.size() == 0)) @(posedge clk);
    repeat (10) @(posedge clk);
    check(n_pkts_done == 19, $sformatf("packets handed over %0d", n_pkts_done));
    check(n_trunc > 0 && n_chkerr > 0 && n_lenerr > 0 && n_raw > 0 && n_sec > 0, "all status cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
