// Testbench for cptp_pkt_formatter: random packets (raw and CPTP, no check,
// CRC or PEC, EOP, EEP or no terminator, interrupt on or off) are fed
// through a FIFO-like source and collected at the output with random
// back-pressure. Output characters are compared with a model that computes
// CRC and PEC independently; `done` and `irq` pulses are counted.
module tb_cptp_pkt_formatter;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] fifo_data;
  logic fifo_valid, fifo_ready;
  spw_char_t tx_data;
  logic tx_valid, tx_ready = 0, done, irq;
  int checks = 0, failures = 0;
  logic [7:0] src_q[$];
  spw_char_t exp_q[$];
  int n_done = 0, n_irq = 0, exp_irq = 0;
  int n_crc = 0, n_pec = 0, n_eep = 0, n_none = 0;

  cptp_pkt_formatter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // FIFO source: random gaps
  logic gap_ok = 1;
  assign fifo_valid = (src_q.size() > 0) && gap_ok;
  assign fifo_data  = (src_q.size() > 0) ? src_q[0] : 8'h00;
  always @(negedge clk) begin
    gap_ok   = ($urandom_range(4, 0) != 0);
    tx_ready = ($urandom_range(3, 0) != 0);
  end
  always @(posedge clk) if (rst_n && fifo_valid && fifo_ready) void'(src_q.pop_front());

  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    if (exp_q.size() == 0) check(0, $sformatf("unexpected char %h", tx_data));
    else begin
      spw_char_t e;
      e = exp_q.pop_front();
      check(tx_data == e, $sformatf("char %h expected %h", tx_data, e));
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (done) n_done++;
    if (irq)  n_irq++;
  end

  task automatic pkt(input bit cptp, input chk_e ck, input term_e t, input bit ie, input int hl, input int pl);
    tx_ctrl_t c;
    logic [7:0] pay[$];
    c = '0;
    c.irq_en = ie; c.term = t; c.cptp = cptp; c.chk = ck;
    c.hdr_len = 7'(hl); c.pay_len = 17'(pl);
    for (int b = 0; b < 4; b++) src_q.push_back(c[31 - 8*b -: 8]);
    for (int i = 0; i < hl; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      src_q.push_back(v);
      exp_q.push_back({1'b0, v});
    end
    for (int i = 0; i < pl; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      src_q.push_back(v);
      pay.push_back(v);
      exp_q.push_back({1'b0, v});
    end
    if (cptp && ck == CHK_CRC) begin
      logic [15:0] k; k = ref_crc(pay);
      exp_q.push_back({1'b0, k[15:8]}); exp_q.push_back({1'b0, k[7:0]}); n_crc++;
    end
    if (cptp && ck == CHK_PEC) begin
      logic [15:0] k; k = ref_pec(pay);
      exp_q.push_back({1'b0, k[15:8]}); exp_q.push_back({1'b0, k[7:0]}); n_pec++;
    end
    if (t == TERM_EOP) exp_q.push_back(SPW_EOP);
    if (t == TERM_EEP) begin exp_q.push_back(SPW_EEP); n_eep++; end
    if (t == TERM_NONE) n_none++;
    if (ie) exp_irq++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pkt(1, CHK_CRC, TERM_EOP, 1, 4, 20);
    pkt(1, CHK_PEC, TERM_EEP, 0, 4, 9);
    pkt(0, CHK_CRC, TERM_EOP, 1, 2, 6);     // raw: no check appended
    pkt(1, CHK_NONE, TERM_NONE, 0, 4, 3);
    pkt(1, CHK_CRC, TERM_EOP, 0, 0, 0);
    for (int k = 0; k < 30; k++)
      pkt($urandom_range(1, 0), chk_e'($urandom_range(2, 0)), term_e'($urandom_range(2, 0)),
          $urandom_range(1, 0), $urandom_range(6, 0), $urandom_range(30, 0));
    while (!(src_q.size() == 0 && exp_q.size() == 0)) @(posedge clk);
    repeat (10) @(posedge clk);
    check(n_done == 35, $sformatf("done pulses %0d", n_done));
    check(n_irq == exp_irq, $sformatf("irq pulses %0d expected %0d", n_irq, exp_irq));
    check(n_crc > 0 && n_pec > 0 && n_eep > 0 && n_none > 0, "all options used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
