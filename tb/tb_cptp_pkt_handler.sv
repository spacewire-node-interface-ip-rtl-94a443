// Testbench for cptp_pkt_handler: packets of random length (zero included)
// arrive as FIFO words ending with the end marker; the decoder side offers
// a random status word and header. After each packet the payload must be in
// memory at the descriptor's payload address (unaligned ones included), the
// status word and header at its header address, bytes next to the areas
// untouched, and the descriptor consumed once with one `done` pulse.
module tb_cptp_pkt_handler;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic desc_avail;
  logic [31:0] desc_addr;
  logic desc_consume;
  logic [8:0] fifo_data;
  logic fifo_valid, fifo_ready;
  logic hdr_valid = 0;
  rx_stat_t stat = '0;
  logic [31:0] hdr = 0;
  logic hdr_done, done;
  dma_req_t dma_req;
  dma_rsp_t dma_rsp;
  int checks = 0, failures = 0;
  int ndesc = 0, used = 0, n_done = 0, n_hdr_done = 0;
  logic [8:0] src_q[$];

  cptp_pkt_handler dut (.*);
  dma_mem_model #(.NPORT(1), .AW(14)) u_mem (.clk, .req(dma_req), .rsp(dma_rsp));

  assign desc_avail = (used < ndesc);
  assign desc_addr  = 32'h100 + 8 * (used % 4);
  always @(posedge clk) if (rst_n) begin
    if (desc_consume) used++;
    if (done) n_done++;
    if (hdr_done) n_hdr_done++;
  end

  logic gap = 1;
  assign fifo_valid = (src_q.size() > 0) && gap;
  assign fifo_data  = (src_q.size() > 0) ? src_q[0] : 9'h0;
  always @(negedge clk) gap = ($urandom_range(3, 0) != 0);
  always @(posedge clk) if (rst_n && fifo_valid && fifo_ready) void'(src_q.pop_front());

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

  task automatic put32(input int a, input logic [31:0] v);
    for (int b = 0; b < 4; b++) u_mem.mem[a + b] = v[31 - 8*b -: 8];
  endtask
  function automatic logic [31:0] get32(input int a);
    logic [31:0] v;
    for (int b = 0; b < 4; b++) v[31 - 8*b -: 8] = u_mem.mem[a + b];
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      int hp, pp, n;
      logic [7:0] pay[$];
      rx_stat_t s;
      logic [31:0] h;
      hp = 32'h1000 + 16 * (k % 4);
      pp = 32'h2000 + 256 * (k % 4) + (k % 3);
      n  = (k == 2) ? 0 : $urandom_range(70, 1);
      put32(32'h100 + 8 * (k % 4), hp);
      put32(32'h104 + 8 * (k % 4), pp);
      for (int i = -1; i <= n; i++) u_mem.mem[pp + i] = 8'hEE;
      pay.delete();
      for (int i = 0; i < n; i++) begin
        pay.push_back(8'($urandom));
        src_q.push_back({1'b0, pay[i]});
      end
      src_q.push_back(9'h100);
      s = rx_stat_t'($urandom);
      h = $urandom;
      @(negedge clk); ndesc++;
      while (!(src_q.size() == 0)) @(posedge clk);
      repeat ($urandom_range(5, 0)) @(posedge clk);
      @(negedge clk); hdr_valid = 1; stat = s; hdr = h;
      while (!(hdr_done)) @(posedge clk);
      @(negedge clk); hdr_valid = 0;
      repeat (2) @(posedge clk);
      for (int i = 0; i < n; i++)
        check(u_mem.mem[pp + i] == pay[i], $sformatf("pkt %0d payload byte %0d", k, i));
      check(u_mem.mem[pp - 1] == 8'hEE && u_mem.mem[pp + n] == 8'hEE, "bytes around payload untouched");
      check(get32(hp) == s, $sformatf("pkt %0d status %h expected %h", k, get32(hp), s));
      check(get32(hp + 4) == h, $sformatf("pkt %0d header", k));
      check(used == k + 1 && n_done == k + 1 && n_hdr_done == k + 1, $sformatf("pkt %0d consumed once", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
