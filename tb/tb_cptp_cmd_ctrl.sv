// Testbench for cptp_cmd_ctrl: three Tx descriptors in a behavioural
// memory (random DMA delays), fetched and pushed into a FIFO sink with
// random back-pressure. The byte stream must be control word, header bytes
// and payload bytes of each packet in order; each descriptor must be
// consumed exactly once; an unaligned payload and a header-less packet are
// included.
module tb_cptp_cmd_ctrl;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic desc_avail;
  logic [31:0] desc_addr;
  logic desc_consume;
  dma_req_t dma_req;
  dma_rsp_t dma_rsp;
  logic [7:0] fifo_data;
  logic fifo_valid, fifo_ready = 0;
  int checks = 0, failures = 0;
  int ndesc = 0, used = 0;
  logic [7:0] exp_q[$];

  cptp_cmd_ctrl dut (.*);
  dma_mem_model #(.NPORT(1), .AW(12)) u_mem (.clk, .req(dma_req), .rsp(dma_rsp));

  assign desc_avail = (used < ndesc);
  assign desc_addr  = 32'h100 + 8 * used;
  always @(posedge clk) if (rst_n && desc_consume) used++;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // build one packet in memory and its expected FIFO bytes
  task automatic mk(input int d, input int hp, input int pp, input int hl, input int pl);
    tx_ctrl_t c;
    c = '0;
    c.hdr_len = 7'(hl);
    c.pay_len = 17'(pl);
    c.cptp    = 1'b1;
    c.chk     = CHK_CRC;
    put32(32'h100 + 8*d, hp);
    put32(32'h104 + 8*d, pp);
    put32(hp, c);
    for (int b = 0; b < 4; b++) exp_q.push_back(c[31 - 8*b -: 8]);
    for (int i = 0; i < hl; i++) begin
      u_mem.mem[hp + 4 + i] = 8'($urandom);
      exp_q.push_back(u_mem.mem[hp + 4 + i]);
    end
    for (int i = 0; i < pl; i++) begin
      u_mem.mem[pp + i] = 8'($urandom);
      exp_q.push_back(u_mem.mem[pp + i]);
    end
  endtask

  always @(negedge clk) fifo_ready = ($urandom_range(3, 0) != 0);

  always @(posedge clk) if (rst_n && fifo_valid && fifo_ready) begin
    if (exp_q.size() == 0) check(0, "unexpected byte");
    else begin
      logic [7:0] e;
      e = exp_q.pop_front();
      check(fifo_data == e, $sformatf("byte %h expected %h", fifo_data, e));
    end
  end

  initial begin
    #1;
    mk(0, 32'h200, 32'h400, 3, 5);
    mk(1, 32'h300, 32'h801, 0, 7);
    mk(2, 32'h340, 32'h900, 4, 40);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    ndesc = 3;
    while (!(exp_q.size() == 0)) @(posedge clk);
    repeat (20) @(posedge clk);
    check(used == 3, $sformatf("descriptors consumed %0d", used));
    check(!fifo_valid && !dma_req.req, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
