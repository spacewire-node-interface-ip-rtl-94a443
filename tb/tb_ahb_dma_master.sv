// Testbench for ahb_dma_master against a behavioural AHB memory with random
// wait states. Three clients run at once: word writes and read-back, byte
// and halfword writes and read-back (big-endian lanes), and locked
// read-modify-write sequences. Checked: every read returns what the model
// memory holds, locked transfers carry HMASTLOCK, an ERROR response reaches
// the client as `err`, no client keeps the bus for more than MAX_BEATS
// transfers while another waits, and every client is served.
module tb_ahb_dma_master;
  import spw_pkg::*;
  localparam int NC = 3, MB = 4;
  logic clk = 0, rst_n = 0;
  dma_req_t [NC-1:0] cli_req = '0;
  dma_rsp_t [NC-1:0] cli_rsp;
  logic hbusreq, hlock, hgrant, hwrite, hmastlock, hready;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans, hresp;
  logic [2:0] hsize, hburst;
  logic [3:0] hprot;
  int checks = 0, failures = 0;
  int served[NC] = '{0, 0, 0};
  int run = 0, run_owner = -1, max_run = 0;
  int n_err = 0;
  bit done_c[NC] = '{0, 0, 0};
  logic [7:0] shadow [logic [31:0]];

  ahb_dma_master #(.NCLI(NC), .MAX_BEATS(MB)) dut (.*);
  ahb_mem_model #(.AW(12), .MAXWAIT(2), .ERR_ADDR(32'h0000_0FFC)) u_mem (
    .clk, .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hmastlock, .hwdata,
    .hrdata, .hready, .hresp);

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

  // bus monitor: consecutive transfers of one client while another waits
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) if (cli_rsp[c].ack) begin
      bool_others: begin
        bit others;
        others = 0;
        for (int o = 0; o < NC; o++) if (o != c && cli_req[o].req) others = 1;
        if (c == run_owner && others && !cli_req[c].lock) run++;
        else run = 1;
        run_owner = c;
        if (run > max_run) max_run = run;
      end
    end
  end
  always @(posedge clk) if (rst_n && htrans[1] && hready)
    if (cli_req[dut.owner].lock) check(hmastlock, "locked transfer has HMASTLOCK");

  task automatic xfer(input int c, input bit we, input dma_size_e sz, input logic [31:0] a,
                      input logic [31:0] wd, input bit lk, output logic [31:0] rd, output bit er);
    @(negedge clk);
    cli_req[c].req = 1; cli_req[c].we = we; cli_req[c].size = sz; cli_req[c].addr = a;
    cli_req[c].wdata = wd; cli_req[c].lock = lk;
    forever begin
      @(negedge clk);
      if (cli_rsp[c].ack) break;
    end
    rd = cli_rsp[c].rdata; er = cli_rsp[c].err;
    served[c]++;
    @(posedge clk); #1;
    cli_req[c].req = 0;
  endtask

  function automatic int nb(dma_size_e s);
    return (s == DMA_BYTE) ? 1 : (s == DMA_HALF) ? 2 : 4;
  endfunction

  // random client c: writes then reads back in its own region
  task automatic client(input int c, input int n);
    logic [31:0] rd, a, wd;
    bit er;
    for (int i = 0; i < n; i++) begin
      dma_size_e sz;
      sz = (c == 0) ? DMA_WORD : dma_size_e'($urandom_range(1, 0));
      a  = 32'h100 * (c + 1) + (($urandom_range(31, 0) * 4) & ~(nb(sz) - 1)) + (sz == DMA_WORD ? 0 : $urandom_range(3, 0) & ~(nb(sz) - 1));
      wd = $urandom;
      xfer(c, 1, sz, a, wd, 0, rd, er);
      for (int b = 0; b < nb(sz); b++) shadow[a + b] = wd[8*(nb(sz)-1-b) +: 8];
      xfer(c, 0, sz, a, 0, 0, rd, er);
      begin
        logic [31:0] exp;
        exp = 0;
        for (int b = 0; b < nb(sz); b++) exp[8*(nb(sz)-1-b) +: 8] = shadow[a + b];
        check(rd == exp && !er, $sformatf("client %0d read %h exp %h size %0d addr %h", c, rd, exp, sz, a));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin client(0, 30); done_c[0] = 1; end
      begin client(1, 30); done_c[1] = 1; end
      begin
        logic [31:0] rd;
        bit er;
        for (int i = 0; i < 15; i++) begin
          // locked read-modify-write of a counter word
          xfer(2, 0, DMA_WORD, 32'h400, 0, 1, rd, er);
          xfer(2, 1, DMA_WORD, 32'h400, rd + 1, 1, rd, er);
        end
        xfer(2, 0, DMA_WORD, 32'h400, 0, 0, rd, er);
        check(rd == 15, $sformatf("counter %0d", rd));
        xfer(2, 0, DMA_WORD, 32'h0FFC, 0, 0, rd, er);
        check(er, "error response reported");
        done_c[2] = 1;
      end
    join
    repeat (5) @(posedge clk);
    check(u_mem.n_locked >= 30, $sformatf("locked transfers %0d", u_mem.n_locked));
    check(u_mem.n_waits > 0, "wait states seen");
    check(max_run <= MB, $sformatf("longest run with others waiting %0d", max_run));
    check(served[0] == 60 && served[1] == 60 && served[2] == 32, "all transfers served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
