// Testbench for cptp_desc_reg: descriptor addresses from base and circular
// index, counts added by register writes and used up by consume pulses
// (saturating at NDESC), index wrap, configuration registers and the
// masked, write-one-to-clear interrupt, including the protocol-error bit
// and the every-N-packets interrupts for both directions.
module tb_cptp_desc_reg;
  import spw_pkg::*;
  localparam int ND = 4;
  logic clk = 0, rst_n = 0;
  reg_wr_t reg_wr = '0;
  logic [7:0] reg_raddr = 0;
  logic [31:0] reg_rdata;
  logic tx_avail, rx_avail, tx_consume = 0, rx_consume = 0;
  logic [31:0] tx_desc_addr, rx_desc_addr;
  chk_e rx_chk;
  logic rx_discard_en;
  logic [16:0] rx_max_len;
  logic ev_tx_irq = 0, ev_rx_done = 0, ev_rx_discard = 0, ev_tx_done = 0, ev_rx_err = 0, irq;
  int checks = 0, failures = 0;

  cptp_desc_reg #(.NDESC(ND), .MAX_PKT_LEN(1000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr.wr = 1; reg_wr.addr = {4'd0, a}; reg_wr.wdata = d;
    @(posedge clk); #1 reg_wr.wr = 0;
  endtask

  task automatic pulse_tx;
    @(negedge clk); tx_consume = 1; @(posedge clk); #1 tx_consume = 0;
  endtask
  task automatic pulse_rx;
    @(negedge clk); rx_consume = 1; @(posedge clk); #1 rx_consume = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!tx_avail && !rx_avail, "nothing available after reset");
    check(rx_max_len == 17'd1000, "max length reset value");
    wr(8'h00, 32'h1000);
    wr(8'h08, 32'h2000);
    wr(8'h04, 3);
    #1 check(tx_avail && tx_desc_addr == 32'h1000, "tx first descriptor");
    reg_raddr = 8'h04; #1 check(reg_rdata == 3, "tx count 3");
    for (int i = 1; i <= 3; i++) begin
      pulse_tx;
      #1 check(tx_desc_addr == 32'h1000 + 8 * (i % ND), $sformatf("tx addr after %0d: %h", i, tx_desc_addr));
    end
    check(!tx_avail, "tx used up");
    wr(8'h04, 3);                          // index 3 -> wraps to 0 after one
    pulse_tx;
    #1 check(tx_desc_addr == 32'h1000, "tx index wraps");
    reg_raddr = 8'h04; #1 check(reg_rdata == 2, "tx count 2");
    wr(8'h04, 100);
    reg_raddr = 8'h04; #1 check(reg_rdata == ND, "tx count saturates at NDESC");
    wr(8'h0C, 2);
    pulse_rx;
    #1 check(rx_avail && rx_desc_addr == 32'h2008, "rx second descriptor");
    wr(8'h08, 32'h3000);
    #1 check(rx_desc_addr == 32'h3000, "rx base write restarts index");
    reg_raddr = 8'h18; #1 check(reg_rdata == {16'd0, 16'd0}, $sformatf("index register %h", reg_rdata));
    wr(8'h10, 32'h6);
    #1 check(rx_chk == CHK_PEC && rx_discard_en, "ctrl register");
    wr(8'h14, 32'd500);
    #1 check(rx_max_len == 17'd500, "max length written");
    wr(8'h14, 32'd5000);
    #1 check(rx_max_len == 17'd1000, "max length clamped");
    // interrupts
    @(negedge clk); ev_rx_done = 1; @(posedge clk); #1 ev_rx_done = 0;
    reg_raddr = 8'h1C; #1 check(reg_rdata == 32'h2, "rx done status");
    check(!irq, "masked");
    wr(8'h20, 32'h7);
    #1 check(irq, "irq after unmask");
    wr(8'h1C, 32'h2);
    #1 check(!irq, "irq cleared");
    @(negedge clk); ev_tx_irq = 1; ev_rx_discard = 1; @(posedge clk); #1 ev_tx_irq = 0; ev_rx_discard = 0;
    reg_raddr = 8'h1C; #1 check(reg_rdata == 32'h5, "tx and discard status");
    check(irq, "irq tx");
    wr(8'h1C, 32'h3F);
    // protocol error
    @(negedge clk); ev_rx_err = 1; @(posedge clk); #1 ev_rx_err = 0;
    reg_raddr = 8'h1C; #1 check(reg_rdata == 32'h8, $sformatf("rx error status %h", reg_rdata));
    check(!irq, "rx error masked");
    wr(8'h20, 32'h38);
    #1 check(irq, "rx error irq");
    wr(8'h1C, 32'h3F);
    // every 3rd Tx packet and every 2nd Rx packet
    wr(8'h24, {16'd2, 16'd3});
    reg_raddr = 8'h24; #1 check(reg_rdata == {16'd2, 16'd3}, "packet-count register");
    for (int k = 1; k <= 7; k++) begin
      @(negedge clk); ev_tx_done = 1; ev_rx_done = 1; @(posedge clk); #1 ev_tx_done = 0; ev_rx_done = 0;
      reg_raddr = 8'h1C;
      #1 check(reg_rdata[5:4] == {k % 2 == 0, k % 3 == 0}, $sformatf("packet %0d count bits %b", k, reg_rdata[5:4]));
      check(irq == (k % 2 == 0 || k % 3 == 0), $sformatf("packet %0d count irq", k));
      wr(8'h1C, 32'h3F);
    end
    wr(8'h24, 0);
    @(negedge clk); ev_tx_done = 1; ev_rx_done = 1; @(posedge clk); #1 ev_tx_done = 0; ev_rx_done = 0;
    reg_raddr = 8'h1C; #1 check(reg_rdata[5:4] == 2'b00, "count interrupts off at N = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
