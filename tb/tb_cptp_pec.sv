// Testbench for cptp_pec: random messages against an integer model of the
// ISO modulo-255 checksum (C0 += byte, C1 += C0; check bytes -(C0+C1) and
// C1), and the zero residue once the check bytes are appended.
module tb_cptp_pec;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0] din = 0;
  logic [15:0] pec;
  logic ok;
  int checks = 0, failures = 0;

  cptp_pec dut (.*);

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

  task automatic feed(input logic [7:0] b);
    @(negedge clk); din = b; en = 1; @(posedge clk); #1 en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      int c0, c1, x, y, n;
      logic [7:0] m[$];
      n = $urandom_range(30, 1);
      m.delete();
      for (int i = 0; i < n; i++) m.push_back((t == 0) ? 8'hFF : 8'($urandom));
      c0 = 0; c1 = 0;
      foreach (m[i]) begin c0 = (c0 + m[i]) % 255; c1 = (c1 + c0) % 255; end
      x = (510 - c0 - c1) % 255; if (x == 0) x = 255;
      y = c1;
      @(negedge clk); clr = 1; @(posedge clk); #1 clr = 0;
      foreach (m[i]) feed(m[i]);
      check(pec[15:8] == 8'(x) && pec[7:0] == 8'(y), $sformatf("pec %h exp %02h%02h", pec, x, y));
      begin logic [15:0] p; p = pec; feed(p[15:8]); feed(p[7:0]); end
      check(ok, "residue zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
