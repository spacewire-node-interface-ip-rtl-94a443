// Testbench for cptp_crc: the standard check value of CRC-16/CCITT with an
// all-ones preset ("123456789" gives 0x29B1), a zero residue once the CRC is
// appended, and random messages against a bit-serial reference written
// from the polynomial definition.
module tb_cptp_crc;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0] din = 0;
  logic [15:0] crc;
  logic ok;
  int checks = 0, failures = 0;

  cptp_crc dut (.*);

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

  // reference: message polynomial times x^16 mod g, with the preset folded in
  function automatic logic [15:0] ref_crc(input logic [7:0] m[$]);
    logic [16:0] r;
    r = 17'h0FFFF;
    foreach (m[i])
      for (int b = 7; b >= 0; b--) begin
        r = {r[15:0], 1'b0} ^ {16'd0, 1'b0};
        r[16] = r[16] ^ m[i][b];
        if (r[16]) r = r ^ 17'h11021;
      end
    return r[15:0];
  endfunction

  initial begin
    logic [7:0] msg[$];
    string s;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    s = "123456789";
    @(negedge clk); clr = 1; @(posedge clk); #1 clr = 0;
    for (int i = 0; i < s.len(); i++) feed(s[i]);
    check(crc == 16'h29B1, $sformatf("check value %h", crc));
    check(!ok, "no zero residue before the CRC");
    feed(8'h29); feed(8'hB1);
    check(ok, "zero residue after the CRC");
    for (int t = 0; t < 50; t++) begin
      logic [15:0] exp;
      msg.delete();
      repeat ($urandom_range(40, 1)) msg.push_back(8'($urandom));
      exp = ref_crc(msg);
      @(negedge clk); clr = 1; @(posedge clk); #1 clr = 0;
      foreach (msg[i]) feed(msg[i]);
      check(crc == exp, $sformatf("random crc %h exp %h", crc, exp));
      feed(exp[15:8]); feed(exp[7:0]);
      check(ok, "random residue");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
