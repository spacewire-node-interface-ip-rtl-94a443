// Testbench for sync_fifo: random pushes and pops against a queue, with
// checks of full/empty flags and the level count.
module tb_sync_fifo;
  localparam int W = 9, D = 16;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [W-1:0] in_data = 0, out_data;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [$clog2(D):0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  bit saw_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      bit pw, pr;
      pw = ($urandom_range(99, 0) < ((cyc < 2000) ? 70 : 30));
      pr = ($urandom_range(99, 0) < ((cyc < 2000) ? 30 : 70));
      in_valid  <= pw;
      in_data   <= W'($urandom);
      out_ready <= pr;
      @(negedge clk);
      check(in_ready == (q.size() < D), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      check(level == q.size(), "level");
      if (q.size() == D) saw_full = 1;
      if (out_valid && out_ready) check(out_data == q[0], $sformatf("data %h exp %h", out_data, q[0]));
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    check(saw_full, "FIFO became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
