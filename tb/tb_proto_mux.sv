// Testbench for proto_mux: three engines offer packets (first character
// tags the engine) with random gaps, the link applies random back-pressure.
// Every packet must come out whole and uninterleaved, in each engine's
// order; an over-long packet must be cut to MAX_LEN characters plus an EEP
// with the rest of it dropped; with all engines busy the engines must be
// served in turn; an engine reset in the middle of a packet must end it
// with an EEP.
module tb_proto_mux;
  import spw_pkg::*;
  localparam int ML = 20;
  logic clk = 0, rst_n = 0;
  spw_char_t [2:0] in_data;
  logic [2:0] in_valid, in_ready, src_rst = 0;
  spw_char_t out_data;
  logic out_valid, out_ready = 0, ev_trunc, ev_reset_eep;
  int checks = 0, failures = 0;
  spw_char_t sq[3][$];
  spw_char_t eq[3][$];
  int cur = -1;
  int order[$];
  int n_trunc = 0, n_reset = 0, n_pk = 0;
  bit gaps = 1, always_ready = 0;

  proto_mux #(.NSRC(3), .MAX_LEN(ML)) dut (.*);

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

  logic [2:0] g = '1;
  always_comb
    for (int s = 0; s < 3; s++) begin
      in_valid[s] = (sq[s].size() > 0) && g[s];
      in_data[s]  = (sq[s].size() > 0) ? sq[s][0] : 9'h0;
    end
  always @(negedge clk) begin
    g = gaps ? 3'($urandom) : 3'b111;
    out_ready = always_ready ? 1'b1 : ($urandom_range(3, 0) != 0);
  end
  always @(posedge clk) if (rst_n) for (int s = 0; s < 3; s++) if (in_valid[s] && in_ready[s]) void'(sq[s].pop_front());
  always @(posedge clk) if (rst_n) begin
    if (ev_trunc) n_trunc++;
    if (ev_reset_eep) n_reset++;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    spw_char_t e;
    if (cur < 0) begin
      cur = int'(out_data[7:4]) - 1;
      if (cur < 0 || cur > 2) begin check(0, $sformatf("bad tag %h", out_data)); cur = 0; end
      order.push_back(cur);
    end
    if (eq[cur].size() == 0) check(0, "unexpected char");
    else begin
      e = eq[cur].pop_front();
      check(out_data == e, $sformatf("src %0d char %h expected %h", cur, out_data, e));
    end
    if (out_data[8]) begin cur = -1; n_pk++; end
  end

  task automatic pkt(input int s, input int len, input bit eep);
    spw_char_t p[$];
    p.push_back(9'(8'h10 * (s + 1)));
    for (int i = 1; i < len; i++) p.push_back(9'($urandom_range(255, 0)));
    foreach (p[i]) sq[s].push_back(p[i]);
    sq[s].push_back(eep ? SPW_EEP : SPW_EOP);
    if (len > ML) begin
      for (int i = 0; i < ML; i++) eq[s].push_back(p[i]);
      eq[s].push_back(SPW_EEP);
    end else begin
      foreach (p[i]) eq[s].push_back(p[i]);
      eq[s].push_back(eep ? SPW_EEP : SPW_EOP);
    end
  endtask

  function automatic bit all_empty();
    return sq[0].size() == 0 && sq[1].size() == 0 && sq[2].size() == 0 &&
           eq[0].size() == 0 && eq[1].size() == 0 && eq[2].size() == 0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) pkt($urandom_range(2, 0), $urandom_range(25, 1), $urandom_range(1, 0));
    pkt(0, 30, 0);
    while (!(all_empty())) @(posedge clk);
    repeat (5) @(posedge clk);
    check(n_trunc >= 1, "truncation seen");
    // fairness: all engines busy, no gaps
    @(negedge clk); gaps = 0; always_ready = 1; order.delete();
    for (int k = 0; k < 4; k++) for (int s = 0; s < 3; s++) pkt(s, 3, 0);
    while (!(all_empty())) @(posedge clk);
    for (int i = 1; i < order.size(); i++)
      check(order[i] == (order[i-1] + 1) % 3, $sformatf("round robin at %0d", i));
    // reset in the middle of a packet from engine 1
    repeat (3) @(posedge clk);
    begin
      for (int i = 0; i < 10; i++) sq[1].push_back(9'(i == 0 ? 8'h20 : i));
      sq[1].push_back(SPW_EOP);
      foreach (sq[1][i]) eq[1].push_back(sq[1][i]);
      while (!(sq[1].size() <= 7)) @(posedge clk);
      // at the falling edge the characters not yet sent are still queued
      @(negedge clk); src_rst[1] = 1; sq[1].delete();
      eq[1].delete(); eq[1].push_back(SPW_EEP);
      @(negedge clk); src_rst[1] = 0;
    end
    while (!(all_empty())) @(posedge clk);
    repeat (5) @(posedge clk);
    check(n_reset == 1, $sformatf("reset EEP pulses %0d", n_reset));
    check(cur == -1, "no packet left open");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
