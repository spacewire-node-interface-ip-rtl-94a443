// Testbench for proto_demux: random packets with RMAP, NDCP, TDP, CPTP and
// other protocol identifiers, packets ending right after the logical
// address, lone terminators and over-long packets. Each output's character
// stream is compared with the packets a model routes to it; over-long
// packets must arrive cut to MAX_LEN characters plus an EEP. Outputs apply
// random back-pressure.
module tb_proto_demux;
  import spw_pkg::*;
  localparam int ML = 24;
  localparam logic [7:0] NP = 8'd250, TP = 8'd251;
  logic clk = 0, rst_n = 0;
  spw_char_t in_data, out_data;
  logic in_valid, in_ready;
  logic [2:0] out_valid, out_ready;
  logic ev_trunc;
  int checks = 0, failures = 0;
  spw_char_t src_q[$];
  spw_char_t exp_q[3][$];
  int n_dest[3] = '{0, 0, 0};
  int n_trunc = 0, exp_trunc = 0;

  proto_demux #(.MAX_LEN(ML), .NDCP_PID(NP), .TDP_PID(TP)) dut (.*);

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

  logic g = 1;
  assign in_valid = (src_q.size() > 0) && g;
  assign in_data  = (src_q.size() > 0) ? src_q[0] : 9'h0;
  always @(negedge clk) begin
    g = ($urandom_range(3, 0) != 0);
    out_ready = 3'($urandom);
  end
  always @(posedge clk) if (rst_n && in_valid && in_ready) void'(src_q.pop_front());
  always @(posedge clk) if (rst_n && ev_trunc) n_trunc++;

  always @(posedge clk) if (rst_n) begin
    check($countones(out_valid) <= 1, "one output at a time");
    for (int d = 0; d < 3; d++) if (out_valid[d] && out_ready[d]) begin
      if (exp_q[d].size() == 0) check(0, $sformatf("unexpected char %h on %0d", out_data, d));
      else begin
        spw_char_t e;
        e = exp_q[d].pop_front();
        check(out_data == e, $sformatf("out %0d char %h expected %h", d, out_data, e));
      end
    end
  end

  task automatic pkt(input logic [7:0] pid, input int len, input bit eep);
    spw_char_t p[$];
    int d;
    p.push_back(9'h0FE);
    if (len >= 2) p.push_back({1'b0, pid});
    for (int i = 2; i < len; i++) p.push_back(9'($urandom_range(255, 0)));
    foreach (p[i]) src_q.push_back(p[i]);
    src_q.push_back(eep ? SPW_EEP : SPW_EOP);
    d = (len < 2) ? 2 : (pid == PID_RMAP || pid == NP) ? 0 : (pid == TP) ? 1 : 2;
    n_dest[d]++;
    if (len > ML) begin
      for (int i = 0; i < ML; i++) exp_q[d].push_back(p[i]);
      exp_q[d].push_back(SPW_EEP);
      exp_trunc++;
    end else begin
      foreach (p[i]) exp_q[d].push_back(p[i]);
      exp_q[d].push_back(eep ? SPW_EEP : SPW_EOP);
    end
  endtask

  initial begin
    logic [7:0] pids[6] = '{PID_RMAP, NP, TP, PID_CPTP, 8'd0, 8'd99};
    repeat (3) @(posedge clk);
    rst_n = 1;
    pkt(PID_RMAP, 10, 0);
    pkt(NP, 8, 0);
    pkt(TP, 6, 1);
    pkt(PID_CPTP, 12, 0);
    pkt(8'd99, 30, 0);          // truncated
    pkt(8'd0, 1, 0);            // ends after the logical address
    src_q.push_back(SPW_EOP);   // lone terminator, dropped
    for (int k = 0; k < 60; k++) pkt(pids[$urandom_range(5, 0)], $urandom_range(35, 1), $urandom_range(1, 0));
    while (!(src_q.size() == 0 && exp_q[0].size() == 0 && exp_q[1].size() == 0 && exp_q[2].size() == 0)) @(posedge clk);
    repeat (5) @(posedge clk);
    check(n_trunc == exp_trunc && exp_trunc > 0, $sformatf("truncations %0d expected %0d", n_trunc, exp_trunc));
    check(n_dest[0] > 0 && n_dest[1] > 0 && n_dest[2] > 0, "every output used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
