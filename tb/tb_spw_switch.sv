// Testbench for spw_switch (4 ports, short time-out). Every input sends a
// stream of packets with a unique 2-byte id; a scoreboard keyed by id holds
// the characters each packet must arrive with (after header deletion) and
// the set of outputs it may leave on. Output monitors rebuild packets and
// check them against it; at the end every routable packet must have
// arrived exactly once. Covered: path addresses (deleted), unknown path
// address and empty logical entry (discarded), logical addresses kept,
// group adaptive routing under contention (a packet must leave on a port
// other than the first of its group), regional addressing (logical address
// deleted), lone end markers, register read-back, and a time-out on a
// starved input, which must end the packet at the output with an EEP and
// spill the rest; the per-port packet and error counters must agree with
// what the monitors saw. Outputs accept with random back-pressure.
module tb_spw_switch;
  import spw_pkg::*;
  localparam int NP = 4;
  localparam int TMO = 64;
  localparam logic [8:0] STALL = 9'h1FF;   // driver-only marker

  logic clk = 0, rst_n = 0;
  spw_char_t [NP-1:0] in_data, out_data;
  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  reg_wr_t reg_wr = '0;
  logic [11:0] reg_raddr = '0;
  logic [31:0] reg_rdata;
  logic ev_route;
  logic [NP-1:0] ev_discard, ev_timeout;
  int checks = 0, failures = 0;
  int n_route = 0, n_discard = 0, n_timeout = 0, n_gar_alt = 0, n_regional = 0, n_path = 0, n_logical = 0;

  spw_switch #(.NPORTS(NP), .TIMEOUT(TMO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- scoreboard
  typedef logic [8:0] cq_t[$];
  cq_t               exp_pk [int];
  logic [NP-1:0]     exp_mask [int];
  int                got [int];
  int                first_port [int];

  // ---- sources
  logic [8:0] src [NP][$];
  logic [NP-1:0] gap, stall;
  int stall_cnt [NP];
  always_comb
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = (src[i].size() > 0) && gap[i] && !stall[i] && (src[i][0] != STALL);
      in_data[i]  = (src[i].size() > 0) ? src[i][0] : 9'h0;
    end
  always @(negedge clk) for (int i = 0; i < NP; i++) gap[i] = ($urandom_range(4, 0) != 0);
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NP; i++) begin
      if (stall[i]) begin
        stall_cnt[i]--;
        if (stall_cnt[i] == 0) stall[i] <= 1'b0;
      end else if (src[i].size() > 0 && src[i][0] == STALL) begin
        void'(src[i].pop_front());
        stall[i]     <= 1'b1;
        stall_cnt[i] = 3 * TMO;
      end else if (in_valid[i] && in_ready[i]) void'(src[i].pop_front());
    end

  // ---- sinks
  int rdy_pct = 70;
  logic [8:0] cur [NP][$];
  int n_out [NP];
  always @(negedge clk) for (int o = 0; o < NP; o++) out_ready[o] = ($urandom_range(99, 0) < rdy_pct);
  always @(posedge clk) if (rst_n) begin
    if (ev_route) n_route++;
    n_discard += $countones(ev_discard);
    n_timeout += $countones(ev_timeout);
    for (int o = 0; o < NP; o++)
      if (out_valid[o] && out_ready[o]) begin
        cur[o].push_back(out_data[o]);
        if (out_data[o][8]) begin
          int id, p;
          n_out[o]++;
          p  = (cur[o][0][7:0] >= 8'd32) ? 1 : 0;
          id = (cur[o].size() > p + 1) ? int'({cur[o][p][7:0], cur[o][p+1][7:0]}) : -1;
          if (!exp_pk.exists(id)) check(0, $sformatf("port %0d: packet with unknown id %0d", o, id));
          else begin
            check(cur[o] == exp_pk[id], $sformatf("port %0d: packet %0d content", o, id));
            check(exp_mask[id][o], $sformatf("packet %0d left on port %0d, not in group %b", id, o, exp_mask[id]));
            if (!got.exists(id)) got[id] = 0;
            got[id]++;
            if (exp_mask[id] != (NP'(1) << o) && o != first_port[id]) n_gar_alt++;
          end
          cur[o].delete();
        end
      end
  end

  int next_id = 1;
  // Queue one packet on input i: header characters, then the id and n
  // random bytes. kept_hdr is what the output sees of the header.
  task automatic send(input int i, input logic [8:0] hdr[$], input logic [8:0] kept_hdr[$],
                      input logic [NP-1:0] mask, input int n, input int stall_at = -1);
    logic [8:0] body[$];
    int id;
    id = next_id++;
    body = '{{1'b0, 8'(id >> 8)}, {1'b0, 8'(id)}};
    for (int k = 0; k < n; k++) body.push_back({1'b0, 8'($urandom)});
    foreach (hdr[k]) src[i].push_back(hdr[k]);
    if (mask != '0) begin
      exp_pk[id]   = kept_hdr;
      exp_mask[id] = mask;
      first_port[id] = 0;
      for (int o = NP - 1; o >= 0; o--) if (mask[o]) first_port[id] = o;
    end
    foreach (body[k]) begin
      if (k == stall_at) src[i].push_back(STALL);
      src[i].push_back(body[k]);
      if (mask != '0 && (stall_at < 0 || k < stall_at)) exp_pk[id].push_back(body[k]);
    end
    src[i].push_back(SPW_EOP);
    if (mask != '0) exp_pk[id].push_back(stall_at < 0 ? SPW_EOP : SPW_EEP);
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = '{wr: 1'b1, addr: a, wdata: d};
    @(negedge clk); reg_wr = '0;
  endtask

  task automatic drain;
    bit busy;
    busy = 1;
    while (busy) begin
      @(posedge clk);
      busy = 0;
      for (int i = 0; i < NP; i++) if (src[i].size() > 0 || stall[i]) busy = 1;
    end
    repeat (20) @(posedge clk);
  endtask

  initial begin
    stall = '0;
    for (int i = 0; i < NP; i++) begin stall_cnt[i] = 0; n_out[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // routing table: 40 -> port 2; 50 -> group {1,2,3}; 60 -> port 3 with
    // header deletion (regional); 70 left empty
    wr(12'h080 + 12'(4 * (40 - 32)), 32'b0100);
    wr(12'h080 + 12'(4 * (50 - 32)), 32'b1110);
    wr(12'h080 + 12'(4 * (60 - 32)), 32'b1000);
    wr(12'h480 + 12'(4 * (60 - 32)), 32'd1);
    wr(12'h000, 32'(TMO));
    @(negedge clk);
    reg_raddr = 12'h080 + 12'(4 * (50 - 32)); #1 check(reg_rdata == 32'b1110, "table read-back (mask)");
    reg_raddr = 12'h480 + 12'(4 * (60 - 32)); #1 check(reg_rdata == 32'd1, "table read-back (deletion)");
    reg_raddr = 12'h000; #1 check(reg_rdata == 32'(TMO), "time-out read-back");

    // path addressing, all inputs to all ports
    for (int r = 0; r < 6; r++)
      for (int i = 0; i < NP; i++) begin
        int p;
        p = $urandom_range(NP - 1, 0);
        send(i, '{9'(p)}, '{}, NP'(1) << p, $urandom_range(30, 0));
        n_path++;
      end
    drain();
    // logical kept, regional, discards, lone end markers
    for (int r = 0; r < 4; r++) begin
      send(0, '{9'd40}, '{9'd40}, 4'b0100, $urandom_range(20, 0)); n_logical++;
      send(1, '{9'd60, 9'h041}, '{9'h041}, 4'b1000, $urandom_range(20, 0)); n_regional++;
      send(2, '{9'd9}, '{}, '0, 5);
      send(3, '{9'd70}, '{}, '0, 5);
      src[0].push_back(SPW_EEP);
    end
    drain();
    check(n_discard == 8, $sformatf("discarded packets %0d", n_discard));
    // group adaptive routing under contention: slow outputs, all inputs at once
    rdy_pct = 30;
    for (int r = 0; r < 8; r++)
      for (int i = 0; i < NP; i++) send(i, '{9'd50}, '{9'd50}, 4'b1110, 40);
    drain();
    rdy_pct = 70;
    // time-out: input 2 stops after 10 body characters for 3 time-outs
    send(2, '{9'd3}, '{}, 4'b1000, 30, 10);
    drain();
    // after the spill the port routes normally again
    send(2, '{9'd3}, '{}, 4'b1000, 10);
    drain();

    // operation and error counters
    for (int o = 0; o < NP; o++) begin
      @(negedge clk); reg_raddr = 12'(12'h800 + 8 * o); #1
      check(reg_rdata == 32'(n_out[o]), $sformatf("port %0d packet counter %0d, expected %0d", o, reg_rdata, n_out[o]));
      reg_raddr = 12'(12'h804 + 8 * o); #1
      check(reg_rdata == ((o == 2) ? 32'd5 : (o == 3) ? 32'd4 : 32'd0), $sformatf("port %0d error counter %0d", o, reg_rdata));
    end
    wr(12'h804 + 12'(8 * 2), 0);
    @(negedge clk); reg_raddr = 12'h804 + 12'(8 * 2); #1 check(reg_rdata == 0, "error counter cleared");
    foreach (exp_pk[id]) check(got.exists(id) && got[id] == 1, $sformatf("packet %0d arrived once", id));
    check(n_timeout == 1, $sformatf("time-outs %0d", n_timeout));
    check(n_gar_alt > 0, "group adaptive routing used another port of the group");
    foreach (cur[o]) check(cur[o].size() == 0, $sformatf("port %0d idle at end", o));
    $display("mechanisms: path=%0d logical=%0d regional=%0d gar_alt=%0d discard=%0d timeout=%0d routed=%0d",
             n_path, n_logical, n_regional, n_gar_alt, n_discard, n_timeout, n_route);
    check(n_path > 0 && n_logical > 0 && n_regional > 0 && n_route > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
