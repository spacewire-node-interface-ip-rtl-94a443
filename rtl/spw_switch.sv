// SpaceWire packet switch (router) with NPORTS character ports.
//
// Each input port looks at the first character of a packet, its address,
// and connects to one output port for the rest of the packet (wormhole
// routing). Addresses 0..31 are path addresses: address n leads to port n
// and is always deleted. Addresses 32..255 are logical addresses and go
// through a routing table written by software. A table entry holds a group
// mask of output ports and a header-deletion flag. Group adaptive routing
// takes the lowest-numbered free port of the group. The deletion flag gives
// regional addressing: the leading logical address is stripped and the next
// character routes the packet in the next region. A path address with no
// port behind it, or a logical address whose mask is empty, makes the
// packet be discarded up to and including its EOP/EEP. A lone EOP/EEP is
// dropped.
//
// Outputs are handed out by one allocator that grants at most one waiting
// input per clock, round-robin over the inputs, so two inputs never fight
// for one output. While a packet is connected, a counter measures clocks
// without a transferred character; reaching the time-out value cuts the
// packet: an EEP is offered to the output (it gives up after a second
// time-out if the output stays blocked), the output is freed, and the rest
// of the input packet is spilled up to its end marker. A time-out of 0
// disables the mechanism.
//
// Ports: one valid/ready 9-bit character stream in and out per port
// (bit 8 set marks EOP 0x100 / EEP 0x101). Port 0 is the internal port of
// the node. Register interface (byte addresses): 0x000 time-out in clocks;
// 0x080 + 4*(a-32) for logical address a: bits [NPORTS-1:0] group mask;
// 0x480 + 4*(a-32): bit 0 header deletion; 0x800 + 8*p: packets that left
// port p; 0x804 + 8*p: packets discarded or cut by a time-out at input p
// (both counters 32 bits, wrapping; a write clears the counter).
// Writes take effect at the next clock, reads are combinational. Event outputs pulse once per routed packet,
// and, one bit per input port, per discarded packet and per time-out.
//
// Timing: the header is looked at while it waits at the input; the
// connection is made at the clock edge of the grant and characters then
// pass combinationally from input to output, one per clock.
//
// Following the document: 4-32 ports, regional addressing, group adaptive
// routing, port time-out, configuration by the node, operation and error
// counters. This design's own
// choices: the single internal port 0 (no separate configuration port;
// configuration through the register interface), the register layout,
// lowest-free-port choice in a group, one grant per clock, time-out
// behaviour in detail.
module spw_switch
  import spw_pkg::*;
#(
  parameter int unsigned NPORTS  = 4,
  parameter int unsigned TIMEOUT = 4096
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  spw_char_t [NPORTS-1:0]  in_data,
  input  logic      [NPORTS-1:0]  in_valid,
  output logic      [NPORTS-1:0]  in_ready,
  output spw_char_t [NPORTS-1:0]  out_data,
  output logic      [NPORTS-1:0]  out_valid,
  input  logic      [NPORTS-1:0]  out_ready,
  input  reg_wr_t                 reg_wr,
  input  logic [11:0]             reg_raddr,
  output logic [31:0]             reg_rdata,
  output logic                    ev_route,
  output logic      [NPORTS-1:0]  ev_discard,
  output logic      [NPORTS-1:0]  ev_timeout
);

  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  typedef enum logic [1:0] {S_HEAD, S_FWD, S_TO_EEP, S_DROP} st_e;

  typedef struct packed {
    logic              del;
    logic [NPORTS-1:0] mask;
  } rt_t;

  rt_t               tbl [224];
  logic [31:0]       tmo;
  st_e               st   [NPORTS];
  logic [PW-1:0]     dest [NPORTS];
  logic [31:0]       cnt  [NPORTS];
  logic [NPORTS-1:0] busy;
  logic [PW-1:0]     owner [NPORTS];
  logic [PW-1:0]     rr;
  logic [31:0]       n_pkt [NPORTS];
  logic [31:0]       n_err [NPORTS];

  initial assert (NPORTS >= 2 && NPORTS <= 32) else $error("NPORTS out of range");

  // ---- header decode, per input
  logic [NPORTS-1:0] hd_mask [NPORTS];
  logic [NPORTS-1:0] hd_del, hd_ctrl, hd_bad, hd_want;

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      hd_mask[i] = '0;
      hd_del[i]  = 1'b0;
      hd_ctrl[i] = in_data[i][8];
      hd_bad[i]  = 1'b0;
      if (!in_data[i][8]) begin
        if (in_data[i][7:0] < 8'd32) begin
          hd_del[i] = 1'b1;
          if (32'(in_data[i][7:0]) < NPORTS) hd_mask[i] = NPORTS'(1) << in_data[i][4:0];
        end else begin
          hd_mask[i] = tbl[in_data[i][7:0] - 8'd32].mask;
          hd_del[i]  = tbl[in_data[i][7:0] - 8'd32].del;
        end
        hd_bad[i] = (hd_mask[i] == '0);
      end
      hd_want[i] = (st[i] == S_HEAD) && in_valid[i] && !hd_ctrl[i] && !hd_bad[i];
    end
  end

  // ---- allocator: first waiting input from rr whose group has a free port
  logic          g_any;
  logic [PW-1:0] g_in, g_out;

  always_comb begin
    logic [NPORTS-1:0] m;
    int unsigned       k;
    g_any = 1'b0;
    g_in  = '0;
    g_out = '0;
    for (int j = 0; j < NPORTS; j++) begin
      k = (32'(rr) + 32'(j)) % NPORTS;
      m = hd_mask[k] & ~busy;
      if (!g_any && hd_want[k] && (m != '0)) begin
        g_any = 1'b1;
        g_in  = PW'(k);
        for (int o = NPORTS - 1; o >= 0; o--)
          if (m[o]) g_out = PW'(o);
      end
    end
  end

  // ---- crossbar
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = 1'b0;
      out_data[o]  = in_data[owner[o]];
      if (busy[o]) begin
        if (st[owner[o]] == S_FWD) out_valid[o] = in_valid[owner[o]];
        else if (st[owner[o]] == S_TO_EEP) begin
          out_valid[o] = 1'b1;
          out_data[o]  = SPW_EEP;
        end
      end
    end
    for (int i = 0; i < NPORTS; i++) begin
      unique case (st[i])
        S_HEAD:   in_ready[i] = hd_ctrl[i] || (g_any && (32'(g_in) == i) && hd_del[i]);
        S_FWD:    in_ready[i] = out_ready[dest[i]];
        S_DROP:   in_ready[i] = 1'b1;
        default:  in_ready[i] = 1'b0;
      endcase
    end
  end

  // ---- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < 224; a++) tbl[a] <= '0;
      tmo        <= TIMEOUT;
      busy       <= '0;
      rr         <= '0;
      ev_route   <= 1'b0;
      ev_discard <= '0;
      ev_timeout <= '0;
      for (int i = 0; i < NPORTS; i++) begin
        n_pkt[i] <= '0;
        n_err[i] <= '0;
        st[i]    <= S_HEAD;
        dest[i]  <= '0;
        cnt[i]   <= '0;
        owner[i] <= '0;
      end
    end else begin
      ev_route   <= 1'b0;
      ev_discard <= '0;
      ev_timeout <= '0;
      for (int o = 0; o < NPORTS; o++)
        if (out_valid[o] && out_ready[o] && out_data[o][8]) n_pkt[o] <= n_pkt[o] + 1;
      for (int i = 0; i < NPORTS; i++)
        if ((st[i] == S_HEAD && in_valid[i] && !hd_ctrl[i] && hd_bad[i]) ||
            (st[i] == S_FWD && !(in_valid[i] && out_ready[dest[i]]) && tmo != 0 && cnt[i] + 1 >= tmo))
          n_err[i] <= n_err[i] + 1;
      if (reg_wr.wr) begin
        if (reg_wr.addr[11] && 32'(reg_wr.addr[10:3]) < NPORTS) begin
          if (reg_wr.addr[2]) n_err[PW'(reg_wr.addr[10:3])] <= '0;
          else                n_pkt[PW'(reg_wr.addr[10:3])] <= '0;
        end
        if (reg_wr.addr[11:0] == 12'h000) tmo <= reg_wr.wdata;
        else if (reg_wr.addr[11] == 1'b0 && reg_wr.addr[9:2] >= 8'd32) begin
          if (reg_wr.addr[10]) tbl[reg_wr.addr[9:2] - 8'd32].del  <= reg_wr.wdata[0];
          else                 tbl[reg_wr.addr[9:2] - 8'd32].mask <= reg_wr.wdata[NPORTS-1:0];
        end
      end
      if (g_any) begin
        busy[g_out]  <= 1'b1;
        owner[g_out] <= g_in;
        dest[g_in]   <= g_out;
        st[g_in]     <= S_FWD;
        cnt[g_in]    <= '0;
        rr           <= PW'((32'(g_in) + 1) % NPORTS);
        ev_route     <= 1'b1;
      end
      for (int i = 0; i < NPORTS; i++) begin
        unique case (st[i])
          S_HEAD:
            if (in_valid[i] && !hd_ctrl[i] && hd_bad[i]) begin
              st[i]      <= S_DROP;
              ev_discard[i] <= 1'b1;
            end
          S_FWD:
            if (in_valid[i] && out_ready[dest[i]]) begin
              cnt[i] <= '0;
              if (in_data[i][8]) begin
                busy[dest[i]] <= 1'b0;
                st[i]         <= S_HEAD;
              end
            end else if (tmo != 0) begin
              cnt[i] <= cnt[i] + 1;
              if (cnt[i] + 1 >= tmo) begin
                st[i]      <= S_TO_EEP;
                cnt[i]     <= '0;
                ev_timeout[i] <= 1'b1;
              end
            end
          S_TO_EEP: begin
            cnt[i] <= cnt[i] + 1;
            if (out_ready[dest[i]] || (cnt[i] + 1 >= tmo)) begin
              busy[dest[i]] <= 1'b0;
              st[i]         <= S_DROP;
              cnt[i]        <= '0;
            end
          end
          default:
            if (in_valid[i] && in_data[i][8]) st[i] <= S_HEAD;
        endcase
      end
    end
  end

  // ---- register read
  always_comb begin
    reg_rdata = '0;
    if (reg_raddr == 12'h000) reg_rdata = tmo;
    else if (reg_raddr[11]) begin
      if (32'(reg_raddr[10:3]) < NPORTS) reg_rdata = reg_raddr[2] ? n_err[PW'(reg_raddr[10:3])] : n_pkt[PW'(reg_raddr[10:3])];
    end else if (reg_raddr[9:2] >= 8'd32) begin
      if (reg_raddr[10]) reg_rdata[0]  = tbl[reg_raddr[9:2] - 8'd32].del;
      else               reg_rdata[NPORTS-1:0] = tbl[reg_raddr[9:2] - 8'd32].mask;
    end
  end

endmodule
