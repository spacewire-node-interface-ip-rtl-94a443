// Behavioural AHB slave memory with a one-master arbiter, for testbenches.
//
// 2**AW bytes, big-endian byte lanes. Each transfer gets 0..MAXWAIT wait
// states at random. A transfer to ERR_ADDR gets the two-cycle ERROR
// response. HGRANT follows HBUSREQ one clock later. Counts transfers,
// locked transfers and wait states for the testbench.
module ahb_mem_model #(
  parameter int unsigned AW       = 16,
  parameter int unsigned MAXWAIT  = 2,
  parameter logic [31:0] ERR_ADDR = 32'hFFFF_FFFC
) (
  input  logic        clk,
  input  logic        hbusreq,
  output logic        hgrant,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic        hmastlock,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic [1:0]  hresp
);

  logic [7:0]  mem [2**AW];
  logic        dp;          // data phase active
  logic [31:0] a_q;
  logic        w_q, lk_q;
  logic [2:0]  s_q;
  int          wait_cnt;
  int          err_ph;
  int unsigned n_xfer = 0, n_locked = 0, n_waits = 0, n_err = 0;

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    dp = 0; hready = 1; hresp = 0; hrdata = 0; hgrant = 0; wait_cnt = 0; err_ph = 0;
    a_q = 0; w_q = 0; lk_q = 0; s_q = 0;
  end

  always @(posedge clk) hgrant <= hbusreq;

  always @(posedge clk) begin
    if (dp && hready) begin
      // data phase completes now
      if (err_ph == 0) begin
        int unsigned n;
        n = 1 << s_q;
        if (w_q)
          for (int unsigned b = 0; b < n; b++) begin
            int unsigned a;
            a = (a_q & ~(n - 1)) + b;
            mem[a % (2**AW)] = hwdata[31 - 8*(a % 4) -: 8];
          end
      end
      dp = 0;
    end
    if (hready && htrans[1]) begin
      dp = 1; a_q = haddr; w_q = hwrite; s_q = hsize; lk_q = hmastlock;
      n_xfer++;
      if (hmastlock) n_locked++;
      wait_cnt = $urandom_range(MAXWAIT, 0);
      err_ph = (haddr == ERR_ADDR) ? 2 : 0;
    end
    // outputs for the next cycle
    hresp  <= 2'b00;
    hready <= 1'b1;
    if (dp) begin
      if (err_ph == 2) begin
        hready <= 1'b0; hresp <= 2'b01; err_ph = 1; n_err++;
      end else if (err_ph == 1) begin
        hready <= 1'b1; hresp <= 2'b01; err_ph = 3;
      end else if (err_ph == 3) begin
        hready <= 1'b1; hresp <= 2'b01;
      end else if (wait_cnt > 0) begin
        hready <= 1'b0; wait_cnt--; n_waits++;
      end else begin
        logic [31:0] d;
        d = 0;
        for (int b = 0; b < 4; b++) d[31 - 8*b -: 8] = mem[((a_q & ~32'd3) + b) % (2**AW)];
        hrdata <= d;
        hready <= 1'b1;
      end
    end
  end

endmodule
