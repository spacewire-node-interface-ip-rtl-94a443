// Packet error control checksum of the CPTP engine, one byte per clock.
//
// The ISO 8473 (Fletcher, modulo 255) checksum used as the CCSDS/PUS packet
// error control: C0 += byte, C1 += C0, both modulo 255, from zero. The two
// bytes to append are CK1 = -(C0 + C1) and CK2 = C1 (a zero CK1 is sent as
// 0xFF, the other form of zero). When the appended bytes are folded in too,
// C0 and C1 are both zero modulo 255, which `ok` reports, so one instance
// inserts on transmit and verifies on receive. `clr` restarts the sums and
// `en` adds `din` on the same edge. The algorithm is this design's choice
// of "PEC"; the document only names the block.
module cptp_pec (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [7:0]  din,
  output logic [15:0] pec,
  output logic        ok
);

  logic [7:0] c0, c1;        // kept in 0..254
  logic [7:0] c0_n, c1_n;
  logic [7:0] ck1;

  function automatic logic [7:0] add255(input logic [7:0] a, input logic [7:0] b);
    logic [8:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= 9'd255) s = s - 9'd255;
    return s[7:0];
  endfunction

  always_comb begin
    c0_n = add255(c0, din);
    c1_n = add255(c1, c0_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0 <= '0;
      c1 <= '0;
    end else if (clr) begin
      c0 <= '0;
      c1 <= '0;
    end else if (en) begin
      c0 <= c0_n;
      c1 <= c1_n;
    end
  end

  // -(c0 + c1) mod 255
  always_comb begin
    logic [7:0] s;
    s   = add255(c0, c1);
    ck1 = (s == 8'd0) ? 8'hFF : 8'(8'd255 - s);
  end

  assign pec = {ck1, c1};
  assign ok  = (c0 == 8'd0) && (c1 == 8'd0);

endmodule
