// CRC-16 of the CPTP engine, one byte per clock.
//
// The CCSDS packet error control CRC: polynomial x^16 + x^12 + x^5 + 1
// (0x1021), register preset to all ones, bytes entered most significant bit
// first, no final inversion. `clr` presets the register, `en` folds `din`
// into it on the same edge. `crc` is the value to append (high byte first);
// once the two appended bytes have been folded in too, the register is zero,
// which `ok` reports, so one instance serves both insertion on transmit and
// verification on receive. The polynomial is the CCSDS one; the document
// only names the block.
module cptp_crc (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [7:0]  din,
  output logic [15:0] crc,
  output logic        ok
);

  function automatic logic [15:0] crc_byte(input logic [15:0] c, input logic [7:0] d);
    logic [15:0] r;
    r = c;
    for (int i = 7; i >= 0; i--) begin
      if (r[15] ^ d[i]) r = {r[14:0], 1'b0} ^ 16'h1021;
      else              r = {r[14:0], 1'b0};
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   crc <= 16'hFFFF;
    else if (clr) crc <= 16'hFFFF;
    else if (en)  crc <= crc_byte(crc, din);
  end

  assign ok = (crc == 16'h0000);

endmodule
