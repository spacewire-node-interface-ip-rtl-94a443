// Protocol multiplexer: shares the transmit link among the protocol engines.
//
// NSRC engines each offer a character stream. Between packets the
// multiplexer picks the next engine with a character waiting, round-robin
// from the one after the last served, and then passes that engine's
// characters until its EOP or EEP has gone out. Two cases end a packet
// early with an EEP inserted by the multiplexer:
//   - truncation: the packet has reached MAX_LEN characters and the engine
//     still offers data; the EEP is sent and the rest of the engine's packet
//     is read and dropped up to its own terminator (`ev_trunc` pulses);
//   - protocol reset: `src_rst` of the engine being served rises in the
//     middle of a packet; the EEP is sent and the engine released at once
//     (`ev_reset_eep` pulses).
// Characters pass with no added register (valid/ready). The behaviour
// follows the document; the arbitration order and the length limit are
// this design's choices.
module proto_mux
  import spw_pkg::*;
#(
  parameter int unsigned NSRC    = 3,
  parameter int unsigned MAX_LEN = 65536 + 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  spw_char_t [NSRC-1:0]    in_data,
  input  logic      [NSRC-1:0]    in_valid,
  output logic      [NSRC-1:0]    in_ready,
  input  logic      [NSRC-1:0]    src_rst,
  output spw_char_t               out_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic                    ev_trunc,
  output logic                    ev_reset_eep
);

  localparam int unsigned SW = (NSRC > 1) ? $clog2(NSRC) : 1;

  typedef enum logic [1:0] {S_IDLE, S_PASS, S_EEP, S_DROP} state_e;

  state_e       st;
  logic [SW-1:0] cur, pick;
  logic         pick_ok;
  logic [31:0]  cnt;
  logic         drop_after;   // EEP for truncation (then drop) or reset
  spw_char_t    c;
  logic         v;

  // round-robin choice, starting after the last served engine
  always_comb begin
    pick    = cur;
    pick_ok = 1'b0;
    for (int k = 1; k <= int'(NSRC); k++) begin
      int unsigned i;
      i = (int'(cur) + k) % NSRC;
      if (!pick_ok && in_valid[i]) begin
        pick    = SW'(i);
        pick_ok = 1'b1;
      end
    end
  end

  assign c = in_data[cur];
  assign v = in_valid[cur];

  always_comb begin
    out_valid = 1'b0;
    out_data  = c;
    in_ready  = '0;
    unique case (st)
      S_PASS: if (src_rst[cur]) begin
                out_valid = 1'b0;
              end else if (!c[8] && cnt >= 32'(MAX_LEN)) begin
                out_valid = 1'b0;
              end else begin
                out_valid     = v;
                in_ready[cur] = out_ready;
              end
      S_EEP:  begin out_valid = 1'b1; out_data = SPW_EEP; end
      S_DROP: in_ready[cur] = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      cur          <= SW'(NSRC - 1);
      cnt          <= '0;
      drop_after   <= 1'b0;
      ev_trunc     <= 1'b0;
      ev_reset_eep <= 1'b0;
    end else begin
      ev_trunc     <= 1'b0;
      ev_reset_eep <= 1'b0;
      unique case (st)
        S_IDLE: if (pick_ok) begin
                  cur <= pick;
                  cnt <= '0;
                  st  <= S_PASS;
                end
        S_PASS: if (src_rst[cur]) begin
                  drop_after   <= 1'b0;
                  ev_reset_eep <= (cnt != '0);
                  st           <= (cnt != '0) ? S_EEP : S_IDLE;
                end else if (v && !c[8] && cnt >= 32'(MAX_LEN)) begin
                  drop_after <= 1'b1;
                  ev_trunc   <= 1'b1;
                  st         <= S_EEP;
                end else if (v && out_ready) begin
                  cnt <= cnt + 32'd1;
                  if (c[8]) st <= S_IDLE;
                end
        S_EEP:  if (out_ready) st <= drop_after ? S_DROP : S_IDLE;
        S_DROP: if ((v && c[8]) || src_rst[cur]) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
