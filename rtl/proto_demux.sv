// Protocol demultiplexer: hands each received packet to its protocol engine.
//
// A packet arrives from the codec as characters starting with the target
// logical address; the second character is the protocol identifier. The
// first character is held until the second arrives, then both and the rest
// of the packet go to one output:
//   DST_RMAP  protocol 1 (RMAP), and the NDCP identifier, when RMAP_EN;
//             NDCP commands are served by the RMAP engine's extensions
//   DST_TDP   the time distribution protocol identifier, when TDP_EN
//   DST_CPTP  everything else: CPTP (identifier 2) and raw packets,
//             including packets that end before a protocol identifier
// A packet longer than MAX_LEN characters (terminator not counted) is cut:
// the engine gets an EEP after MAX_LEN characters and the rest is dropped
// up to the packet's own EOP/EEP; `ev_trunc` pulses. A terminator with no
// packet before it is dropped. Characters pass with no added register once
// the header is out (valid/ready). The dispatching and the EEP on
// truncation follow the document; the identifiers for NDCP and TDP and the
// length limit are this design's parameters.
module proto_demux
  import spw_pkg::*;
#(
  parameter bit          RMAP_EN  = 1'b1,
  parameter bit          NDCP_EN  = 1'b1,
  parameter bit          TDP_EN   = 1'b1,
  parameter logic [7:0]  NDCP_PID = 8'd250,
  parameter logic [7:0]  TDP_PID  = 8'd251,
  parameter int unsigned MAX_LEN  = 65536 + 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  spw_char_t   in_data,
  input  logic        in_valid,
  output logic        in_ready,
  output spw_char_t   out_data,
  output logic [2:0]  out_valid,   // one-hot, index = dest_e
  input  logic [2:0]  out_ready,
  output logic        ev_trunc
);

  typedef enum logic [1:0] {DST_RMAP = 2'd0, DST_TDP = 2'd1, DST_CPTP = 2'd2} dest_e;
  typedef enum logic [2:0] {S_IDLE, S_PID, S_TLA_OUT, S_PID_OUT, S_PASS, S_EEP_OUT, S_DROP} state_e;

  state_e     st;
  dest_e      dst;
  spw_char_t  tla_q, pid_q;
  logic [31:0] cnt;
  logic       o_valid, o_ready;

  function automatic dest_e classify(input spw_char_t pid);
    if (pid[8])                                        return DST_CPTP;
    if (RMAP_EN && pid[7:0] == PID_RMAP)               return DST_RMAP;
    if (RMAP_EN && NDCP_EN && pid[7:0] == NDCP_PID)    return DST_RMAP;
    if (TDP_EN && pid[7:0] == TDP_PID)                 return DST_TDP;
    return DST_CPTP;
  endfunction

  assign o_ready = out_ready[dst];
  always_comb begin
    out_valid      = '0;
    out_valid[dst] = o_valid;
  end

  always_comb begin
    o_valid  = 1'b0;
    out_data = in_data;
    in_ready = 1'b0;
    unique case (st)
      S_IDLE, S_PID, S_DROP: in_ready = 1'b1;
      S_TLA_OUT: begin o_valid = 1'b1; out_data = tla_q; end
      S_PID_OUT: begin o_valid = 1'b1; out_data = pid_q; end
      S_PASS:    if (!in_data[8] && cnt >= 32'(MAX_LEN)) in_ready = 1'b0;
                 else begin
                   o_valid  = in_valid;
                   in_ready = o_ready;
                 end
      S_EEP_OUT: begin o_valid = 1'b1; out_data = SPW_EEP; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      dst      <= DST_CPTP;
      tla_q    <= '0;
      pid_q    <= '0;
      cnt      <= '0;
      ev_trunc <= 1'b0;
    end else begin
      ev_trunc <= 1'b0;
      unique case (st)
        S_IDLE:    if (in_valid && !in_data[8]) begin tla_q <= in_data; st <= S_PID; end
        S_PID:     if (in_valid) begin
                     pid_q <= in_data;
                     dst   <= classify(in_data);
                     st    <= S_TLA_OUT;
                   end
        S_TLA_OUT: if (o_ready) st <= S_PID_OUT;
        S_PID_OUT: if (o_ready) begin
                     cnt <= 32'd2;
                     st  <= pid_q[8] ? S_IDLE : S_PASS;
                   end
        S_PASS:    if (in_valid) begin
                     if (!in_data[8] && cnt >= 32'(MAX_LEN)) begin
                       st       <= S_EEP_OUT;
                       ev_trunc <= 1'b1;
                     end else if (o_ready) begin
                       cnt <= cnt + 32'd1;
                       if (in_data[8]) st <= S_IDLE;
                     end
                   end
        S_EEP_OUT: if (o_ready) st <= S_DROP;
        S_DROP:    if (in_valid && in_data[8]) st <= S_IDLE;
        default:   st <= S_IDLE;
      endcase
    end
  end

endmodule
