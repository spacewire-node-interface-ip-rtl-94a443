// NDCP address translation, access rules and ownership.
//
// NDCP addresses a highly fragmented space: application index, protocol
// index, field-set identifier and field identifier (8 bits each here, in
// that order from bit 31), where consecutive field identifiers are
// consecutive 32-bit fields. This block turns such an address into a flat
// physical address for the RMAP target and decides whether the access is
// allowed.
//
// Table: DEPTH entries, each giving application, protocol, field set, the
// lowest field identifier and the number of fields of a region, its access
// flags (read-only, CAS-modifiable, reserved, followed by a CAS region,
// followed by a read-only region) and the physical address of its lowest
// field. The table is a RAM that software writes through the register
// port, or, with ROM = 1, constant contents given by the parameters
// ROM_TABLE and ROM_NUM (table and NUM writes are then ignored, reads still
// work). Register port (byte offsets):
//   entry i at 16*i: word 0 {app, proto, fieldset, field_lo}
//                    word 1 {fs_len[31:24], 19'b0, ro_fl, cas_fl, rsv, cas, ro}
//                    word 2 physical address
//   0xF00 NUM     entries in use, scanned from entry 0
//   0xF04 OWNER   [8] owner set, [7:0] owner's logical address
// Lookup: `lk_req` starts a scan, one entry per clock, from entry 0. The
// first entry whose region holds the first field accessed decides:
//   read    granted (it may run past the region)
//   write   refused in a read-only or CAS region, and refused when it runs
//           past the region and the next region is CAS or read-only
//   CAS     refused in a read-only region
// Writes and CAS are also refused when an owner is set and the initiator's
// logical address is not the owner's. No match refuses. On grant `lk_phys`
// is the region's physical address + 4 * (field - lowest field) and
// `lk_rsv` tells the target to read zeros / drop the write. `lk_done`
// pulses with the answer, between 1 and NUM+1 clocks after the request.
// The table contents, the sequential first-match scan, the rules and the
// RAM/ROM choice follow the document; field widths, the ROM parameters,
// the register map and the treatment of a node with no owner set are
// this design's.
module ndcp_addr_xlate
  import spw_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter bit          ROM       = 1'b0,
  parameter ndcp_entry_t ROM_TABLE [DEPTH] = '{default: '0},
  parameter int unsigned ROM_NUM   = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  reg_wr_t     reg_wr,
  input  logic [11:0] reg_raddr,
  output logic [31:0] reg_rdata,
  // lookup from the RMAP target
  input  logic        lk_req,
  input  logic [31:0] lk_addr,
  input  logic [7:0]  lk_nfields,    // fields accessed, at least 1
  input  logic [1:0]  lk_op,         // 0 read, 1 write, 2 CAS
  input  logic [7:0]  lk_src,        // initiator logical address
  output logic        lk_done,
  output logic        lk_grant,
  output logic        lk_rsv,
  output logic [31:0] lk_phys
);

  localparam int unsigned AW = $clog2(DEPTH);

  initial assert (DEPTH >= 2 && DEPTH <= 240) else $error("DEPTH must be 2..240 to fit the register window");
  initial assert (ROM_NUM <= DEPTH) else $error("ROM_NUM larger than DEPTH");

  typedef ndcp_entry_t entry_t;

  entry_t      tbl [DEPTH];
  logic [AW:0] num;
  logic [8:0]  owner;
  logic        busy;
  logic [AW:0] idx;
  entry_t      e;
  logic        hit;
  logic [8:0]  off, end_f, reg_end;

  // ---- register port
  wire         tbl_wr = reg_wr.wr && (reg_wr.addr[11:8] != 4'hF) && (32'(reg_wr.addr[11:4]) < DEPTH);
  wire [AW-1:0] wi    = AW'(reg_wr.addr[11:4]);

  if (ROM) begin : g_rom
    always_comb tbl = ROM_TABLE;
  end else begin : g_ram
    always_ff @(posedge clk) begin
      if (tbl_wr) begin
        unique case (reg_wr.addr[3:2])
          2'd0: {tbl[wi].app, tbl[wi].proto, tbl[wi].fset, tbl[wi].field_lo} <= reg_wr.wdata;
          2'd1: begin
                  tbl[wi].fs_len <= reg_wr.wdata[31:24];
                  {tbl[wi].ro_fl, tbl[wi].cas_fl, tbl[wi].rsv, tbl[wi].cas, tbl[wi].ro} <= reg_wr.wdata[4:0];
                end
          2'd2: tbl[wi].phys <= reg_wr.wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    entry_t  re;
    re        = tbl[AW'(reg_raddr[11:4])];
    reg_rdata = '0;
    if (reg_raddr[11:8] == 4'hF) begin
      unique case (reg_raddr[3:0])
        4'h0:    reg_rdata = 32'(num);
        4'h4:    reg_rdata = {23'd0, owner};
        default: reg_rdata = '0;
      endcase
    end else if (32'(reg_raddr[11:4]) < DEPTH) begin
      unique case (reg_raddr[3:2])
        2'd0:    reg_rdata = {re.app, re.proto, re.fset, re.field_lo};
        2'd1:    reg_rdata = {re.fs_len, 19'd0, re.ro_fl, re.cas_fl, re.rsv, re.cas, re.ro};
        2'd2:    reg_rdata = re.phys;
        default: reg_rdata = '0;
      endcase
    end
  end

  // ---- sequential scan
  assign e       = tbl[idx[AW-1:0]];
  assign off     = {1'b0, lk_addr[7:0]} - {1'b0, e.field_lo};
  assign reg_end = {1'b0, e.field_lo} + {1'b0, e.fs_len};          // one past the region
  assign end_f   = {1'b0, lk_addr[7:0]} + {1'b0, lk_nfields};      // one past the access
  assign hit     = (idx < num) && e.app == lk_addr[31:24] && e.proto == lk_addr[23:16]
                && e.fset == lk_addr[15:8] && lk_addr[7:0] >= e.field_lo
                && {1'b0, lk_addr[7:0]} < reg_end;

  function automatic logic allowed(input entry_t en, input logic [1:0] op, input logic beyond,
                                   input logic is_owner);
    unique case (op)
      2'd0:    return 1'b1;
      2'd1:    return is_owner && !en.ro && !en.cas && !(beyond && (en.cas_fl || en.ro_fl));
      2'd2:    return is_owner && !en.ro;
      default: return 1'b0;
    endcase
  endfunction

  wire is_owner = !owner[8] || (owner[7:0] == lk_src);
  wire beyond   = end_f > reg_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num      <= ROM ? (AW+1)'(ROM_NUM) : '0;
      owner    <= '0;
      busy     <= 1'b0;
      idx      <= '0;
      lk_done  <= 1'b0;
      lk_grant <= 1'b0;
      lk_rsv   <= 1'b0;
      lk_phys  <= '0;
    end else begin
      lk_done <= 1'b0;
      if (reg_wr.wr && reg_wr.addr == 12'hF00 && !ROM)
        num <= (reg_wr.wdata > 32'(DEPTH)) ? (AW+1)'(DEPTH) : reg_wr.wdata[AW:0];
      if (reg_wr.wr && reg_wr.addr == 12'hF04) owner <= reg_wr.wdata[8:0];
      if (!busy) begin
        if (lk_req) begin
          busy <= 1'b1;
          idx  <= '0;
        end
      end else if (hit) begin
        busy     <= 1'b0;
        lk_done  <= 1'b1;
        lk_grant <= allowed(e, lk_op, beyond, is_owner);
        lk_rsv   <= e.rsv;
        lk_phys  <= e.phys + {21'd0, off, 2'b00};
      end else if (idx >= num) begin
        busy     <= 1'b0;
        lk_done  <= 1'b1;
        lk_grant <= 1'b0;
        lk_rsv   <= 1'b0;
        lk_phys  <= '0;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

endmodule
