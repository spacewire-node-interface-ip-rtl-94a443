// Testbench for ndcp_addr_xlate. The table is loaded through the register
// port with the layout of the NDCP rules: a writable region followed by a
// CAS region, the CAS region followed by a read-only region, a reserved
// writable region, the whole field set as read-only last, and a second
// field set. Reads, writes, multi-field writes that cross into a CAS or
// read-only region, CAS operations, reserved fields, unknown addresses and
// ownership are checked against the expected grant, reserved flag and
// physical address, and each answer's latency against the position of the
// deciding entry (one entry per clock). A second instance holds the same
// table as a ROM (parameters); it must answer the same lookups the same
// way, read its table back, and ignore table and NUM writes.
module tb_ndcp_addr_xlate;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  reg_wr_t reg_wr = '0;
  logic [11:0] reg_raddr = 0;
  logic [31:0] reg_rdata;
  logic lk_req = 0;
  logic [31:0] lk_addr = 0;
  logic [7:0] lk_nfields = 1, lk_src = 0;
  logic [1:0] lk_op = 0;
  logic lk_done, lk_grant, lk_rsv;
  logic [31:0] lk_phys;
  logic        r_done, r_grant, r_rsv;
  logic [31:0] r_phys, r_rdata;
  bit          use_rom = 0;
  int checks = 0, failures = 0;

  ndcp_addr_xlate #(.DEPTH(16)) dut (
    .clk, .rst_n, .reg_wr, .reg_raddr, .reg_rdata, .lk_req, .lk_addr, .lk_nfields, .lk_op, .lk_src,
    .lk_done, .lk_grant, .lk_rsv, .lk_phys);

  // the same six regions as loaded into the RAM table below
  function automatic ndcp_entry_t ent(input logic [7:0] fs, input logic [7:0] lo, input logic [7:0] len,
                                      input logic [4:0] fl, input logic [31:0] ph);
    ndcp_entry_t x;
    x = '{app: 8'd1, proto: 8'd2, fset: fs, field_lo: lo, fs_len: len,
          ro_fl: fl[4], cas_fl: fl[3], rsv: fl[2], cas: fl[1], ro: fl[0], phys: ph};
    return x;
  endfunction
  localparam ndcp_entry_t ROMT [8] = '{
    ent(8'd3, 8'd0, 8'd4,  5'b01000, 32'h8000), ent(8'd3, 8'd4, 8'd2,  5'b10010, 32'h8010),
    ent(8'd3, 8'd6, 8'd2,  5'b00001, 32'h8018), ent(8'd3, 8'd8, 8'd2,  5'b00100, 32'h8020),
    ent(8'd3, 8'd0, 8'd16, 5'b00001, 32'h8000), ent(8'd4, 8'd0, 8'd4,  5'b00000, 32'h9000),
    '0, '0};

  ndcp_addr_xlate #(.DEPTH(8), .ROM(1'b1), .ROM_TABLE(ROMT), .ROM_NUM(6)) u_rom (
    .clk, .rst_n, .reg_wr, .reg_raddr, .reg_rdata(r_rdata), .lk_req, .lk_addr, .lk_nfields, .lk_op, .lk_src,
    .lk_done(r_done), .lk_grant(r_grant), .lk_rsv(r_rsv), .lk_phys(r_phys));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr.wr = 1; reg_wr.addr = a; reg_wr.wdata = d;
    @(posedge clk); #1 reg_wr.wr = 0;
  endtask

  // flags: {ro_fl, cas_fl, rsv, cas, ro}
  task automatic entry(input int i, input logic [7:0] fs, input logic [7:0] lo, input logic [7:0] len,
                       input logic [4:0] fl, input logic [31:0] ph);
    wr(12'(16*i),     {8'd1, 8'd2, fs, lo});
    wr(12'(16*i + 4), {len, 19'd0, fl});
    wr(12'(16*i + 8), ph);
  endtask

  task automatic look(input logic [7:0] fs, input logic [7:0] f, input int n, input int op, input logic [7:0] src,
                      input bit eg, input bit ersv, input logic [31:0] ephys, input int elat, input string what);
    int lat;
    logic d, g, r;
    logic [31:0] ph;
    @(negedge clk);
    lk_addr = {8'd1, 8'd2, fs, f}; lk_nfields = 8'(n); lk_op = 2'(op); lk_src = src; lk_req = 1;
    @(negedge clk); lk_req = 0;
    lat = 1;
    forever begin
      {d, g, r, ph} = use_rom ? {r_done, r_grant, r_rsv, r_phys} : {lk_done, lk_grant, lk_rsv, lk_phys};
      if (d) break;
      @(negedge clk); lat++;
    end
    if (use_rom) what = {"ROM: ", what};
    check(g == eg, $sformatf("%s: grant %0d", what, g));
    if (eg) begin
      check(r == ersv, $sformatf("%s: reserved %0d", what, r));
      check(ph == ephys, $sformatf("%s: phys %h expected %h", what, ph, ephys));
    end
    if (elat >= 0) check(lat == elat, $sformatf("%s: latency %0d expected %0d", what, lat, elat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    entry(0, 8'd3, 8'd0, 8'd4, 5'b01000, 32'h8000);   // writable, followed by CAS
    entry(1, 8'd3, 8'd4, 8'd2, 5'b10010, 32'h8010);   // CAS, followed by RO
    entry(2, 8'd3, 8'd6, 8'd2, 5'b00001, 32'h8018);   // read-only
    entry(3, 8'd3, 8'd8, 8'd2, 5'b00100, 32'h8020);   // reserved, writable
    entry(4, 8'd3, 8'd0, 8'd16, 5'b00001, 32'h8000);  // whole field set, read-only
    entry(5, 8'd4, 8'd0, 8'd4, 5'b00000, 32'h9000);   // other field set
    wr(12'hF00, 6);
    reg_raddr = 12'h014; #1 check(reg_rdata == {8'd2, 19'd0, 5'b10010}, "entry 1 word 1 read back");
    reg_raddr = 12'hF00; #1 check(reg_rdata == 6, "NUM read back");
    run_looks();
    // the ROM instance: same answers, writes to the table and NUM ignored
    use_rom = 1;
    wr(12'hF04, 32'h000);
    wr(12'h010, 32'hFFFF_FFFF);
    wr(12'hF00, 1);
    reg_raddr = 12'h014; #1 check(r_rdata == {8'd2, 19'd0, 5'b10010}, "ROM entry 1 word 1 read back");
    reg_raddr = 12'h010; #1 check(r_rdata == {8'd1, 8'd2, 8'd3, 8'd4}, "ROM entry ignores writes");
    reg_raddr = 12'hF00; #1 check(r_rdata == 6, "ROM NUM ignores writes");
    run_looks();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_looks;
    //   fs    f   n op src   grant rsv phys        latency
    look(3, 0,  1, 0, 0, 1, 0, 32'h8000, 2, "read first field");
    look(3, 2,  1, 0, 0, 1, 0, 32'h8008, 2, "read field 2");
    look(3, 1,  2, 1, 0, 1, 0, 32'h8004, 2, "write inside region");
    look(3, 3,  2, 1, 0, 0, 0, 0, 2,        "write crossing into CAS region");
    look(3, 4,  1, 1, 0, 0, 0, 0, 3,        "write to CAS region");
    look(3, 5,  1, 2, 0, 1, 0, 32'h8014, 3, "CAS in CAS region");
    look(3, 5,  2, 1, 0, 0, 0, 0, 3,        "write to CAS region crossing");
    look(3, 6,  1, 2, 0, 0, 0, 0, 4,        "CAS to read-only");
    look(3, 7,  1, 1, 0, 0, 0, 0, 4,        "write to read-only");
    look(3, 8,  1, 1, 0, 1, 1, 32'h8020, 5, "write reserved field");
    look(3, 9,  1, 0, 0, 1, 1, 32'h8024, 5, "read reserved field");
    look(3, 12, 1, 0, 0, 1, 0, 32'h8030, 6, "read undefined field of field set");
    look(3, 12, 1, 1, 0, 0, 0, 0, 6,        "write undefined field");
    look(3, 2,  5, 0, 0, 1, 0, 32'h8008, 2, "multi-field read across regions");
    look(4, 2,  5, 1, 0, 1, 0, 32'h9008, 7, "write past a region with nothing following");
    look(9, 0,  1, 0, 0, 0, 0, 0, 8,        "unknown field set");
    wr(12'hF04, 32'h142);                              // owner 0x42
    look(3, 1,  1, 1, 8'h41, 0, 0, 0, 2,        "write from non-owner");
    look(3, 5,  1, 2, 8'h41, 0, 0, 0, 3,        "CAS from non-owner");
    look(3, 1,  1, 1, 8'h42, 1, 0, 32'h8004, 2, "write from owner");
    look(3, 1,  1, 0, 8'h41, 1, 0, 32'h8004, 2, "read from non-owner");
  endtask
endmodule
