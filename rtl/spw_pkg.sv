// Shared types and constants of the SpaceWire node.
//
// SpaceWire characters travel inside the node on the common 9-bit codec
// FIFO format: bit 8 set marks a control character, and with it data 0x00
// is an end of packet (EOP) and 0x01 an error end of packet (EEP). Every
// character stream uses a valid/ready handshake: a character moves on a
// clock edge where both are high.
//
// DMA clients reach system memory through one AHB master with the dma_req_t
// and dma_rsp_t bundle: a client raises req with the other fields stable and
// keeps them until it sees a one-cycle ack, which also carries the read data.
// Addresses are byte addresses, data is big-endian (byte 0 of a word is in
// bits 31:24), as on a LEON system bus. The protocol identifiers are those of
// the SpaceWire protocol-identification standard; the NDCP and TDP values are
// this design's defaults and are parameters where they are used.
package spw_pkg;

  typedef logic [8:0] spw_char_t;

  localparam spw_char_t SPW_EOP = 9'h100;
  localparam spw_char_t SPW_EEP = 9'h101;

  localparam logic [7:0] PID_RMAP = 8'd1;
  localparam logic [7:0] PID_CPTP = 8'd2;

  // transfer size, as AHB HSIZE
  typedef enum logic [1:0] {
    DMA_BYTE = 2'd0,
    DMA_HALF = 2'd1,
    DMA_WORD = 2'd2
  } dma_size_e;

  typedef struct packed {
    logic        req;    // transfer wanted
    logic        we;     // 1 write, 0 read
    dma_size_e   size;
    logic [31:0] addr;
    logic [31:0] wdata;  // right-aligned for byte and halfword writes
    logic        lock;   // locked (atomic) sequence, HMASTLOCK
  } dma_req_t;

  typedef struct packed {
    logic        ack;    // one-cycle pulse: transfer done
    logic        err;    // AHB ERROR response seen
    logic [31:0] rdata;  // right-aligned for byte and halfword reads
  } dma_rsp_t;

  // check inserted or verified on a CPTP packet
  typedef enum logic [1:0] {
    CHK_NONE = 2'd0,
    CHK_CRC  = 2'd1,
    CHK_PEC  = 2'd2
  } chk_e;

  // how a transmitted packet ends
  typedef enum logic [1:0] {
    TERM_EOP  = 2'd0,
    TERM_EEP  = 2'd1,
    TERM_NONE = 2'd2
  } term_e;

  // control word, first word of a Tx header in memory
  typedef struct packed {
    logic        irq_en;    // 31
    term_e       term;      // 30:29
    logic        cptp;      // 28
    chk_e        chk;       // 27:26
    logic [1:0]  rsv;       // 25:24
    logic [6:0]  hdr_len;   // 23:17 header NCHARs, outside the check
    logic [16:0] pay_len;   // 16:0  payload bytes in memory (up to 64K)
  } tx_ctrl_t;

  // status word, first word of an Rx header written to memory
  typedef struct packed {
    logic        eep;       // 31 packet ended with EEP
    logic        cptp;      // 30 CPTP packet (PID 2)
    logic        no_pay;    // 29 no payload
    logic        len_err;   // 28 CCSDS length field mismatch
    logic        sec_hdr;   // 27 CCSDS secondary header flag
    logic        trunc;     // 26 packet truncated
    logic        chk_err;   // 25 CRC/PEC error
    logic        rsv;       // 24
    logic [6:0]  hdr_len;   // 23:17 header NCHARs stored
    logic [16:0] pay_len;   // 16:0  payload bytes stored (up to 64K)
  } rx_stat_t;

  // NDCP address translation table entry (see ndcp_addr_xlate)
  typedef struct packed {
    logic [7:0]  app;       // application index
    logic [7:0]  proto;     // protocol index
    logic [7:0]  fset;      // field-set identifier
    logic [7:0]  field_lo;  // lowest field identifier of the region
    logic [7:0]  fs_len;    // fields in the region
    logic        ro_fl;     // followed by a read-only region
    logic        cas_fl;    // followed by a CAS region
    logic        rsv;       // reserved fields
    logic        cas;       // CAS-modifiable
    logic        ro;        // read-only
    logic [31:0] phys;      // physical address of field_lo
  } ndcp_entry_t;

  // register bus used inside the node (decoded from APB at the top)
  typedef struct packed {
    logic        wr;
    logic [11:0] addr;      // byte address within the block
    logic [31:0] wdata;
  } reg_wr_t;

endpackage
