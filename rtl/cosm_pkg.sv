// cosm_pkg: types and constants shared by the COSM (Controlled Shared Memory)
// ESMD datapath.
//
// Every request and response in the device travels as one flit_t: a single
// 64-byte transfer (one CXL.mem transaction, one cache line), the source
// switch port that issued it, a host tag returned unchanged, and an error
// flag that marks rejected transactions on the way back. Address width (52
// bits) is the hosts' physical address size; the 64-byte data width is the
// CXL transaction size. Rule control bits follow the Address Translation
// Table (ATT) description: Enabled, Reverse, Reject, Rd, Wr; the translate
// enable and slice size fields, the tag width and the register map are this
// design's own choices.
package cosm_pkg;

  parameter int unsigned ADDR_W    = 52;   // host physical address bits
  parameter int unsigned DATA_W    = 512;  // one 64 B transaction
  parameter int unsigned TAG_W     = 8;    // host transaction tag
  parameter int unsigned PORT_W    = 4;    // switch port number (0..15)
  parameter int unsigned FIELD_W   = 32;   // width of the inspected data field

  // One transfer through the device, request or response.
  typedef struct packed {
    logic [PORT_W-1:0] src;       // switch input port that issued the request
    logic              is_write;  // 1 = write, 0 = read
    logic              err;       // response only: request was rejected
    logic [TAG_W-1:0]  tag;       // returned unchanged in the response
    logic [ADDR_W-1:0] addr;      // byte address
    logic [DATA_W-1:0] data;      // write data / read data
  } flit_t;

  // Control bits of one ATT rule.
  typedef struct packed {
    logic xlat;     // translate addresses that hit this rule
    logic wr;       // allow writes
    logic rd;       // allow reads
    logic reject;   // reject everything, whatever rd/wr say
    logic reverse;  // invert the range comparison
    logic enabled;  // rule takes part in matching
  } rule_ctrl_t;

  // One ATT rule.
  typedef struct packed {
    logic [ADDR_W-1:0] lo;          // Compare Low (inclusive)
    logic [ADDR_W-1:0] hi;          // Compare High (inclusive)
    logic [ADDR_W-1:0] xbase;       // translation destination base
    logic [5:0]        xsize_log2;  // translated slice: offset = addr[xsize_log2-1:0]
    rule_ctrl_t        ctrl;
  } att_rule_t;

  // The six rule kinds an ATT rule can express.
  typedef enum logic [2:0] {
    REJECT_ALL   = 3'd0,
    REJECT_READ  = 3'd1,
    REJECT_WRITE = 3'd2,
    ALLOW_ALL    = 3'd3,
    ALLOW_READ   = 3'd4,
    ALLOW_WRITE  = 3'd5
  } rule_kind_e;

  // Control bits of an enabled, non-reversed, non-translating rule of a kind.
  function automatic rule_ctrl_t rule_ctrl(rule_kind_e kind);
    rule_ctrl_t c;
    c = '0;
    c.enabled = 1'b1;
    unique case (kind)
      REJECT_ALL:   c.reject = 1'b1;
      REJECT_READ:  c.wr = 1'b1;
      REJECT_WRITE: c.rd = 1'b1;
      ALLOW_ALL:    begin c.rd = 1'b1; c.wr = 1'b1; end
      ALLOW_READ:   c.rd = 1'b1;
      ALLOW_WRITE:  c.wr = 1'b1;
      default:      c.reject = 1'b1;
    endcase
    return c;
  endfunction

  // ATT register map: 64-bit registers, byte address = {index, 3'b000}.
  // index[7:2] selects the rule (0..NUM_RULES-1), the global block (32) or
  // the header-check block (33), index[1:0] the register within it.
  localparam int unsigned CFG_GLOBAL  = 32;
  localparam int unsigned CFG_HDR     = 33;
  localparam logic [1:0]  REG_LO      = 2'd0;  // rule: Compare Low
  localparam logic [1:0]  REG_HI      = 2'd1;  // rule: Compare High
  localparam logic [1:0]  REG_XBASE   = 2'd2;  // rule: translation base
  localparam logic [1:0]  REG_CTRL    = 2'd3;  // rule: {xsize_log2[13:8], ctrl[5:0]}
  localparam logic [1:0]  REG_DEFAULT = 2'd0;  // global: default rule ctrl[5:0]
  localparam logic [1:0]  REG_INSP    = 2'd1;  // global: {hdr_lsb[40:32], flag[18],
                                               //  hdr_en[17], rng_en[16], rng_lsb[8:0]}
  localparam logic [1:0]  REG_IRANGE  = 2'd2;  // global: {hi[63:32], lo[31:0]}
  localparam logic [1:0]  REG_REJCNT  = 2'd3;  // global: reject count, write clears
  localparam logic [1:0]  REG_HDR     = 2'd0;  // header block: {mask[63:32], value[31:0]}

endpackage
