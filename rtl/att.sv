// att: Address Translation Table, the COSM ingress filter of one host link.
//
// Every memory request arriving from a host link is checked against up to
// NUM_RULES rules before it may enter the switch. All rules are compared in
// parallel (att_access_check); the lowest-numbered rule that hits wins, which
// is the same as checking them one after the other with earlier rules first.
// A default rule below the last one always hits, so every request gets a
// decision. An allowed request leaves on out_*, with its address translated
// if the winning rule asks for it; a rejected one is turned into an error
// response on rej_* (read data zero), so the host sees its transaction
// complete. This per-link table is how the write-and-read permission matrix
// of a host is enforced: giving the link of host n an allow-write rule for a
// region sets W = 1, R = 0 for that host and region.
//
// Writes that the rules allow are also checked by data_inspect (the second
// level of isolation: a field range check and a header format check). A
// write whose payload fails is rejected, or, in flag mode, let through and
// reported by a pulse on flag_event instead.
//
// Address translation: with xlat set, the offset addr[xsize_log2-1:0] is
// added to the rule's xbase. This relies on the restrictions the table places
// on translating rules (power-of-two slice, range start aligned to it);
// firewall-only rules may use any bounds.
//
// Programming port (cfg_*): a flit with is_write writes, otherwise reads, the
// 64-bit register at addr[10:3] (map in cosm_pkg); every programming request
// gets a response on cfg_rsp_* one clock later, read data in data[63:0]. A
// rule written takes effect for requests accepted from the next clock on.
// Each rejection pulses reject_event for one clock (the interrupt to the
// hosts) and increments a saturating counter; each flagged write pulses
// flag_event.
//
// From the document: rule count, inclusive range check, Enabled, Reverse,
// Reject, Rd, Wr, first-hit priority, default rule, translation restrictions,
// interrupts on ATT events, blocking or flagging data that fails inspection.
// This design's own choices: the register map,
// the parallel compare, the one-clock pipeline, error responses for rejected
// requests, the reject counter, and reset to all rules off with a default
// rule that rejects everything (air-gap until programmed).
//
// Timing: one request per clock; a decision appears on out_* or rej_* one
// clock after the request is accepted. in_ready is low while the register
// the request needs is full.
module att
  import cosm_pkg::*;
#(
  parameter int unsigned NUM_RULES = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  // requests from the host link
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  // allowed (possibly translated) requests towards the switch
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_flit,
  // error responses for rejected requests
  output logic  rej_valid,
  input  logic  rej_ready,
  output flit_t rej_flit,
  // programming port
  input  logic  cfg_valid,
  output logic  cfg_ready,
  input  flit_t cfg_flit,
  output logic  cfg_rsp_valid,
  input  logic  cfg_rsp_ready,
  output flit_t cfg_rsp_flit,
  // events
  output logic        reject_event,
  output logic        flag_event,
  output logic [31:0] reject_count
);

  att_rule_t            rules [NUM_RULES];
  rule_ctrl_t           dflt;
  logic                 insp_en, hdr_en, insp_flag;
  logic [8:0]           insp_lsb, hdr_lsb;
  logic [FIELD_W-1:0]   insp_lo, insp_hi, hdr_val, hdr_mask;
  logic [5:0]   cfg_rule;
  logic [1:0]   cfg_reg;
  logic         cfg_fire, cfg_wr, cfg_global, cfg_hdr, cfg_rule_ok;
  logic [63:0]  cfg_wdata, cfg_rdata;

  // ---------------------------------------------------------------- lookup
  logic [NUM_RULES-1:0] hit, allow;

  for (genvar r = 0; r < NUM_RULES; r++) begin : g_rule
    att_access_check u_chk (
      .rule    (rules[r]),
      .addr    (in_flit.addr),
      .is_write(in_flit.is_write),
      .hit     (hit[r]),
      .allow   (allow[r])
    );
  end

  logic              rule_allow, insp_pass, accept_req;
  logic              win_xlat;
  logic [5:0]        win_size;
  logic [ADDR_W-1:0] win_base, xaddr;

  always_comb begin
    // default rule: always hits
    rule_allow = !dflt.reject && (in_flit.is_write ? dflt.wr : dflt.rd);
    win_xlat   = 1'b0;
    win_size   = '0;
    win_base   = '0;
    for (int r = NUM_RULES - 1; r >= 0; r--) begin
      if (hit[r]) begin
        rule_allow = allow[r];
        win_xlat   = rules[r].ctrl.xlat;
        win_size   = rules[r].xsize_log2;
        win_base   = rules[r].xbase;
      end
    end
    xaddr = win_xlat
          ? win_base + (in_flit.addr & ((ADDR_W'(1) << win_size) - ADDR_W'(1)))
          : in_flit.addr;
    accept_req = rule_allow && (insp_pass || insp_flag);
  end

  data_inspect u_insp (
    .rng_en   (insp_en),
    .rng_lsb  (insp_lsb),
    .lo       (insp_lo),
    .hi       (insp_hi),
    .hdr_en   (hdr_en),
    .hdr_lsb  (hdr_lsb),
    .hdr_val  (hdr_val),
    .hdr_mask (hdr_mask),
    .is_write (in_flit.is_write),
    .data     (in_flit.data),
    .pass     (insp_pass)
  );

  // -------------------------------------------------------------- pipeline
  logic fire;

  assign in_ready = accept_req ? (!out_valid || out_ready) : (!rej_valid || rej_ready);
  assign fire     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      rej_valid <= 1'b0;
    end else begin
      if (fire && accept_req)  out_valid <= 1'b1;
      else if (out_ready)      out_valid <= 1'b0;
      if (fire && !accept_req) rej_valid <= 1'b1;
      else if (rej_ready)      rej_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (fire && accept_req) begin
      out_flit      <= in_flit;
      out_flit.addr <= xaddr;
    end
    if (fire && !accept_req) begin
      rej_flit      <= in_flit;
      rej_flit.err  <= 1'b1;
      rej_flit.data <= '0;
    end
  end

  // -------------------------------------------------- events and counting
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reject_event <= 1'b0;
      flag_event   <= 1'b0;
      reject_count <= '0;
    end else begin
      reject_event <= fire && !accept_req;
      flag_event   <= fire && rule_allow && !insp_pass && insp_flag;
      if (cfg_wr && cfg_global && cfg_reg == REG_REJCNT)
        reject_count <= '0;
      else if (fire && !accept_req && reject_count != '1)
        reject_count <= reject_count + 32'd1;
    end
  end

  // ------------------------------------------------------------ programming

  always_comb begin
    cfg_rule    = cfg_flit.addr[10:5];
    cfg_reg     = cfg_flit.addr[4:3];
    cfg_wdata   = cfg_flit.data[63:0];
    cfg_global  = (32'(cfg_rule) == CFG_GLOBAL);
    cfg_hdr     = (32'(cfg_rule) == CFG_HDR) && (cfg_reg == REG_HDR);
    cfg_rule_ok = (32'(cfg_rule) < NUM_RULES);
    cfg_ready   = !cfg_rsp_valid || cfg_rsp_ready;
    cfg_fire    = cfg_valid && cfg_ready;
    cfg_wr      = cfg_fire && cfg_flit.is_write;
  end

  always_comb begin
    cfg_rdata = '0;
    if (cfg_rule_ok) begin
      for (int r = 0; r < NUM_RULES; r++) begin
        if (32'(cfg_rule) == r) begin
          unique case (cfg_reg)
            REG_LO:    cfg_rdata = 64'(rules[r].lo);
            REG_HI:    cfg_rdata = 64'(rules[r].hi);
            REG_XBASE: cfg_rdata = 64'(rules[r].xbase);
            REG_CTRL:  cfg_rdata = {50'd0, rules[r].xsize_log2, 2'b00, rules[r].ctrl};
            default:   cfg_rdata = '0;
          endcase
        end
      end
    end else if (cfg_global) begin
      unique case (cfg_reg)
        REG_DEFAULT: cfg_rdata = {58'd0, dflt};
        REG_INSP:    cfg_rdata = {23'd0, hdr_lsb, 13'd0, insp_flag, hdr_en, insp_en, 7'd0, insp_lsb};
        REG_IRANGE:  cfg_rdata = {insp_hi, insp_lo};
        REG_REJCNT:  cfg_rdata = {32'd0, reject_count};
        default:     cfg_rdata = '0;
      endcase
    end else if (cfg_hdr) begin
      cfg_rdata = {hdr_mask, hdr_val};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_RULES; r++) rules[r] <= '0;
      dflt     <= '{reject: 1'b1, default: 1'b0};
      insp_en  <= 1'b0;
      insp_lsb <= '0;
      insp_lo  <= '0;
      insp_hi  <= '0;
      hdr_en   <= 1'b0;
      hdr_lsb  <= '0;
      hdr_val  <= '0;
      hdr_mask <= '0;
      insp_flag <= 1'b0;
    end else if (cfg_wr) begin
      if (cfg_rule_ok) begin
        for (int r = 0; r < NUM_RULES; r++) begin
          if (32'(cfg_rule) == r) begin
            unique case (cfg_reg)
              REG_LO:    rules[r].lo    <= cfg_wdata[ADDR_W-1:0];
              REG_HI:    rules[r].hi    <= cfg_wdata[ADDR_W-1:0];
              REG_XBASE: rules[r].xbase <= cfg_wdata[ADDR_W-1:0];
              REG_CTRL:  begin
                rules[r].ctrl       <= cfg_wdata[5:0];
                rules[r].xsize_log2 <= cfg_wdata[13:8];
              end
              default: ;
            endcase
          end
        end
      end else if (cfg_global) begin
        unique case (cfg_reg)
          REG_DEFAULT: dflt <= cfg_wdata[5:0];
          REG_INSP: begin
            insp_en   <= cfg_wdata[16];
            insp_lsb  <= cfg_wdata[8:0];
            hdr_en    <= cfg_wdata[17];
            insp_flag <= cfg_wdata[18];
            hdr_lsb   <= cfg_wdata[40:32];
          end
          REG_IRANGE: begin
            insp_lo <= cfg_wdata[31:0];
            insp_hi <= cfg_wdata[63:32];
          end
          default: ;
        endcase
      end else if (cfg_hdr) begin
        hdr_val  <= cfg_wdata[31:0];
        hdr_mask <= cfg_wdata[63:32];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_rsp_valid <= 1'b0;
    end else if (cfg_fire) begin
      cfg_rsp_valid <= 1'b1;
    end else if (cfg_rsp_ready) begin
      cfg_rsp_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_fire) begin
      cfg_rsp_flit      <= cfg_flit;
      cfg_rsp_flit.err  <= !(cfg_rule_ok || cfg_global || cfg_hdr);
      cfg_rsp_flit.data <= DATA_W'(cfg_rdata);
    end
  end

  // A decision register is never overwritten while it still holds a flit.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> out_valid && $stable(out_flit));

endmodule
