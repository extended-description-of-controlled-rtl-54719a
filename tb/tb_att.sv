// tb_att: self-checking test of the Address Translation Table filter.
//
// Keeps its own copy of every rule it programs and decides each request
// independently of the design: rules are scanned from rule 0 upwards and the
// first enabled rule whose (possibly reversed) inclusive range holds the
// address decides; otherwise the default rule does. Checked:
//  - reset state: everything rejected (air gap), error response, reject
//    event pulse and counter;
//  - programming: registers read back what was written, the counter clears;
//  - the permission matrix cases for one region: [W R] = [0 0], [1 0],
//    [0 1], [1 1], forward and reverse diode, and rule priority;
//  - random rule sets (random bounds, kinds, Reverse, Enabled, translation)
//    against random requests under random back-pressure, with translated
//    addresses and data inspection of writes (range and header checks,
//    blocking or, in flag mode, letting the write through with a flag
//    event);
//  - timing: a decision appears exactly one clock after the request is
//    accepted, and one request is accepted per clock when nothing stalls.
module tb_att;
  import cosm_pkg::*;

  localparam int NR = 32;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, out_valid, out_ready, rej_valid, rej_ready;
  flit_t       in_flit, out_flit, rej_flit;
  logic        cfg_valid, cfg_ready, cfg_rsp_valid, cfg_rsp_ready;
  flit_t       cfg_flit, cfg_rsp_flit;
  logic        reject_event, flag_event;
  logic [31:0] reject_count;

  att dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  // model state
  att_rule_t        m_rule [NR];
  rule_ctrl_t       m_dflt;
  logic             m_insp_en;
  logic [8:0]       m_insp_lsb;
  logic [31:0]      m_lo, m_hi;
  logic             m_hdr_en, m_flag;
  logic [8:0]       m_hdr_lsb;
  logic [31:0]      m_hdr_val, m_hdr_mask;
  int unsigned      m_flags = 0;
  int unsigned      flags = 0;
  int unsigned      m_rejects = 0;
  int unsigned      events = 0;

  typedef struct { logic [ADDR_W-1:0] addr; logic [TAG_W-1:0] tag; logic w; int unsigned t; } exp_t;
  exp_t exp_out [$];
  exp_t exp_rej [$];

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  function automatic logic model_allow(flit_t f, output logic [ADDR_W-1:0] a, output logic flagged);
    logic allow;
    logic [ADDR_W-1:0] field;
    allow = !m_dflt.reject && (f.is_write ? m_dflt.wr : m_dflt.rd);
    a = f.addr;
    flagged = 1'b0;
    for (int r = 0; r < NR; r++) begin
      logic inr;
      inr = (f.addr >= m_rule[r].lo) && (f.addr <= m_rule[r].hi);
      if (m_rule[r].ctrl.enabled && (inr != m_rule[r].ctrl.reverse)) begin
        allow = !m_rule[r].ctrl.reject && (f.is_write ? m_rule[r].ctrl.wr : m_rule[r].ctrl.rd);
        if (m_rule[r].ctrl.xlat)
          a = m_rule[r].xbase + (f.addr % (ADDR_W'(1) << m_rule[r].xsize_log2));
        break;
      end
    end
    if (allow && f.is_write) begin
      logic [31:0] v, h;
      logic ok;
      for (int b = 0; b < 32; b++) begin
        v[b] = (32'(m_insp_lsb) + b < DATA_W) ? f.data[32'(m_insp_lsb) + b] : 1'b0;
        h[b] = (32'(m_hdr_lsb) + b < DATA_W) ? f.data[32'(m_hdr_lsb) + b] : 1'b0;
      end
      ok = 1'b1;
      if (m_insp_en && (v < m_lo || v > m_hi)) ok = 1'b0;
      if (m_hdr_en && ((h & m_hdr_mask) != (m_hdr_val & m_hdr_mask))) ok = 1'b0;
      if (!ok) begin
        if (m_flag) flagged = 1'b1;
        else        allow = 1'b0;
      end
    end
    return allow;
  endfunction

  // -------------------------------------------------------- scoreboard
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (reject_event) events++;
    if (flag_event) flags++;
    if (in_valid && in_ready) begin
      exp_t e;
      logic [ADDR_W-1:0] a;
      logic fl;
      e.tag = in_flit.tag; e.w = in_flit.is_write; e.t = cyc;
      if (model_allow(in_flit, a, fl)) begin e.addr = a; exp_out.push_back(e); if (fl) m_flags++; end
      else begin e.addr = in_flit.addr; exp_rej.push_back(e); m_rejects++; end
    end
    if (out_valid && out_ready) begin
      checks++;
      if (exp_out.size() == 0) fail("request passed that should have been rejected");
      else begin
        exp_t e;
        e = exp_out.pop_front();
        if (out_flit.addr !== e.addr || out_flit.tag !== e.tag || out_flit.err)
          fail($sformatf("allowed request: addr %h tag %0d, expected %h tag %0d", out_flit.addr, out_flit.tag, e.addr, e.tag));
      end
    end
    if (rej_valid && rej_ready) begin
      checks++;
      if (exp_rej.size() == 0) fail("request rejected that should have passed");
      else begin
        exp_t e;
        e = exp_rej.pop_front();
        if (rej_flit.tag !== e.tag || !rej_flit.err || rej_flit.data != '0 || rej_flit.is_write !== e.w)
          fail($sformatf("bad reject response tag %0d/%0d err %b w %b/%b", rej_flit.tag, e.tag, rej_flit.err, rej_flit.is_write, e.w));
      end
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic cfg_access(input logic w, input int rule, input logic [1:0] rg,
                            input logic [63:0] wd, output logic [63:0] rd);
    cfg_flit          <= '0;
    cfg_flit.is_write <= w;
    cfg_flit.addr     <= ADDR_W'({rule[5:0], rg, 3'b000});
    cfg_flit.data     <= DATA_W'(wd);
    cfg_valid         <= 1'b1;
    @(posedge clk);
    while (!cfg_ready) @(posedge clk);
    cfg_valid <= 1'b0;
    while (!(cfg_rsp_valid && cfg_rsp_ready)) @(posedge clk);
    rd = cfg_rsp_flit.data[63:0];
  endtask

  task automatic set_rule(int r, att_rule_t ru);
    logic [63:0] d;
    cfg_access(1, r, REG_LO, 64'(ru.lo), d);
    cfg_access(1, r, REG_HI, 64'(ru.hi), d);
    cfg_access(1, r, REG_XBASE, 64'(ru.xbase), d);
    cfg_access(1, r, REG_CTRL, {50'd0, ru.xsize_log2, 2'b00, ru.ctrl}, d);
    m_rule[r] = ru;
  endtask

  task automatic set_default(rule_ctrl_t c);
    logic [63:0] d;
    cfg_access(1, CFG_GLOBAL, REG_DEFAULT, 64'(c), d);
    m_dflt = c;
  endtask

  task automatic clear_rules();
    for (int r = 0; r < NR; r++) if (m_rule[r].ctrl != '0) set_rule(r, '0);
  endtask

  task automatic drain();
    in_valid <= 1'b0;
    out_ready <= 1'b1;
    rej_ready <= 1'b1;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_out.size() != 0 || exp_rej.size() != 0) fail("responses missing");
  endtask

  // sends one request and waits until it is accepted
  task automatic send(logic w, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d, logic [TAG_W-1:0] tag);
    in_flit          <= '0;
    in_flit.is_write <= w;
    in_flit.addr     <= a;
    in_flit.data     <= d;
    in_flit.tag      <= tag;
    in_valid         <= 1'b1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    in_valid <= 1'b0;
  endtask

  // expects a single request to be allowed (1) or rejected (0)
  task automatic probe(logic w, logic [ADDR_W-1:0] a, logic exp_allow, string what);
    int unsigned t0;
    send(w, a, '0, 8'h5A);
    t0 = cyc;
    #1;
    // the decision is registered: visible at the clock after acceptance
    checks++;
    if ((out_valid !== exp_allow) || (rej_valid !== !exp_allow))
      fail($sformatf("%s: %s at %h gave out=%b rej=%b", what, w ? "write" : "read", a, out_valid, rej_valid));
    @(posedge clk);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] rd;
    int unsigned ev0, t_start, n_acc;
    in_valid = 0; in_flit = '0; out_ready = 1; rej_ready = 1;
    cfg_valid = 0; cfg_flit = '0; cfg_rsp_ready = 1;
    for (int r = 0; r < NR; r++) m_rule[r] = '0;
    m_dflt = '{reject: 1'b1, default: 1'b0};
    m_insp_en = 0; m_insp_lsb = 0; m_lo = 0; m_hi = 0;
    m_hdr_en = 0; m_flag = 0; m_hdr_lsb = 0; m_hdr_val = 0; m_hdr_mask = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // ---- reset state: air gap
    ev0 = events;
    probe(0, 52'h80_8000_0000, 0, "reset read");
    probe(1, 52'h80_8000_0040, 0, "reset write");
    repeat (2) @(posedge clk);
    checks += 2;
    if (reject_count != 2) fail($sformatf("reject count %0d after 2 rejects", reject_count));
    if (events - ev0 != 2) fail("reject events not pulsed");
    cfg_access(0, CFG_GLOBAL, REG_REJCNT, 0, rd);
    checks++; if (rd != 2) fail("reject count read back");
    cfg_access(1, CFG_GLOBAL, REG_REJCNT, 0, rd);
    @(posedge clk);
    checks++; if (reject_count != 0) fail("reject count not cleared");

    // ---- register read back
    begin
      att_rule_t ru;
      ru.lo = 52'h123_4567_89AB; ru.hi = 52'hF_FFFF_FFFF_FFFF; ru.xbase = 52'hA_BCDE_F012_3456;
      ru.xsize_log2 = 6'd33; ru.ctrl = 6'b101011;
      set_rule(7, ru);
      cfg_access(0, 7, REG_LO, 0, rd);    checks++; if (rd != 64'(ru.lo)) fail("LO read back");
      cfg_access(0, 7, REG_HI, 0, rd);    checks++; if (rd != 64'(ru.hi)) fail("HI read back");
      cfg_access(0, 7, REG_XBASE, 0, rd); checks++; if (rd != 64'(ru.xbase)) fail("XBASE read back");
      cfg_access(0, 7, REG_CTRL, 0, rd);  checks++; if (rd != {50'd0, ru.xsize_log2, 2'b00, ru.ctrl}) fail("CTRL read back");
      set_rule(7, '0);
    end

    // ---- permission vector [W R] of one host for region [0x1000, 0x1FFF]
    set_default(rule_ctrl(REJECT_ALL));
    for (int p = 0; p < 4; p++) begin
      att_rule_t ru;
      logic wp, rp;
      wp = p[1]; rp = p[0];
      ru = '0; ru.lo = 52'h1000; ru.hi = 52'h1FFF;
      ru.ctrl = (wp && rp) ? rule_ctrl(ALLOW_ALL) : wp ? rule_ctrl(ALLOW_WRITE)
              : rp ? rule_ctrl(ALLOW_READ) : rule_ctrl(REJECT_ALL);
      set_rule(0, ru);
      probe(1, 52'h1000, wp, $sformatf("[%b %b] write", wp, rp));
      probe(0, 52'h1FFF, rp, $sformatf("[%b %b] read", wp, rp));
      probe(0, 52'h2000, 0, "outside region (default)");
    end
    // priority: an earlier reject-write rule shadows a later allow-all rule
    begin
      att_rule_t ru;
      ru = '0; ru.lo = 52'h1800; ru.hi = 52'h18FF; ru.ctrl = rule_ctrl(REJECT_WRITE);
      set_rule(0, ru);
      ru = '0; ru.lo = 52'h1000; ru.hi = 52'h1FFF; ru.ctrl = rule_ctrl(ALLOW_ALL);
      set_rule(1, ru);
      probe(1, 52'h1880, 0, "shadowed write");
      probe(0, 52'h1880, 1, "shadowed read");
      probe(1, 52'h1000, 1, "write below the shadow");
      // Reverse: everything outside [0x1800,0x18FF] rejected
      ru = '0; ru.lo = 52'h1800; ru.hi = 52'h18FF; ru.ctrl = rule_ctrl(REJECT_ALL); ru.ctrl.reverse = 1;
      set_rule(0, ru);
      probe(0, 52'h1000, 0, "reversed rule outside range");
      probe(0, 52'h1800, 1, "reversed rule inside range falls to rule 1");
    end
    drain();
    clear_rules();

    // ---- random rule sets and traffic
    for (int set = 0; set < 12; set++) begin
      logic [63:0] d;
      for (int r = 0; r < NR; r++) begin
        att_rule_t ru;
        ru = '0;
        ru.lo = ADDR_W'($urandom_range(0, 255)) << 12;
        ru.hi = ru.lo + (ADDR_W'($urandom_range(1, 64)) << 12) - 1;
        ru.ctrl = rule_ctrl(rule_kind_e'($urandom_range(0, 5)));
        ru.ctrl.enabled = ($urandom_range(0, 5) != 0);
        ru.ctrl.reverse = ($urandom_range(0, 9) == 0);
        if ($urandom_range(0, 2) == 0) begin
          // translating rule: power-of-two slice, start aligned to it
          ru.xsize_log2 = 6'($urandom_range(12, 16));
          ru.lo = (ADDR_W'($urandom_range(0, 15)) << 16);
          ru.hi = ru.lo + (ADDR_W'(1) << ru.xsize_log2) - 1;
          ru.xbase = ADDR_W'({$urandom(), $urandom()});
          ru.ctrl.xlat = 1'b1;
        end
        set_rule(r, ru);
      end
      set_default(rule_ctrl(rule_kind_e'($urandom_range(0, 5))));
      m_insp_en  = (set % 3 == 2);
      m_insp_lsb = 9'($urandom_range(0, 480));
      m_lo = 32'h4000_0000; m_hi = 32'hBFFF_FFFF;
      m_hdr_en   = (set % 4 == 1) || (set % 4 == 3);
      m_hdr_lsb  = 9'($urandom_range(0, 480));
      m_hdr_val  = $urandom();
      m_hdr_mask = $urandom() & $urandom() & $urandom();
      m_flag     = (set >= 8);
      cfg_access(1, CFG_GLOBAL, REG_INSP,
                 {23'd0, m_hdr_lsb, 13'd0, m_flag, m_hdr_en, m_insp_en, 7'd0, m_insp_lsb}, d);
      cfg_access(1, CFG_GLOBAL, REG_IRANGE, {m_hi, m_lo}, d);
      cfg_access(1, CFG_HDR, REG_HDR, {m_hdr_mask, m_hdr_val}, d);
      cfg_access(0, CFG_GLOBAL, REG_INSP, 0, d);
      checks++;
      if (d != {23'd0, m_hdr_lsb, 13'd0, m_flag, m_hdr_en, m_insp_en, 7'd0, m_insp_lsb}) fail("inspection control read back");
      cfg_access(0, CFG_HDR, REG_HDR, 0, d);
      checks++;
      if (d != {m_hdr_mask, m_hdr_val}) fail("header pattern read back");

      for (int n = 0; n < 600; n++) begin
        if (!in_valid || in_ready) begin
          logic [DATA_W-1:0] dd;
          for (int w = 0; w < DATA_W / 32; w++) dd[w*32 +: 32] = $urandom();
          in_flit          <= '0;
          in_flit.is_write <= 1'($urandom());
          in_flit.addr     <= (ADDR_W'($urandom_range(0, 1 << 20))) & ~ADDR_W'(63);
          in_flit.data     <= dd;
          in_flit.tag      <= TAG_W'(n);
          in_valid         <= ($urandom_range(0, 3) != 0);
        end
        out_ready <= ($urandom_range(0, 3) != 0);
        rej_ready <= ($urandom_range(0, 3) != 0);
        @(posedge clk);
      end
      drain();
    end

    // ---- throughput: one request per clock with no stalls
    clear_rules();
    set_default(rule_ctrl(ALLOW_ALL));
    m_insp_en = 0; m_hdr_en = 0; m_flag = 0;
    begin
      logic [63:0] d;
      cfg_access(1, CFG_GLOBAL, REG_INSP, 64'd0, d);
    end
    in_valid <= 1'b1;
    in_flit <= '0;
    n_acc = 0;
    @(posedge clk);
    t_start = cyc;
    for (int n = 0; n < 100; n++) begin
      if (in_ready) n_acc++;
      in_flit.tag <= TAG_W'(n);
      @(posedge clk);
    end
    checks++;
    if (n_acc != 100) fail($sformatf("accepted %0d requests in 100 clocks", n_acc));
    drain();

    $display("rejected %0d requests, %0d reject events, %0d writes flagged", m_rejects, events, m_flags);
    checks++;
    if (events != m_rejects) fail("reject events differ from rejections");
    checks++;
    if (flags != m_flags || m_flags == 0) fail($sformatf("%0d flag events for %0d flagged writes", flags, m_flags));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
