// tb_cosm_esmd_top: end-to-end test of the ESMD datapath with COSM
// isolation, at the design's default parameters (32 rules per ATT).
//
// Two host models (host_agent) sit on the host links, two behavioural DDR
// channels (ddr_channel_model) behind the memory ports, and a simple driver
// on expansion link 0. Host 1 of the description is host 0 here, host 2 is
// host 1. The test walks through:
//  1. reset: both hosts air-gapped, requests answered with errors, interrupts;
//  2. programming through the switch, with read-back;
//  3. idle latency of a read, a write and a rejected request;
//  4. the permission patterns of a shared region pair: forward diode, reverse
//     diode, bidirectional, and switching a region to air gap at run time;
//  5. address translation and write-data inspection (range check, flag
//     mode, header check);
//  6. an expansion-link access;
//  7. the load experiments: host 0 runs read/write mixes while host 1 loads
//     the device with 0 %, 100 % reads, 100 % writes or 50/50 under each of
//     its four permission vectors [W R]. Traffic the permissions forbid must
//     never reach memory and must change neither host 0's throughput nor
//     its read latency; permitted traffic must lower the first and, on
//     average over the runs, raise the second.
// Every mechanism it relies on is counted and must have happened at least
// once.
module tb_cosm_esmd_top;
  import cosm_pkg::*;

  localparam int unsigned MEM_LAT = 10;
  localparam logic [ADDR_W-1:0] ESMD_BASE = 52'h80_8000_0000;   // where hosts map the device
  localparam logic [ADDR_W-1:0] ESMD_SIZE = 52'h8_0000_0000;    // 32 GB
  localparam logic [ADDR_W-1:0] HALF      = 52'h4_0000_0000;    // 16 GB

  logic        clk = 0, rst_n = 0;
  logic [1:0]  h_req_valid, h_req_ready, h_rd_rsp_valid, h_rd_rsp_ready;
  logic [1:0]  h_wr_rsp_valid, h_wr_rsp_ready, h_cfg_valid, h_cfg_ready;
  logic [1:0]  h_cfg_rsp_valid, h_cfg_rsp_ready, h_irq;
  logic [1:0]  ext_irq = '0;
  flit_t       h_req [2], h_rd_rsp [2], h_wr_rsp [2], h_cfg [2], h_cfg_rsp [2];
  logic [31:0] h_reject_count [2];
  logic [3:0]  x_req_valid, x_req_ready, x_rsp_valid, x_rsp_ready;
  flit_t       x_req [4], x_rsp [4];
  logic [1:0]  mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  flit_t       mem_req [2], mem_rsp [2];

  cosm_esmd_top dut (.*);

  for (genvar h = 0; h < 2; h++) begin : g_h
    host_agent u_host (
      .clk, .rst_n,
      .req_valid(h_req_valid[h]), .req_ready(h_req_ready[h]), .req(h_req[h]),
      .rd_rsp_valid(h_rd_rsp_valid[h]), .rd_rsp_ready(h_rd_rsp_ready[h]), .rd_rsp(h_rd_rsp[h]),
      .wr_rsp_valid(h_wr_rsp_valid[h]), .wr_rsp_ready(h_wr_rsp_ready[h]), .wr_rsp(h_wr_rsp[h]),
      .cfg_valid(h_cfg_valid[h]), .cfg_ready(h_cfg_ready[h]), .cfg(h_cfg[h]),
      .cfg_rsp_valid(h_cfg_rsp_valid[h]), .cfg_rsp_ready(h_cfg_rsp_ready[h]), .cfg_rsp(h_cfg_rsp[h])
    );
  end

  for (genvar c = 0; c < 2; c++) begin : g_m
    ddr_channel_model #(.LATENCY(MEM_LAT), .INTERVAL(2)) u_ddr (
      .clk, .rst_n,
      .req_valid(mem_req_valid[c]), .req_ready(mem_req_ready[c]), .req(mem_req[c]),
      .rsp_valid(mem_rsp_valid[c]), .rsp_ready(mem_rsp_ready[c]), .rsp(mem_rsp[c])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  // mechanism counters
  int unsigned n_irq [2];
  int unsigned n_ch_busy = 0, n_ch_used [2];
  int unsigned n_xlat = 0, n_inspect_rej = 0, n_cfg_rd = 0, n_exp = 0, n_diode = 0;
  int unsigned lat_sum_permitted = 0;
  int unsigned n_vc_pass = 0;
  int unsigned n_flagged = 0, n_header_rej = 0, irq0;   // a flit left a switch input past one held for a busy output
  int unsigned n_airgap_switch = 0, n_blocked_noeffect = 0, n_permitted_slows = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int h = 0; h < 2; h++) if (h_irq[h]) n_irq[h]++;
    for (int c = 0; c < 2; c++) begin
      if (mem_req_valid[c] && !mem_req_ready[c]) n_ch_busy++;
      if (mem_req_valid[c] && mem_req_ready[c]) n_ch_used[c]++;
    end
    for (int i = 0; i < 10; i++)
      if (dut.u_req_sw.pop[i] && (dut.u_req_sw.vc_valid[i] & ~dut.u_req_sw.vc_req[i]) != 0) n_vc_pass++;
    for (int i = 0; i < 6; i++)
      if (dut.u_rsp_sw.pop[i] && (dut.u_rsp_sw.vc_valid[i] & ~dut.u_rsp_sw.vc_req[i]) != 0) n_vc_pass++;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  function automatic logic [DATA_W-1:0] pattern(int unsigned seed);
    logic [DATA_W-1:0] d;
    for (int k = 0; k < DATA_W / 32; k++) d[k*32 +: 32] = seed * 32'h9E37_79B9 + 32'(k);
    return d;
  endfunction

  // convenience wrappers
  task automatic rd(int h, logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] d, output logic err,
                    output int unsigned lat);
    if (h == 0) g_h[0].u_host.access(0, a, '0, d, err, lat);
    else        g_h[1].u_host.access(0, a, '0, d, err, lat);
  endtask

  task automatic wr(int h, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d, output logic err,
                    output int unsigned lat);
    logic [DATA_W-1:0] x;
    if (h == 0) g_h[0].u_host.access(1, a, d, x, err, lat);
    else        g_h[1].u_host.access(1, a, d, x, err, lat);
  endtask

  task automatic rule(int h, int r, logic [ADDR_W-1:0] lo, logic [ADDR_W-1:0] hi, rule_ctrl_t c,
                      logic [ADDR_W-1:0] xbase = '0, logic [5:0] xsize = '0);
    if (h == 0) g_h[0].u_host.set_rule(r, lo, hi, c, xbase, xsize);
    else        g_h[1].u_host.set_rule(r, lo, hi, c, xbase, xsize);
  endtask

  task automatic cfg(int h, logic w, int r, logic [1:0] rg, logic [63:0] wd, output logic [63:0] rdv,
                     output logic err);
    if (h == 0) g_h[0].u_host.cfg_access(w, r, rg, wd, rdv, err);
    else        g_h[1].u_host.cfg_access(w, r, rg, wd, rdv, err);
  endtask

  // one load experiment: returns host 0 completions in WINDOW clocks and the
  // host 1 operations that reached memory
  localparam int unsigned WINDOW = 1500;
  task automatic load_run(int unsigned h0_rd_pct, int unsigned h1_rd_pct, logic h1_on,
                          logic w_ok, logic r_ok, output int unsigned h0_done,
                          output int unsigned h1_mem_rd, output int unsigned h1_mem_wr,
                          output int unsigned h0_lat);
    int unsigned d0, r0, w0;
    logic [DATA_W-1:0] d;
    logic e;
    int unsigned l;
    g_h[0].u_host.rd_pct = h0_rd_pct;
    g_h[1].u_host.rd_pct = h1_rd_pct;
    g_h[1].u_host.exp_w_ok = w_ok;
    g_h[1].u_host.exp_r_ok = r_ok;
    g_h[1].u_host.gen_on = h1_on;
    repeat (200) @(posedge clk);               // let host 1 load settle
    g_h[0].u_host.gen_on = 1;
    repeat (100) @(posedge clk);               // warm up
    d0 = g_h[0].u_host.n_rd_ok + g_h[0].u_host.n_wr_ok;
    r0 = g_m[0].u_ddr.reads_by_src[2] + g_m[1].u_ddr.reads_by_src[2];
    w0 = g_m[0].u_ddr.writes_by_src[3] + g_m[1].u_ddr.writes_by_src[3];
    repeat (WINDOW) @(posedge clk);
    h0_done   = g_h[0].u_host.n_rd_ok + g_h[0].u_host.n_wr_ok - d0;
    h1_mem_rd = g_m[0].u_ddr.reads_by_src[2] + g_m[1].u_ddr.reads_by_src[2] - r0;
    h1_mem_wr = g_m[0].u_ddr.writes_by_src[3] + g_m[1].u_ddr.writes_by_src[3] - w0;
    // read latency of host 0 alone, with host 1 still loading the device
    g_h[0].u_host.gen_on = 0;
    g_h[0].u_host.wait_idle();
    h0_lat = 0;
    for (int k = 0; k < 8; k++) begin
      g_h[0].u_host.access(0, ESMD_BASE + 52'(k * 64), '0, d, e, l);
      h0_lat += l;
    end
    h0_lat = h0_lat / 8;
    g_h[1].u_host.gen_on = 0;
    g_h[0].u_host.wait_idle();
    g_h[1].u_host.wait_idle();
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] d;
    logic [63:0]       rv;
    logic              e;
    int unsigned       lat;
    logic [ADDR_W-1:0] r0, r1, rm, win;

    h_cfg_rsp_ready = '1;
    x_req_valid = '0; x_rsp_ready = '1;
    for (int k = 0; k < 4; k++) x_req[k] = '0;
    n_irq[0] = 0; n_irq[1] = 0; n_ch_used[0] = 0; n_ch_used[1] = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // ---------------------------------------------------- 1. air gap at reset
    rd(0, ESMD_BASE, d, e, lat);
    check(e, "host 0 read allowed before any rule was programmed");
    check(lat == 3, $sformatf("rejected read answered after %0d clocks, expected 3", lat));
    wr(1, ESMD_BASE, pattern(1), e, lat);
    check(e, "host 1 write allowed before any rule was programmed");
    check(g_m[0].u_ddr.writes_by_src[3] + g_m[1].u_ddr.writes_by_src[3] == 0, "rejected write reached memory");
    check(g_m[0].u_ddr.peek(ESMD_BASE) == '0, "memory changed by a rejected write");
    check(n_irq[0] == 1 && n_irq[1] == 1, "interrupts on rejections");

    // ---------------------------------------------------- 2. programming
    rule(0, 31, ESMD_BASE, ESMD_BASE + ESMD_SIZE - 1, rule_ctrl(ALLOW_ALL));   // host 0: whole device
    cfg(0, 0, 31, REG_HI, 0, rv, e);
    n_cfg_rd++;
    check(!e && rv == 64'(ESMD_BASE + ESMD_SIZE - 1), "rule read back through the switch");
    cfg(1, 0, 31, REG_CTRL, 0, rv, e);
    n_cfg_rd++;
    check(!e && rv == 0, "host 1 sees its own table, not host 0's");
    cfg(0, 0, CFG_GLOBAL, REG_REJCNT, 0, rv, e);
    check(rv == 1 && h_reject_count[0] == 1, "reject count of host 0");

    // ---------------------------------------------------- 3. idle latency
    wr(0, ESMD_BASE + 52'h40, pattern(2), e, lat);
    check(!e, "host 0 write rejected");
    check(lat == 6 + MEM_LAT, $sformatf("write latency %0d, expected %0d", lat, 6 + MEM_LAT));
    rd(0, ESMD_BASE + 52'h40, d, e, lat);
    check(!e && d == pattern(2), "host 0 reads back its data");
    check(lat == 6 + MEM_LAT, $sformatf("read latency %0d, expected %0d", lat, 6 + MEM_LAT));

    // ---------------------------------------------------- 4. permission patterns
    r0 = ESMD_BASE + 52'h1000_0000;   // region 0: forward diode, host 0 -> host 1
    r1 = ESMD_BASE + 52'h2000_0000;   // region 1: reverse diode, host 1 -> host 0
    rm = ESMD_BASE + 52'h3000_0000;   // region M: bidirectional
    rule(0, 0, r0, r0 + 52'hF_FFFF, rule_ctrl(ALLOW_WRITE));   // host 0 [W R] = [1 0]
    rule(1, 0, r0, r0 + 52'hF_FFFF, rule_ctrl(ALLOW_READ));    // host 1 [0 1]
    rule(0, 1, r1, r1 + 52'hF_FFFF, rule_ctrl(ALLOW_READ));    // host 0 [0 1]
    rule(1, 1, r1, r1 + 52'hF_FFFF, rule_ctrl(ALLOW_WRITE));   // host 1 [1 0]
    rule(0, 2, rm, rm + 52'hF_FFFF, rule_ctrl(ALLOW_ALL));     // both [1 1]
    rule(1, 2, rm, rm + 52'hF_FFFF, rule_ctrl(ALLOW_ALL));

    for (int k = 0; k < 8; k++) begin
      wr(0, r0 + 52'(k * 64), pattern(100 + k), e, lat);  check(!e, "forward diode: sender write");
    end
    for (int k = 0; k < 8; k++) begin
      rd(1, r0 + 52'(k * 64), d, e, lat);
      check(!e && d == pattern(100 + k), "forward diode: receiver reads the sender's data");
      n_diode++;
    end
    wr(1, r0, pattern(999), e, lat);    check(e, "forward diode: receiver write must be blocked");
    rd(0, r0, d, e, lat);               check(e && d == '0, "forward diode: sender read must be blocked");
    check(g_m[0].u_ddr.peek(r0) == pattern(100), "blocked write left memory unchanged");

    wr(1, r1 + 52'h80, pattern(200), e, lat);  check(!e, "reverse diode: host 1 write");
    rd(0, r1 + 52'h80, d, e, lat);             check(!e && d == pattern(200), "reverse diode: host 0 reads");
    wr(0, r1 + 52'h80, pattern(201), e, lat);  check(e, "reverse diode: host 0 write blocked");
    rd(1, r1 + 52'h80, d, e, lat);             check(e, "reverse diode: host 1 read blocked");
    n_diode++;

    wr(0, rm, pattern(300), e, lat);   check(!e, "bidirectional: host 0 write");
    rd(1, rm, d, e, lat);              check(!e && d == pattern(300), "bidirectional: host 1 reads");
    wr(1, rm + 52'h40, pattern(301), e, lat);  check(!e, "bidirectional: host 1 write");
    rd(0, rm + 52'h40, d, e, lat);     check(!e && d == pattern(301), "bidirectional: host 0 reads");

    // run-time change: region 0 becomes an air gap for host 1
    rule(1, 0, r0, r0 + 52'hF_FFFF, rule_ctrl(REJECT_ALL));
    rd(1, r0, d, e, lat);              check(e && d == '0, "air gap: host 1 read after revocation");
    n_airgap_switch++;

    // ---------------------------------------------------- 5. translation, inspection
    // host 1 sees a 64 KB window at 0x90_0000_0000 mapped onto region M
    win = 52'h90_0000_0000;
    rule(1, 3, win, win + 52'hFFFF, rule_ctrl(ALLOW_READ) | rule_ctrl_t'(6'b100000), rm, 6'd16);
    rd(1, win + 52'h40, d, e, lat);
    check(!e && d == pattern(301), "translated read returns region M data");
    n_xlat++;
    // inspection: 32-bit field at bit 64 of a write into region M must be in [100, 200]
    cfg(1, 1, CFG_GLOBAL, REG_IRANGE, {32'd200, 32'd100}, rv, e);
    cfg(1, 1, CFG_GLOBAL, REG_INSP, {47'd0, 1'b1, 7'd0, 9'd64}, rv, e);
    d = pattern(400); d[64 +: 32] = 32'd150;
    wr(1, rm + 52'h80, d, e, lat);     check(!e, "inspection: field in range passes");
    d[64 +: 32] = 32'd201;
    wr(1, rm + 52'hC0, d, e, lat);     check(e, "inspection: field out of range blocked");
    check(g_m[1].u_ddr.peek(rm + 52'hC0) == '0, "inspected write never reached memory");
    n_inspect_rej++;
    // flag mode: the failing write goes through and only raises an interrupt
    cfg(1, 1, CFG_GLOBAL, REG_INSP, {45'd0, 1'b1, 1'b0, 1'b1, 7'd0, 9'd64}, rv, e);
    irq0 = n_irq[1];
    wr(1, rm + 52'h140, d, e, lat);    check(!e, "flag mode: out-of-range write completes");
    repeat (2) @(posedge clk);
    check(n_irq[1] == irq0 + 1, "flag mode: write flagged by an interrupt");
    check(g_m[1].u_ddr.peek(rm + 52'h140) == d, "flag mode: flagged write reached memory");
    n_flagged++;
    // header check: the low byte of the payload must be 8'hC5
    cfg(1, 1, CFG_HDR, REG_HDR, {32'h0000_00FF, 32'h0000_00C5}, rv, e);
    cfg(1, 1, CFG_GLOBAL, REG_INSP, {46'd0, 1'b1, 17'd0}, rv, e);
    d = pattern(401); d[7:0] = 8'hC5;
    wr(1, rm + 52'h180, d, e, lat);    check(!e, "header check: matching header passes");
    d[7:0] = 8'hC4;
    wr(1, rm + 52'h1C0, d, e, lat);    check(e, "header check: wrong header blocked");
    n_header_rej++;
    cfg(1, 1, CFG_GLOBAL, REG_INSP, 64'd0, rv, e);

    // ---------------------------------------------------- 6. expansion link
    x_req[0]          <= '0;
    x_req[0].addr     <= rm;
    x_req[0].tag      <= 8'h77;
    x_req_valid[0]    <= 1'b1;
    @(posedge clk);
    while (!x_req_ready[0]) @(posedge clk);
    x_req_valid[0] <= 1'b0;
    while (!x_rsp_valid[0]) @(posedge clk);
    check(x_rsp[0].tag == 8'h77 && x_rsp[0].data == pattern(300) && !x_rsp[0].err, "expansion link read");
    n_exp++;
    @(posedge clk);

    // ---------------------------------------------------- 7. load experiments
    // host 0: first 16 GB, full permissions; host 1: second 16 GB
    rule(1, 0, ESMD_BASE + HALF, ESMD_BASE + ESMD_SIZE - 1, rule_ctrl(REJECT_ALL));
    g_h[0].u_host.base = ESMD_BASE;
    g_h[0].u_host.span = 4096;
    g_h[1].u_host.base = ESMD_BASE + HALF;
    g_h[1].u_host.span = 4096;
    begin
      int unsigned idle [5];
      int unsigned mix [5] = '{100, 75, 67, 50, 0};   // 100% R, 3R:1W, 2R:1W, 1R:1W, 100% W
      int unsigned loads [3] = '{100, 0, 50};         // host 1: 100% R, 100% W, 50/50
      int unsigned done, mr, mw, lt;
      for (int m = 0; m < 5; m++) begin
        load_run(mix[m], 100, 0, 1, 1, idle[m], mr, mw, lt);
        check(lt == 6 + MEM_LAT, $sformatf("idle read latency %0d", lt));
        $display("host 0 mix %0d%% reads, host 1 idle: %0d completions in %0d clocks", mix[m], idle[m], WINDOW);
        check(idle[m] > WINDOW / 2, "host 0 throughput with host 1 idle");
      end
      for (int l = 0; l < 3; l++) begin
        for (int p = 0; p < 4; p++) begin
          logic wp, rp, hits;
          wp = p[1]; rp = p[0];
          rule(1, 0, ESMD_BASE + HALF, ESMD_BASE + ESMD_SIZE - 1,
               (wp && rp) ? rule_ctrl(ALLOW_ALL) : wp ? rule_ctrl(ALLOW_WRITE)
               : rp ? rule_ctrl(ALLOW_READ) : rule_ctrl(REJECT_ALL));
          load_run(100, loads[l], 1, wp, rp, done, mr, mw, lt);
          hits = (rp && loads[l] > 0) || (wp && loads[l] < 100);
          $display("host 1 load %0d%% reads, [W R]=[%b %b]: host 0 %0d completions (idle %0d), host 1 reached memory %0d rd %0d wr, host 0 read latency %0d clocks",
                   loads[l], wp, rp, done, idle[0], mr, mw, lt);
          check(rp || mr == 0, "host 1 reads reached memory without read permission");
          check(wp || mw == 0, "host 1 writes reached memory without write permission");
          if (hits) begin
            check(mr + mw > 0, "permitted host 1 load reached memory");
            check(done * 100 < idle[0] * 90, "permitted host 1 load slows host 0 down");
            check(lt >= 6 + MEM_LAT, "host 0 read latency below its idle value");
            lat_sum_permitted += lt;
            n_permitted_slows++;
          end else begin
            check(done * 100 > idle[0] * 95 && done * 100 < idle[0] * 105,
                  "blocked host 1 load leaves host 0 throughput unchanged");
            check(lt == 6 + MEM_LAT, "blocked host 1 load leaves host 0 read latency unchanged");
            n_blocked_noeffect++;
          end
        end
      end
    end

    // permitted host 1 load raises host 0's read latency on average
    check(lat_sum_permitted > 32'(n_permitted_slows) * (6 + MEM_LAT),
          "permitted host 1 load never raised host 0 read latency");

    // response back-pressure at the hosts
    g_h[0].u_host.rand_stall = 1;
    g_h[1].u_host.rand_stall = 1;
    rule(1, 0, ESMD_BASE + HALF, ESMD_BASE + ESMD_SIZE - 1, rule_ctrl(ALLOW_READ));
    begin
      int unsigned done, mr, mw, lt;
      load_run(50, 50, 1, 0, 1, done, mr, mw, lt);
    end
    g_h[0].u_host.rand_stall = 0;
    g_h[1].u_host.rand_stall = 0;

    // ---------------------------------------------------- mechanisms seen
    check(n_irq[0] > 0 && n_irq[1] > 0, "ATT interrupts");
    check(h_reject_count[1] + 32'(n_flagged) == 32'(n_irq[1]), "reject counter plus flagged writes equals interrupt count");
    // an event of custom logic interrupts only the host it is raised for
    @(negedge clk);
    ext_irq = 2'b10;
    #1;
    check(h_irq == 2'b10, "custom-logic event interrupts host 1 only");
    @(negedge clk);
    ext_irq = 2'b00;
    #1;
    check(h_irq == 2'b00, "custom-logic event ends");
    check(n_ch_used[0] > 0 && n_ch_used[1] > 0, "both memory channels used");
    check(n_ch_busy > 0, "memory channel back-pressure");
    check(n_vc_pass > 0, "a virtual channel passing a blocked one");
    check(g_h[0].u_host.n_stall + g_h[1].u_host.n_stall > 0, "host link back-pressure");
    check(g_h[0].u_host.n_rsp_stall + g_h[1].u_host.n_rsp_stall > 0, "response back-pressure");
    check(n_xlat > 0 && n_inspect_rej > 0 && n_cfg_rd > 0 && n_exp > 0, "translation, inspection, read-back, expansion");
    check(n_flagged > 0 && n_header_rej > 0, "flag mode and header check");
    check(n_diode > 0 && n_airgap_switch > 0, "diodes and run-time air gap");
    check(n_blocked_noeffect > 0 && n_permitted_slows > 0, "load experiments");
    check(g_h[0].u_host.n_errors == 0 && g_h[1].u_host.n_errors == 0, "host response checks");
    checks += g_h[0].u_host.n_rsp + g_h[1].u_host.n_rsp;
    failures += g_h[0].u_host.n_errors + g_h[1].u_host.n_errors;

    $display("mechanisms: irq %0d/%0d, channel use %0d/%0d, channel stalls %0d, virtual channel passes %0d, link stalls %0d, rsp stalls %0d",
             n_irq[0], n_irq[1], n_ch_used[0], n_ch_used[1], n_ch_busy, n_vc_pass,
             g_h[0].u_host.n_stall + g_h[1].u_host.n_stall, g_h[0].u_host.n_rsp_stall + g_h[1].u_host.n_rsp_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
