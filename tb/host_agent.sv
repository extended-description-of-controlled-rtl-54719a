// host_agent: simulation model of one host on an ESMD host link, used by the
// end-to-end testbench. Not synthesizable.
//
// Issues memory requests on the request stream and checks every response:
// each request must be answered exactly once, on the read or write response
// stream that matches it, with the error flag the current permissions call
// for. Two ways to use it:
//  - traffic generator: with gen_on set, issues a random request each clock
//    (rd_pct percent reads) to 64-byte lines in [base, base + span*64), with
//    at most MAX_OST outstanding; exp_w_ok / exp_r_ok say whether writes and
//    reads are expected to pass;
//  - access(): one blocking read or write that returns data, error flag and
//    the clocks from acceptance to response.
// Also drives the host's ATT programming stream (cfg_write, cfg_read).
module host_agent
  import cosm_pkg::*;
#(
  parameter int unsigned MAX_OST = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  req_valid,
  input  logic  req_ready,
  output flit_t req,
  input  logic  rd_rsp_valid,
  output logic  rd_rsp_ready,
  input  flit_t rd_rsp,
  input  logic  wr_rsp_valid,
  output logic  wr_rsp_ready,
  input  flit_t wr_rsp,
  output logic  cfg_valid,
  input  logic  cfg_ready,
  output flit_t cfg,
  input  logic  cfg_rsp_valid,
  output logic  cfg_rsp_ready,
  input  flit_t cfg_rsp
);

  typedef struct {
    logic              w;
    logic              exp_err;
    logic              directed;
    int unsigned       t;
  } ost_t;

  // controls
  logic              gen_on = 0;
  int unsigned       rd_pct = 100;
  logic [ADDR_W-1:0] base = '0;
  int unsigned       span = 256;
  logic              exp_w_ok = 1, exp_r_ok = 1;
  logic              rand_stall = 0;

  // statistics
  int unsigned n_issued = 0, n_rsp = 0, n_rd_ok = 0, n_wr_ok = 0, n_rd_rej = 0, n_wr_rej = 0;
  int unsigned n_errors = 0, n_stall = 0, n_rsp_stall = 0;
  int unsigned cyc = 0;

  ost_t        ost [int];
  logic [TAG_W-1:0] next_tag = '0;

  // directed access
  logic              dir_req = 0, dir_done = 0, dir_issued = 0;
  logic [TAG_W-1:0]  dir_tag = '0;
  logic              dir_w;
  logic [ADDR_W-1:0] dir_addr;
  logic [DATA_W-1:0] dir_wdata, dir_rdata;
  logic              dir_err;
  int unsigned       dir_lat;

  function automatic void error(string msg);
    n_errors++;
    if (n_errors < 10) $display("FAIL %m @%0d: %s", cyc, msg);
  endfunction

  task automatic take_rsp(flit_t r, logic w);
    ost_t o;
    n_rsp++;
    if (!ost.exists(int'(r.tag))) begin
      error($sformatf("response with unknown tag %0d", r.tag));
      return;
    end
    o = ost[int'(r.tag)];
    ost.delete(int'(r.tag));
    if (o.w != w) error("response on the wrong stream");
    if (!o.directed && r.err != o.exp_err) error($sformatf("%s at tag %0d: err=%b, expected %b",
                                            w ? "write" : "read", r.tag, r.err, o.exp_err));
    if (w) begin if (r.err) n_wr_rej++; else n_wr_ok++; end
    else   begin if (r.err) n_rd_rej++; else n_rd_ok++; end
    if (o.directed) begin
      dir_rdata = r.data;
      dir_err   = r.err;
      dir_lat   = cyc - o.t;
      dir_done  = 1;
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin
      req_valid    <= 1'b0;
      rd_rsp_ready <= 1'b1;
      wr_rsp_ready <= 1'b1;
    end else begin
      if (req_valid && !req_ready) n_stall++;
      if (rd_rsp_valid && !rd_rsp_ready) n_rsp_stall++;
      if (rd_rsp_valid && rd_rsp_ready) take_rsp(rd_rsp, 1'b0);
      if (wr_rsp_valid && wr_rsp_ready) take_rsp(wr_rsp, 1'b1);
      if (req_valid && req_ready) begin
        ost_t o;
        o.w        = req.is_write;
        o.exp_err  = req.is_write ? !exp_w_ok : !exp_r_ok;
        o.directed = dir_issued && !dir_done && (req.tag == dir_tag);
        o.t        = cyc;
        ost[int'(req.tag)] = o;
        n_issued++;
      end
      if (!req_valid || req_ready) begin
        req_valid <= 1'b0;
        if (dir_req && !dir_issued) begin
          req          <= '0;
          req.is_write <= dir_w;
          req.addr     <= dir_addr;
          req.data     <= dir_wdata;
          req.tag      <= next_tag;
          dir_tag       = next_tag;
          dir_issued    = 1'b1;
          next_tag     <= next_tag + 1'b1;
          req_valid    <= 1'b1;
        end else if (gen_on && !dir_req && ost.size() < MAX_OST && !ost.exists(int'(next_tag))) begin
          logic w;
          logic [DATA_W-1:0] d;
          w = ($urandom_range(1, 100) > rd_pct);
          for (int k = 0; k < DATA_W / 32; k++) d[k*32 +: 32] = $urandom();
          req          <= '0;
          req.is_write <= w;
          req.addr     <= base + ADDR_W'($urandom_range(0, span - 1)) * 64;
          req.data     <= d;
          req.tag      <= next_tag;
          next_tag     <= next_tag + 1'b1;
          req_valid    <= 1'b1;
        end
      end
      if (rand_stall) begin
        rd_rsp_ready <= ($urandom_range(0, 2) != 0);
        wr_rsp_ready <= ($urandom_range(0, 2) != 0);
      end else begin
        rd_rsp_ready <= 1'b1;
        wr_rsp_ready <= 1'b1;
      end
    end
  end

  // one blocking access; returns read data, error flag and latency in clocks
  task automatic access(input logic w, input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d,
                        output logic [DATA_W-1:0] rdata, output logic err, output int unsigned lat);
    dir_w     = w;
    dir_addr  = a;
    dir_wdata = w ? d : '0;
    dir_done   = 0;
    dir_issued = 0;
    dir_req    = 1;
    while (!dir_done) @(posedge clk);
    dir_req = 0;
    rdata   = dir_rdata;
    err     = dir_err;
    lat     = dir_lat;
    @(posedge clk);
  endtask

  // waits until every outstanding request is answered
  task automatic wait_idle();
    int unsigned n = 0;
    while ((ost.size() != 0 || req_valid) && n < 5000) begin @(posedge clk); n++; end
    if (n >= 5000) error("requests never answered");
  endtask

  // ---------------------------------------------------- ATT programming
  task automatic cfg_access(input logic w, input int rule, input logic [1:0] rg,
                            input logic [63:0] wd, output logic [63:0] rd, output logic err);
    cfg          <= '0;
    cfg.is_write <= w;
    cfg.addr     <= ADDR_W'({rule[5:0], rg, 3'b000});
    cfg.data     <= DATA_W'(wd);
    cfg.tag      <= 8'hC5;
    cfg_valid    <= 1'b1;
    @(posedge clk);
    while (!cfg_ready) @(posedge clk);
    cfg_valid <= 1'b0;
    while (!(cfg_rsp_valid && cfg_rsp_ready)) @(posedge clk);
    rd  = cfg_rsp.data[63:0];
    err = cfg_rsp.err;
    if (cfg_rsp.tag != 8'hC5) error("programming response tag");
  endtask

  task automatic set_rule(int r, logic [ADDR_W-1:0] lo, logic [ADDR_W-1:0] hi, rule_ctrl_t c,
                          logic [ADDR_W-1:0] xbase = '0, logic [5:0] xsize = '0);
    logic [63:0] d;
    logic e;
    cfg_access(1, r, REG_LO, 64'(lo), d, e);
    cfg_access(1, r, REG_HI, 64'(hi), d, e);
    cfg_access(1, r, REG_XBASE, 64'(xbase), d, e);
    cfg_access(1, r, REG_CTRL, {50'd0, xsize, 2'b00, c}, d, e);
  endtask

  initial begin
    cfg_valid     = 1'b0;
    cfg           = '0;
    cfg_rsp_ready = 1'b1;
    req           = '0;
  end

endmodule
