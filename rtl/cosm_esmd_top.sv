// cosm_esmd_top: externally-attached shared memory device (ESMD) datapath
// with Controlled Shared Memory (COSM) isolation between two hosts.
//
// Two hosts share the device's memory. Each host link passes through its own
// Address Translation Table (att), which enforces that host's write and read
// permissions per address region (the COSM permission matrix) and, for
// writes, the data inspection check. Only allowed requests reach the
// arbitration switch; rejected ones are answered with an error response and
// never touch memory. The switch (arb_switch, ten inputs) lets any input
// reach either of the two memory channels; consecutive 64-byte lines
// alternate between channels (route_compute). Responses come back through a
// second arb_switch that routes on the source port stored in each flit.
//
// Switch input ports (the flit's src):
//   0 host 0 reads   1 host 0 writes   2 host 1 reads   3 host 1 writes
//   4 host 0 ATT programming           5 host 1 ATT programming
//   6..9 expansion links
// Request switch outputs: 0, 1 memory channels; 2, 3 programming ports of the
// ATT of host 0 and host 1. A host can program only its own table.
// Response switch: inputs are the two memory channels, the two ATT
// programming responses and the two ATT reject streams; outputs are the ten
// ports above, read responses of host h on port 2h, write completions on
// 2h+1.
//
// The host link controllers (CXL IP), the DDR memory controllers and the
// processor that programs the tables are outside this module: their flit
// streams are the ports below. Every stream uses valid/ready; a flit moves
// when both are high. The memory side must return each request's src and
// tag in its response. Expansion links are brought out but, like the
// prototype this follows, have no ATT in front of them: only the two socket
// links are filtered.
//
// From the document: one ATT per host link with 32 rules, ten-port
// arbitration switch (four ports for socket traffic, two for ATT
// programming, four reserved) with virtual channels on its inputs, two
// memory channels, interrupts to each host on its ATT's events or on events
// of custom logic (ext_irq, passed straight through). This design's own
// choices: the flit format, splitting each link
// into a read and a write port (the AXI read and write channels), the port
// numbering, the line interleave and the response network.
//
// Latency with no contention, counted between handshakes: a host request
// reaches the memory channel 3 clocks after the host handed it over (ATT
// register, switch buffer, switch output register); a memory response
// reaches the host 2 clocks after the memory handed it over. A rejected
// request is answered 3 clocks after it was handed over.
module cosm_esmd_top
  import cosm_pkg::*;
#(
  parameter int unsigned NUM_RULES  = 32,  // rules per ATT
  parameter int unsigned NUM_VC     = 2,   // virtual channels per switch input
  parameter int unsigned FIFO_DEPTH = 2,   // buffer depth of each virtual channel
  parameter int unsigned CH_SEL_BIT = 6    // address bit choosing the memory channel
) (
  input  logic        clk,
  input  logic        rst_n,
  // host links: memory requests
  input  logic [1:0]  h_req_valid,
  output logic [1:0]  h_req_ready,
  input  flit_t       h_req       [2],
  // host links: read responses
  output logic [1:0]  h_rd_rsp_valid,
  input  logic [1:0]  h_rd_rsp_ready,
  output flit_t       h_rd_rsp    [2],
  // host links: write completions
  output logic [1:0]  h_wr_rsp_valid,
  input  logic [1:0]  h_wr_rsp_ready,
  output flit_t       h_wr_rsp    [2],
  // host links: ATT programming
  input  logic [1:0]  h_cfg_valid,
  output logic [1:0]  h_cfg_ready,
  input  flit_t       h_cfg       [2],
  output logic [1:0]  h_cfg_rsp_valid,
  input  logic [1:0]  h_cfg_rsp_ready,
  output flit_t       h_cfg_rsp   [2],
  // interrupts: one pulse per rejected or flagged request of that host,
  // ORed with events raised for that host by custom logic outside this module
  input  logic [1:0]  ext_irq,
  output logic [1:0]  h_irq,
  output logic [31:0] h_reject_count [2],
  // expansion links
  input  logic [3:0]  x_req_valid,
  output logic [3:0]  x_req_ready,
  input  flit_t       x_req       [4],
  output logic [3:0]  x_rsp_valid,
  input  logic [3:0]  x_rsp_ready,
  output flit_t       x_rsp       [4],
  // memory channels
  output logic [1:0]  mem_req_valid,
  input  logic [1:0]  mem_req_ready,
  output flit_t       mem_req     [2],
  input  logic [1:0]  mem_rsp_valid,
  output logic [1:0]  mem_rsp_ready,
  input  flit_t       mem_rsp     [2]
);

  localparam int unsigned NPORT = 10;  // switch ports
  localparam int unsigned NREQO = 4;   // request switch outputs
  localparam int unsigned NRSPI = 6;   // response switch inputs

  // request switch
  logic [NPORT-1:0]  rq_valid, rq_ready;
  flit_t             rq_flit [NPORT];
  logic [PORT_W-1:0] rq_dst  [NPORT];
  logic [NREQO-1:0]  rqo_valid, rqo_ready;
  flit_t             rqo_flit [NREQO];
  // response switch
  logic [NRSPI-1:0]  rs_valid, rs_ready;
  flit_t             rs_flit [NRSPI];
  logic [PORT_W-1:0] rs_dst  [NRSPI];
  logic [NPORT-1:0]  rso_valid, rso_ready;
  flit_t             rso_flit [NPORT];

  // ----------------------------------------------------------- host links
  for (genvar h = 0; h < 2; h++) begin : g_host
    localparam logic [PORT_W-1:0] RD_PORT  = PORT_W'(2 * h);
    localparam logic [PORT_W-1:0] WR_PORT  = PORT_W'(2 * h + 1);
    localparam logic [PORT_W-1:0] CFG_PORT = PORT_W'(4 + h);

    flit_t stamped, cfg_stamped, att_out;
    logic  att_event, att_flag;
    logic  att_out_valid, att_out_ready;

    always_comb begin
      stamped     = h_req[h];
      stamped.src = h_req[h].is_write ? WR_PORT : RD_PORT;
      stamped.err = 1'b0;
      cfg_stamped     = h_cfg[h];
      cfg_stamped.src = CFG_PORT;
      cfg_stamped.err = 1'b0;
    end

    att #(.NUM_RULES(NUM_RULES)) u_att (
      .clk, .rst_n,
      .in_valid     (h_req_valid[h]),
      .in_ready     (h_req_ready[h]),
      .in_flit      (stamped),
      .out_valid    (att_out_valid),
      .out_ready    (att_out_ready),
      .out_flit     (att_out),
      .rej_valid    (rs_valid[4 + h]),
      .rej_ready    (rs_ready[4 + h]),
      .rej_flit     (rs_flit[4 + h]),
      .cfg_valid    (rqo_valid[2 + h]),
      .cfg_ready    (rqo_ready[2 + h]),
      .cfg_flit     (rqo_flit[2 + h]),
      .cfg_rsp_valid(rs_valid[2 + h]),
      .cfg_rsp_ready(rs_ready[2 + h]),
      .cfg_rsp_flit (rs_flit[2 + h]),
      .reject_event (att_event),
      .flag_event   (att_flag),
      .reject_count (h_reject_count[h])
    );

    assign h_irq[h] = att_event | att_flag | ext_irq[h];

    // allowed requests: reads to the read port, writes to the write port
    always_comb begin
      rq_valid[2*h]     = att_out_valid && !att_out.is_write;
      rq_valid[2*h + 1] = att_out_valid &&  att_out.is_write;
      rq_flit[2*h]      = att_out;
      rq_flit[2*h + 1]  = att_out;
      att_out_ready     = att_out.is_write ? rq_ready[2*h + 1] : rq_ready[2*h];
    end

    route_compute #(.CH_SEL_BIT(CH_SEL_BIT)) u_rc_rd (
      .addr(att_out.addr), .is_cfg(1'b0), .dst(rq_dst[2*h]));
    assign rq_dst[2*h + 1] = rq_dst[2*h];

    // programming requests
    assign rq_valid[4 + h]  = h_cfg_valid[h];
    assign h_cfg_ready[h]   = rq_ready[4 + h];
    assign rq_flit[4 + h]   = cfg_stamped;
    route_compute #(.CH_SEL_BIT(CH_SEL_BIT), .CFG_DST(PORT_W'(2 + h))) u_rc_cfg (
      .addr(cfg_stamped.addr), .is_cfg(1'b1), .dst(rq_dst[4 + h]));

    // responses back to the host
    assign h_rd_rsp_valid[h]  = rso_valid[2*h];
    assign h_rd_rsp[h]        = rso_flit[2*h];
    assign rso_ready[2*h]     = h_rd_rsp_ready[h];
    assign h_wr_rsp_valid[h]  = rso_valid[2*h + 1];
    assign h_wr_rsp[h]        = rso_flit[2*h + 1];
    assign rso_ready[2*h + 1] = h_wr_rsp_ready[h];
    assign h_cfg_rsp_valid[h] = rso_valid[4 + h];
    assign h_cfg_rsp[h]       = rso_flit[4 + h];
    assign rso_ready[4 + h]   = h_cfg_rsp_ready[h];
  end

  // ------------------------------------------------------ expansion links
  for (genvar k = 0; k < 4; k++) begin : g_exp
    flit_t stamped;
    always_comb begin
      stamped     = x_req[k];
      stamped.src = PORT_W'(6 + k);
      stamped.err = 1'b0;
    end
    assign rq_valid[6 + k] = x_req_valid[k];
    assign x_req_ready[k]  = rq_ready[6 + k];
    assign rq_flit[6 + k]  = stamped;
    route_compute #(.CH_SEL_BIT(CH_SEL_BIT)) u_rc (
      .addr(stamped.addr), .is_cfg(1'b0), .dst(rq_dst[6 + k]));

    assign x_rsp_valid[k]    = rso_valid[6 + k];
    assign x_rsp[k]          = rso_flit[6 + k];
    assign rso_ready[6 + k]  = x_rsp_ready[k];
  end

  // ------------------------------------------------------- memory channels
  for (genvar c = 0; c < 2; c++) begin : g_mem
    assign mem_req_valid[c] = rqo_valid[c];
    assign mem_req[c]       = rqo_flit[c];
    assign rqo_ready[c]     = mem_req_ready[c];
    assign rs_valid[c]      = mem_rsp_valid[c];
    assign rs_flit[c]       = mem_rsp[c];
    assign mem_rsp_ready[c] = rs_ready[c];
  end

  // responses route on the port that issued the request
  for (genvar i = 0; i < NRSPI; i++) begin : g_rsp_dst
    assign rs_dst[i] = rs_flit[i].src;
  end

  // ------------------------------------------------------------- switches
  arb_switch #(.NUM_IN(NPORT), .NUM_OUT(NREQO), .NUM_VC(NUM_VC), .FIFO_DEPTH(FIFO_DEPTH)) u_req_sw (
    .clk, .rst_n,
    .in_valid (rq_valid),
    .in_ready (rq_ready),
    .in_flit  (rq_flit),
    .in_dst   (rq_dst),
    .out_valid(rqo_valid),
    .out_ready(rqo_ready),
    .out_flit (rqo_flit)
  );

  arb_switch #(.NUM_IN(NRSPI), .NUM_OUT(NPORT), .NUM_VC(NUM_VC), .FIFO_DEPTH(FIFO_DEPTH)) u_rsp_sw (
    .clk, .rst_n,
    .in_valid (rs_valid),
    .in_ready (rs_ready),
    .in_flit  (rs_flit),
    .in_dst   (rs_dst),
    .out_valid(rso_valid),
    .out_ready(rso_ready),
    .out_flit (rso_flit)
  );

endmodule
