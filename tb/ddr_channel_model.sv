// ddr_channel_model: behavioural model of one DDR memory channel (memory
// controller plus DIMM) behind the ESMD switch. Not synthesizable; for
// simulation only.
//
// Accepts at most one 64-byte request every INTERVAL clocks, which stands in
// for the bandwidth limit of the DRAM, and answers each after LATENCY clocks,
// in order. Reads return the stored line (zero if never written); writes
// store the line and return a completion. src and tag are echoed. Lines are
// kept in an associative array indexed by address bits [ADDR_W-1:6], so any
// address may be used. Counts the requests of every source port.
module ddr_channel_model
  import cosm_pkg::*;
#(
  parameter int unsigned LATENCY  = 10,
  parameter int unsigned INTERVAL = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid,
  output logic  req_ready,
  input  flit_t req,
  output logic  rsp_valid,
  input  logic  rsp_ready,
  output flit_t rsp
);

  logic [DATA_W-1:0] mem [logic [ADDR_W-7:0]];
  flit_t             pend [$];
  int unsigned       due  [$];
  int unsigned       cyc = 0, last_accept = 0;
  int unsigned       reads_by_src  [16];
  int unsigned       writes_by_src [16];

  initial begin
    for (int i = 0; i < 16; i++) begin reads_by_src[i] = 0; writes_by_src[i] = 0; end
  end

  assign req_ready = rst_n && (cyc - last_accept >= INTERVAL) && (pend.size() < 64);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      rsp_valid <= 1'b0;
    end else begin
      if (req_valid && req_ready) begin
        flit_t r;
        r = req;
        r.err = 1'b0;
        if (req.is_write) begin
          mem[req.addr[ADDR_W-1:6]] = req.data;
          r.data = '0;
          writes_by_src[req.src]++;
        end else begin
          r.data = mem.exists(req.addr[ADDR_W-1:6]) ? mem[req.addr[ADDR_W-1:6]] : '0;
          reads_by_src[req.src]++;
        end
        pend.push_back(r);
        due.push_back(cyc + LATENCY);
        last_accept <= cyc;
      end
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;
      if ((!rsp_valid || rsp_ready) && pend.size() > 0 && due[0] <= cyc) begin
        rsp       <= pend.pop_front();
        void'(due.pop_front());
        rsp_valid <= 1'b1;
      end
    end
  end

  // peek at a stored line
  function automatic logic [DATA_W-1:0] peek(logic [ADDR_W-1:0] a);
    return mem.exists(a[ADDR_W-1:6]) ? mem[a[ADDR_W-1:6]] : '0;
  endfunction

endmodule
