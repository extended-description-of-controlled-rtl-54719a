// arb_switch: the arbitration switch that lets every input reach every output
// of the ESMD, e.g. each host link either memory channel.
//
// Each input port has NUM_VC virtual channels. A flit arrives with its
// destination output (worked out by route_compute before the switch) and is
// queued in virtual channel dst % NUM_VC, a FIFO_DEPTH-entry buffer whose
// ready is the flow control back to the sender. Flits for different outputs
// can therefore sit in different channels, so a flit waiting for a busy
// output does not block a flit behind it that wants a free one.
// Allocation takes two round-robin stages each clock:
//   1. virtual channel arbitration: each input picks one of its channels whose
//      oldest flit targets an output that can take a flit this clock (its
//      output register is empty or being read: the route reservation);
//   2. each output picks one of the inputs whose chosen flit targets it.
// The winners cross the crossbar into the output registers. A flit is one
// whole 64-byte transfer, so a grant reserves the output for exactly one clock.
// An arbiter's pointer moves only when its grant is used, so every waiting
// flit is served within a bounded number of grants.
//
// The document names the parts of its switch (input ports with multiple
// virtual channels, route compute, route reservation, flow control, virtual
// channel arbitration and a crossbar) but not how they work. The number of
// channels, the channel chosen by destination, valid/ready flow control in
// place of credits and the separable round-robin allocator are this design's
// own choices.
//
// Timing: a flit accepted at an input appears at its output two clocks later
// when nothing competes; an output delivers one flit per clock while its
// consumer is ready. Flits from one input to one output stay in order.
// in_ready depends combinationally on in_dst (it is the ready of the channel
// that in_dst selects).
module arb_switch
  import cosm_pkg::*;
#(
  parameter int unsigned NUM_IN     = 10,
  parameter int unsigned NUM_OUT    = 4,
  parameter int unsigned NUM_VC     = 2,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_IN-1:0]   in_valid,
  output logic [NUM_IN-1:0]   in_ready,
  input  flit_t               in_flit [NUM_IN],
  input  logic [PORT_W-1:0]   in_dst  [NUM_IN],
  output logic [NUM_OUT-1:0]  out_valid,
  input  logic [NUM_OUT-1:0]  out_ready,
  output flit_t               out_flit [NUM_OUT]
);

  typedef struct packed {
    logic [PORT_W-1:0] dst;
    flit_t             flit;
  } entry_t;

  entry_t             vc_head  [NUM_IN][NUM_VC];
  logic [NUM_VC-1:0]  vc_valid [NUM_IN];
  logic [NUM_VC-1:0]  vc_ready [NUM_IN];
  logic [NUM_VC-1:0]  vc_req   [NUM_IN];
  logic [NUM_VC-1:0]  vc_grant [NUM_IN];
  entry_t             head     [NUM_IN];
  logic [NUM_IN-1:0]  head_valid;
  logic [NUM_IN-1:0]  pop;
  logic [NUM_OUT-1:0] out_free;
  logic [2**PORT_W-1:0] out_free_x;   // out_free indexed by any dst value
  logic [NUM_IN-1:0]  req      [NUM_OUT];
  logic [NUM_IN-1:0]  grant    [NUM_OUT];
  logic [NUM_OUT-1:0] load;

  assign out_free   = ~out_valid | out_ready;
  assign out_free_x = (2**PORT_W)'(out_free);

  for (genvar i = 0; i < NUM_IN; i++) begin : g_in
    entry_t      e_in;
    int unsigned vsel;
    assign e_in = '{dst: in_dst[i], flit: in_flit[i]};
    assign vsel = 32'(in_dst[i]) % NUM_VC;
    assign in_ready[i] = vc_ready[i][vsel];

    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      sync_fifo #(.T(entry_t), .DEPTH(FIFO_DEPTH)) u_buf (
        .clk, .rst_n,
        .in_valid (in_valid[i] && vsel == v),
        .in_ready (vc_ready[i][v]),
        .in_data  (e_in),
        .out_valid(vc_valid[i][v]),
        .out_ready(pop[i] && vc_grant[i][v]),
        .out_data (vc_head[i][v])
      );
      assign vc_req[i][v] = vc_valid[i][v] && out_free_x[vc_head[i][v].dst];
    end

    // stage 1: virtual channel arbitration
    rr_arbiter #(.N(NUM_VC)) u_vc_arb (
      .clk, .rst_n,
      .req    (vc_req[i]),
      .advance(pop[i]),
      .grant  (vc_grant[i])
    );

    always_comb begin
      head[i] = '0;
      for (int v = 0; v < NUM_VC; v++)
        if (vc_grant[i][v]) head[i] = vc_head[i][v];
    end
    assign head_valid[i] = vc_req[i] != '0;
  end

  // stage 2: output arbitration, crossbar and output registers
  for (genvar o = 0; o < NUM_OUT; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NUM_IN; i++)
        req[o][i] = head_valid[i] && (32'(head[i].dst) == o);
      load[o] = req[o] != '0;
    end

    rr_arbiter #(.N(NUM_IN)) u_arb (
      .clk, .rst_n,
      .req    (req[o]),
      .advance(load[o]),
      .grant  (grant[o])
    );

    flit_t sel;
    always_comb begin
      sel = '0;
      for (int i = 0; i < NUM_IN; i++)
        if (grant[o][i]) sel = head[i].flit;
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        out_valid[o] <= 1'b0;
      end else if (load[o]) begin
        out_valid[o] <= 1'b1;
      end else if (out_ready[o]) begin
        out_valid[o] <= 1'b0;
      end
    end

    always_ff @(posedge clk) begin
      if (load[o]) out_flit[o] <= sel;
    end
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < NUM_OUT; o++)
      if (load[o]) pop = pop | grant[o];
  end

  // Every flit addresses an existing output.
  for (genvar i = 0; i < NUM_IN; i++) begin : g_chk
    a_dst_range: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[i] |-> (32'(in_dst[i]) < NUM_OUT));
  end

endmodule
