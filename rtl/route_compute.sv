// route_compute: destination output of a request entering the arbitration
// switch.
//
// Requests from the programming inputs go to the programming port of their
// own ATT (CFG_DST). All other requests go to a memory channel; the channel
// is picked by address bits starting at CH_SEL_BIT, so that consecutive
// 64-byte lines alternate between the channels. That the switch lets any
// input reach either memory channel follows the description of the split
// memory channel; the line interleave is this design's own choice.
//
// Interface: addr and is_cfg in; dst (switch output number) out.
// Combinational.
module route_compute
  import cosm_pkg::*;
#(
  parameter int unsigned      NUM_CH     = 2,  // memory channels, outputs 0..NUM_CH-1
  parameter int unsigned      CH_SEL_BIT = 6,  // lowest address bit of the channel number
  parameter logic [PORT_W-1:0] CFG_DST   = 4'd2
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic              is_cfg,
  output logic [PORT_W-1:0] dst
);

  localparam int unsigned CH_W = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  logic [CH_W-1:0] ch;

  always_comb begin
    ch = (NUM_CH > 1) ? addr[CH_SEL_BIT +: CH_W] : '0;
    if (is_cfg)                ch = '0;
    else if (32'(ch) >= NUM_CH) ch = CH_W'(32'(ch) - NUM_CH);
    dst = is_cfg ? CFG_DST : PORT_W'(ch);
  end

endmodule
