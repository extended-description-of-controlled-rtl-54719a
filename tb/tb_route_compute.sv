// tb_route_compute: self-checking test of the switch route computation.
//
// Programming requests must go to the configured ATT output whatever their
// address; memory requests must go to channel addr[CH_SEL_BIT] for the
// default two channels and a line-interleaved channel bit of 6, and to
// addr[7] when the channel bit is moved.
module tb_route_compute;
  import cosm_pkg::*;

  logic [ADDR_W-1:0] addr;
  logic              is_cfg;
  logic [PORT_W-1:0] dst, dst7;
  int                checks = 0, failures = 0;

  route_compute #(.CFG_DST(4'd3)) dut (.addr, .is_cfg, .dst);
  route_compute #(.CH_SEL_BIT(7), .CFG_DST(4'd2)) dut7 (.addr, .is_cfg, .dst(dst7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [PORT_W-1:0] e, e7;
      addr   = {$urandom(), $urandom()} & {ADDR_W{1'b1}};
      is_cfg = ($urandom_range(0, 3) == 0);
      #1;
      e  = is_cfg ? 4'd3 : {3'd0, addr[6]};
      e7 = is_cfg ? 4'd2 : {3'd0, addr[7]};
      checks += 2;
      if (dst !== e)   begin failures++; $display("FAIL addr=%h cfg=%b dst=%0d exp %0d", addr, is_cfg, dst, e); end
      if (dst7 !== e7) begin failures++; $display("FAIL bit7 addr=%h cfg=%b dst=%0d exp %0d", addr, is_cfg, dst7, e7); end
    end
    // consecutive 64-byte lines alternate between the channels
    is_cfg = 1'b0;
    for (int l = 0; l < 8; l++) begin
      addr = 52'h80_8000_0000 + 52'(l * 64);
      #1;
      checks++;
      if (dst !== 4'(l % 2)) begin failures++; $display("FAIL line %0d dst=%0d", l, dst); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
