// tb_att_access_check: self-checking test of the single-rule access check.
//
// Drives random rules and addresses, biased so that addresses often land on
// or next to the Compare Low/High bounds, and compares hit and allow with a
// reference worked out here from the rule definition: inclusive range,
// inverted by Reverse, gated by Enabled; Reject overrides Rd/Wr. Also checks
// the six rule kinds on a fixed range.
module tb_att_access_check;
  import cosm_pkg::*;

  att_rule_t         rule;
  logic [ADDR_W-1:0] addr;
  logic              is_write, hit, allow;
  int                checks = 0, failures = 0;
  int unsigned       sel;

  att_access_check dut (.rule, .addr, .is_write, .hit, .allow);

  function automatic logic [ADDR_W-1:0] rand_addr();
    return {$urandom(), $urandom()} & {ADDR_W{1'b1}};
  endfunction

  task automatic check(input string what);
    logic in_r, exp_hit, exp_allow;
    #1;
    in_r      = (addr >= rule.lo) && (addr <= rule.hi);
    exp_hit   = rule.ctrl.enabled && (rule.ctrl.reverse ? !in_r : in_r);
    exp_allow = rule.ctrl.reject ? 1'b0 : (is_write ? rule.ctrl.wr : rule.ctrl.rd);
    checks++;
    if (hit !== exp_hit || (exp_hit && allow !== exp_allow)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s lo=%h hi=%h addr=%h ctrl=%b wr=%b: hit=%b allow=%b exp %b %b",
                 what, rule.lo, rule.hi, addr, rule.ctrl, is_write, hit, allow, exp_hit, exp_allow);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fixed cases: the six rule kinds on [0x1000, 0x1FFF]
    rule = '0;
    rule.lo = 52'h1000;
    rule.hi = 52'h1FFF;
    for (int k = 0; k < 6; k++) begin
      rule.ctrl = rule_ctrl(rule_kind_e'(k));
      for (int j = 0; j < 4; j++) begin
        addr = (j == 0) ? 52'hFFF : (j == 1) ? 52'h1000 : (j == 2) ? 52'h1FFF : 52'h2000;
        for (int w = 0; w < 2; w++) begin
          is_write = w[0];
          check("kind");
          // explicit expectations for the kinds
          if (j == 1 || j == 2) begin
            logic e;
            unique case (rule_kind_e'(k))
              REJECT_ALL:   e = 1'b0;
              REJECT_READ:  e = is_write;
              REJECT_WRITE: e = !is_write;
              ALLOW_ALL:    e = 1'b1;
              ALLOW_READ:   e = !is_write;
              ALLOW_WRITE:  e = is_write;
              default:      e = 1'b0;
            endcase
            checks++;
            if (!(hit && allow == e)) begin
              failures++;
              $display("FAIL kind %0d addr %h write %b", k, addr, is_write);
            end
          end else begin
            checks++;
            if (hit) begin
              failures++;
              $display("FAIL kind %0d hit outside range at %h", k, addr);
            end
          end
        end
      end
    end

    // random rules and addresses
    for (int n = 0; n < 20000; n++) begin
      rule.lo = rand_addr();
      rule.hi = ($urandom_range(0, 3) == 0) ? rand_addr() : rule.lo + 52'($urandom_range(0, 4096));
      rule.xbase = rand_addr();
      rule.xsize_log2 = 6'($urandom());
      rule.ctrl = 6'($urandom());
      sel = $urandom_range(0, 5);
      case (sel)
        0: addr = rule.lo;
        1: addr = rule.hi;
        2: addr = rule.lo - 52'd1;
        3: addr = rule.hi + 52'd1;
        4: addr = rule.lo + 52'($urandom_range(0, 4096));
        default: addr = rand_addr();
      endcase
      is_write = 1'($urandom());
      check("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
