// att_access_check: the access check of one Address Translation Table rule.
//
// The request address is compared against the rule's Compare Low and Compare
// High bounds, both inclusive. Reverse inverts the result of that comparison;
// a rule whose Enabled bit is clear never hits. On a hit the access control
// bits decide: Reject denies everything, otherwise Rd allows reads and Wr
// allows writes. The bit meanings follow the ATT description; the block is
// purely combinational (no clock), so the caller adds any pipelining.
//
// Interface: rule (att_rule_t), addr and is_write of the request in;
// hit (the rule matches the address) and allow (the matched rule lets this
// operation through; meaningful only when hit) out.
module att_access_check
  import cosm_pkg::*;
(
  input  att_rule_t         rule,
  input  logic [ADDR_W-1:0] addr,
  input  logic              is_write,
  output logic              hit,
  output logic              allow
);

  logic in_range;

  always_comb begin
    in_range = (addr >= rule.lo) && (addr <= rule.hi);
    hit      = rule.ctrl.enabled && (in_range ^ rule.ctrl.reverse);
    allow    = !rule.ctrl.reject && (is_write ? rule.ctrl.wr : rule.ctrl.rd);
  end

endmodule
