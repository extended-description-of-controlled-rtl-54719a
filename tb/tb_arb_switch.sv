// tb_arb_switch: self-checking test of the arbitration switch at its default
// size (10 inputs, 4 outputs).
//
// Phase 1: one flit through an idle switch must appear at its output exactly
// 2 clocks after it was accepted. Phase 2: every input sends random flits to
// random outputs while the outputs stall at random; a scoreboard checks that
// every flit arrives once, at the output it was sent to, with its payload
// intact and in order per input/output pair. Phase 3: all inputs keep output
// 0 busy with outputs always ready; round-robin arbitration must then give
// every input the same number of grants, within one. Phase 4: with output 0
// stalled, input 0 fills its channel for output 0; a flit it then sends to
// output 1 travels in the other virtual channel and must pass the blocked
// flits, arriving 2 clocks after it was accepted.
module tb_arb_switch;
  import cosm_pkg::*;

  localparam int NI = 10, NO = 4;

  logic              clk = 0, rst_n = 0;
  logic [NI-1:0]     in_valid, in_ready;
  flit_t             in_flit [NI];
  logic [PORT_W-1:0] in_dst  [NI];
  logic [NO-1:0]     out_valid, out_ready;
  flit_t             out_flit [NO];

  int checks = 0, failures = 0;
  int unsigned seq [NI];
  int unsigned exp_q [NI][NO][$];
  int unsigned sent = 0, recv = 0;
  int unsigned grants [NI];
  int          phase = 0;
  int unsigned cyc = 0;

  arb_switch dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_flit(int i, int unsigned d);
    seq[i]++;
    in_flit[i]          <= '0;
    in_flit[i].src      <= PORT_W'(i);
    in_flit[i].tag      <= TAG_W'(seq[i]);
    in_flit[i].addr     <= ADDR_W'({$urandom(), $urandom()});
    in_flit[i].data     <= {16{seq[i] ^ 32'(i << 24)}};
    in_dst[i]           <= PORT_W'(d);
  endtask

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < NI; i++)
      if (in_valid[i] && in_ready[i]) begin
        exp_q[i][in_dst[i]].push_back(in_flit[i].data[31:0] ^ 32'(i << 24));
        sent++;
      end
    for (int o = 0; o < NO; o++)
      if (out_valid[o] && out_ready[o]) begin
        int s;
        int unsigned e;
        s = int'(out_flit[o].src);
        recv++;
        checks++;
        if (s >= NI || exp_q[s][o].size() == 0) begin
          failures++;
          $display("FAIL unexpected flit at output %0d from %0d", o, s);
        end else begin
          e = exp_q[s][o].pop_front();
          if (out_flit[o].data !== {16{e ^ 32'(s << 24)}} || out_flit[o].tag !== TAG_W'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL output %0d from %0d: seq %0d expected", o, s, e);
          end
        end
        if (phase == 3 && o == 0) grants[s]++;
      end
  end

  initial begin
    int t0;
    in_valid  = '0;
    out_ready = '0;
    for (int i = 0; i < NI; i++) begin seq[i] = 0; grants[i] = 0; in_flit[i] = '0; in_dst[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // phase 1: latency through an idle switch
    phase = 1;
    out_ready <= '1;
    new_flit(3, 2);
    in_valid[3] <= 1'b1;
    @(posedge clk);
    in_valid[3] <= 1'b0;
    t0 = cyc;
    while (!out_valid[2]) @(posedge clk);
    checks++;
    if (cyc - t0 != 2) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 2", cyc - t0);
    end
    @(posedge clk);

    // phase 2: random traffic with random stalls
    phase = 2;
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < NI; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          if ($urandom_range(0, 2) != 0) begin
            in_valid[i] <= 1'b1;
            new_flit(i, $urandom_range(0, NO - 1));
          end else begin
            in_valid[i] <= 1'b0;
          end
        end
      end
      out_ready <= NO'($urandom());
      @(posedge clk);
    end
    in_valid <= '0;
    out_ready <= '1;
    repeat (50) @(posedge clk);

    // phase 3: fairness under full contention for output 0
    phase = 3;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < NI; i++)
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] <= 1'b1;
          new_flit(i, 0);
        end
      @(posedge clk);
    end
    in_valid <= '0;
    repeat (50) @(posedge clk);

    // phase 4: no head-of-line blocking between virtual channels
    phase = 4;
    out_ready <= 4'b1110;
    in_valid[0] <= 1'b1;
    new_flit(0, 0);
    @(posedge clk);
    for (int n = 0; n < 20 && in_ready[0]; n++) begin
      new_flit(0, 0);
      @(posedge clk);
    end
    checks++;
    if (in_ready[0] || !out_valid[0]) begin
      failures++;
      $display("FAIL output 0 stall did not back up to input 0");
    end
    new_flit(0, 1);
    #1;
    checks++;
    if (!in_ready[0]) begin
      failures++;
      $display("FAIL flit for output 1 refused while output 0 is stalled");
    end
    @(posedge clk);
    in_valid[0] <= 1'b0;
    t0 = cyc;
    for (int n = 0; n < 10 && !out_valid[1]; n++) @(posedge clk);
    checks++;
    if (!out_valid[1] || cyc - t0 != 2) begin
      failures++;
      $display("FAIL flit for output 1 blocked behind output 0 (%0d clocks)", cyc - t0);
    end
    out_ready <= '1;
    repeat (20) @(posedge clk);

    checks++;
    if (sent != recv) begin
      failures++;
      $display("FAIL sent %0d flits, received %0d", sent, recv);
    end
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (grants[i] + 1 < grants[0] || grants[i] > grants[0] + 1) begin
        failures++;
        $display("FAIL unfair: input %0d got %0d grants, input 0 got %0d", i, grants[i], grants[0]);
      end
    end
    $display("sent %0d flits, grants per input under contention %0d", sent, grants[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
