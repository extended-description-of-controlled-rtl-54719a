// tb_data_inspect: self-checking test of the write-data inspection checks.
//
// Each trial fills a random 64-byte payload and places a random 32-bit value
// at a random bit position for the range check and another at a second
// random position for the header check (the two fields may overlap). The
// range is programmed around, at the edges of, or away from the range
// value; the header pattern either matches the header value under its mask
// or differs from it in one masked bit. pass is compared with a model that
// picks the fields out bit by bit: reads always pass, writes pass when every
// enabled check holds.
module tb_data_inspect;
  import cosm_pkg::*;

  logic               rng_en, hdr_en, is_write, pass;
  logic [8:0]         rng_lsb, hdr_lsb;
  logic [FIELD_W-1:0] lo, hi, v, hv, hdr_val, hdr_mask;
  logic [DATA_W-1:0]  data;
  int                 checks = 0, failures = 0;
  int unsigned        sel;

  data_inspect dut (.rng_en, .rng_lsb, .lo, .hi, .hdr_en, .hdr_lsb, .hdr_val, .hdr_mask,
                    .is_write, .data, .pass);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n_pass;
    n_pass = 0;
    for (int n = 0; n < 20000; n++) begin
      logic exp, r_ok, h_ok;
      logic [FIELD_W-1:0] rf, hf;
      for (int w = 0; w < DATA_W / 32; w++) data[w*32 +: 32] = $urandom();
      hdr_lsb = 9'($urandom_range(0, DATA_W - FIELD_W));
      hv = $urandom();
      for (int b = 0; b < FIELD_W; b++) data[32'(hdr_lsb) + b] = hv[b];
      rng_lsb = 9'($urandom_range(0, DATA_W - FIELD_W));
      v = $urandom();
      for (int b = 0; b < FIELD_W; b++) data[32'(rng_lsb) + b] = v[b];
      sel = $urandom_range(0, 4);
      case (sel)
        0: begin lo = v; hi = v; end
        1: begin lo = v + 1; hi = v + 32'd100; end
        2: begin lo = v - 32'd100; hi = v - 1; end
        3: begin lo = v - 32'($urandom_range(0, 50)); hi = v + 32'($urandom_range(0, 50)); end
        default: begin lo = $urandom(); hi = $urandom(); end
      endcase
      // header pattern taken from the payload as it now stands, then
      // possibly broken in one masked bit
      for (int b = 0; b < FIELD_W; b++) hf[b] = data[32'(hdr_lsb) + b];
      hdr_mask = $urandom() | 32'h1;
      hdr_val  = (hf & hdr_mask) | ($urandom() & ~hdr_mask);
      if ($urandom_range(0, 1) == 0) begin
        int unsigned k;
        k = $urandom_range(0, FIELD_W - 1);
        while (!hdr_mask[k]) k = (k + 1) % FIELD_W;
        hdr_val[k] = ~hdr_val[k];
      end
      rng_en = ($urandom_range(0, 3) != 0);
      hdr_en = ($urandom_range(0, 2) != 0);
      is_write = ($urandom_range(0, 3) != 0);
      #1;
      // fields taken bit by bit, independently of the shifters in the design
      for (int b = 0; b < FIELD_W; b++) rf[b] = data[32'(rng_lsb) + b];
      r_ok = (rf >= lo && rf <= hi);
      h_ok = 1'b1;
      for (int b = 0; b < FIELD_W; b++) if (hdr_mask[b] && hf[b] != hdr_val[b]) h_ok = 1'b0;
      exp = !is_write || ((!rng_en || r_ok) && (!hdr_en || h_ok));
      if (exp && is_write && (rng_en || hdr_en)) n_pass++;
      checks++;
      if (pass !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL rng %0d field=%h lo=%h hi=%h en=%b, hdr %0d field=%h val=%h mask=%h en=%b, wr=%b pass=%b",
                   rng_lsb, rf, lo, hi, rng_en, hdr_lsb, hf, hdr_val, hdr_mask, hdr_en, is_write, pass);
      end
    end
    checks++;
    if (n_pass < 1000) begin
      failures++;
      $display("FAIL only %0d inspected writes passed", n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
