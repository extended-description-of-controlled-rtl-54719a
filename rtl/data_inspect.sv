// data_inspect: second-level COSM isolation by data inspection.
//
// A write that the permission rules allow is checked once more on its
// payload. Two checks can be enabled, each on a FIELD_W-bit field that starts
// at its own programmable bit position of the 64-byte write data:
//  - range check: the field, unsigned, must lie within [lo, hi], e.g. a
//    parameter value that must stay within its limits;
//  - header check: the field must equal hdr_val in every bit set in
//    hdr_mask, e.g. a message type or version that marks a valid format.
// pass is high when every enabled check holds. Reads pass unchecked. What the
// ATT does with a failed write (reject it, or only flag it) is decided there.
//
// Checking that a field lies in a range and that a header has the expected
// format are the examples of user-defined inspection the COSM concept gives;
// the fixed field width, one range and one header pattern per link, and the
// restriction to writes are this design's own choices.
//
// Interface: configuration (rng_en, rng_lsb, lo, hi, hdr_en, hdr_lsb,
// hdr_val, hdr_mask), is_write and data of the request in; pass out.
// Combinational: pass is valid in the same cycle.
module data_inspect
  import cosm_pkg::*;
(
  input  logic               rng_en,
  input  logic [8:0]         rng_lsb,
  input  logic [FIELD_W-1:0] lo,
  input  logic [FIELD_W-1:0] hi,
  input  logic               hdr_en,
  input  logic [8:0]         hdr_lsb,
  input  logic [FIELD_W-1:0] hdr_val,
  input  logic [FIELD_W-1:0] hdr_mask,
  input  logic               is_write,
  input  logic [DATA_W-1:0]  data,
  output logic               pass
);

  logic [DATA_W-1:0]  rng_shifted, hdr_shifted;
  logic [FIELD_W-1:0] rng_field, hdr_field;
  logic               rng_ok, hdr_ok;

  always_comb begin
    rng_shifted = data >> rng_lsb;
    rng_field   = rng_shifted[FIELD_W-1:0];
    hdr_shifted = data >> hdr_lsb;
    hdr_field   = hdr_shifted[FIELD_W-1:0];
    rng_ok      = !rng_en || ((rng_field >= lo) && (rng_field <= hi));
    hdr_ok      = !hdr_en || (((hdr_field ^ hdr_val) & hdr_mask) == '0);
    pass        = !is_write || (rng_ok && hdr_ok);
  end

endmodule
