// sc_tail_lut: lookup table of tail-bit indices for step 2.
// The index sequence of W is cut into groups of 2^H positions (H = N/2).
// Every full group ends in one "tail" position, g * 2^H for group g, whose
// input-bit index is N-1-H-tz(g).  The table holds that index for
// g = 1 .. 2^H-1 (entry 0 is unused and holds 0).  It is a constant table
// built at elaboration from that formula; the read is combinational.
// Storing the tail indices in a LUT follows the published design; the
// formula for its contents is derived from the index sequence.
module sc_tail_lut
  import sc_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned H  = N / 2,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic [H-1:0]  g,    // group number 1 .. 2^H-1
  output logic [IW-1:0] idx   // input-bit index of that group's tail bit
);
  typedef logic [(2**H)-1:0][IW-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    t = '0;
    for (int unsigned k = 1; k < 2**H; k++) begin
      t[k] = IW'(N - 1 - H - tz(32'(k), H));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign idx = TABLE[g];
endmodule
