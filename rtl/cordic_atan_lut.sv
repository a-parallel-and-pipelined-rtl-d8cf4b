// cordic_atan_lut: elementary-angle look-up table of the CORDIC.
//
// Returns atan(2^-idx) as a Z_W-bit binary angle (2^Z_W = one full turn) for
// idx = 0..N_ENTRIES-1, and 0 for any larger index. It is purely
// combinational. In the unrolled pipeline each stage reads it at a constant
// index, so synthesis folds it to that stage's constant; an iterative CORDIC
// would read it with its iteration counter. The table contents are the
// standard CORDIC angles named in the paper (45, 26.6, 14, 7.1, ... degrees);
// the binary-angle encoding and the rounding are this design's choice.
//
// Interface: idx (entry number) -> angle (unsigned Z_W-bit binary angle).
module cordic_atan_lut
  import cordic_pkg::*;
#(
  parameter int unsigned Z_W       = 32,
  parameter int unsigned N_ENTRIES = 16
) (
  input  logic [IDX_W-1:0] idx,
  output logic [Z_W-1:0]                angle
);

  initial begin
    assert (Z_W >= 4 && Z_W <= TABLE_W)
      else $error("cordic_atan_lut: Z_W must be in 4..%0d", TABLE_W);
    assert (N_ENTRIES >= 1 && N_ENTRIES <= MAX_STAGES)
      else $error("cordic_atan_lut: N_ENTRIES must be in 1..%0d", MAX_STAGES);
  end

  // Table built from the package constants; entries from N_ENTRIES on are 0.
  logic [Z_W-1:0] rom [MAX_STAGES];

  always_comb begin
    for (int unsigned i = 0; i < MAX_STAGES; i++) begin
      rom[i] = (i < N_ENTRIES) ? Z_W'(atan_angle(IDX_W'(i), Z_W)) : '0;
    end
  end

  assign angle = rom[idx];

endmodule
