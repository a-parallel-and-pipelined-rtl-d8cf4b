// cordic_pkg: types and constants shared by the CORDIC pipeline.
//
// Angles are binary angles: a Z_W-bit two's-complement word where 2^Z_W is one
// full turn, so 2^(Z_W-2) is +90 degrees and the word wraps naturally at
// +-180 degrees. The elementary-angle table below holds
//     ATAN_TABLE[i] = round( atan(2^-i) / (2*pi) * 2^32 )
// for i = 0..31 at 32-bit resolution; narrower angle words take a rounded,
// right-shifted copy (see atan_angle). The two CORDIC modes (rotation and
// vectoring) follow the paper's description; carrying the mode with each
// sample is this design's choice.
package cordic_pkg;

  // Number of entries in the elementary-angle table, and so the largest
  // number of micro-rotation stages a pipeline may be built with.
  localparam int unsigned MAX_STAGES = 32;
  // Resolution at which the table is stored.
  localparam int unsigned TABLE_W = 32;
  // Width of a table index.
  localparam int unsigned IDX_W = $clog2(MAX_STAGES);

  typedef enum logic {
    CORDIC_ROTATE = 1'b0,  // drive z to 0: d_i = sign(z_i)
    CORDIC_VECTOR = 1'b1   // drive y to 0: d_i = -sign(y_i)
  } cordic_mode_e;

  localparam logic [TABLE_W-1:0] ATAN_TABLE [MAX_STAGES] = '{
    32'h20000000, // i= 0  45.000000 deg
    32'h12E4051E, // i= 1  26.565051 deg
    32'h09FB385B, // i= 2  14.036243 deg
    32'h051111D4, // i= 3   7.125016 deg
    32'h028B0D43, // i= 4   3.576334 deg
    32'h0145D7E1, // i= 5   1.789911 deg
    32'h00A2F61E, // i= 6   0.895174 deg
    32'h00517C55, // i= 7   0.447614 deg
    32'h0028BE53, // i= 8   0.223811 deg
    32'h00145F2F, // i= 9   0.111906 deg
    32'h000A2F98, // i=10   0.055953 deg
    32'h000517CC, // i=11   0.027976 deg
    32'h00028BE6, // i=12   0.013988 deg
    32'h000145F3, // i=13   0.006994 deg
    32'h0000A2FA, // i=14   0.003497 deg
    32'h0000517D, // i=15   0.001749 deg
    32'h000028BE, // i=16
    32'h0000145F, // i=17
    32'h00000A30, // i=18
    32'h00000518, // i=19
    32'h0000028C, // i=20
    32'h00000146, // i=21
    32'h000000A3, // i=22
    32'h00000051, // i=23
    32'h00000029, // i=24
    32'h00000014, // i=25
    32'h0000000A, // i=26
    32'h00000005, // i=27
    32'h00000003, // i=28
    32'h00000001, // i=29
    32'h00000001, // i=30
    32'h00000000  // i=31
  };

  // Elementary angle atan(2^-i) as a zw-bit binary angle (zw <= TABLE_W),
  // rounded to nearest.
  function automatic logic [TABLE_W-1:0] atan_angle(logic [IDX_W-1:0] i, int unsigned zw);
    logic [TABLE_W:0] wide;
    wide = {1'b0, ATAN_TABLE[i]};
    if (zw < TABLE_W) begin
      wide = wide + ((TABLE_W+1)'(1) << (TABLE_W - zw - 1));
      wide = wide >> (TABLE_W - zw);
    end
    return wide[TABLE_W-1:0];
  endfunction

endpackage
