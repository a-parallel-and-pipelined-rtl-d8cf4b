// cordic_pipeline: parallel-pipelined CORDIC rotator/vectorer (top level).
//
// The CORDIC iteration is unrolled into STAGES rows, one per iteration
// i = 0..STAGES-1, each with its own shifters, adder/subtractors and angle
// constant, and a register after every row. A new sample may enter on every
// clock; iteration i of a sample runs in the cycle after iteration i-1, so the
// critical path is one row rather than the whole chain. A quadrant
// pre-rotation row (cordic_prerotate) in front extends the range to the full
// circle.
//
// Modes, chosen per sample with in_mode:
//   CORDIC_ROTATE: turns (x,y) by the angle z.
//       out_x = K*(x*cos z - y*sin z),  out_y = K*(y*cos z + x*sin z),  out_z ~ 0
//     Starting from x = 1/K = 0.60725 (in the chosen scale), y = 0 gives
//     out_x = cos z, out_y = sin z.
//   CORDIC_VECTOR: turns (x,y) onto the positive x axis.
//       out_x = K*sqrt(x^2+y^2),  out_y ~ 0,  out_z = z + atan2(y,x)
// K = prod sqrt(1+2^-2i) ~ 1.6468 for 16 stages; the gain is not removed in
// hardware, as in the paper.
//
// Number formats: x and y are XY_W-bit two's complement with any fixed binary
// point (the same on input and output). z is a Z_W-bit binary angle:
// 2^Z_W is a full turn, so 2^(Z_W-2) is 90 degrees. To stay clear of overflow,
// K*sqrt(x^2+y^2) must stay below 2^(XY_W-1).
//
// Timing: LATENCY = STAGES + 1 cycles from a sample on in_* (with in_valid) to
// its result on out_* (with out_valid); throughput is one sample per clock,
// with no back-pressure. rst_n (asynchronous, active low) clears the valid bits.
//
// Follows the paper: 16 unrolled rows with shifts >>0..>>15, registers between
// rows, 16-bit x/y, rotation and vectoring modes, and the +-90 degree turn in
// front. This design's own choices: the angle width and encoding, the register
// after the last row, the valid/mode side-band and the per-sample mode.
module cordic_pipeline
  import cordic_pkg::*;
#(
  parameter int unsigned XY_W   = 16,
  parameter int unsigned Z_W    = 32,
  parameter int unsigned STAGES = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  cordic_mode_e           in_mode,
  input  logic signed [XY_W-1:0] in_x,
  input  logic signed [XY_W-1:0] in_y,
  input  logic signed [Z_W-1:0]  in_z,
  output logic                   out_valid,
  output cordic_mode_e           out_mode,
  output logic signed [XY_W-1:0] out_x,
  output logic signed [XY_W-1:0] out_y,
  output logic signed [Z_W-1:0]  out_z
);

  initial begin
    assert (STAGES >= 1 && STAGES <= MAX_STAGES)
      else $error("cordic_pipeline: STAGES must be in 1..%0d", MAX_STAGES);
  end

  // Row boundaries: index 0 is the pre-rotation output, index i+1 the output
  // of micro-rotation i.
  logic                   v [STAGES+1];
  cordic_mode_e           m [STAGES+1];
  logic signed [XY_W-1:0] x [STAGES+1];
  logic signed [XY_W-1:0] y [STAGES+1];
  logic signed [Z_W-1:0]  z [STAGES+1];

  cordic_prerotate #(
    .XY_W(XY_W),
    .Z_W (Z_W)
  ) u_prerotate (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_mode  (in_mode),
    .in_x     (in_x),
    .in_y     (in_y),
    .in_z     (in_z),
    .out_valid(v[0]),
    .out_mode (m[0]),
    .out_x    (x[0]),
    .out_y    (y[0]),
    .out_z    (z[0])
  );

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    cordic_stage #(
      .XY_W (XY_W),
      .Z_W  (Z_W),
      .STAGE(i)
    ) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[i]),
      .in_mode  (m[i]),
      .in_x     (x[i]),
      .in_y     (y[i]),
      .in_z     (z[i]),
      .out_valid(v[i+1]),
      .out_mode (m[i+1]),
      .out_x    (x[i+1]),
      .out_y    (y[i+1]),
      .out_z    (z[i+1])
    );
  end

  assign out_valid = v[STAGES];
  assign out_mode  = m[STAGES];
  assign out_x     = x[STAGES];
  assign out_y     = y[STAGES];
  assign out_z     = z[STAGES];

endmodule
