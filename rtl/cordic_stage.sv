// cordic_stage: one unrolled, registered CORDIC micro-rotation (iteration STAGE).
//
// This is one row of the parallel-pipelined CORDIC: two arithmetic shifters
// give 2^-i*x and 2^-i*y, three adder/subtractors update x, y and z, and a
// constant from the elementary-angle table gives atan(2^-i). With d = +1 or -1,
//     x' = x - d * (y >>> i)
//     y' = y + d * (x >>> i)
//     z' = z - d * atan(2^-i)
// Rotation mode takes d = sign(z) and drives z towards 0; vectoring mode takes
// d = -sign(y) and drives y towards 0 while z gathers the vector's angle
// (zero counts as positive). The equations, the sign-controlled
// adder/subtractors and the register after each row follow the paper. The
// valid bit and per-sample mode carried alongside, and truncating shifts, are
// this design's choice.
//
// Interface: inputs are sampled on the rising clock edge; the updated sample
// appears on out_* one cycle later. rst_n (asynchronous, active low) clears
// out_valid only; data registers load only when in_valid is high.
module cordic_stage
  import cordic_pkg::*;
#(
  parameter int unsigned XY_W  = 16,
  parameter int unsigned Z_W   = 32,
  parameter int unsigned STAGE = 0
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
    assert (STAGE < MAX_STAGES)
      else $error("cordic_stage: STAGE must be below %0d", MAX_STAGES);
  end

  logic [Z_W-1:0]         alpha;     // atan(2^-STAGE) as a binary angle
  logic signed [XY_W-1:0] x_shift, y_shift;
  logic                   ccw;       // d = +1: counter-clockwise turn
  logic signed [XY_W-1:0] nx, ny;
  logic signed [Z_W-1:0]  nz;

  cordic_atan_lut #(
    .Z_W      (Z_W),
    .N_ENTRIES(STAGE + 1)
  ) u_lut (
    .idx  (IDX_W'(STAGE)),
    .angle(alpha)
  );

  assign x_shift = in_x >>> STAGE;
  assign y_shift = in_y >>> STAGE;

  always_comb begin
    if (in_mode == CORDIC_ROTATE) ccw = !in_z[Z_W-1];   // z >= 0
    else                          ccw = in_y[XY_W-1];   // y <  0

    if (ccw) begin
      nx = in_x - y_shift;
      ny = in_y + x_shift;
      nz = in_z - $signed(alpha);
    end else begin
      nx = in_x + y_shift;
      ny = in_y - x_shift;
      nz = in_z + $signed(alpha);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_mode <= in_mode;
      out_x    <= nx;
      out_y    <= ny;
      out_z    <= nz;
    end
  end

endmodule
