// cordic_prerotate: registered quadrant correction in front of the CORDIC stages.
//
// The micro-rotations together cover only about +-99.7 degrees, so each
// sample is first turned by 0, +90 or -90 degrees, which costs no arithmetic
// beyond swapping and negating x and y:
//   rotation mode  (drive z to 0): the two top bits of the binary angle z name
//     its quadrant. For z in [90,180) the vector is turned by +90 degrees
//     (x,y) -> (-y,x) and 90 degrees is taken off z; for z in [-180,-90) it is
//     turned by -90 degrees (x,y) -> (y,-x) and 90 degrees is added to z.
//   vectoring mode (drive y to 0): a vector with x < 0 is turned into the
//     right half-plane, by -90 degrees if y >= 0 and by +90 degrees if y < 0,
//     and z records the turn (+90 or -90 degrees respectively).
// Afterwards the residual angle lies within +-90 degrees. Turning the vector
// by +-pi/2 to widen the range is the paper's; the exact selection rules, the
// binary-angle encoding and the output register are this design's choice.
//
// Interface: in_valid/in_mode/in_x/in_y/in_z are sampled on the rising clock
// edge; out_* appear one cycle later. rst_n (asynchronous, active low) clears
// out_valid only. x and y must stay inside +-(2^(XY_W-1)-1); the negation of
// the most negative value is not representable.
module cordic_prerotate
  import cordic_pkg::*;
#(
  parameter int unsigned XY_W = 16,
  parameter int unsigned Z_W  = 32
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

  // +90 degrees as a binary angle.
  localparam logic signed [Z_W-1:0] QUARTER = Z_W'(1) <<< (Z_W - 2);

  typedef enum logic [1:0] {
    TURN_NONE  = 2'd0,
    TURN_PLUS  = 2'd1,   // rotate the vector by +90 degrees
    TURN_MINUS = 2'd2    // rotate the vector by -90 degrees
  } turn_e;

  turn_e                   turn;
  logic signed [XY_W-1:0]  nx, ny;
  logic signed [Z_W-1:0]   nz;

  always_comb begin
    turn = TURN_NONE;
    if (in_mode == CORDIC_ROTATE) begin
      unique case (in_z[Z_W-1 -: 2])
        2'b01:   turn = TURN_PLUS;    // [ +90, +180)
        2'b10:   turn = TURN_MINUS;   // [-180,  -90)
        default: turn = TURN_NONE;
      endcase
    end else if (in_x < 0) begin
      turn = (in_y < 0) ? TURN_PLUS : TURN_MINUS;
    end

    unique case (turn)
      TURN_PLUS: begin
        nx = -in_y;
        ny = in_x;
        // Rotation mode: the turn is taken off the angle still to go.
        // Vectoring mode: z accumulates the angle of the vector, and a
        // +90 degree turn means the vector's angle was 90 degrees lower.
        nz = in_z - QUARTER;
      end
      TURN_MINUS: begin
        nx = in_y;
        ny = -in_x;
        nz = in_z + QUARTER;
      end
      default: begin
        nx = in_x;
        ny = in_y;
        nz = in_z;
      end
    endcase
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
