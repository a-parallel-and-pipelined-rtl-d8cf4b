// tb_cordic_stage: checks single micro-rotation rows against a reference
// model written with real arithmetic.
//
// Three instances (iterations 0, 3 and 15) receive the same random samples in
// both modes. For each, the testbench forms 2^-i*x and 2^-i*y as floor()
// of a real division, picks the direction from sign(z) (rotation) or sign(y)
// (vectoring), and takes atan(2^-i) from $atan, then checks x, y, z, mode and
// the one-cycle latency. Both directions must occur in both modes. A watchdog
// ends the run if it stalls.
module tb_cordic_stage;
  import cordic_pkg::*;

  localparam int  XY_W = 16;
  localparam int  Z_W  = 32;
  localparam int  NI   = 3;
  localparam int  SHIFTS [NI] = '{0, 3, 15};
  localparam real PI   = 3.14159265358979323846;

  logic                   clk = 1'b0;
  logic                   rst_n;
  logic                   in_valid;
  cordic_mode_e           in_mode;
  logic signed [XY_W-1:0] in_x, in_y;
  logic signed [Z_W-1:0]  in_z;
  logic                   out_valid [NI];
  cordic_mode_e           out_mode  [NI];
  logic signed [XY_W-1:0] out_x     [NI];
  logic signed [XY_W-1:0] out_y     [NI];
  logic signed [Z_W-1:0]  out_z     [NI];

  int checks = 0;
  int failures = 0;
  int dir_seen [2][2];   // [mode][counter-clockwise]

  always #5 clk = ~clk;

  for (genvar k = 0; k < NI; k++) begin : g_dut
    cordic_stage #(.XY_W(XY_W), .Z_W(Z_W), .STAGE(SHIFTS[k])) dut (
      .clk, .rst_n, .in_valid, .in_mode, .in_x, .in_y, .in_z,
      .out_valid(out_valid[k]), .out_mode(out_mode[k]),
      .out_x(out_x[k]), .out_y(out_y[k]), .out_z(out_z[k])
    );
  end

  task automatic check(bit cond, string what, int k);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL i=%0d %s (mode=%0d x=%0d y=%0d z=%h -> x=%0d y=%0d z=%h)",
               SHIFTS[k], what, in_mode, in_x, in_y, in_z, out_x[k], out_y[k], out_z[k]);
    end
  endtask

  initial begin
    longint xs, ys, ex, ey, ez, a, d;
    bit     ccw;
    rst_n = 1'b0; in_valid = 1'b0; in_mode = CORDIC_ROTATE;
    in_x = '0; in_y = '0; in_z = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_mode  = ($urandom_range(1) != 0) ? CORDIC_VECTOR : CORDIC_ROTATE;
      // Keep |x|,|y| small enough that one row cannot overflow (row 0 doubles).
      in_x     = XY_W'($signed($urandom_range(32766)) - 16383);
      in_y     = XY_W'($signed($urandom_range(32766)) - 16383);
      in_z     = Z_W'($signed($urandom_range(32'h7FFF_FFFE)) - 32'sh3FFF_FFFF);
      if (in_mode == CORDIC_ROTATE) ccw = (in_z >= 0);
      else                          ccw = (in_y < 0);
      dir_seen[in_mode][ccw]++;
      d = ccw ? 1 : -1;
      @(posedge clk);
      #1;
      for (int k = 0; k < NI; k++) begin
        xs = longint'($floor(real'(in_x) / (2.0 ** SHIFTS[k])));
        ys = longint'($floor(real'(in_y) / (2.0 ** SHIFTS[k])));
        a  = longint'($floor($atan(2.0 ** (-SHIFTS[k])) / (2.0 * PI) * (2.0 ** Z_W) + 0.5));
        ex = longint'(in_x) - d * ys;
        ey = longint'(in_y) + d * xs;
        ez = longint'(in_z) - d * a;
        check(out_valid[k] == 1'b1, "valid one cycle later", k);
        check(out_mode[k] == in_mode, "mode carried", k);
        check(longint'(out_x[k]) == ex, "x update", k);
        check(longint'(out_y[k]) == ey, "y update", k);
        ez = longint'(out_z[k]) - ez;
        check(ez >= -1 && ez <= 1, "z update", k);
      end
      if ($urandom_range(9) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        @(posedge clk);
        #1;
        for (int k = 0; k < NI; k++) check(out_valid[k] == 1'b0, "bubble gives no output", k);
      end
    end

    for (int md = 0; md < 2; md++)
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (dir_seen[md][c] == 0) begin
          failures++;
          $display("FAIL direction %0d never seen in mode %0d", c, md);
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
