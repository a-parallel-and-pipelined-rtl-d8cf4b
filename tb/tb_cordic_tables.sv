// tb_cordic_tables: follows two worked examples through the pipeline row by
// row and compares each intermediate (x_i, y_i, z_i) and direction d_i with
// the published iteration tables of the classic CORDIC.
//
//   Rotation by 30 degrees from x = 0.6073 (1/K), y = 0, with 1.0 = 2^14:
//     i   d_i   z_i      y_i      x_i
//     0   +1   +30.0    0.0000   0.6073
//     1   -1   -15.0    0.6073   0.6073
//     2   +1   +11.6    0.3036   0.9109
//     3   -1    -2.4    0.5313   0.8350
//     4   +1    +4.7    0.4270   0.9014
//     5   +1    +1.1    0.4833   0.8747
//     6   -1    -0.7    0.5106   0.8596
//     7   +1    +0.2    0.4972   0.8676
//   Vectoring of (x, y) = (1, 2) from z = 0, with 1.0 = 2^13:
//     i    z_i    y_i
//     0    0.0    2.000
//     1   45.0    1.000
//     2   71.6   -0.500
//     3   57.6    0.375
//     4   64.7   -0.078
//     5   61.1    0.151
//     6   62.9    0.039
//     7   63.8   -0.019
//     8   63.4    0.009
// The tables round to one decimal of a degree and use rounded elementary
// angles (14 for 14.04 and so on), hence the 0.2 degree tolerance on z; x and y
// are compared within 0.002, vectoring y within 0.003 because the table's y_6
// (0.039) is itself off: exact arithmetic gives 0.1515 - 3.677/32 = 0.0366. Row i's input must become valid exactly i+1
// cycles after the sample enters (one cycle for the quadrant row). The
// hierarchical names dut.v/x/y/z are the row boundaries of cordic_pipeline.
// A watchdog ends the run if it stalls.
module tb_cordic_tables;
  import cordic_pkg::*;

  localparam int  XY_W  = 16;
  localparam int  Z_W   = 32;
  localparam real TWO_Z = 4294967296.0;

  localparam int  NROT = 8;
  localparam real ROT_D [NROT] = '{1, -1, 1, -1, 1, 1, -1, 1};
  localparam real ROT_Z [NROT] = '{30.0, -15.0, 11.6, -2.4, 4.7, 1.1, -0.7, 0.2};
  localparam real ROT_Y [NROT] = '{0.0, 0.6073, 0.3036, 0.5313, 0.4270, 0.4833, 0.5106, 0.4972};
  localparam real ROT_X [NROT] = '{0.6073, 0.6073, 0.9109, 0.8350, 0.9014, 0.8747, 0.8596, 0.8676};

  localparam int  NVEC = 9;
  localparam real VEC_Z [NVEC] = '{0.0, 45.0, 71.6, 57.6, 64.7, 61.1, 62.9, 63.8, 63.4};
  localparam real VEC_Y [NVEC] = '{2.0, 1.0, -0.5, 0.375, -0.078, 0.151, 0.039, -0.019, 0.009};

  logic                   clk = 1'b0;
  logic                   rst_n;
  logic                   in_valid;
  cordic_mode_e           in_mode;
  logic signed [XY_W-1:0] in_x, in_y;
  logic signed [Z_W-1:0]  in_z;
  logic                   out_valid;
  cordic_mode_e           out_mode;
  logic signed [XY_W-1:0] out_x, out_y;
  logic signed [Z_W-1:0]  out_z;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  cordic_pipeline dut (.*);

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real deg(logic signed [Z_W-1:0] zz);
    return real'(zz) * 360.0 / TWO_Z;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Sends one sample and checks that row i's input is valid i+1 cycles later.
  task automatic launch(cordic_mode_e mode, int x, int y, longint z, int rows);
    @(negedge clk);
    in_valid = 1'b1; in_mode = mode;
    in_x = XY_W'(x); in_y = XY_W'(y); in_z = Z_W'(z);
    @(negedge clk);
    in_valid = 1'b0;
    for (int i = 0; i < rows; i++) begin
      check(dut.v[i] == 1'b1, $sformatf("row %0d input valid %0d cycles after entry", i, i + 1));
      @(negedge clk);
    end
    // Data registers hold their last sample, so after draining every row
    // boundary still shows this sample's values.
    repeat (20) @(negedge clk);
  endtask

  initial begin
    real s;
    rst_n = 1'b0; in_valid = 1'b0; in_mode = CORDIC_ROTATE;
    in_x = '0; in_y = '0; in_z = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Rotation by 30 degrees.
    s = 16384.0;
    launch(CORDIC_ROTATE, int'(0.6072529 * s + 0.5), 0,
           longint'($floor(30.0 * TWO_Z / 360.0)), NROT);
    for (int i = 0; i < NROT; i++) begin
      real d_hw;
      d_hw = (deg(dut.z[i + 1]) < deg(dut.z[i])) ? 1.0 : -1.0;   // z' = z - d*theta
      check(d_hw == ROT_D[i], $sformatf("rotation d_%0d", i));
      check(absr(deg(dut.z[i]) - ROT_Z[i]) <= 0.2,
            $sformatf("rotation z_%0d = %f, table %f", i, deg(dut.z[i]), ROT_Z[i]));
      check(absr(real'(dut.x[i]) / s - ROT_X[i]) <= 0.002,
            $sformatf("rotation x_%0d = %f, table %f", i, real'(dut.x[i]) / s, ROT_X[i]));
      check(absr(real'(dut.y[i]) / s - ROT_Y[i]) <= 0.002,
            $sformatf("rotation y_%0d = %f, table %f", i, real'(dut.y[i]) / s, ROT_Y[i]));
    end
    check(absr(real'(out_x) / s - 0.8660) <= 0.002, "rotation result cos 30");
    check(absr(real'(out_y) / s - 0.5000) <= 0.002, "rotation result sin 30");

    // Vectoring of (1, 2).
    s = 8192.0;
    launch(CORDIC_VECTOR, 8192, 16384, 0, NVEC);
    for (int i = 0; i < NVEC; i++) begin
      check(absr(deg(dut.z[i]) - VEC_Z[i]) <= 0.2,
            $sformatf("vectoring z_%0d = %f, table %f", i, deg(dut.z[i]), VEC_Z[i]));
      check(absr(real'(dut.y[i]) / s - VEC_Y[i]) <= 0.003,
            $sformatf("vectoring y_%0d = %f, table %f", i, real'(dut.y[i]) / s, VEC_Y[i]));
    end
    check(absr(deg(out_z) - 63.4349) <= 0.01, "vectoring result atan(2)");
    check(absr(real'(out_x) / s - 1.646760 * 2.2360680) <= 0.003, "vectoring result K*sqrt(5)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
