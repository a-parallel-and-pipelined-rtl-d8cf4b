// tb_cordic_prerotate: checks the quadrant correction with random samples.
//
// For each sample the testbench works out, with real arithmetic on angles in
// degrees, which quarter turn should be applied: in rotation mode the one that
// brings the angle into [-90, 90) degrees, in vectoring mode the one that
// brings a vector with x < 0 into the right half-plane. It then checks the
// turned x/y, the adjusted z, the mode and the one-cycle latency of the
// registered output, and that in_valid low produces no output. Every kind of
// turn in both modes must occur. A watchdog ends the run if it stalls.
module tb_cordic_prerotate;
  import cordic_pkg::*;

  localparam int XY_W = 16;
  localparam int Z_W  = 32;

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
  int seen [2][3];   // [mode][turn: 0 none, 1 +90, 2 -90]

  always #5 clk = ~clk;

  cordic_prerotate dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (mode=%0d x=%0d y=%0d z=%h -> x=%0d y=%0d z=%h)",
               what, in_mode, in_x, in_y, in_z, out_x, out_y, out_z);
    end
  endtask

  initial begin
    int   turn;
    real  deg, exp_deg, got_deg;
    longint ex, ey;
    rst_n = 1'b0; in_valid = 1'b0; in_mode = CORDIC_ROTATE;
    in_x = '0; in_y = '0; in_z = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(out_valid == 1'b0, "valid after reset");

    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_mode  = ($urandom_range(1) != 0) ? CORDIC_VECTOR : CORDIC_ROTATE;
      in_x     = XY_W'($signed($urandom_range(65534)) - 32767);
      in_y     = XY_W'($signed($urandom_range(65534)) - 32767);
      in_z     = Z_W'($urandom);
      deg      = real'(in_z) * 360.0 / (2.0 ** Z_W);
      // Expected quarter turn of the vector.
      if (in_mode == CORDIC_ROTATE) begin
        if (deg >= 90.0)       turn = 1;
        else if (deg < -90.0)  turn = 2;
        else                   turn = 0;
      end else begin
        if (in_x >= 0)         turn = 0;
        else if (in_y < 0)     turn = 1;
        else                   turn = 2;
      end
      seen[in_mode][turn]++;
      case (turn)
        1:       begin ex = -longint'(in_y); ey = longint'(in_x);  exp_deg = deg - 90.0; end
        2:       begin ex = longint'(in_y);  ey = -longint'(in_x); exp_deg = deg + 90.0; end
        default: begin ex = longint'(in_x);  ey = longint'(in_y);  exp_deg = deg;        end
      endcase
      if (exp_deg >= 180.0)  exp_deg -= 360.0;
      if (exp_deg < -180.0)  exp_deg += 360.0;
      @(posedge clk);
      #1;
      got_deg = real'(out_z) * 360.0 / (2.0 ** Z_W);
      check(out_valid == 1'b1, "valid one cycle later");
      check(out_mode == in_mode, "mode carried");
      check(longint'(out_x) == ex && longint'(out_y) == ey, "turned x/y");
      check(got_deg - exp_deg < 1e-6 && exp_deg - got_deg < 1e-6, "adjusted z");
      if (in_mode == CORDIC_ROTATE)
        check(got_deg >= -90.0 && got_deg < 90.0, "residual angle in range");
      else
        check(out_x >= 0, "vector in right half-plane");
      // Occasional bubble.
      if ($urandom_range(7) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        @(posedge clk);
        #1;
        check(out_valid == 1'b0, "bubble gives no output");
      end
    end

    for (int md = 0; md < 2; md++)
      for (int t = 0; t < 3; t++)
        check(seen[md][t] > 0, $sformatf("turn %0d in mode %0d exercised", t, md));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
