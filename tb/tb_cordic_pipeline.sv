// tb_cordic_pipeline: end-to-end test of the parallel-pipelined CORDIC at its
// default size (16-bit x/y, 32-bit angle, 16 stages).
//
// Every sample sent is pushed onto a scoreboard with the cycle it entered and
// a result worked out with real arithmetic ($sin, $cos, $atan2, $sqrt and the
// gain K of the stages). Each result must come out exactly STAGES+1 cycles
// later, in order, within 16 LSBs of the reference (each of the 16 rows
// truncates its shifted operand, with no guard bits). The phases are:
//   1. sine/cosine sweep: x = 19429 (32000/K), y = 0, angle 0..360 degrees in
//      1-degree steps, one sample per clock, so out_x/out_y trace a cosine
//      and a sine of amplitude ~32000;
//   2. rotation by 30 degrees from x = 1/K, y = 0 (expects cos 30, sin 30);
//   3. vectoring of (1, 2) (expects angle 63.43 degrees, length K*sqrt(5));
//   4. random rotations and vectorings over the whole circle, mixed modes,
//      with random gaps between samples.
// The testbench counts how often each mechanism happened: rotation and
// vectoring samples with each of the three quarter turns, back-to-back
// samples, gaps, and changes of mode between consecutive samples; a mechanism
// that never happened counts as a failure. A watchdog ends the run if it stalls.
module tb_cordic_pipeline;
  import cordic_pkg::*;

  localparam int  XY_W    = 16;
  localparam int  Z_W     = 32;
  localparam int  STAGES  = 16;
  localparam int  LATENCY = STAGES + 1;
  localparam real PI      = 3.14159265358979323846;
  localparam real TWO_Z   = 4294967296.0;   // 2^Z_W

  typedef struct {
    longint       cycle;
    cordic_mode_e mode;
    real          ex, ey;     // expected x, y
    real          ez_deg;     // expected z in degrees (vectoring only)
    real          xy_tol;     // tolerance on x, y in LSB
    real          z_tol_deg;  // tolerance on z in degrees
    string        tag;
  } expect_t;

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

  expect_t q[$];
  longint  cycle = 0;
  int      checks = 0;
  int      failures = 0;
  real     gain;

  // Mechanism counters.
  int turn_seen [2][3];     // [mode][0 none, 1 +90, 2 -90]
  int back_to_back = 0;
  int gaps = 0;
  int mode_switches = 0;
  bit prev_valid = 0;
  cordic_mode_e prev_mode = CORDIC_ROTATE;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cordic_pipeline dut (.*);

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real wrap180(real d);
    while (d >= 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Drives one sample in the current cycle (call after a negedge) and queues
  // its reference result.
  task automatic send(cordic_mode_e mode, int x, int y, longint z, string tag,
                      real xy_tol = 16.0);
    expect_t e;
    real deg, zr, mag;
    int  turn;
    in_valid = 1'b1;
    in_mode  = mode;
    in_x     = XY_W'(x);
    in_y     = XY_W'(y);
    in_z     = Z_W'(z);
    deg = real'(in_z) * 360.0 / TWO_Z;
    zr  = deg * PI / 180.0;
    e.cycle  = cycle;
    e.mode   = mode;
    e.tag    = tag;
    e.xy_tol = xy_tol;
    if (mode == CORDIC_ROTATE) begin
      e.ex = gain * (real'(x) * $cos(zr) - real'(y) * $sin(zr));
      e.ey = gain * (real'(y) * $cos(zr) + real'(x) * $sin(zr));
      e.ez_deg = 0.0;
      e.z_tol_deg = 0.01;
      turn = (deg >= 90.0) ? 1 : (deg < -90.0) ? 2 : 0;
    end else begin
      mag = $sqrt(real'(x) * real'(x) + real'(y) * real'(y));
      e.ex = gain * mag;
      e.ey = 0.0;
      e.ez_deg = wrap180(deg + $atan2(real'(y), real'(x)) * 180.0 / PI);
      // Residual y of a few LSBs over the final length bounds the angle error.
      e.z_tol_deg = (mag > 0.0) ? (8.0 / (gain * mag)) * 180.0 / PI + 0.01 : 360.0;
      turn = (x >= 0) ? 0 : (y < 0) ? 1 : 2;
    end
    turn_seen[mode][turn]++;
    if (prev_valid) back_to_back++;
    if (prev_valid && prev_mode != mode) mode_switches++;
    prev_valid = 1'b1;
    prev_mode  = mode;
    q.push_back(e);
  endtask

  task automatic idle();
    in_valid = 1'b0;
    if (prev_valid) gaps++;
    prev_valid = 1'b0;
  endtask

  // Scoreboard: every output is compared with the oldest expected result.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      expect_t e;
      real     got_z;
      if (q.size() == 0) begin
        checks++; failures++;
        $display("FAIL output with no sample outstanding");
      end else begin
        e = q.pop_front();
        got_z = real'(out_z) * 360.0 / TWO_Z;
        check(cycle - e.cycle == longint'(LATENCY),
              $sformatf("%s latency %0d, expected %0d", e.tag, cycle - e.cycle, LATENCY));
        check(out_mode == e.mode, $sformatf("%s mode", e.tag));
        check(absr(real'(out_x) - e.ex) <= e.xy_tol,
              $sformatf("%s x=%0d expected %f", e.tag, out_x, e.ex));
        check(absr(real'(out_y) - e.ey) <= e.xy_tol,
              $sformatf("%s y=%0d expected %f", e.tag, out_y, e.ey));
        check(absr(wrap180(got_z - e.ez_deg)) <= e.z_tol_deg,
              $sformatf("%s z=%f deg expected %f", e.tag, got_z, e.ez_deg));
      end
    end
  end

  initial begin
    int x0;
    gain = 1.0;
    for (int i = 0; i < STAGES; i++) gain *= $sqrt(1.0 + 2.0 ** (-2 * i));

    rst_n = 1'b0; in_valid = 1'b0; in_mode = CORDIC_ROTATE;
    in_x = '0; in_y = '0; in_z = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // 1. Sweep 0..360 degrees, one sample per clock.
    for (int a = 0; a <= 360; a++) begin
      @(negedge clk);
      send(CORDIC_ROTATE, 19429, 0, longint'($floor(real'(a) * TWO_Z / 360.0)),
           $sformatf("sweep %0d deg", a));
    end
    @(negedge clk); idle();

    // 2. 30 degrees from x = 1/K (scaled to 2^14 = 1.0).
    x0 = int'($floor(16384.0 / gain + 0.5));
    @(negedge clk);
    send(CORDIC_ROTATE, x0, 0, longint'($floor(30.0 * TWO_Z / 360.0)), "rotate 30 deg");
    @(negedge clk); idle();
    repeat (LATENCY + 2) @(negedge clk);
    check(dut.out_x >= 14185 - 6 && dut.out_x <= 14189 + 6, "30 deg gives cos 30 = 0.866");
    check(dut.out_y >= 8192 - 6 && dut.out_y <= 8192 + 6, "30 deg gives sin 30 = 0.5");

    // 3. Vectoring (1, 2) with 1.0 = 2^13.
    @(negedge clk);
    send(CORDIC_VECTOR, 8192, 16384, 0, "vector (1,2)");
    @(negedge clk); idle();
    repeat (LATENCY + 2) @(negedge clk);
    check(absr(real'(dut.out_z) * 360.0 / TWO_Z - 63.4349) < 0.01, "atan(2) = 63.43 deg");

    // 4. Random mixed traffic over the whole circle.
    for (int n = 0; n < 4000; n++) begin
      real mag, ang;
      @(negedge clk);
      if ($urandom_range(4) == 0) begin
        idle();
      end else begin
        // Length up to 19000, so that K*length stays below 2^15.
        mag = 2000.0 + real'($urandom_range(17000));
        ang = real'($urandom) * 2.0 * PI / TWO_Z;
        if ($urandom_range(1) == 0)
          send(CORDIC_ROTATE, int'(mag * $cos(ang)), int'(mag * $sin(ang)),
               longint'($urandom), "random rotate");
        else
          send(CORDIC_VECTOR, int'(mag * $cos(ang)), int'(mag * $sin(ang)),
               longint'($urandom), "random vector");
      end
    end
    @(negedge clk); idle();
    repeat (LATENCY + 2) @(negedge clk);
    check(q.size() == 0, $sformatf("%0d samples never came out", q.size()));

    // Every mechanism must have happened.
    for (int md = 0; md < 2; md++)
      for (int t = 0; t < 3; t++)
        check(turn_seen[md][t] > 0, $sformatf("quarter turn %0d in mode %0d exercised", t, md));
    check(back_to_back > 0, "back-to-back samples exercised");
    check(gaps > 0, "gaps exercised");
    check(mode_switches > 0, "mode switches exercised");
    $display("mechanisms: rotate none/+90/-90 = %0d/%0d/%0d, vector none/+90/-90 = %0d/%0d/%0d",
             turn_seen[0][0], turn_seen[0][1], turn_seen[0][2],
             turn_seen[1][0], turn_seen[1][1], turn_seen[1][2]);
    $display("mechanisms: back-to-back %0d, gaps %0d, mode switches %0d",
             back_to_back, gaps, mode_switches);

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
