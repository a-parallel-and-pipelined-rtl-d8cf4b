// tb_cordic_atan_lut: checks the elementary-angle table against atan(2^-i)
// computed with real arithmetic in the testbench.
//
// Two instances are read at every index 0..31: the default one (32-bit angles,
// 16 entries) and a 16-bit, 8-entry one. Entries inside the table must match
// round(atan(2^-i) / (2*pi) * 2^Z_W) to within one LSB; entries past the end
// must be 0. A watchdog ends the run if it stalls.
module tb_cordic_atan_lut;
  import cordic_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic             clk = 1'b0;
  logic [IDX_W-1:0] idx;
  logic [31:0]      angle32;
  logic [15:0]      angle16;
  int               checks = 0;
  int               failures = 0;

  always #5 clk = ~clk;

  cordic_atan_lut dut32 (.idx(idx), .angle(angle32));
  cordic_atan_lut #(.Z_W(16), .N_ENTRIES(8)) dut16 (.idx(idx), .angle(angle16));

  function automatic longint expected(int i, int zw, int entries);
    real a;
    if (i >= entries) return 0;
    a = $atan(2.0 ** (-i)) / (2.0 * PI) * (2.0 ** zw);
    return longint'($floor(a + 0.5));
  endfunction

  task automatic compare(string name, int i, longint got, longint exp);
    longint diff;
    checks++;
    diff = got - exp;
    if (diff < -1 || diff > 1) begin
      failures++;
      $display("FAIL %s idx=%0d got=%0h expected=%0h", name, i, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < MAX_STAGES; i++) begin
      idx = IDX_W'(i);
      @(posedge clk);
      compare("Z_W=32", i, longint'(angle32), expected(i, 32, 16));
      compare("Z_W=16", i, longint'(angle16), expected(i, 16, 8));
    end
    // The first entries read as the degrees quoted for the classic table.
    idx = 0; @(posedge clk);
    checks++;
    if (angle32 != 32'h2000_0000) begin
      failures++;
      $display("FAIL entry 0 is not 45 degrees: %h", angle32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
