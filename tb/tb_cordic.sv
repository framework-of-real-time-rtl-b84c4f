// tb_cordic: checks both CORDIC units against real arithmetic, one input
// per clock. Vectoring: random (x, y) of random magnitude in all four
// quadrants; the angle (65536 = one turn) must be within 8 LSBs of atan2.
// Rotation: random angles within +/-90 degrees; cos and sin (Q2.14) must be
// within 12 LSBs. Latencies are checked: 17 clocks (vectoring) and 16
// (rotation). Prints TB_RESULT.
module tb_cordic;
  logic clk = 0, rst = 1, v_in = 0, r_in = 0;
  logic signed [23:0] x, y;
  logic [15:0] ang_v, ang_r;
  logic v_out, r_out;
  logic signed [15:0] cos_o, sin_o;
  int checks = 0, failures = 0;
  cordic_vec #(.IW(24)) u_vec (.clk, .rst, .in_valid(v_in), .x, .y, .out_valid(v_out), .angle(ang_v));
  cordic_rot u_rot (.clk, .rst, .in_valid(r_in), .angle(ang_r), .out_valid(r_out), .cos_o, .sin_o);
  always #2.5 clk = ~clk;
  initial begin #1ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  localparam real PI = 3.14159265358979;
  int exp_v [$], exp_c [$], exp_s [$];
  longint t_v [$], t_r [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (v_out) begin
      int e, d;
      e = exp_v.pop_front();
      d = int'(16'(ang_v - 16'(e)));
      if (d > 32767) d -= 65536;
      checks++;
      if (d > 8 || d < -8) begin failures++; if (failures < 6) $display("angle %0d expected %0d", ang_v, e); end
      checks++;
      if (cyc - t_v.pop_front() != 17 + 1) begin failures++; if (failures < 6) $display("vectoring latency"); end
    end
    if (r_out) begin
      int ec, es;
      ec = exp_c.pop_front(); es = exp_s.pop_front();
      checks++;
      if (cos_o - ec > 12 || ec - cos_o > 12 || sin_o - es > 12 || es - sin_o > 12) begin
        failures++; if (failures < 6) $display("cos/sin %0d %0d expected %0d %0d", cos_o, sin_o, ec, es);
      end
      checks++;
      if (cyc - t_r.pop_front() != 16 + 1) begin failures++; if (failures < 6) $display("rotation latency"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int n = 0; n < 5000; n++) begin
      real a, mag, ra;
      int xi, yi, ang;
      a = ($urandom % 100000) / 100000.0 * 2 * PI - PI;
      mag = 1000.0 + ($urandom % 6000000);
      xi = int'(mag * $cos(a)); yi = int'(mag * $sin(a));
      ra = $atan2(real'(yi), real'(xi)) / (2 * PI) * 65536.0;
      ang = int'($urandom % 32767) - 16383;
      @(posedge clk);
      v_in <= 1; x <= 24'(xi); y <= 24'(yi);
      exp_v.push_back(int'(ra)); t_v.push_back(cyc);
      r_in <= 1; ang_r <= 16'(ang);
      exp_c.push_back(int'(16384.0 * $cos(ang * 2 * PI / 65536.0)));
      exp_s.push_back(int'(16384.0 * $sin(ang * 2 * PI / 65536.0)));
      t_r.push_back(cyc);
    end
    @(posedge clk); v_in <= 0; r_in <= 0;
    repeat (30) @(posedge clk);
    checks++; if (exp_v.size() != 0 || exp_c.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
