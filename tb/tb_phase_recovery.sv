// tb_phase_recovery: 4-QAM points (on the axes, amplitude 1400, with noise)
// rotated by a fixed carrier phase, one sample every 8 clocks. After the
// 64-sample estimate has settled, every output point must lie within 4
// degrees of an axis (the phase is removed up to a multiple of 90 degrees),
// and for a rotation inside +/-45 degrees it must be back on its original
// axis point. Each phase is run after a reset. The derivative inputs must
// pass through unchanged with the same timing, and outputs must appear one
// clock after each input. Prints TB_RESULT.
module tb_phase_recovery;
  import rx_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  sample_t i1, q1, id1, qd1, i2, q2, id2, qd2;
  int checks = 0, failures = 0;
  phase_recovery dut (.*);
  always #2.5 clk = ~clk;
  initial begin #5ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  localparam real PI = 3.14159265358979;
  real deg_list [4] = '{0.0, 25.0, -40.0, 70.0};

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    foreach (deg_list[r]) begin
      real th;
      th = deg_list[r] * PI / 180.0;
      rst <= 1; @(posedge clk); rst <= 0;
      for (int n = 0; n < 400; n++) begin
        int pt, xi, yi, di, dq, nx, ny;
        real x0, y0, ang_out, err_deg;
        pt = $urandom % 4;
        x0 = (pt == 0) ? 1400.0 : (pt == 1) ? -1400.0 : 0.0;
        y0 = (pt == 2) ? 1400.0 : (pt == 3) ? -1400.0 : 0.0;
        nx = int'($urandom % 101) - 50; ny = int'($urandom % 101) - 50;
        x0 = x0 + nx; y0 = y0 + ny;
        xi = int'(x0 * $cos(th) - y0 * $sin(th));
        yi = int'(x0 * $sin(th) + y0 * $cos(th));
        di = int'($urandom % 4095) - 2047; dq = int'($urandom % 4095) - 2047;
        @(posedge clk);
        in_valid <= 1; i1 <= sample_t'(xi); q1 <= sample_t'(yi); id1 <= sample_t'(di); qd1 <= sample_t'(dq);
        @(posedge clk); in_valid <= 0;
        #1;
        checks++;
        if (!out_valid || int'(id2) != di || int'(qd2) != dq) begin
          failures++; if (failures < 6) $display("timing or derivative pass-through wrong at sample %0d", n);
        end
        if (n >= 100) begin
          ang_out = $atan2(real'(q2), real'(i2)) * 180.0 / PI;
          err_deg = ang_out - 90.0 * $floor(ang_out / 90.0 + 0.5);
          checks++;
          if (err_deg > 4.0 || err_deg < -4.0) begin
            failures++; if (failures < 6) $display("phase %0.1f: output %0.1f deg off axis", deg_list[r], err_deg);
          end
          if (deg_list[r] > -45.0 && deg_list[r] < 45.0) begin
            real ex, ey;
            ex = (pt == 0) ? 1400.0 : (pt == 1) ? -1400.0 : 0.0;
            ey = (pt == 2) ? 1400.0 : (pt == 3) ? -1400.0 : 0.0;
            checks++;
            if ((i2 - ex) * (i2 - ex) + (q2 - ey) * (q2 - ey) > 150.0 * 150.0) begin
              failures++; if (failures < 6) $display("phase %0.1f: (%0d,%0d) expected near (%0.0f,%0.0f)", deg_list[r], i2, q2, ex, ey);
            end
          end
        end
        repeat (6) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
