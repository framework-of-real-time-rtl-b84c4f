// tb_ninety_degree_shift: builds a bit stream (random bits, the preamble
// Barker-11 / 0 / negated Barker-11 / 0 on a symbol boundary, more random
// bits), maps it to 4-QAM points (00 = +I, 01 = -I, 11 = +Q, 10 = -Q),
// rotates every point by k * 90 degrees counter-clockwise, and decodes the
// rotated points into the I/Q and I/-Q bit streams the decoder would give.
// For k = 1, 2, 3 exactly the matching trigger must latch (Filt2 for +90,
// Filt3 for 180, Filt1 for -90) and, from the preamble on, the output must
// equal the transmitted stream 24 bits later; for k = 0 no trigger may
// latch and the stream must pass unchanged. Bits arrive every 4 clocks
// (50 MHz on 200 MHz). Prints TB_RESULT.
module tb_ninety_degree_shift;
  logic clk = 0, rst = 1, bit_valid = 0, iq_bit, inq_bit, bit_phase;
  logic dout_valid, dout, dout_phase;
  logic [2:0] trig, trig_pulse;
  int checks = 0, failures = 0;
  ninety_degree_shift #(.DELAY(24)) dut (.*);
  always #2.5 clk = ~clk;
  initial begin #5ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  localparam logic [10:0] B11 = 11'b11100010010;   // first sent bit on the left

  function automatic void pt(logic [1:0] s, output int x, output int y);
    case (s)
      2'b00: begin x = 1; y = 0; end
      2'b01: begin x = -1; y = 0; end
      2'b11: begin x = 0; y = 1; end
      default: begin x = 0; y = -1; end
    endcase
  endfunction
  function automatic logic [1:0] dec(int x, int y);
    if (y > 0) return 2'b11;
    if (y < 0) return 2'b10;
    return (x < 0) ? 2'b01 : 2'b00;
  endfunction

  initial begin
    logic [2:0] exp_trig [4] = '{3'b000, 3'b010, 3'b100, 3'b001};
    repeat (3) @(posedge clk); rst <= 0;
    for (int k = 0; k < 4; k++) begin
      logic tx [$];
      logic rx_iq [$], rx_inq [$];
      int nout, pre, good, bad;
      tx.delete(); rx_iq.delete(); rx_inq.delete();
      rst <= 1; @(posedge clk); rst <= 0;
      pre = 2 * (50 + $urandom % 50);
      for (int n = 0; n < pre; n++) tx.push_back(1'($urandom));
      for (int n = 0; n < 11; n++) tx.push_back(B11[10 - n]);
      tx.push_back(1'b0);
      for (int n = 0; n < 11; n++) tx.push_back(~B11[10 - n]);
      tx.push_back(1'b0);
      for (int n = 0; n < 600; n++) tx.push_back(1'($urandom));
      // rotate and decode symbol by symbol
      for (int s = 0; s < tx.size() / 2; s++) begin
        int x, y, t;
        logic [1:0] a, b;
        pt({tx[2*s], tx[2*s+1]}, x, y);
        for (int r = 0; r < k; r++) begin t = x; x = -y; y = t; end
        a = dec(x, y); b = dec(x, -y);
        rx_iq.push_back(a[1]); rx_iq.push_back(a[0]);
        rx_inq.push_back(b[1]); rx_inq.push_back(b[0]);
      end
      nout = 0; good = 0; bad = 0;
      for (int n = 0; n < tx.size(); n++) begin
        logic latched;
        @(posedge clk);
        latched = (trig != 0);
        bit_valid <= 1; iq_bit <= rx_iq[n]; inq_bit <= rx_inq[n]; bit_phase <= 1'(n % 2);
        @(posedge clk); bit_valid <= 0;
        #1;
        // the output of this edge is bit n - 24
        if (n >= 24 && (latched || k == 0)) begin
          if (dout === tx[n - 24]) good++; else bad++;
        end
        repeat (2) @(posedge clk);
      end
      checks++;
      if (trig != exp_trig[k]) begin failures++; $display("rotation %0d: trigger %b expected %b", 90 * k, trig, exp_trig[k]); end
      checks++;
      if (bad != 0 || good < 600) begin failures++; $display("rotation %0d: %0d corrected bits wrong, %0d right", 90 * k, bad, good); end
      checks += good;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
