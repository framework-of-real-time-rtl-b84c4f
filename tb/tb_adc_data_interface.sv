// tb_adc_data_interface: drives both 12-bit buses with a new random word on
// every edge of the data clock and checks that d1d/d1/d2d/d2 present the
// rising-edge and falling-edge words of one clock period together, two
// rising edges later. Prints TB_RESULT.
module tb_adc_data_interface;
  logic dclk = 0, rst = 1;
  logic [11:0] d, dd, d1d, d1, d2d, d2;
  int checks = 0, failures = 0;
  adc_data_interface #(.W(12)) dut (.*);
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  logic [11:0] hist_d [$], hist_dd [$];   // words present at each edge, rising first
  initial begin
    d = 0; dd = 0;
    repeat (4) begin #1.25 dclk = 1; #1.25 dclk = 0; end
    rst = 0;
    for (int c = 0; c < 300; c++) begin
      // new data half a phase before each edge (source-synchronous DDR)
      d = 12'($urandom); dd = 12'($urandom);
      hist_d.push_back(d); hist_dd.push_back(dd);
      #0.625 dclk = 1; #0.625;
      d = 12'($urandom); dd = 12'($urandom);
      hist_d.push_back(d); hist_dd.push_back(dd);
      #0.625 dclk = 0; #0.625;
      #0.01;
      if (c >= 3) begin
        // period c-1: the registered outputs of the previous period's edges
        int r;
        r = 2 * (c - 1);
        checks++;
        if (d1d !== hist_dd[r] || d1 !== hist_d[r] || d2d !== hist_dd[r+1] || d2 !== hist_d[r+1]) begin
          failures++;
          if (failures < 5) $display("period %0d: got %h %h %h %h exp %h %h %h %h", c, d1d, d1, d2d, d2,
                                     hist_dd[r], hist_d[r], hist_dd[r+1], hist_d[r+1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
