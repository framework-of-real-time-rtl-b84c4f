// tb_pll_init: checks the synthesizer programming sequence: 13 words of 20
// data bits then 4 address bits, MSB first, sampled on rising pll_clk, LE low
// while shifting and one high pulse after each word, done after 13 * 50
// ticks. Runs with ce on every clock and with ce every 32 clocks (the
// 6.25 MHz tick). Random register contents; prints TB_RESULT.
module tb_pll_init;
  localparam int NREG = 13;
  logic clk = 0, rst = 1, ce = 0, start = 0;
  logic [19:0] reg_data [NREG];
  logic [3:0]  reg_addr [NREG];
  logic pll_data, pll_clk, pll_le, done;
  int checks = 0, failures = 0;
  pll_init #(.NREG(NREG)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  // serial receiver model
  logic [23:0] sh; int nbits = 0; int nwords = 0; logic [23:0] got [NREG];
  always @(posedge pll_clk) begin
    if (pll_le) begin failures++; $display("clock pulse while LE high"); end
    sh = {sh[22:0], pll_data}; nbits++;
  end
  always @(posedge pll_le) begin
    checks++;
    if (nbits != 24) begin failures++; $display("word %0d: %0d bits before LE", nwords, nbits); end
    if (nwords < NREG) got[nwords] = sh;
    nwords++; nbits = 0;
  end

  task automatic run(int div);
    int t_start, ticks;
    nwords = 0; nbits = 0;
    for (int r = 0; r < NREG; r++) begin reg_data[r] = 20'($urandom); reg_addr[r] = 4'(r); end
    @(posedge clk); start <= 1;
    // wait for a tick to take start
    do @(posedge clk); while (!ce);
    start <= 0; t_start = $time;
    @(posedge clk); #1;
    checks++; if (done) begin failures++; $display("done not cleared by start"); end
    wait (done); t_start = ($time - t_start) / 10;
    ticks = (t_start + div - 1) / div;
    checks++;
    if (ticks < NREG * 50 - 1 || ticks > NREG * 50 + 1) begin
      failures++; $display("div %0d: done after %0d ticks, expected %0d", div, ticks, NREG * 50);
    end
    checks++;
    if (nwords != NREG) begin failures++; $display("%0d words", nwords); end
    for (int r = 0; r < NREG; r++) begin
      checks++;
      if (got[r] !== {reg_data[r], reg_addr[r]}) begin
        failures++; $display("word %0d: %h expected %h", r, got[r], {reg_data[r], reg_addr[r]});
      end
    end
  endtask

  int div = 1, cnt = 0;
  always @(posedge clk) begin
    cnt <= (cnt + 1) % div;
    ce  <= (div == 1) ? 1'b1 : (cnt == div - 1);
  end

  initial begin
    repeat (4) @(posedge clk); rst <= 0;
    run(1);
    repeat (10) @(posedge clk);
    div = 32;
    run(32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
