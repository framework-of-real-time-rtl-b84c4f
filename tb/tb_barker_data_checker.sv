// tb_barker_data_checker: builds the 2048-bit test block independently
// (20 sync bits, Barker-11 pair, Barker-13 / negated Barker-13, PRBS-9
// payload x^9 + x^5 + 1 from seed 1FF) and sends random bits, then the block
// and the start of the next one, with a random number of bit errors placed
// at random in the 2176 checked bits. Checks: the I trigger (or the Q
// trigger when the whole stream is inverted), done exactly one clock after
// the 2176th checked bit, error_last equal to the injected count, the
// triggers released after done, and no done for a stream without a block.
// Bits arrive every 4 clocks. Prints TB_RESULT.
module tb_barker_data_checker;
  logic clk = 0, rst = 1, bit_valid = 0, din;
  logic trig_i, trig_q, done;
  logic [11:0] error_count, error_last, rom_index;
  int checks = 0, failures = 0;
  barker_data_checker dut (.*);
  always #2.5 clk = ~clk;
  initial begin #20ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  localparam logic [10:0] B11 = 11'b11100010010;
  localparam logic [12:0] B13 = 13'b1111100110101;
  logic blk [2048];

  initial begin
    int n;
    logic [8:0] l;
    n = 0;
    for (int k = 0; k < 20; k++) blk[n++] = (k % 4 == 3);
    for (int k = 10; k >= 0; k--) blk[n++] = B11[k];
    blk[n++] = 0;
    for (int k = 10; k >= 0; k--) blk[n++] = ~B11[k];
    blk[n++] = 0;
    for (int k = 12; k >= 0; k--) blk[n++] = B13[k];
    for (int k = 12; k >= 0; k--) blk[n++] = ~B13[k];
    l = 9'h1FF;
    while (n < 2048) begin
      blk[n++] = l[8];
      l = {l[7:0], l[8] ^ l[4]};
    end
  end

  int done_seen;
  always @(posedge clk) if (done) done_seen++;

  task automatic send(logic b, logic inv);
    @(posedge clk); bit_valid <= 1; din <= b ^ inv;
    @(posedge clk); bit_valid <= 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int run = 0; run < 6; run++) begin
      logic inv;
      int nerr, pre;
      logic flip [2176];
      inv = (run % 2 == 1);
      nerr = (run < 2) ? 0 : int'($urandom % 200);
      foreach (flip[k]) flip[k] = 0;
      for (int e = 0; e < nerr; e++) begin
        int p;
        do p = $urandom % 2176; while (flip[p]);
        flip[p] = 1;
      end
      done_seen = 0;
      pre = 30 + $urandom % 500;
      for (int k = 0; k < pre; k++) send(1'($urandom), 1'b0);
      for (int k = 0; k < 70; k++) send(blk[k], inv);
      checks++;
      if (trig_i !== !inv || trig_q !== inv) begin failures++; $display("run %0d: triggers %b%b after preamble", run, trig_i, trig_q); end
      for (int a = 0; a < 2176; a++) begin
        send(blk[(70 + a) % 2048] ^ flip[a], inv);
        if (a == 2174) begin
          checks++; if (done_seen != 0) begin failures++; $display("run %0d: early done", run); end
        end
      end
      checks++;
      if (done_seen != 1) begin failures++; $display("run %0d: %0d done pulses", run, done_seen); end
      checks++;
      if (int'(error_last) != nerr) begin failures++; $display("run %0d: %0d errors counted, %0d injected", run, error_last, nerr); end
      checks++;
      if (trig_i || trig_q) begin failures++; $display("run %0d: trigger not released", run); end
    end
    // done timing: one clock after the last checked bit
    begin
      int t_last, t_done;
      for (int k = 0; k < 70; k++) send(blk[k], 1'b0);
      for (int a = 0; a < 2175; a++) send(blk[70 + a < 2048 ? 70 + a : 70 + a - 2048], 1'b0);
      @(posedge clk); bit_valid <= 1; din <= blk[(70 + 2175) % 2048]; t_last = $time;
      @(posedge clk); bit_valid <= 0;
      while (!done) @(posedge clk);
      t_done = $time;
      checks++;
      if (t_done - t_last != 2 * 5) begin failures++; $display("done %0d ns after the last bit was driven", t_done - t_last); end
    end
    // random data only: no done
    repeat (3) @(posedge clk);
    done_seen = 0;
    for (int k = 0; k < 3000; k++) send(1'($urandom), 1'b0);
    checks++;
    if (done_seen != 0 || trig_i || trig_q) begin failures++; $display("triggered on random data: done %0d trig %b%b index %0d", done_seen, trig_i, trig_q, rom_index); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
