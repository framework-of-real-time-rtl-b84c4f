// tb_async_fifo: writes random words on a 200 MHz clock and reads them on an
// unrelated 6.25 MHz-class clock (and the other way round), with random
// enables; checks order, no loss, no duplication, that full stops writes at
// DEPTH words and that empty is reported after the last word. Prints
// TB_RESULT.
module tb_async_fifo;
  localparam int DEPTH = 1024;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1, we = 0, re = 0;
  logic [11:0] din, dout;
  logic full, empty;
  int checks = 0, failures = 0;
  real wper = 5.0, rper = 7.3;
  async_fifo #(.DEPTH(DEPTH), .W(12)) dut (.*);
  always #(wper / 2) wclk = ~wclk;
  always #(rper / 2) rclk = ~rclk;
  initial begin #20ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  logic [11:0] model [$];
  int written = 0, readn = 0;
  bit wr_on = 0, rd_on = 0; int wpct = 50, rpct = 50;

  always @(posedge wclk) begin
    if (!wrst && we && !full) begin model.push_back(din); written++; end
    we  <= wr_on && ($urandom % 100 < wpct);
    din <= 12'($urandom);
  end
  logic pend = 0;
  always @(posedge rclk) begin
    if (pend) begin
      logic [11:0] e;
      e = model.pop_front();
      checks++;
      if (dout !== e) begin failures++; if (failures < 5) $display("read %0d: %h expected %h", readn, dout, e); end
      readn++;
    end
    pend <= !rrst && re && !empty;
    re   <= rd_on && ($urandom % 100 < rpct);
  end

  initial begin
    repeat (5) @(posedge rclk); wrst = 0; rrst = 0;
    // 1: fill completely with the reader stopped
    wr_on = 1; wpct = 100;
    repeat (3000) @(posedge wclk);
    checks++; if (!full || written != DEPTH) begin failures++; $display("fill: full=%b written=%0d", full, written); end
    wr_on = 0;
    // 2: drain completely
    rd_on = 1; rpct = 100;
    repeat (DEPTH + 50) @(posedge rclk);
    checks++; if (!empty || readn != DEPTH) begin failures++; $display("drain: empty=%b read=%0d", empty, readn); end
    rd_on = 0;
    // 3: random traffic, fast writer, both clock ratios
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1) begin wper = 7.3; rper = 5.0; end
      wr_on = 1; rd_on = 1; wpct = 40; rpct = 60;
      repeat (20000) @(posedge wclk);
      wr_on = 0; rpct = 100;
      repeat (3000) @(posedge rclk);
      rd_on = 0;
      repeat (20) @(posedge rclk);
      checks++; if (!empty || model.size() != 0) begin failures++; $display("pass %0d: %0d left", pass, model.size()); end
    end
    $display("written %0d read %0d", written, readn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
