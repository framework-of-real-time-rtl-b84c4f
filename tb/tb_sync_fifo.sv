// tb_sync_fifo: random writes and reads against a queue model; checks data
// order, the count, full at DEPTH (3072) and empty, and that writes when
// full and reads when empty are ignored. Prints TB_RESULT.
module tb_sync_fifo;
  localparam int DEPTH = 3072;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [11:0] din, dout;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  sync_fifo #(.DEPTH(DEPTH), .W(12)) dut (.*);
  always #2.5 clk = ~clk;
  initial begin #10ms; $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1); $finish; end

  logic [11:0] model [$];
  logic pend = 0;
  int wpct, rpct;
  always @(posedge clk) begin
    if (!rst) begin
      if (pend) begin
        logic [11:0] e;
        e = model.pop_front();
        checks++;
        if (dout !== e) begin failures++; if (failures < 5) $display("%h expected %h", dout, e); end
      end
      pend <= rd_en && !empty;
      if (wr_en && !full) model.push_back(din);
    end
    wr_en <= ($urandom % 100) < wpct;
    rd_en <= ($urandom % 100) < rpct;
    din   <= 12'($urandom);
  end

  // count, full and empty against the model, checked between edges
  always @(negedge clk) if (!rst) begin
    checks++;
    if (int'(count) != model.size() - (pend ? 1 : 0)) begin
      failures++; if (failures < 5) $display("count %0d model %0d", count, model.size());
    end
    if (full != (count == DEPTH) || empty != (count == 0)) begin failures++; $display("flags"); end
  end

  initial begin
    wpct = 0; rpct = 0;
    repeat (4) @(posedge clk); rst <= 0;
    wpct = 100; rpct = 0; repeat (DEPTH + 100) @(posedge clk);
    checks++; if (!full) begin failures++; $display("not full"); end
    wpct = 0; rpct = 100; repeat (DEPTH + 100) @(posedge clk);
    checks++; if (!empty) begin failures++; $display("not empty"); end
    wpct = 55; rpct = 45; repeat (30000) @(posedge clk);
    wpct = 45; rpct = 55; repeat (30000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
