// pll_init: serial programming of the external frequency synthesizer.
//
// On start, NREG words are sent in order, register 0 first. Each word is 24
// bits, the 20 data bits D19..D0 followed by the 4 address bits C3..C0, most
// significant bit first, as in the source's programming diagram. The data
// line changes while pll_clk is low and the synthesizer samples it on the
// rising edge of pll_clk. The process advances on the 6.25 MHz tick ce, as
// in the source ("the 6.25 MHz clock runs this process"); each serial clock
// period is 2 ticks (this design's choice). LE stays low while a word is shifted and is pulsed high
// for one serial clock period after the 24th bit to load the word. After the
// last word, done is set and held until the next start.
//
// Register contents are inputs: they depend on the reference crystal and the
// wanted output (the source computes them for a 60 MHz crystal, R = 16,
// N = 426.6667 and a 1.6 GHz output).
//
// Timing: per word 24 * 2 + 2 ticks; all NREG words take NREG * 50 ticks
// after start (sampled on a tick), then done rises. With ce tied high one
// tick is one clock.
module pll_init #(
  parameter int NREG = 13
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        start,
  input  logic [19:0] reg_data [NREG],
  input  logic [3:0]  reg_addr [NREG],
  output logic        pll_data,
  output logic        pll_clk,
  output logic        pll_le,
  output logic        done
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_LATCH, S_DONE} state_t;
  state_t state;

  logic [$clog2(NREG)-1:0] word;
  logic [4:0]              bitn;     // 0..23
  logic [23:0]             sh;
  logic                    phase;    // 0 = clock low half, 1 = clock high half

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; word <= '0; bitn <= '0; sh <= '0; phase <= 1'b0;
      pll_data <= 1'b0; pll_clk <= 1'b0; pll_le <= 1'b0; done <= 1'b0;
    end else if (ce) begin
      case (state)
        S_IDLE, S_DONE: begin
          pll_clk <= 1'b0;
          pll_le  <= 1'b0;
          if (start) begin
            done     <= 1'b0;
            word     <= '0;
            bitn     <= '0;
            phase    <= 1'b0;
            sh       <= {reg_data[0], reg_addr[0]};
            state    <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          phase <= ~phase;
          if (!phase) begin
            // low half: present the bit
            pll_clk  <= 1'b0;
            pll_data <= sh[23];
            sh       <= {sh[22:0], 1'b0};
          end else begin
            // high half: the synthesizer samples on this rising edge
            pll_clk <= 1'b1;
            if (bitn == 5'd23) begin
              bitn  <= '0;
              state <= S_LATCH;
            end else begin
              bitn <= bitn + 1'b1;
            end
          end
        end
        S_LATCH: begin
          pll_clk <= 1'b0;
          phase   <= ~phase;
          pll_le  <= ~phase;
          if (phase) begin
            if (int'(word) == NREG - 1) begin
              state <= S_DONE;
              done  <= 1'b1;
            end else begin
              word  <= word + 1'b1;
              sh    <= {reg_data[word + 1'b1], reg_addr[word + 1'b1]};
              state <= S_SHIFT;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
