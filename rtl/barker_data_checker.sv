// barker_data_checker: finds the start of the data block and counts bit
// errors against the known transmitted data.
//
// Start detection: a 26-bit window is compared with Barker-13 followed by
// its negation (trigger I) and with the negation followed by Barker-13
// (trigger Q), the source's "positive then negative spike" and the opposite.
// Trigger Q means the stream arrives inverted; the data are then inverted
// before comparison, as the source's data mux does. A trigger is held until
// the end of the check.
//
// Error counter (source's subsystem): while a trigger is held, each bit
// advances an address counter into a ROM of the CHECK_BITS = 2176 transmitted
// bits that follow the preamble; received XOR ROM enables the error counter.
// When the address reaches CHECK_BITS - 1 (the source's constant 2175), done
// pulses, error_last captures the total, and the trigger and counters clear.
// The ROM is loaded from check_rom.hex (one bit per line). Its contents are
// this design's test block (PRBS-9 payload, see rx_pkg), since the source's
// data are not published.
//
// Timing: bit_valid/din in; trig_i/trig_q rise the clock after the last
// preamble bit; done and error_last appear the clock after the 2176th
// compared bit.
module barker_data_checker
  import rx_pkg::*;
#(
  parameter int CHECK = CHECK_BITS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bit_valid,
  input  logic        din,
  output logic        trig_i,
  output logic        trig_q,
  output logic        done,
  output logic [11:0] error_count,    // running count of the current check
  output logic [11:0] error_last,     // total of the last finished check
  output logic [11:0] rom_index
);
  logic rom [CHECK_BITS];
  initial $readmemh("rtl/check_rom.hex", rom);

  logic [25:0] win;                   // win[0] = newest bit
  logic        m_pos, m_neg;

  always_comb begin
    int cp, cn;
    cp = 0; cn = 0;
    for (int i = 0; i < 13; i++) begin
      // first 13 bits (older) against the code, last 13 against its negation
      cp += (win[25-i] == b13(i)) ? 1 : -1;
      cn += (win[12-i] == ~b13(i)) ? 1 : -1;
    end
    m_pos = (cp == 13) && (cn == 13);   // +13 then -13
    m_neg = (cp == -13) && (cn == -13); // -13 then +13
  end

  logic checking;
  wire  active = trig_i | trig_q;
  wire  rx_bit = trig_q ? ~din : din;
  wire  miss   = rx_bit ^ rom[rom_index];

  always_ff @(posedge clk) begin
    if (rst) begin
      win <= '0; checking <= 1'b0;
      trig_i <= 1'b0; trig_q <= 1'b0; done <= 1'b0;
      error_count <= '0; error_last <= '0; rom_index <= '0;
    end else begin
      done     <= 1'b0;
      checking <= bit_valid && !active;
      if (bit_valid) win <= {win[24:0], din};
      if (checking && !active) begin
        if (m_pos)      trig_i <= 1'b1;
        else if (m_neg) trig_q <= 1'b1;
      end
      if (bit_valid && active) begin
        if (int'(rom_index) == CHECK - 1) begin
          done        <= 1'b1;
          error_last  <= error_count + 12'(miss);
          error_count <= '0;
          rom_index   <= '0;
          trig_i      <= 1'b0;
          trig_q      <= 1'b0;
        end else begin
          error_count <= error_count + 12'(miss);
          rom_index   <= rom_index + 1'b1;
        end
      end
    end
  end

  a_one_polarity: assert property (@(posedge clk) disable iff (rst) !(trig_i && trig_q));
endmodule
