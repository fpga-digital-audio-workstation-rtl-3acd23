// i2s_rx: I2S receiver (ADC side), running in the master-clock domain.
// It watches the serial and word clocks, counts serial-clock rising edges
// since the last word-clock change, and shifts in the data bits of positions
// 1..WORD_W (I2S puts the MSB one serial clock after the word-clock edge).
// Only the top WORD_W bits of each slot are kept; the converter's lower bits
// are dropped, which truncates its 24-bit sample to an 8-bit word. A word is
// delivered with a one-cycle word_valid strobe right after its last bit, with
// right = 1 for the right-channel slot (word clock high). Left and right
// words therefore come out alternately, one per word-clock half period.
// 8-bit words, one per word-clock edge, follow the original design; keeping
// the top 8 bits of the converter's sample is a choice made here.
module i2s_rx
  import daw_pkg::*;
#(
  parameter int WORD_W_P = WORD_W
) (
  input  logic                mclk,
  input  logic                rst,
  input  logic                sclk,
  input  logic                lrck,
  input  logic                sdin,
  output logic [WORD_W_P-1:0] word,
  output logic                word_valid,
  output logic                right
);
  logic             sclk_q, lrck_seen;
  logic [5:0]       pos;
  logic [WORD_W_P-1:0] shreg;

  always_ff @(posedge mclk) begin
    if (rst) begin
      sclk_q     <= 1'b0;
      lrck_seen  <= 1'b0;
      pos        <= '0;
      shreg      <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      right      <= 1'b0;
    end else begin
      sclk_q     <= sclk;
      word_valid <= 1'b0;
      if (sclk && !sclk_q) begin            // serial clock rising edge
        logic [5:0] p;
        if (lrck != lrck_seen) p = '0;      // first edge of a new slot
        else if (pos != 6'd63) p = pos + 1'b1;
        else p = pos;
        lrck_seen <= lrck;
        pos       <= p;
        if (p >= 6'd1 && p <= 6'(WORD_W_P)) begin
          shreg <= {shreg[WORD_W_P-2:0], sdin};
          if (p == 6'(WORD_W_P)) begin
            word       <= {shreg[WORD_W_P-2:0], sdin};
            word_valid <= 1'b1;
            right      <= lrck;
          end
        end
      end
    end
  end
endmodule
