// i2s_tx: I2S transmitter (DAC side), running in the master-clock domain.
// At every word-clock change (seen at a serial-clock falling edge) it asks
// its source for the next word with a one-cycle pop strobe; the source
// answers with in_valid one or more cycles later (a FIFO read). The word is
// shifted out MSB first on the falling edges of serial-clock periods
// 1..WORD_W after the word-clock edge; the rest of the slot carries zeros,
// so the 24-bit converter sees the word in its top bits. If the source had
// nothing (empty), a zero word is sent and underrun pulses.
// One 8-bit word per word-clock edge follows the original design; the
// one-slot prefetch and the zero word on underrun are choices made here.
module i2s_tx
  import daw_pkg::*;
#(
  parameter int WORD_W_P = WORD_W
) (
  input  logic                mclk,
  input  logic                rst,
  input  logic                sclk,
  input  logic                lrck,
  input  logic [WORD_W_P-1:0] in_word,
  input  logic                in_valid,
  input  logic                in_empty,
  output logic                pop,
  output logic                sdout,
  output logic                underrun
);
  logic                sclk_q, lrck_seen;
  logic [5:0]          pos;
  logic [WORD_W_P-1:0] cur, nxt;

  always_ff @(posedge mclk) begin
    if (rst) begin
      sclk_q    <= 1'b0;
      lrck_seen <= 1'b0;
      pos       <= '0;
      cur       <= '0;
      nxt       <= '0;
      sdout     <= 1'b0;
      pop       <= 1'b0;
      underrun  <= 1'b0;
    end else begin
      sclk_q   <= sclk;
      pop      <= 1'b0;
      underrun <= 1'b0;
      if (in_valid) nxt <= in_word;
      if (!sclk && sclk_q) begin            // serial clock falling edge
        if (lrck != lrck_seen) begin        // new slot: period 0
          lrck_seen <= lrck;
          pos       <= '0;
          sdout     <= 1'b0;
          cur       <= nxt;                 // word fetched during last slot
          nxt       <= '0;
          if (in_empty) underrun <= 1'b1;
          else          pop      <= 1'b1;
        end else begin
          logic [5:0] p;
          p = (pos != 6'd63) ? pos + 1'b1 : pos;
          pos <= p;
          if (p >= 6'd1 && p <= 6'(WORD_W_P)) sdout <= cur[WORD_W_P - int'(p)];
          else                                sdout <= 1'b0;
        end
      end
    end
  end
endmodule
