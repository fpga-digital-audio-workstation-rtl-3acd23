// i2s_dac_model: behavioural I2S DAC for testbenches. It samples the data
// line on rising serial-clock edges, takes bits 1..8 after each word-clock
// change as the word, and appends every completed word to got[].
// The interface follows the parts being modelled; the timing numbers are
// choices made here.
module i2s_dac_model (
  input logic sclk,
  input logic lrck,
  input logic sdout
);
  logic [7:0] got [$];
  logic [7:0] sh = '0;
  logic       lprev = 1'b0, started = 1'b0;
  int         pos = 0;
  always @(posedge sclk) begin
    if (lrck != lprev) begin
      if (started) got.push_back(sh);
      started = 1'b1;
      lprev   = lrck;
      pos     = 0;
      sh      = '0;
    end else pos++;
    if (pos >= 1 && pos <= 8) sh = {sh[6:0], sdout};
  end
endmodule
