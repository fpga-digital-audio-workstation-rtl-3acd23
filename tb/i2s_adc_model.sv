// i2s_adc_model: behavioural I2S ADC for testbenches. It follows the serial
// and word clocks it is given and, for every word-clock half period, sends
// a new random 24-bit sample MSB first, changing data on falling serial-clock
// edges with the MSB one serial clock after the word-clock edge. The top
// eight bits of every sample sent are kept in sent[] for checking.
// The interface follows the parts being modelled; the timing numbers are
// choices made here.
module i2s_adc_model (
  input  logic sclk,
  input  logic lrck,
  output logic sdin
);
  logic [7:0]  sent [$];
  logic [23:0] cur = '0;
  logic        lprev = 1'b0;
  int          pos = 0;
  initial sdin = 1'b0;
  always @(negedge sclk) begin
    if (lrck != lprev) begin
      lprev = lrck;
      pos   = 0;
      cur   = 24'($urandom);
      sent.push_back(cur[23:16]);
    end else pos++;
    sdin <= (pos >= 1 && pos <= 24) ? cur[24 - pos] : 1'b0;
  end
endmodule
