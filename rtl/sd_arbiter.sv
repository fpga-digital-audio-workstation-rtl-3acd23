// sd_arbiter: shares the one SD-card controller among several sector
// clients (the store cache and one load cache per channel), taking them in
// round-robin order so every channel's cache gets its turn.
// A client raises req with wr (1 = write) and a byte address. The arbiter
// grants it (gnt, held for the whole sector), asserts the controller's rd or
// wr until the controller drops ready, then moves 512 bytes:
//  - read: each rising edge of byte_available hands sd_dout to the client
//    as a one-cycle rbyte_valid strobe;
//  - write: the controller raises ready_for_next_byte once per byte; at its
//    first rising edge din already holds byte 0, and at each later one the
//    client is told (wnext) to present the next byte.
// After 512 bytes it waits for ready to return and ends with a done strobe,
// during which gnt is still set; gnt drops the cycle after.
// The controller runs from the derived 25 MHz clock; its signals are
// sampled here at 100 MHz, which the edge detection tolerates.
// Caches taking turns at the card follows the original design; the round
// robin and the handshake details are choices made here.
module sd_arbiter #(
  parameter int NCLI   = 5,
  parameter int SECTOR = 512
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NCLI-1:0]   req,
  input  logic [NCLI-1:0]   wr,
  input  logic [31:0]       addr  [NCLI],
  input  logic [7:0]        wdata [NCLI],
  output logic [NCLI-1:0]   gnt,
  output logic [7:0]        rbyte,
  output logic              rbyte_valid,
  output logic              wnext,
  output logic              done,
  // SD controller
  output logic              sd_rd,
  output logic              sd_wr,
  output logic [31:0]       sd_addr,
  output logic [7:0]        sd_din,
  input  logic              sd_ready,
  input  logic [7:0]        sd_dout,
  input  logic              sd_byte_available,
  input  logic              sd_ready_for_next_byte
);
  localparam int IW = (NCLI > 1) ? $clog2(NCLI) : 1;

  typedef enum logic [2:0] {S_IDLE, S_CMD, S_XFER, S_FINISH, S_RELEASE} state_e;
  state_e state;

  logic [IW-1:0]        cur, last;
  logic                 is_wr;
  logic [$clog2(SECTOR):0] cnt;
  logic                 ba_q, rf_q;

  // round-robin pick: first requester after the last one served
  logic [IW-1:0] pick;
  logic          any;
  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int k = 1; k <= NCLI; k++) begin
      logic [IW:0] idx;
      idx = (IW+1)'((int'(last) + k) % NCLI);
      if (!any && req[idx[IW-1:0]]) begin
        any  = 1'b1;
        pick = idx[IW-1:0];
      end
    end
  end

  assign sd_din = wdata[cur];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; cur <= '0; last <= IW'(NCLI - 1); is_wr <= 1'b0; cnt <= '0;
      gnt <= '0; sd_rd <= 1'b0; sd_wr <= 1'b0; sd_addr <= '0;
      rbyte <= '0; rbyte_valid <= 1'b0; wnext <= 1'b0; done <= 1'b0;
      ba_q <= 1'b0; rf_q <= 1'b0;
    end else begin
      ba_q        <= sd_byte_available;
      rf_q        <= sd_ready_for_next_byte;
      rbyte_valid <= 1'b0;
      wnext       <= 1'b0;
      done        <= 1'b0;
      unique case (state)
        S_IDLE: if (any && sd_ready) begin
          cur     <= pick;
          last    <= pick;
          is_wr   <= wr[pick];
          gnt     <= NCLI'(1) << pick;
          sd_addr <= addr[pick];
          sd_rd   <= !wr[pick];
          sd_wr   <= wr[pick];
          cnt     <= '0;
          state   <= S_CMD;
        end
        S_CMD: if (!sd_ready) begin
          sd_rd <= 1'b0;
          sd_wr <= 1'b0;
          state <= S_XFER;
        end
        S_XFER: begin
          if (!is_wr && sd_byte_available && !ba_q) begin
            rbyte       <= sd_dout;
            rbyte_valid <= 1'b1;
            cnt         <= cnt + 1'b1;
          end
          if (is_wr && sd_ready_for_next_byte && !rf_q) begin
            if (cnt != 0) wnext <= 1'b1;
            cnt <= cnt + 1'b1;
          end
          if (cnt == ($clog2(SECTOR)+1)'(SECTOR)) state <= S_FINISH;
        end
        S_FINISH: if (sd_ready) begin
          done  <= 1'b1;                    // seen by the client with gnt still set
          state <= S_RELEASE;
        end
        S_RELEASE: begin
          gnt   <= '0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_gnt_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
  a_no_rd_wr:   assert property (@(posedge clk) disable iff (rst) !(sd_rd && sd_wr));
`endif
endmodule
