// sd_card_model: behavioural model (not synthesizable) of the SD-card
// controller plus card, with the controller's byte-wide sector interface.
// It is stepped on rising edges of the 25 MHz controller clock, detected by
// sampling sd_clk on the 100 MHz clock.
//   idle: ready = 1. rd or wr seen with ready: ready drops, CMD_TICKS pass.
//   read: 512 bytes; each byte is put on dout and byte_available is high for
//         one tick, then low for BYTE_TICKS-1 ticks.
//   write: ready_for_next_byte pulses once per byte (high one tick); din is
//         taken just before the next pulse (and after the last one), i.e.
//         byte k must be on din from pulse k until pulse k+1.
//   after a sector: BUSY_TICKS, then ready returns.
// The card contents are sparse; a byte never written reads as pattern(a).
// Counts of sector reads and writes, and the last addresses, are kept.
// The interface follows the parts being modelled; the timing numbers are
// choices made here.
module sd_card_model #(
  parameter int INIT_TICKS = 20,
  parameter int CMD_TICKS  = 16,
  parameter int BYTE_TICKS = 8,
  parameter int BUSY_TICKS = 24
) (
  input  logic        clk,
  input  logic        sd_clk,
  input  logic        rd,
  input  logic        wr,
  input  logic [31:0] addr,
  input  logic [7:0]  din,
  output logic        ready,
  output logic [7:0]  dout,
  output logic        byte_available,
  output logic        ready_for_next_byte
);
  logic [7:0] mem [longint unsigned];
  int n_reads = 0, n_writes = 0;
  int reads_at [longint unsigned];   // sector reads per byte address
  logic [31:0] last_rd_addr = '0, last_wr_addr = '0;
  logic s_prev = 1'b0;

  function automatic logic [7:0] pattern(input longint unsigned a);
    return 8'(a[7:0] ^ a[16:9] ^ a[27:20] ^ 8'h5A);
  endfunction

  function automatic logic [7:0] peek(input longint unsigned a);
    return mem.exists(a) ? mem[a] : pattern(a);
  endfunction

  // one tick = the first 100 MHz edge at which sd_clk is seen high after
  // having been seen low at the edge before
  task automatic wait_ticks(input int n);
    repeat (n) begin
      logic hit;
      do begin
        @(posedge clk);
        hit    = sd_clk && !s_prev;
        s_prev = sd_clk;
      end while (!hit);
    end
  endtask

  initial begin
    ready = 1'b0; dout = '0; byte_available = 1'b0; ready_for_next_byte = 1'b0;
    wait_ticks(INIT_TICKS);
    ready <= 1'b1;
    forever begin
      wait_ticks(1);
      if (ready && (rd || wr)) begin
        logic [31:0] a;
        logic        is_wr;
        a = addr; is_wr = wr;
        ready <= 1'b0;
        wait_ticks(CMD_TICKS);
        if (!is_wr) begin
          n_reads++; last_rd_addr = a;
          if (reads_at.exists(longint'(a))) reads_at[longint'(a)]++; else reads_at[longint'(a)] = 1;
          for (int k = 0; k < 512; k++) begin
            dout <= peek(longint'(a) + k);
            byte_available <= 1'b1;
            wait_ticks(1);
            byte_available <= 1'b0;
            wait_ticks(BYTE_TICKS - 1);
          end
        end else begin
          n_writes++; last_wr_addr = a;
          for (int k = 0; k <= 512; k++) begin
            if (k > 0) mem[longint'(a) + k - 1] = din;
            if (k < 512) begin
              ready_for_next_byte <= 1'b1;
              wait_ticks(1);
              ready_for_next_byte <= 1'b0;
              wait_ticks(BYTE_TICKS - 1);
            end
          end
        end
        wait_ticks(BUSY_TICKS);
        ready <= 1'b1;
      end
    end
  end
endmodule
