// ms_test_player - sequencer of the two MS2005 test transmissions.
//
// FIFO_A playback: a start request (VME command or CCB "Inject patterns"),
// accepted only in Test mode, makes all twelve FIFO_A buffers deliver
// A_FRAMES frames (255 patterns of two frames) at 80 MHz.  fifo_rd is
// asserted for A_FRAMES consecutive clk cycles, starting in a frame-2 cycle
// so that the first word, which a FIFO delivers one cycle after its read
// strobe, lands in a frame-1 cycle.  fifo_valid marks the cycles in which
// FIFO words are on the FIFO outputs.
//
// RAM playback: a start request (VME command or the CCB bunch counter reset
// line), accepted only when the GMT source is the RAM buffers (CSR0[10] = 1),
// steps ram_addr from 0 to RAM_WORDS-1, one word per bx (40 MHz, on ce).
// ram_active is high for those RAM_WORDS bx (12.8 us) and is also the window
// in which the RAM addresses are stepped.  A RAM answers one bx after its
// address, so ram_valid, ram_active delayed by one bx, marks the bx in which
// RAM words are on the RAM outputs; it drives the GMT multiplexer and is the
// window in which FIFO_D accepts data.
// Counts and rates follow the specification; the alignment details are this
// design's own.
module ms_test_player #(
  parameter int A_FRAMES  = 510,
  parameter int RAM_WORDS = 512
)(
  input  logic       clk,
  input  logic       rst,
  input  logic       frame2,      // 1 in the cycle carrying frame 2
  input  logic       ce,          // once per bx
  input  logic       test_mode,
  input  logic       ram_src,     // CSR0[10]
  input  logic       start_a,
  input  logic       start_ram,
  output logic       fifo_rd,
  output logic       fifo_valid,
  output logic       a_busy,
  output logic [$clog2(RAM_WORDS)-1:0] ram_addr,
  output logic       ram_active,
  output logic       ram_valid
);

  localparam int FW = $clog2(A_FRAMES + 1);
  localparam int RW = $clog2(RAM_WORDS);

  logic          a_pend;
  logic [FW-1:0] a_cnt;
  logic          r_run;
  logic [RW:0]   r_cnt;

  assign a_busy = a_pend || fifo_rd;

  // FIFO_A playback
  always_ff @(posedge clk) begin
    if (rst) begin
      a_pend     <= 1'b0;
      fifo_rd    <= 1'b0;
      a_cnt      <= '0;
      fifo_valid <= 1'b0;
    end else begin
      fifo_valid <= fifo_rd;
      if (start_a && test_mode && !a_busy) a_pend <= 1'b1;
      if (a_pend && !frame2) begin
        a_pend  <= 1'b0;
        fifo_rd <= 1'b1;
        a_cnt   <= FW'(A_FRAMES - 1);
      end else if (fifo_rd) begin
        if (a_cnt == '0) fifo_rd <= 1'b0;
        else             a_cnt   <= a_cnt - 1'b1;
      end
    end
  end

  // RAM playback, one word per bx
  always_ff @(posedge clk) begin
    if (rst) begin
      r_run      <= 1'b0;
      r_cnt      <= '0;
      ram_addr   <= '0;
      ram_active <= 1'b0;
      ram_valid  <= 1'b0;
    end else begin
      if (start_ram && ram_src && !r_run) begin
        r_run <= 1'b1;
        r_cnt <= '0;
      end
      if (ce) begin
        ram_valid  <= ram_active;
        ram_active <= r_run;
        if (r_run) begin
          ram_addr <= r_cnt[RW-1:0];
          r_cnt    <= r_cnt + 1'b1;
          if (r_cnt == (RW+1)'(RAM_WORDS)) begin
            r_run      <= 1'b0;
            ram_active <= 1'b0;
          end
        end else begin
          ram_addr <= '0;
        end
      end
    end
  end

endmodule
