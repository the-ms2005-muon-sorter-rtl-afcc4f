// ms_input_rx - input selector and frame assembler for one Sector Processor.
//
// Every bx an SP sends its three muons in two 32-bit frames at 80 MHz: frame 1
// carries phi/eta of the three muons plus BC0 and SE, frame 2 carries rank,
// VC, C, HL plus BX0 and the spare bit.  In Trigger mode (test_mode = 0) the
// frames come from the backplane; in Test mode they come from the SP's FIFO_A
// buffer (the Test/Trigger multiplexer).  When the SP is disabled by its CSR9
// bit, zeros are used instead, so the SP contributes only rank-0 muons.
//
// Timing: clk is the 80 MHz frame clock.  frame2 is 0 in the cycle that
// carries frame 1 and 1 in the cycle that carries frame 2.  Frame 1 is held
// in a register; at the frame-2 edge both frames are unpacked into `pat`,
// which then stays stable for the whole next bx (2 clk cycles).
// The multiplexer and disable behaviour follow the specification; the frame
// phase input and the register placement are this design's choices.
module ms_input_rx
  import ms_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        frame2,      // 0: frame 1 on the inputs, 1: frame 2
  input  logic        test_mode,   // CSR0[0]
  input  logic        disable_sp,  // CSR9 bit of this SP
  input  logic [31:0] sp_frame,    // backplane frame
  input  logic [31:0] fifo_frame,  // FIFO_A frame
  output sp_pattern_t pat
);

  logic [31:0] frame, f1_q;

  always_comb begin
    if (disable_sp)     frame = '0;
    else if (test_mode) frame = fifo_frame;
    else                frame = sp_frame;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      f1_q <= '0;
      pat  <= '0;
    end else if (!frame2) begin
      f1_q <= frame;
    end else begin
      pat  <= unpack_frames(f1_q, frame);
    end
  end

endmodule
