// ms_winner - "winner" bit feedback from the sorter to the 12 Sector Processors.
//
// For every SP i the logic finds which of its three muons the sorter
// selected (OR of the four one-hot sorter addresses) and sends them back on
// two lines Wi[1:0] in two 80 MHz frames:
//   frame 1: Wi[0] = Muon_1 selected, Wi[1] = Muon_2 selected
//   frame 2: Wi[0] = Muon_3 selected, Wi[1] = 0
// The selection can be delayed by CSR0[15:12] = 1..15 further bx through a
// 15-deep shift register clocked once per bx; 0 means no extra delay.
// In training pattern mode every Wi[0] carries a 40 MHz square wave (1 in
// frame 1, 0 in frame 2) and Wi[1] is 0, so the SPs can time their inputs.
// The mode is winner-bit mode after reset; set_training (Stop Trigger,
// VME command, Soft_Reset) and set_winner (Start Trigger, VME command)
// switch it.
//
// Timing: clk is the 80 MHz frame clock, frame2 is 1 in the frame-2 cycle
// and ce is high once per bx.  The output register loads frame-1 bits at
// the end of a frame-2 cycle, so frame 1 is on the lines during the
// following frame-1 cycle; with delay 0 the bits of a sorter result are on
// the lines in the bx after the sorter output changed.
// The encoding, the delay range and the training pattern follow the
// specification; the meaning of delay 0, the square-wave phase and the
// register placement are this design's choices.
module ms_winner
  import ms_pkg::*;
#(
  parameter int MAX_DELAY = 15
)(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      ce,
  input  logic                      frame2,
  input  logic [N_OUT-1:0][N_IN-1:0] sel,
  input  logic [3:0]                delay,
  input  logic                      set_winner,
  input  logic                      set_training,
  output logic                      training,
  output logic [N_SP-1:0][1:0]      w
);

  logic [N_IN-1:0] won;
  logic [N_IN-1:0] hist [MAX_DELAY];
  logic [N_IN-1:0] tap;
  logic [N_SP-1:0] m3_q;   // Muon_3 bits kept for frame 2

  always_comb begin
    won = '0;
    for (int p = 0; p < N_OUT; p++) won = won | sel[p];
    tap = (delay == 4'd0) ? won : hist[int'(delay) - 1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < MAX_DELAY; d++) hist[d] <= '0;
    end else if (ce) begin
      hist[0] <= won;
      for (int d = 1; d < MAX_DELAY; d++) hist[d] <= hist[d-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)               training <= 1'b0;
    else if (set_training) training <= 1'b1;
    else if (set_winner)   training <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      w    <= '0;
      m3_q <= '0;
    end else begin
      for (int i = 0; i < N_SP; i++) begin
        if (frame2) m3_q[i] <= tap[3*i+2];
        if (training)    w[i] <= {1'b0, frame2};
        else if (frame2) w[i] <= {tap[3*i+1], tap[3*i]};
        else             w[i] <= {1'b0, m3_q[i]};
      end
    end
  end

endmodule
