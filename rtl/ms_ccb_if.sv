// ms_ccb_if - interface to the Clock and Control Board (CCB) and the bunch
// crossing counter BXN.
//
// CCB fast-control signals are sampled once per bx (ce).  When ccb_cmd_strobe
// is high the 6-bit ccb_cmd is decoded:
//   01h BC0                 BXN starts counting on the next bx
//   03h L1Reset             BXN <= CSR7 (and holds until BC0)
//   04h Hard Reset          FPGA reload request
//   06h Start Trigger       winner-bit mode
//   07h Stop Trigger        training-pattern mode
//   11h MS_Hard_Reset       FPGA reload request
//   31h Inject patterns     send the FIFO_A test patterns to the sorter
//   32h Bunch Counter Reset BXN <= CSR7 (and holds until BC0)
// The dedicated ccb_bc0 line acts like the BC0 command, and the dedicated
// ms_hard_reset line like a reload request.  The command outputs are
// one-clk pulses in the ce cycle.
// BXN is a 16-bit counter that, once started, advances by one every bx and
// wraps at 2^16.
//
// All inputs are taken active-high: the backplane signals are active-low
// GTLP and are assumed to be inverted by the receivers.  The command codes
// and BXN behaviour follow the specification; sampling on ce, the dedicated
// lines and the pulse outputs are this design's choices.
module ms_ccb_if #(
  parameter int BXN_W = 16
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [5:0]       ccb_cmd,
  input  logic             ccb_cmd_strobe,
  input  logic             ccb_bc0,
  input  logic             ms_hard_reset,
  input  logic [BXN_W-1:0] bxn_offset,   // CSR7
  output logic [BXN_W-1:0] bxn,
  output logic             bxn_run,
  output logic             start_trig,
  output logic             stop_trig,
  output logic             reload_req,
  output logic             inject,
  output logic             bxn_load
);

  typedef enum logic [5:0] {
    CMD_BC0       = 6'h01,
    CMD_L1RESET   = 6'h03,
    CMD_HARD_RST  = 6'h04,
    CMD_START     = 6'h06,
    CMD_STOP      = 6'h07,
    CMD_MS_HARD   = 6'h11,
    CMD_INJECT    = 6'h31,
    CMD_BC_RESET  = 6'h32
  } ccb_cmd_e;

  logic       cmd_v;
  logic       bc0;
  ccb_cmd_e   cmd;

  assign cmd      = ccb_cmd_e'(ccb_cmd);
  assign cmd_v    = ce && ccb_cmd_strobe;
  assign bc0      = (cmd_v && cmd == CMD_BC0) || (ce && ccb_bc0);
  assign bxn_load = cmd_v && (cmd == CMD_L1RESET || cmd == CMD_BC_RESET);

  always_comb begin
    start_trig = cmd_v && cmd == CMD_START;
    stop_trig  = cmd_v && cmd == CMD_STOP;
    inject     = cmd_v && cmd == CMD_INJECT;
    reload_req = (cmd_v && (cmd == CMD_HARD_RST || cmd == CMD_MS_HARD)) ||
                 (ce && ms_hard_reset);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bxn     <= '0;
      bxn_run <= 1'b0;
    end else if (ce) begin
      if (bxn_load) begin
        bxn     <= bxn_offset;
        bxn_run <= 1'b0;
      end else begin
        if (bxn_run) bxn <= bxn + 1'b1;
        if (bc0)     bxn_run <= 1'b1;
      end
    end
  end

endmodule
