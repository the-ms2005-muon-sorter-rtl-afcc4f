// ms_cpld_ctrl - the board's control PLD functions that the FPGA depends on.
//
//   CSR3 (R)   bit 0: FPGA configuration done and DLL locked.
//   CSR4 (R/W) bit 0: enable the VME JTAG controller; bit 1: let the CCB
//              Hard_Reset / MS_Hard_Reset requests reload the FPGA.
//              0 after power-up.
//   A_JTAG_RST write: one-clk reset pulse to the VME JTAG controller chip.
//   A_HARD_RST write: 500 ns reload pulse to the FPGA, unconditionally.
//   A_SOFT_RST write: one-clk Soft_Reset pulse (empties all FIFOs, sets
//              training-pattern mode, clears the RAM address counter).
// A CCB reload request (from a CCB command or the MS_hard_reset line)
// produces the same 500 ns pulse only when CSR4[1] = 1.  A request that
// arrives during a pulse is absorbed by it.
//
// Timing: the pulse lasts HARD_RESET_CYCLES clk cycles (40 at 80 MHz =
// 500 ns) and starts the clk after the request.  Read data appears one clk
// after the read strobe.
// Register bits, the 500 ns length and the CSR4[1] gating follow the
// specification; running this logic on the FPGA clock and bus is this
// design's simplification of the separate PLD.
module ms_cpld_ctrl
  import ms_pkg::*;
#(
  parameter int HARD_RESET_CYCLES = 40
)(
  input  logic        clk,
  input  logic        rst,
  input  reg_req_t    reg_req,
  output logic [15:0] reg_rdata,
  input  logic        cfg_done,      // FPGA configured and DLL locked
  input  logic        ccb_reload_req,
  output logic        jtag_enable,
  output logic        jtag_reset,
  output logic        fpga_reload,
  output logic        soft_reset
);

  localparam int CW = $clog2(HARD_RESET_CYCLES + 1);

  logic [15:0]   csr4;
  logic [CW-1:0] cnt;
  logic          req;

  assign jtag_enable = csr4[0];
  assign fpga_reload = (cnt != '0);
  assign req = (reg_req.wr && reg_req.addr == A_HARD_RST[18:1]) ||
               (ccb_reload_req && csr4[1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      csr4       <= '0;
      cnt        <= '0;
      soft_reset <= 1'b0;
      jtag_reset <= 1'b0;
      reg_rdata  <= '0;
    end else begin
      if (reg_req.wr && reg_req.addr == A_CSR4[18:1]) csr4 <= reg_req.wdata;
      soft_reset <= reg_req.wr && reg_req.addr == A_SOFT_RST[18:1];
      jtag_reset <= reg_req.wr && reg_req.addr == A_JTAG_RST[18:1];
      if (req && cnt == '0) cnt <= CW'(HARD_RESET_CYCLES);
      else if (cnt != '0)   cnt <= cnt - 1'b1;
      reg_rdata <= '0;
      if (reg_req.rd) begin
        if (reg_req.addr == A_CSR4[18:1]) reg_rdata <= csr4;
        if (reg_req.addr == A_CSR3[18:1]) reg_rdata <= {15'd0, cfg_done};
      end
    end
  end

endmodule
