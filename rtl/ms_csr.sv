// ms_csr - control and status registers of the MS2005 main FPGA.
//
//   CSR0 (R/W) general purpose: [0] Test mode, [5] MASKSP, [6] MASKCOMP,
//        [7] MASKER, [8] MASKBXN, [9] MS_L1A_Request enable, [10] GMT source
//        is RAM, [15:12] winner-bit delay.
//   CSR1 (R)   FIFO flags {D empty, D full, C empty, C full, B empty, B full,
//        A empty, A full} in bits [7:0].
//   CSR2 (R)   firmware date: [4:0] day, [8:5] month, [11:9] year - 2000.
//   CSR5 (R)   DCM status: [0]/[1] PSDONE of DCM1/DCM2 (sticky until the
//        PSDONE reset command), [4:2] STATUS of DCM1, [7:5] STATUS of DCM2.
//   CSR7 (R/W) 16-bit BXN offset.  CSR8 (R/W) [7:0] clock delay chip setting.
//   CSR9 (R/W) [11:0] disable input from SP1..SP12 when 1.
// Write-only commands (any data) give a one-clk pulse: FIFO_A transmission,
// PSDONE reset, winner-bit mode, training-pattern mode, DCM1/DCM2 reset.
// Writes to the DCM phase registers give a phase step pulse with the
// direction in data bit 0 (1 = increase).
// All registers are 0 after reset.
//
// Timing: writes take effect at the strobe edge; read data appears one clk
// after the read strobe and is 0 when the address is not a register here.
// The bit assignments follow the register tables of the specification.
// Where the text puts MS_L1A_Request enable at CSR0[7] and the CSR0 table
// at bit 9, bit 9 is used.
module ms_csr
  import ms_pkg::*;
#(
  parameter logic [15:0] FW_DATE = 16'd1252  // 4 July 2002 in the CSR2 coding
)(
  input  logic        clk,
  input  logic        rst,
  input  reg_req_t    reg_req,
  output logic [15:0] reg_rdata,
  input  logic [7:0]  fifo_flags,
  input  logic        dcm1_psdone,
  input  logic        dcm2_psdone,
  input  logic [2:0]  dcm1_status,
  input  logic [2:0]  dcm2_status,
  output logic [15:0] csr0,
  output logic [15:0] csr7,
  output logic [7:0]  csr8,
  output logic [11:0] csr9,
  output logic        send_a,
  output logic        set_winner,
  output logic        set_training,
  output logic        dcm1_ps_en,
  output logic        dcm2_ps_en,
  output logic        dcm_ps_inc,
  output logic        dcm1_rst,
  output logic        dcm2_rst
);

  logic [1:0] psdone_q;

  function automatic logic wr_at(reg_req_t r, logic [18:0] a);
    return r.wr && (r.addr == a[18:1]);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      csr0         <= '0;
      csr7         <= '0;
      csr8         <= '0;
      csr9         <= '0;
      psdone_q     <= '0;
      reg_rdata    <= '0;
      send_a       <= 1'b0;
      set_winner   <= 1'b0;
      set_training <= 1'b0;
      dcm1_ps_en   <= 1'b0;
      dcm2_ps_en   <= 1'b0;
      dcm_ps_inc   <= 1'b0;
      dcm1_rst     <= 1'b0;
      dcm2_rst     <= 1'b0;
    end else begin
      if (wr_at(reg_req, A_CSR0)) csr0 <= reg_req.wdata;
      if (wr_at(reg_req, A_CSR7)) csr7 <= reg_req.wdata;
      if (wr_at(reg_req, A_CSR8)) csr8 <= reg_req.wdata[7:0];
      if (wr_at(reg_req, A_CSR9)) csr9 <= reg_req.wdata[11:0];

      send_a       <= wr_at(reg_req, A_SEND_A);
      set_winner   <= wr_at(reg_req, A_WIN_MODE);
      set_training <= wr_at(reg_req, A_TRAIN_MODE);
      dcm1_ps_en   <= wr_at(reg_req, A_DCM1_PS);
      dcm2_ps_en   <= wr_at(reg_req, A_DCM2_PS);
      if (wr_at(reg_req, A_DCM1_PS) || wr_at(reg_req, A_DCM2_PS))
        dcm_ps_inc <= reg_req.wdata[0];
      dcm1_rst     <= wr_at(reg_req, A_DCM1_RST);
      dcm2_rst     <= wr_at(reg_req, A_DCM2_RST);

      if (wr_at(reg_req, A_PSDONE_RST)) psdone_q <= '0;
      else psdone_q <= psdone_q | {dcm2_psdone, dcm1_psdone};

      reg_rdata <= '0;
      if (reg_req.rd) begin
        case (reg_req.addr)
          A_CSR0[18:1]: reg_rdata <= csr0;
          A_CSR1[18:1]: reg_rdata <= {8'h00, fifo_flags};
          A_CSR2[18:1]: reg_rdata <= {4'h0, FW_DATE[11:0]};
          A_CSR5[18:1]: reg_rdata <= {8'h00, dcm2_status, dcm1_status, psdone_q};
          A_CSR7[18:1]: reg_rdata <= csr7;
          A_CSR8[18:1]: reg_rdata <= {8'h00, csr8};
          A_CSR9[18:1]: reg_rdata <= {4'h0, csr9};
          default:      reg_rdata <= '0;
        endcase
      end
    end
  end

endmodule
