// ms_out_lut - output data conversion for one of the four selected muons.
//
// Three parts convert a sorter output to GMT units:
//   * Rank LUT, 512 x 8: address {0, 0, Rank[6:0]}, data {Quality[2:0], Pt[4:0]}.
//     Its initial content is the identity (data = address), because the SP
//     rank already is {Quality[1:0], Pt[4:0]} and Quality[2] is 0.
//   * Phi LUT, 512 x 8: address {SP_ID[3:0], Phi_SP[4:0]}, data Phi_GMT[7:0].
//     Initial content: Phi_SP + 6 + 24*((SP_ID-1) mod 6) for SP_ID 1..12 (each
//     sector covers 60 degrees = 24 bins of 2.5 degrees and sector 1 starts at
//     bin 6); 0 for the unused SP_ID values 0 and 13..15.
//   * Eta decoder: Eta_GMT = {SP_ID >= 7, Eta_SP[4:0]}: SP7..SP12 form the
//     negative endcap.
// Both LUTs can be read and written from VME at byte offset BASE + 2*address:
// data bits [15:8] are the Rank LUT, bits [7:0] the Phi LUT.
//
// Timing: the LUTs are synchronous memories read on ce; `out` is valid one bx
// after `in`.  VME read data appears one cycle after the read strobe.
// The LUT sizes, address and data assignments, the VME data lines, initial
// contents and eta decoding follow the specification; loading the initial contents at
// configuration is this design's choice.
module ms_out_lut
  import ms_pkg::*;
#(
  parameter int          LUT_DEPTH = 512,
  parameter logic [18:0] BASE      = A_LUT
)(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  sel_muon_t   in,
  output conv_muon_t  out,
  input  reg_req_t    reg_req,
  output logic [15:0] reg_rdata
);

  localparam int AW = $clog2(LUT_DEPTH);

  logic [7:0] rank_lut [LUT_DEPTH];
  logic [7:0] phi_lut  [LUT_DEPTH];

  initial begin
    for (int a = 0; a < LUT_DEPTH; a++) begin
      int id, ph;
      rank_lut[a] = 8'(a);
      id = (a >> 5) & 15;
      ph = a & 31;
      phi_lut[a]  = (id >= 1 && id <= 12) ? 8'(ph + 6 + 24 * ((id - 1) % 6)) : 8'd0;
    end
  end

  logic          hit;
  logic [AW-1:0] vaddr;
  logic [AW-1:0] r_addr, p_addr;

  assign hit    = (reg_req.addr >= BASE[18:1]) &&
                  (reg_req.addr <  BASE[18:1] + 18'(LUT_DEPTH));
  assign vaddr  = AW'(reg_req.addr - BASE[18:1]);
  assign r_addr = AW'({2'b00, in.mu.rank});
  assign p_addr = AW'({in.sp_id, in.mu.phi});

  always_ff @(posedge clk) begin
    if (reg_req.wr && hit) begin
      rank_lut[vaddr] <= reg_req.wdata[15:8];
      phi_lut[vaddr]  <= reg_req.wdata[7:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out       <= '0;
      reg_rdata <= '0;
    end else begin
      reg_rdata <= (reg_req.rd && hit) ? {rank_lut[vaddr], phi_lut[vaddr]} : 16'h0000;
      if (ce) begin
        {out.quality, out.pt} <= rank_lut[r_addr];
        out.phi   <= phi_lut[p_addr];
        out.eta   <= {in.sp_id >= 4'd7, in.mu.eta};
        out.hl    <= in.mu.hl;
        out.c     <= in.mu.c;
        out.vc    <= in.mu.vc;
        out.se    <= in.se;
        out.bx0   <= in.bx0;
        out.valid <= (in.mu.rank != 7'd0);
      end
    end
  end

endmodule
