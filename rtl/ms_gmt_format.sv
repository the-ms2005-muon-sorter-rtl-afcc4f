// ms_gmt_format - builds the 31-bit MS-to-GMT word of one muon.
//
// The same word goes to the GMT cable (bits 0..30; bit 31 of the cable is
// the 40 MHz clock) and, with a 0 in bit 31, into FIFO_B:
//   [7:0] Phi   [12:8] ~Pt   [15:13] ~Quality   [21:16] Eta[5:0]
//   22 HL   23 C   24 VC   25..27 Bx[2:0]   28 Bc0   29 SyncEr   30 Parity
// Pt and Quality are sent inverted.  An empty candidate (Pt = 0) is sent
// with bits 16..24 at 0 and Phi, ~Pt and ~Quality all ones.  Parity is the
// XNOR of bits [29:0] (1 for an even number of ones).
//
// Bx bits: with MASKBXN (CSR0[8]) = 1 they are the three LSBs of the
// board's bunch crossing counter; otherwise with MASKER (CSR0[7]) = 1 they
// are {0, 0, BX0 of the selected muon}; otherwise 0.
// SyncEr: MASKCOMP (CSR0[6]) = 1 passes the comparison of the muon's BX0
// with BXN[0]; MASKSP (CSR0[5]) = 1 passes the SE bit sent by the SP; the two
// are ORed.  Bc0 is the OR of the BC0 bits of all 12 SPs, independent of
// the sorting.
//
// Purely combinational.  The word layout, inversion, empty coding, parity
// and the mask bits follow the specification.  The priority of MASKBXN over
// MASKER and comparing BX0 only for a selected muon are this design's
// choices.
module ms_gmt_format
  import ms_pkg::*;
(
  input  conv_muon_t  mu,
  input  logic [2:0]  bxn,        // BXN[2:0]
  input  logic        bc0_any,    // OR of the BC0 bits of all SPs
  input  logic        masksp,
  input  logic        maskcomp,
  input  logic        masker,
  input  logic        maskbxn,
  output logic [30:0] word
);

  logic [2:0] bx;
  logic       syncer;
  logic [29:0] w;

  always_comb begin
    if (maskbxn)     bx = bxn;
    else if (masker) bx = {2'b00, mu.bx0};
    else             bx = 3'b000;

    syncer = (maskcomp && mu.valid && (mu.bx0 != bxn[0])) || (masksp && mu.se);

    if (mu.pt == 5'd0)
      w = {syncer, bc0_any, bx, 9'd0, 3'b111, 5'b11111, 8'hFF};
    else
      w = {syncer, bc0_any, bx, mu.vc, mu.c, mu.hl, mu.eta, ~mu.quality, ~mu.pt, mu.phi};

    word = {gmt_parity(w), w};
  end

endmodule
