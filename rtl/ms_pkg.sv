// ms_pkg - types, constants and small helper functions shared by the MS2005
// muon sorter FPGA logic.
//
// The MS2005 receives up to three muon candidates from each of 12 Sector
// Processors (SP) every bunch crossing (bx, 25 ns), selects the four best and
// sends them to the Global Muon Trigger (GMT).  This package holds:
//   * the muon field layout of the SP-to-MS frames (two 32-bit frames per bx),
//   * the 31-bit MS-to-GMT word layout (also the FIFO_B / FIFO_D format),
//   * the FIFO_C word layout,
//   * the internal register bus that connects the VME decoder to the register
//     blocks, and the VME byte offsets of every register.
// Field positions, sizes and register offsets follow the specification of the
// board.  The internal register bus (one-cycle strobes, read data returned
// one cycle later) is this design's own choice.
package ms_pkg;

  localparam int N_SP       = 12;             // Sector Processors
  localparam int N_MU_SP    = 3;              // muons per SP per bx
  localparam int N_IN       = N_SP * N_MU_SP; // 36 sorter inputs
  localparam int N_OUT      = 4;              // best muons sent to GMT
  localparam int FIFO_DEPTH = 511;            // words in every FIFO buffer
  localparam int RAM_DEPTH  = 512;            // words in every output RAM

  // One muon as sent by an SP (Table "SP-to-MS data format").
  typedef struct packed {
    logic [6:0] rank;  // Pt LUT output, {Quality[1:0], Pt[4:0]}
    logic       hl;    // halo muon
    logic       c;     // charge
    logic       vc;    // valid charge
    logic [4:0] eta;
    logic [4:0] phi;
  } muon_t;

  // Everything one SP sends in one bx.
  typedef struct packed {
    muon_t [N_MU_SP-1:0] mu;   // mu[0] = Muon_1
    logic  bc0;                // bunch crossing zero flag (frame 1, bit 30)
    logic  se;                 // synchronisation error (frame 1, bit 31)
    logic  bx0;                // LSB of the SP bunch counter (frame 2, bit 30)
    logic  sp;                 // spare (frame 2, bit 31)
  } sp_pattern_t;

  // A muon after the sorter: the muon plus the bits common to its SP.
  typedef struct packed {
    muon_t      mu;
    logic [3:0] sp_id;   // 1..12, 0 when no muon was selected
    logic       bc0;
    logic       se;
    logic       bx0;
    logic       sp;
  } sel_muon_t;

  // A muon after the output look-up tables and the eta decoder.
  typedef struct packed {
    logic [4:0] pt;
    logic [2:0] quality;
    logic [7:0] phi;
    logic [5:0] eta;
    logic       hl;
    logic       c;
    logic       vc;
    logic       se;    // SE bit of the source SP
    logic       bx0;   // BX0 bit of the source SP
    logic       valid; // a muon was selected (rank != 0)
  } conv_muon_t;

  // Internal register bus: one-cycle strobes; byte offset is A[18:0] with A0 = 0.
  typedef struct packed {
    logic        wr;
    logic        rd;
    logic [18:1] addr;
    logic [15:0] wdata;
  } reg_req_t;

  // ---- VME byte offsets inside the board's A24 window ----
  // control PLD
  localparam logic [18:0] A_JTAG_RST   = 19'h00010;
  localparam logic [18:0] A_CSR4       = 19'h00012;
  localparam logic [18:0] A_CSR3       = 19'h00014;
  localparam logic [18:0] A_HARD_RST   = 19'h00016;
  localparam logic [18:0] A_SOFT_RST   = 19'h00018;
  // main FPGA
  localparam logic [18:0] A_FIFO_A     = 19'h00100; // + 4*i, i = 0..11
  localparam logic [18:0] A_FIFO_B     = 19'h00130; // + 4*i, i = 0..3
  localparam logic [18:0] A_FIFO_C     = 19'h00140; // + 4*i, i = 0..3
  localparam logic [18:0] A_FIFO_D     = 19'h00150;
  localparam logic [18:0] A_CSR0       = 19'h00158;
  localparam logic [18:0] A_CSR1       = 19'h0015A;
  localparam logic [18:0] A_CSR2       = 19'h0015C;
  localparam logic [18:0] A_SEND_A     = 19'h0015E;
  localparam logic [18:0] A_DCM1_PS    = 19'h00160;
  localparam logic [18:0] A_DCM2_PS    = 19'h00162;
  localparam logic [18:0] A_PSDONE_RST = 19'h00164;
  localparam logic [18:0] A_CSR7       = 19'h00166;
  localparam logic [18:0] A_CSR5       = 19'h00168;
  localparam logic [18:0] A_WIN_MODE   = 19'h0016A;
  localparam logic [18:0] A_TRAIN_MODE = 19'h0016C;
  localparam logic [18:0] A_CSR8       = 19'h0016E;
  localparam logic [18:0] A_CSR9       = 19'h00170;
  localparam logic [18:0] A_DCM1_RST   = 19'h00172;
  localparam logic [18:0] A_DCM2_RST   = 19'h00174;
  localparam logic [18:0] A_RAM_ADDR   = 19'h00178;
  localparam logic [18:0] A_CSR6       = 19'h0017A;
  localparam logic [18:0] A_RAM_DATA   = 19'h0017C;
  localparam logic [18:0] A_SEND_RAM   = 19'h0017E;
  localparam logic [18:0] A_LUT        = 19'h00400; // + 0x400*m, m = 0..3, 512 words each

  // CSR0 bit positions
  localparam int CSR0_TEST     = 0;
  localparam int CSR0_MASKSP   = 5;
  localparam int CSR0_MASKCOMP = 6;
  localparam int CSR0_MASKER   = 7;
  localparam int CSR0_MASKBXN  = 8;
  localparam int CSR0_L1A_EN   = 9;
  localparam int CSR0_RAM_SRC  = 10;

  // Assemble the two 80 MHz frames of one SP into a pattern.
  function automatic sp_pattern_t unpack_frames(logic [31:0] f1, logic [31:0] f2);
    sp_pattern_t p;
    for (int k = 0; k < N_MU_SP; k++) begin
      p.mu[k].phi  = f1[10*k +: 5];
      p.mu[k].eta  = f1[10*k + 5 +: 5];
      p.mu[k].rank = f2[10*k +: 7];
      p.mu[k].vc   = f2[10*k + 7];
      p.mu[k].c    = f2[10*k + 8];
      p.mu[k].hl   = f2[10*k + 9];
    end
    p.bc0 = f1[30];
    p.se  = f1[31];
    p.bx0 = f2[30];
    p.sp  = f2[31];
    return p;
  endfunction

  // FIFO_C word: a sorter output before the look-up tables.
  function automatic logic [31:0] fifo_c_word(sel_muon_t s);
    return {4'b0000, s.sp_id, s.se, s.bc0, s.sp, s.bx0, s.mu.eta[4:1],
            s.mu.eta[0], s.mu.phi, s.mu.hl, s.mu.c, s.mu.vc, s.mu.rank};
  endfunction

  // Parity of a GMT word: 1 when bits [29:0] hold an even number of ones.
  function automatic logic gmt_parity(logic [29:0] w);
    return ~^w;
  endfunction

endpackage
