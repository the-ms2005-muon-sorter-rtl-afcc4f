// ms_fifo - one 511-word x 32-bit test FIFO of the MS2005 (FIFO_A, _B, _C, _D).
//
// The datapath side has a write port (wr_en/wr_data) and a read port
// (rd_en/rd_data).  The VME side sees the FIFO as two 16-bit registers at
// byte offsets BASE (bits [15:0]) and BASE+2 (bits [31:16]):
//   * writing BASE latches the low half, writing BASE+2 pushes
//     {written data, latched low half};
//   * reading BASE returns the low half of the oldest word without removing
//     it, reading BASE+2 returns its high half and removes the word.
// Reading an empty FIFO returns 0.  When both sides push (or pop) in the same
// cycle the datapath wins and the VME access is ignored.  soft_rst empties
// the FIFO (EMPTY = 1, FULL = 0).
//
// Timing: rd_data is registered: the word popped by rd_en appears on the next
// clk edge; rd_en on an empty FIFO gives 0, which ends a test playback with
// zero frames.  VME read data (reg_rdata) appears one cycle after the read
// strobe and is 0 unless this FIFO was addressed.
// Depth, width and the FULL/EMPTY meaning follow the specification; the
// half-word access order and the port priorities are this design's choices.
module ms_fifo
  import ms_pkg::*;
#(
  parameter int          DEPTH = FIFO_DEPTH,
  parameter int          WIDTH = 32,
  parameter logic [18:0] BASE  = A_FIFO_A
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             soft_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  input  reg_req_t         reg_req,
  output logic [15:0]      reg_rdata,
  output logic             full,
  output logic             empty
);

  localparam int AW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      count;
  logic [15:0]      lo_q;

  logic hit_lo, hit_hi, vme_push, vme_pop, push, pop;

  assign hit_lo = (reg_req.addr == BASE[18:1]);
  assign hit_hi = (reg_req.addr == BASE[18:1] + 18'd1);

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);

  assign vme_push = reg_req.wr && hit_hi && !wr_en;
  assign vme_pop  = reg_req.rd && hit_hi && !rd_en;
  assign push     = (wr_en || vme_push) && !full;
  assign pop      = (rd_en || vme_pop) && !empty;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_en ? wr_data : WIDTH'({reg_req.wdata, lo_q});
  end

  always_ff @(posedge clk) begin
    if (rst || soft_rst) begin
      wp        <= '0;
      rp        <= '0;
      count     <= '0;
      lo_q      <= '0;
      rd_data   <= '0;
      reg_rdata <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      if (reg_req.wr && hit_lo) lo_q <= reg_req.wdata;
      if (rd_en) rd_data <= empty ? '0 : mem[rp];
      reg_rdata <= '0;
      if (reg_req.rd && !empty) begin
        if (hit_lo) reg_rdata <= mem[rp][15:0];
        if (hit_hi) reg_rdata <= 16'(mem[rp] >> 16);
      end
    end
  end

endmodule
