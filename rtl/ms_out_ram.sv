// ms_out_ram - the four 512 x 32 output RAM buffers RAM_1..RAM_4.
//
// The buffers hold ready-made GMT words (bits [29:0] in the GMT format) that
// can be sent to GMT instead of the sorter results.  VME access goes through
// a common 9-bit address counter and CSR6:
//   * A_RAM_ADDR  read/write the address counter (0..1FF);
//   * A_CSR6      read/write CSR6[7:0]; bit 2m enables bits [15:0] and bit
//                 2m+1 bits [31:16] of RAM_(m+1);
//   * A_RAM_DATA  write: the 16-bit data goes to every enabled half at the
//                 address counter; read: OR of all enabled halves there;
//   * A_SEND_RAM  write: start the transmission of all 512 words
//                 (send_req pulse; the playback itself is sequenced outside).
// The address counter does not advance by itself.  soft_rst clears the
// address counter.  The playback port reads all four buffers at play_addr.
//
// Timing: play_data is registered and updated on ce, one bx after
// play_addr; VME read data appears one cycle after the read strobe.
// Sizes, the common counter and CSR6 follow the specification; the counter
// not auto-incrementing and the OR of several enabled halves on read are
// this design's choices.
module ms_out_ram
  import ms_pkg::*;
#(
  parameter int DEPTH = RAM_DEPTH
)(
  input  logic        clk,
  input  logic        rst,
  input  logic        soft_rst,
  input  logic        ce,
  input  logic [$clog2(DEPTH)-1:0] play_addr,
  output logic [N_OUT-1:0][31:0]   play_data,
  output logic        send_req,
  input  reg_req_t    reg_req,
  output logic [15:0] reg_rdata
);

  localparam int AW = $clog2(DEPTH);

  logic [15:0] ram [2*N_OUT][DEPTH];   // index 2m: RAM_(m+1)[15:0], 2m+1: [31:16]
  logic [AW-1:0] addr_q;
  logic [7:0]    csr6;

  logic hit_addr, hit_csr6, hit_data;
  assign hit_addr = (reg_req.addr == A_RAM_ADDR[18:1]);
  assign hit_csr6 = (reg_req.addr == A_CSR6[18:1]);
  assign hit_data = (reg_req.addr == A_RAM_DATA[18:1]);

  for (genvar h = 0; h < 2*N_OUT; h++) begin : g_half
    always_ff @(posedge clk) begin
      if (reg_req.wr && hit_data && csr6[h]) ram[h][addr_q] <= reg_req.wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_q    <= '0;
      csr6      <= '0;
      reg_rdata <= '0;
      send_req  <= 1'b0;
      play_data <= '0;
    end else begin
      send_req <= reg_req.wr && (reg_req.addr == A_SEND_RAM[18:1]);
      if (soft_rst) addr_q <= '0;
      else if (reg_req.wr && hit_addr) addr_q <= AW'(reg_req.wdata);
      if (reg_req.wr && hit_csr6) csr6 <= reg_req.wdata[7:0];

      reg_rdata <= '0;
      if (reg_req.rd) begin
        if (hit_addr) reg_rdata <= 16'(addr_q);
        if (hit_csr6) reg_rdata <= {8'h00, csr6};
        if (hit_data) begin
          logic [15:0] acc;
          acc = '0;
          for (int h = 0; h < 2*N_OUT; h++)
            if (csr6[h]) acc = acc | ram[h][addr_q];
          reg_rdata <= acc;
        end
      end

      if (ce)
        for (int m = 0; m < N_OUT; m++)
          play_data[m] <= {ram[2*m+1][play_addr], ram[2*m][play_addr]};
    end
  end

endmodule
