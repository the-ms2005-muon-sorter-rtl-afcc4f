// ms_vme_if - VME A24 slave of the MS2005.
//
// The board answers A24 word cycles whose address bits A[23:19] equal the
// 5-bit geographical address of its slot (slot 14 of the Track Finder crate
// gives base 700000h) and whose address modifier is 39h or 3Dh.  Byte cycles
// (only one of DS1/DS0) are ignored, so all valid addresses are even.
// An accepted cycle becomes one strobe on the internal register bus
// (reg_req.wr or reg_req.rd for one clk, address A[18:1]); the register
// blocks return read data one clk later, ORed together on reg_rdata, which
// is latched onto vme_rdata before DTACK is given.  DTACK stays asserted
// until the master removes AS or the data strobes.
//
// The bus signals are taken active-high (the board's transceivers are
// assumed to invert) and asynchronous: AS and DS pass a two-flop
// synchroniser; address, AM, WRITE and data are sampled when the
// synchronised strobes show a cycle, by which time they are stable.
// Timing: DTACK follows the data strobes by about five clk cycles.
// The address decoding and AM codes follow the specification; the
// synchroniser and the handshake timing are this design's choices.
module ms_vme_if
  import ms_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  vme_ga,
  input  logic        vme_as,
  input  logic [1:0]  vme_ds,
  input  logic        vme_write,
  input  logic [5:0]  vme_am,
  input  logic [23:1] vme_addr,
  input  logic [15:0] vme_wdata,
  output logic [15:0] vme_rdata,
  output logic        vme_dtack,
  output reg_req_t    reg_req,
  input  logic [15:0] reg_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_DATA, S_ACK, S_SKIP} state_e;
  state_e state;

  logic [1:0] as_sync;
  logic [1:0] ds_sync [2];
  logic as_s, word_s, any_ds;
  logic is_write;

  assign as_s   = as_sync[1];
  assign word_s = (ds_sync[1] == 2'b11);
  assign any_ds = |ds_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      as_sync    <= '0;
      ds_sync[0] <= '0;
      ds_sync[1] <= '0;
    end else begin
      as_sync    <= {as_sync[0], vme_as};
      ds_sync[0] <= vme_ds;
      ds_sync[1] <= ds_sync[0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      reg_req   <= '0;
      vme_rdata <= '0;
      vme_dtack <= 1'b0;
      is_write  <= 1'b0;
    end else begin
      reg_req.wr <= 1'b0;
      reg_req.rd <= 1'b0;
      case (state)
        S_IDLE: if (as_s && any_ds) begin
          if (word_s && vme_addr[23:19] == vme_ga &&
              (vme_am == 6'h39 || vme_am == 6'h3D)) begin
            reg_req.addr  <= vme_addr[18:1];
            reg_req.wdata <= vme_wdata;
            reg_req.wr    <= vme_write;
            reg_req.rd    <= !vme_write;
            is_write      <= vme_write;
            state         <= S_WAIT;
          end else begin
            state <= S_SKIP;
          end
        end
        S_WAIT: state <= S_DATA;              // strobe cycle
        S_DATA: begin                          // read data valid now
          if (!is_write) vme_rdata <= reg_rdata;
          vme_dtack <= 1'b1;
          state     <= S_ACK;
        end
        S_ACK: if (!as_s || !any_ds) begin
          vme_dtack <= 1'b0;
          state     <= S_IDLE;
        end
        S_SKIP: if (!as_s || !any_ds) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
