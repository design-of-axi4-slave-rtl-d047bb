// axi_slave_rd: the slave's read side: AR acceptance and the R (read data)
// channel.
//
// IDLE: ARREADY is high; when ARVALID is seen the command is stored and the
// slave moves to BURST. BURST: whenever the RDATA register is empty or its
// beat is being taken (RREADY high), the next beat is read from memory at the
// current address and driven with RVALID high, RID = ARID, RRESP = OKAY and
// RLAST on the last of the ARLEN+1 beats; the address then advances by the
// burst rule (FIXED, INCR or WRAP, sized by ARSIZE). A beat is held while
// RREADY is low. Once the last beat has been taken, RVALID and the fields
// return to zero and the slave goes back to IDLE. While ARESETn is low every
// output is zero.
//
// Timing: one read burst at a time. AR handshake at edge t; the first beat is
// on the bus from edge t+1; then one beat per clock while RREADY is high; the
// edge that takes the RLAST beat clears RVALID and raises ARREADY again, so
// the next AR handshake can come one clock later. All bus outputs are flip-flops; the memory read
// address comes from internal registers only.
//
// Holding RDATA until RREADY, driving the next beat when RREADY is high and
// RLAST on the last beat follow the source paper's R channel description. A burst is
// ARLEN+1 beats, as in AXI4. One outstanding read, the one-cycle start and the
// address sequencing of narrow and unaligned beats (AXI4 rules) are this
// design's own choices. ARLOCK, ARCACHE and ARPROT are accepted and not used.
module axi_slave_rd
  import axi_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic       aclk,
  input  logic       aresetn,
  // AXI AR
  input  id_t        arid,
  input  addr_t      araddr,
  input  len_t       arlen,
  input  size_t      arsize,
  input  logic [1:0] arburst,
  input  logic       arlock,
  input  logic [3:0] arcache,
  input  logic [2:0] arprot,
  input  logic       arvalid,
  output logic       arready,
  // AXI R
  output id_t        rid,
  output data_t      rdata,
  output logic [1:0] rresp,
  output logic       rlast,
  output logic       rvalid,
  input  logic       rready,
  // memory read port
  output logic [$clog2(MEM_BYTES/8)-1:0] mem_raddr,
  input  data_t                          mem_rdata
);

  typedef enum logic {RD_IDLE, RD_BURST} rd_state_t;

  rd_state_t  state;
  id_t        cur_id;
  addr_t      cur_addr;
  len_t       cur_len;
  size_t      cur_size;
  logic [1:0] cur_burst;
  len_t       beat;       // beats already driven
  logic       done;       // the last beat has been driven

  assign mem_raddr = cur_addr[$clog2(MEM_BYTES)-1:3];

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state     <= RD_IDLE;
      arready   <= 1'b0;
      {rid, rdata, rresp, rlast, rvalid} <= '0;
      cur_id    <= '0;
      cur_addr  <= '0;
      cur_len   <= '0;
      cur_size  <= '0;
      cur_burst <= '0;
      beat      <= '0;
      done      <= 1'b0;
    end else begin
      unique case (state)
        RD_IDLE: begin
          arready <= 1'b1;
          if (arvalid && arready) begin
            cur_id    <= arid;
            cur_addr  <= araddr;
            cur_len   <= arlen;
            cur_size  <= arsize;
            cur_burst <= arburst;
            beat      <= '0;
            done      <= 1'b0;
            arready   <= 1'b0;
            state     <= RD_BURST;
          end
        end
        RD_BURST: begin
          if (!rvalid || rready) begin
            if (!done) begin
              rid      <= cur_id;
              rdata    <= mem_rdata;
              rresp    <= RESP_OKAY;
              rlast    <= (beat == cur_len);
              rvalid   <= 1'b1;
              done     <= (beat == cur_len);
              beat     <= beat + 1'b1;
              cur_addr <= next_addr(cur_addr, cur_size, cur_len, cur_burst);
            end else begin
              {rid, rdata, rresp, rlast, rvalid} <= '0;
              arready <= 1'b1;
              state   <= RD_IDLE;
            end
          end
        end
        default: state <= RD_IDLE;
      endcase
    end
  end

  a_ar_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                              arvalid && !arready |=> arvalid && $stable(araddr));

endmodule
