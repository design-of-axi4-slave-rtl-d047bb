// axi_slave_wr: the slave's write side: AW and W acceptance and the B
// (write response) channel.
//
// A three-state controller. IDLE: AWREADY is high; when AWVALID is seen the
// command is stored and the slave moves to DATA. DATA: WREADY is high; each
// beat taken is written to memory (mem_we, word index, data, strobes) at the
// beat's address, and the address then advances by the burst rule of the
// command (FIXED, INCR or WRAP, sized by AWSIZE). When the beat with WLAST is
// taken the slave moves to RESP and drives BVALID high with BID = AWID and
// BRESP = OKAY. RESP: the response is held until BREADY is high; at that edge
// BVALID, BID and BRESP return to zero and AWREADY rises again. While ARESETn
// is low every output is zero.
//
// Timing: one write burst at a time. AW handshake at edge t; WREADY is high
// from t; one beat per clock while WVALID is high; BVALID rises at the edge
// that takes WLAST; AWREADY is high again the edge after BREADY is seen. All
// bus outputs are flip-flops. The memory write port is driven from bus inputs
// combinationally, but stays inside the slave.
//
// Waiting for WLAST, then holding BVALID until BREADY and clearing the
// response to zero follow the source paper's B channel description. Accepting W
// only after AW, one outstanding write, and the address sequencing of
// narrow and unaligned beats are this design's own choices, the last taken
// from the AXI4 rules. AWLOCK, AWCACHE and AWPROT are accepted and not used;
// WID is only compared with AWID by an assertion.
module axi_slave_wr
  import axi_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic       aclk,
  input  logic       aresetn,
  // AXI AW
  input  id_t        awid,
  input  addr_t      awaddr,
  input  len_t       awlen,
  input  size_t      awsize,
  input  logic [1:0] awburst,
  input  logic       awlock,
  input  logic [3:0] awcache,
  input  logic [2:0] awprot,
  input  logic       awvalid,
  output logic       awready,
  // AXI W
  input  id_t        wid,
  input  data_t      wdata,
  input  strb_t      wstrb,
  input  logic       wlast,
  input  logic       wvalid,
  output logic       wready,
  // AXI B
  output id_t        bid,
  output logic [1:0] bresp,
  output logic       bvalid,
  input  logic       bready,
  // memory write port
  output logic                           mem_we,
  output logic [$clog2(MEM_BYTES/8)-1:0] mem_waddr,
  output data_t                          mem_wdata,
  output strb_t                          mem_wstrb
);

  typedef enum logic [1:0] {WR_IDLE, WR_DATA, WR_RESP} wr_state_t;

  wr_state_t  state;
  id_t        cur_id;
  addr_t      cur_addr;
  len_t       cur_len;
  size_t      cur_size;
  logic [1:0] cur_burst;
  len_t       beat;

  logic w_hs;
  assign w_hs = wvalid && wready;

  assign mem_we    = w_hs;
  assign mem_waddr = cur_addr[$clog2(MEM_BYTES)-1:3];
  assign mem_wdata = wdata;
  assign mem_wstrb = wstrb;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state     <= WR_IDLE;
      awready   <= 1'b0;
      wready    <= 1'b0;
      bvalid    <= 1'b0;
      bid       <= '0;
      bresp     <= '0;
      cur_id    <= '0;
      cur_addr  <= '0;
      cur_len   <= '0;
      cur_size  <= '0;
      cur_burst <= '0;
      beat      <= '0;
    end else begin
      unique case (state)
        WR_IDLE: begin
          awready <= 1'b1;
          if (awvalid && awready) begin
            cur_id    <= awid;
            cur_addr  <= awaddr;
            cur_len   <= awlen;
            cur_size  <= awsize;
            cur_burst <= awburst;
            beat      <= '0;
            awready   <= 1'b0;
            wready    <= 1'b1;
            state     <= WR_DATA;
          end
        end
        WR_DATA: begin
          if (w_hs) begin
            cur_addr <= next_addr(cur_addr, cur_size, cur_len, cur_burst);
            beat     <= beat + 1'b1;
            if (wlast) begin
              wready <= 1'b0;
              bvalid <= 1'b1;
              bid    <= cur_id;
              bresp  <= RESP_OKAY;
              state  <= WR_RESP;
            end
          end
        end
        WR_RESP: begin
          if (bready) begin
            bvalid  <= 1'b0;
            bid     <= '0;
            bresp   <= '0;
            awready <= 1'b1;
            state   <= WR_IDLE;
          end
        end
        default: state <= WR_IDLE;
      endcase
    end
  end

  // Rules of the bus this side relies on.
  a_aw_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                              awvalid && !awready |=> awvalid && $stable(awaddr));
  a_w_hold:  assert property (@(posedge aclk) disable iff (!aresetn)
                              wvalid && !wready |=> wvalid && $stable(wdata));
  a_wlast:   assert property (@(posedge aclk) disable iff (!aresetn)
                              w_hs |-> (wlast == (beat == cur_len)));
  a_wid:     assert property (@(posedge aclk) disable iff (!aresetn)
                              w_hs |-> (wid == cur_id));

endmodule
