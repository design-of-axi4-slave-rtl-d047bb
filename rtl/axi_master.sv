// axi_master: AXI4 master built from one driver per channel.
//
// The user side takes write commands (wr_cmd_valid/wr_cmd/wr_cmd_ready), a
// write data stream (wr_data_valid/wr_data/wr_strb/wr_data_ready) and read
// commands (rd_cmd_valid/rd_cmd/rd_cmd_ready), and hands back write responses
// and read data. A write command is sent on AW by axi_master_aw; at the same
// time its ID and length are queued (CMD_DEPTH entries) for axi_master_w,
// which drives that burst's AWLEN+1 beats on W with WID = AWID and WLAST on
// the last. The queue lets the W channel run behind AW by up to CMD_DEPTH
// bursts; a write command waits while the queue is full. Read commands go out
// on AR through axi_master_ar. The B and R channels are handed to the user
// side as they arrive: BREADY and RREADY are the user's wr_rsp_ready and
// rd_data_ready.
//
// Timing: AW, AR and W outputs come from flip-flops, one command or beat per
// clock at best. BREADY and RREADY come straight from user-side inputs, never
// from a bus input.
//
// The channel behaviour follows the source paper's description of the AW, W and AR
// channels. The user-side interface, the burst queue and its depth are this
// design's own choices.
module axi_master
  import axi_pkg::*;
#(
  parameter int unsigned CMD_DEPTH = 4
) (
  input  logic       aclk,
  input  logic       aresetn,
  // user side: write commands and data
  input  logic       wr_cmd_valid,
  input  cmd_t       wr_cmd,
  output logic       wr_cmd_ready,
  input  logic       wr_data_valid,
  input  data_t      wr_data,
  input  strb_t      wr_strb,
  output logic       wr_data_ready,
  // user side: write responses
  output logic       wr_rsp_valid,
  output id_t        wr_rsp_id,
  output logic [1:0] wr_rsp_resp,
  input  logic       wr_rsp_ready,
  // user side: read commands and data
  input  logic       rd_cmd_valid,
  input  cmd_t       rd_cmd,
  output logic       rd_cmd_ready,
  output logic       rd_data_valid,
  output id_t        rd_data_id,
  output data_t      rd_data,
  output logic [1:0] rd_data_resp,
  output logic       rd_data_last,
  input  logic       rd_data_ready,
  // AXI AW
  output id_t        awid,
  output addr_t      awaddr,
  output len_t       awlen,
  output size_t      awsize,
  output logic [1:0] awburst,
  output logic       awlock,
  output logic [3:0] awcache,
  output logic [2:0] awprot,
  output logic       awvalid,
  input  logic       awready,
  // AXI W
  output id_t        wid,
  output data_t      wdata,
  output strb_t      wstrb,
  output logic       wlast,
  output logic       wvalid,
  input  logic       wready,
  // AXI B
  input  id_t        bid,
  input  logic [1:0] bresp,
  input  logic       bvalid,
  output logic       bready,
  // AXI AR
  output id_t        arid,
  output addr_t      araddr,
  output len_t       arlen,
  output size_t      arsize,
  output logic [1:0] arburst,
  output logic       arlock,
  output logic [3:0] arcache,
  output logic [2:0] arprot,
  output logic       arvalid,
  input  logic       arready,
  // AXI R
  input  id_t        rid,
  input  data_t      rdata,
  input  logic [1:0] rresp,
  input  logic       rlast,
  input  logic       rvalid,
  output logic       rready
);

  // ---- write: AW driver plus burst queue for the W driver ----
  logic aw_cmd_ready, q_full, q_empty, q_pop;
  logic [ID_W+LEN_W-1:0] q_dout;

  assign wr_cmd_ready = aw_cmd_ready && !q_full;

  axi_master_aw u_aw (
    .aclk, .aresetn,
    .cmd_valid (wr_cmd_valid && !q_full),
    .cmd       (wr_cmd),
    .cmd_ready (aw_cmd_ready),
    .awid, .awaddr, .awlen, .awsize, .awburst, .awlock, .awcache, .awprot,
    .awvalid, .awready
  );

  axi_fifo #(.WIDTH(ID_W + LEN_W), .DEPTH(CMD_DEPTH)) u_burst_q (
    .clk   (aclk),
    .rst_n (aresetn),
    .push  (wr_cmd_valid && wr_cmd_ready),
    .din   ({wr_cmd.id, wr_cmd.len}),
    .pop   (q_pop),
    .dout  (q_dout),
    .empty (q_empty),
    .full  (q_full)
  );

  axi_master_w u_w (
    .aclk, .aresetn,
    .burst_valid (!q_empty),
    .burst_id    (q_dout[ID_W+LEN_W-1:LEN_W]),
    .burst_len   (q_dout[LEN_W-1:0]),
    .burst_pop   (q_pop),
    .data_valid  (wr_data_valid),
    .data        (wr_data),
    .strb        (wr_strb),
    .data_ready  (wr_data_ready),
    .wid, .wdata, .wstrb, .wlast, .wvalid, .wready
  );

  // ---- write response ----
  assign wr_rsp_valid = bvalid;
  assign wr_rsp_id    = bid;
  assign wr_rsp_resp  = bresp;
  assign bready       = wr_rsp_ready;

  // ---- read: AR driver, R handed to the user ----
  axi_master_ar u_ar (
    .aclk, .aresetn,
    .cmd_valid (rd_cmd_valid),
    .cmd       (rd_cmd),
    .cmd_ready (rd_cmd_ready),
    .arid, .araddr, .arlen, .arsize, .arburst, .arlock, .arcache, .arprot,
    .arvalid, .arready
  );

  assign rd_data_valid = rvalid;
  assign rd_data_id    = rid;
  assign rd_data       = rdata;
  assign rd_data_resp  = rresp;
  assign rd_data_last  = rlast;
  assign rready        = rd_data_ready;

endmodule
