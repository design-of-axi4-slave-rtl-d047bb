// axi_system: one AXI4 master and one AXI4 memory slave joined by the five
// channels (write address, write data, write response, read address, read
// data), the smallest AXI4 system.
//
// The ports are the master's user side: write commands and a write data
// stream in, write responses out; read commands in, read data out. Inside,
// axi_master turns them into AW/W/AR traffic and axi_slave stores the written
// bytes and returns them on reads. Each channel uses the VALID/READY
// handshake: a transfer happens at a clock edge where both are high.
//
// Timing: the clock is ACLK (100 MHz in the intended use), ARESETn is active
// low. A write burst of N beats occupies the slave for about N+2 clocks from
// its AW handshake to BVALID; a read burst of N beats returns its first beat
// one clock after its AR handshake and then one beat per clock.
//
// The channel set and the one-master/one-slave arrangement follow the source paper.
// MEM_BYTES and CMD_DEPTH are this design's own choices.
module axi_system
  import axi_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096,
  parameter int unsigned CMD_DEPTH = 4
) (
  input  logic       aclk,
  input  logic       aresetn,
  // write commands and data
  input  logic       wr_cmd_valid,
  input  cmd_t       wr_cmd,
  output logic       wr_cmd_ready,
  input  logic       wr_data_valid,
  input  data_t      wr_data,
  input  strb_t      wr_strb,
  output logic       wr_data_ready,
  // write responses
  output logic       wr_rsp_valid,
  output id_t        wr_rsp_id,
  output logic [1:0] wr_rsp_resp,
  input  logic       wr_rsp_ready,
  // read commands and data
  input  logic       rd_cmd_valid,
  input  cmd_t       rd_cmd,
  output logic       rd_cmd_ready,
  output logic       rd_data_valid,
  output id_t        rd_data_id,
  output data_t      rd_data,
  output logic [1:0] rd_data_resp,
  output logic       rd_data_last,
  input  logic       rd_data_ready
);

  // the five channels
  id_t        awid, wid, bid, arid, rid;
  addr_t      awaddr, araddr;
  len_t       awlen, arlen;
  size_t      awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic       awlock, arlock;
  logic [3:0] awcache, arcache;
  logic [2:0] awprot, arprot;
  logic       awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic       arvalid, arready, rvalid, rready, rlast;
  data_t      wdata, rdata;
  strb_t      wstrb;

  axi_master #(.CMD_DEPTH(CMD_DEPTH)) u_master (
    .aclk, .aresetn,
    .wr_cmd_valid, .wr_cmd, .wr_cmd_ready,
    .wr_data_valid, .wr_data, .wr_strb, .wr_data_ready,
    .wr_rsp_valid, .wr_rsp_id, .wr_rsp_resp, .wr_rsp_ready,
    .rd_cmd_valid, .rd_cmd, .rd_cmd_ready,
    .rd_data_valid, .rd_data_id, .rd_data, .rd_data_resp, .rd_data_last,
    .rd_data_ready,
    .awid, .awaddr, .awlen, .awsize, .awburst, .awlock, .awcache, .awprot,
    .awvalid, .awready,
    .wid, .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arlock, .arcache, .arprot,
    .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready
  );

  axi_slave #(.MEM_BYTES(MEM_BYTES)) u_slave (
    .aclk, .aresetn,
    .awid, .awaddr, .awlen, .awsize, .awburst, .awlock, .awcache, .awprot,
    .awvalid, .awready,
    .wid, .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arlock, .arcache, .arprot,
    .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready
  );

endmodule
