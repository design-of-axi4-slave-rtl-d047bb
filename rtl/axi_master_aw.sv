// axi_master_aw: the master's write address channel (AW) driver.
//
// A write command arrives on the user side (cmd_valid/cmd_ready, one cmd_t)
// and is copied into the AW* output registers with AWVALID high. The
// registers hold their value while AWREADY is low; the cycle after the
// slave takes the command (AWVALID and AWREADY both high at a clock edge)
// the next waiting command is driven, or AWVALID drops and every field
// returns to zero. While ARESETn is low every output is zero.
//
// Timing: a command accepted on the user side at edge t is on the bus from
// edge t on; commands follow each other on consecutive cycles while
// AWREADY stays high. All bus outputs come from flip-flops, so no
// combinational path runs from a bus input to a bus output. cmd_ready is
// (!AWVALID || AWREADY) and so depends on AWREADY combinationally; it
// only goes to the user side.
//
// The reset-to-zero, valid-high and hold-while-not-ready behaviour follows the source
// paper's channel description. The user-side handshake, the
// asynchronous reset and the return of the fields to zero when idle are this
// design's own choices.
module axi_master_aw
  import axi_pkg::*;
(
  input  logic       aclk,
  input  logic       aresetn,
  // user side
  input  logic       cmd_valid,
  input  cmd_t       cmd,
  output logic       cmd_ready,
  // AXI AW channel
  output id_t        awid,
  output addr_t      awaddr,
  output len_t       awlen,
  output size_t      awsize,
  output logic [1:0] awburst,
  output logic       awlock,
  output logic [3:0] awcache,
  output logic [2:0] awprot,
  output logic       awvalid,
  input  logic       awready
);

  assign cmd_ready = !awvalid || awready;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      {awid, awaddr, awlen, awsize, awburst, awlock, awcache, awprot} <= '0;
      awvalid <= 1'b0;
    end else if (cmd_ready) begin
      if (cmd_valid) begin
        awid    <= cmd.id;
        awaddr  <= cmd.addr;
        awlen   <= cmd.len;
        awsize  <= cmd.size;
        awburst <= cmd.burst;
        awlock  <= cmd.lock;
        awcache <= cmd.cache;
        awprot  <= cmd.prot;
        awvalid <= 1'b1;
      end else begin
        {awid, awaddr, awlen, awsize, awburst, awlock, awcache, awprot} <= '0;
        awvalid <= 1'b0;
      end
    end
  end

endmodule
