// axi_master_ar: the master's read address channel (AR) driver.
//
// A read command arrives on the user side (cmd_valid/cmd_ready, one cmd_t)
// and is copied into the AR* output registers with ARVALID high. The
// registers hold their value while ARREADY is low; the cycle after the
// slave takes the command (ARVALID and ARREADY both high at a clock edge)
// the next waiting command is driven, or ARVALID drops and every field
// returns to zero. While ARESETn is low every output is zero.
//
// Timing: a command accepted on the user side at edge t is on the bus from
// edge t on; commands follow each other on consecutive cycles while
// ARREADY stays high. All bus outputs come from flip-flops, so no
// combinational path runs from a bus input to a bus output. cmd_ready is
// (!ARVALID || ARREADY) and so depends on ARREADY combinationally; it
// only goes to the user side.
//
// The reset-to-zero, valid-high and hold-while-not-ready behaviour follows the source
// paper's channel description. The user-side handshake, the
// asynchronous reset and the return of the fields to zero when idle are this
// design's own choices.
module axi_master_ar
  import axi_pkg::*;
(
  input  logic       aclk,
  input  logic       aresetn,
  // user side
  input  logic       cmd_valid,
  input  cmd_t       cmd,
  output logic       cmd_ready,
  // AXI AR channel
  output id_t        arid,
  output addr_t      araddr,
  output len_t       arlen,
  output size_t      arsize,
  output logic [1:0] arburst,
  output logic       arlock,
  output logic [3:0] arcache,
  output logic [2:0] arprot,
  output logic       arvalid,
  input  logic       arready
);

  assign cmd_ready = !arvalid || arready;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      {arid, araddr, arlen, arsize, arburst, arlock, arcache, arprot} <= '0;
      arvalid <= 1'b0;
    end else if (cmd_ready) begin
      if (cmd_valid) begin
        arid    <= cmd.id;
        araddr  <= cmd.addr;
        arlen   <= cmd.len;
        arsize  <= cmd.size;
        arburst <= cmd.burst;
        arlock  <= cmd.lock;
        arcache <= cmd.cache;
        arprot  <= cmd.prot;
        arvalid <= 1'b1;
      end else begin
        {arid, araddr, arlen, arsize, arburst, arlock, arcache, arprot} <= '0;
        arvalid <= 1'b0;
      end
    end
  end

endmodule
