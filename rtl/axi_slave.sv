// axi_slave: AXI4 memory slave, the device at the far end of the five
// channels.
//
// Three parts: axi_slave_wr accepts a write command on AW, takes its beats on
// W into memory and answers on B; axi_slave_rd accepts a read command on AR
// and returns its beats from memory on R; axi_slave_mem holds MEM_BYTES bytes
// as 64-bit words with byte strobes. The write and read sides run
// independently, each with one burst in flight; both address the same memory,
// so data written can be read back. Addresses wrap modulo MEM_BYTES (the
// upper address bits are ignored) and every response is OKAY.
//
// Timing: see axi_slave_wr and axi_slave_rd. A read of a word in the cycle it
// is written returns the old value.
//
// The channel behaviour follows the source paper's description of the B and R
// channels. The memory size, the address aliasing and the one-burst-at-a-time
// limit are this design's own choices.
module axi_slave
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
  input  logic       rready
);

  localparam int unsigned IW = $clog2(MEM_BYTES / 8);

  logic          mem_we;
  logic [IW-1:0] mem_waddr, mem_raddr;
  data_t         mem_wdata, mem_rdata;
  strb_t         mem_wstrb;

  axi_slave_wr #(.MEM_BYTES(MEM_BYTES)) u_wr (
    .aclk, .aresetn,
    .awid, .awaddr, .awlen, .awsize, .awburst, .awlock, .awcache, .awprot,
    .awvalid, .awready,
    .wid, .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bid, .bresp, .bvalid, .bready,
    .mem_we, .mem_waddr, .mem_wdata, .mem_wstrb
  );

  axi_slave_rd #(.MEM_BYTES(MEM_BYTES)) u_rd (
    .aclk, .aresetn,
    .arid, .araddr, .arlen, .arsize, .arburst, .arlock, .arcache, .arprot,
    .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready,
    .mem_raddr, .mem_rdata
  );

  axi_slave_mem #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk   (aclk),
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .wstrb (mem_wstrb),
    .raddr (mem_raddr),
    .rdata (mem_rdata)
  );

endmodule
