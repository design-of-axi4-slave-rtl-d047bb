// axi_slave_mem: the slave's storage, MEM_BYTES bytes as 64-bit words.
//
// One write port with a byte strobe (a byte lane is written where its strobe
// bit is set) and one read port. Both take a word index: the byte address
// divided by eight. The write takes effect at the clock edge; the read is
// combinational (rdata shows the word at raddr in the same cycle), so a read
// of the word being written in that cycle returns its old value. Contents
// are not cleared by reset. MEM_BYTES must be a power of two and at least 8.
//
// The design stores the data its slave receives and returns it on reads; the
// size, the organisation and the port timing are this design's own choices.
module axi_slave_mem
  import axi_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2(MEM_BYTES/8)-1:0] waddr,
  input  data_t                         wdata,
  input  strb_t                         wstrb,
  input  logic [$clog2(MEM_BYTES/8)-1:0] raddr,
  output data_t                         rdata
);

  localparam int unsigned WORDS = MEM_BYTES / 8;

  data_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < STRB_W; b++) begin
        if (wstrb[b]) mem[waddr][8*b +: 8] <= wdata[8*b +: 8];
      end
    end
  end

  assign rdata = mem[raddr];

endmodule
