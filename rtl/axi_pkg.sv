// axi_pkg: widths, field types and the burst address rule shared by the
// AXI4 master and slave.
//
// The field widths are the ones of the channel signals of the design:
// 4-bit IDs, 32-bit addresses, 8-bit burst length (up to 256 beats),
// 3-bit size, 2-bit burst type, 1-bit lock, 4-bit cache, 3-bit protection.
// The data bus is 64 bits wide, the narrowest bus on which a size code of 3
// (eight bytes per beat), which the design issues, is legal. The burst types
// and response codes are the standard AXI4 encodings.
package axi_pkg;

  localparam int unsigned ID_W   = 4;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 64;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned LEN_W  = 8;

  typedef logic [ID_W-1:0]   id_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STRB_W-1:0] strb_t;
  typedef logic [LEN_W-1:0]  len_t;
  typedef logic [2:0]        size_t;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_t;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_t;

  // One address-channel command (AW or AR): everything but VALID/READY.
  typedef struct packed {
    id_t        id;
    addr_t      addr;
    len_t       len;     // beats in the burst minus one
    size_t      size;    // log2 of bytes per beat
    logic [1:0] burst;
    logic       lock;
    logic [3:0] cache;
    logic [2:0] prot;
  } cmd_t;

  // Address of the beat after the one at `addr` in a burst.
  //   FIXED: the address does not move.
  //   INCR : the address is aligned to the beat size, then advanced by one beat.
  //   WRAP : as INCR, but kept inside the block of (len+1) beats that holds the
  //          start address (len+1 is 2, 4, 8 or 16 for a legal wrap).
  function automatic addr_t next_addr(addr_t addr, size_t size, len_t len,
                                      logic [1:0] burst);
    addr_t bytes, aligned, incr, wmask;
    bytes   = addr_t'(1) << size;
    aligned = addr & ~(bytes - addr_t'(1));
    incr    = aligned + bytes;
    wmask   = ((addr_t'(len) + addr_t'(1)) << size) - addr_t'(1);
    case (burst)
      BURST_FIXED: next_addr = addr;
      BURST_WRAP:  next_addr = (addr & ~wmask) | (incr & wmask);
      default:     next_addr = incr;
    endcase
  endfunction

endpackage
