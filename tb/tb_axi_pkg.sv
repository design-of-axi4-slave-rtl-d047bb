// tb_axi_pkg: reference helpers shared by the testbenches.
//
// beat_addr gives the byte address of beat i of a burst straight from the
// AXI4 formulas (start address, beats counted from the aligned start, wrap
// block of (len+1) beats), independently of the design's step-by-step
// address update. rand_cmd draws a legal random command: FIXED, INCR or
// WRAP, sizes 0 to 3, wrap lengths 2, 4, 8 or 16 beats with an aligned start.
package tb_axi_pkg;
  import axi_pkg::*;

  function automatic longint unsigned beat_addr(longint unsigned start, int size,
                                                int len, int burst, int i);
    longint unsigned bytes = 64'd1 << size;
    longint unsigned al    = start / bytes * bytes;
    longint unsigned total = bytes * (len + 1);
    longint unsigned base;
    if (i == 0 || burst == 0) return start;
    if (burst == 2) begin
      base = start / total * total;
      return base + (al - base + i * bytes) % total;
    end
    return al + i * bytes;
  endfunction

  function automatic cmd_t rand_cmd(int max_addr);
    cmd_t c;
    int wl [4] = '{1, 3, 7, 15};
    c.id    = id_t'($urandom);
    c.size  = size_t'($urandom_range(0, 3));
    c.burst = 2'($urandom_range(0, 2));
    c.len   = (c.burst == 2) ? len_t'(wl[$urandom_range(0, 3)])
                             : len_t'($urandom_range(0, 255));
    c.addr  = addr_t'($urandom_range(0, max_addr));
    if (c.burst == 2) c.addr = c.addr & ~((addr_t'(1) << c.size) - 1);
    c.lock  = 1'($urandom);
    c.cache = 4'($urandom);
    c.prot  = 3'($urandom);
    return c;
  endfunction
endpackage
