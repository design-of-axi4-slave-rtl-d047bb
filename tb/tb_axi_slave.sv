// tb_axi_slave: self-checking test of the complete memory slave.
//
// A master model first fills the whole memory with two 256-beat INCR writes
// of 64-bit beats (so every byte is known), then runs 300 random operations:
// writes (random legal FIXED/INCR/WRAP command, random data and strobes) and
// reads, with random VALID gaps and random BREADY/RREADY. A byte model of the
// memory predicts every read beat; BID/RID must echo the command ID, every
// response must be OKAY and RLAST must mark the last beat. Finally a write and
// a read of the same location back to back check the data path end to end.
module tb_axi_slave;
  import axi_pkg::*;
  import tb_axi_pkg::*;

  localparam int unsigned MEM_BYTES = 4096;

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;

  id_t awid, wid, bid, arid, rid; addr_t awaddr, araddr; len_t awlen, arlen;
  size_t awsize, arsize; logic [1:0] awburst, arburst, bresp, rresp;
  logic awlock, arlock; logic [3:0] awcache, arcache; logic [2:0] awprot, arprot;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic arvalid, arready, rvalid, rready, rlast;
  data_t wdata, rdata; strb_t wstrb;

  axi_slave dut (.aclk(clk), .aresetn(rstn),
    .awid, .awaddr, .awlen, .awsize, .awburst, .awlock, .awcache, .awprot, .awvalid, .awready,
    .wid, .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arlock, .arcache, .arprot, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [7:0] model [MEM_BYTES];

  // one cycle: inputs are changed 1 time unit after the rising edge
  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic do_write(cmd_t c, bit all_strb);
    data_t d; strb_t s; int w;
    awvalid = 1; {awid, awaddr, awlen, awsize, awburst, awlock, awcache, awprot} = c;
    #1; while (!awready) begin tick(); #1; end
    tick(); awvalid = 0;
    for (int i = 0; i <= int'(c.len); i++) begin
      while ($urandom_range(0, 3) == 0) tick();
      d = {$urandom, $urandom}; s = all_strb ? '1 : strb_t'($urandom);
      wvalid = 1; wid = c.id; wdata = d; wstrb = s; wlast = (i == int'(c.len));
      #1; while (!wready) begin tick(); #1; end
      w = int'(beat_addr(c.addr, c.size, c.len, c.burst, i) % MEM_BYTES) / 8;
      for (int b = 0; b < 8; b++) if (s[b]) model[w*8 + b] = d[8*b +: 8];
      tick(); wvalid = 0; wlast = 0;
    end
    bready = 1'($urandom);
    #1;
    while (!(bvalid && bready)) begin tick(); bready = 1'($urandom); #1; end
    check(bid == c.id && bresp == 2'b00, "write response");
    tick(); bready = 0;
  endtask

  task automatic do_read(cmd_t c);
    int w; data_t e;
    arvalid = 1; {arid, araddr, arlen, arsize, arburst, arlock, arcache, arprot} = c;
    #1; while (!arready) begin tick(); #1; end
    tick(); arvalid = 0;
    for (int i = 0; i <= int'(c.len); i++) begin
      rready = 1'($urandom_range(0, 3) != 0); #1;
      while (!(rvalid && rready)) begin tick(); rready = 1'($urandom_range(0, 3) != 0); #1; end
      w = int'(beat_addr(c.addr, c.size, c.len, c.burst, i) % MEM_BYTES) / 8;
      for (int b = 0; b < 8; b++) e[8*b +: 8] = model[w*8 + b];
      check(rdata == e, $sformatf("read data beat %0d of %p", i, c));
      check(rid == c.id && rresp == 2'b00 && rlast == (i == int'(c.len)), "RID/RRESP/RLAST");
      tick();
    end
    rready = 0;
  endtask

  initial begin
    cmd_t c;
    awvalid = 0; wvalid = 0; arvalid = 0; bready = 0; rready = 0; wlast = 0;
    {awid, awaddr, awlen, awsize, awburst, awlock, awcache, awprot} = '0;
    {arid, araddr, arlen, arsize, arburst, arlock, arcache, arprot} = '0;
    wid = 0; wdata = 0; wstrb = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rstn = 1;
    tick();
    for (int h = 0; h < 2; h++)
      do_write('{id: 4'(h), addr: addr_t'(h * 2048), len: 8'd255, size: 3'd3, burst: 2'b01,
                 lock: 0, cache: 4'h3, prot: 3'h1}, 1'b1);
    for (int n = 0; n < 300; n++) begin
      c = rand_cmd(MEM_BYTES - 1);
      if ($urandom_range(0, 1) == 0) do_write(c, 1'b0); else do_read(c);
    end
    c = '{id: 4'd7, addr: 32'd70, len: 8'd5, size: 3'd3, burst: 2'b01, lock: 0, cache: 4'h3, prot: 3'h1};
    do_write(c, 1'b1);
    do_read(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
