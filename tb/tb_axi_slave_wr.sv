// tb_axi_slave_wr: self-checking test of the slave's write side.
//
// A master model issues the five write commands of the reference run (IDs 11,
// 9, 5, 3, 7; addresses 23, 30, 20, 50, 70; lengths 60, 60, 30, 30, 5 beats-1;
// sizes 0, 0, 1, 1, 3) and then 150 random legal commands (FIXED, INCR, WRAP),
// with random gaps on WVALID and random BREADY. For each beat taken the
// memory write port must show the word of the beat's address (computed from
// the AXI4 formulas in tb_axi_pkg), the beat's data and strobes. After WLAST,
// BVALID must rise on the next clock with BID = AWID and BRESP = OKAY, hold
// until BREADY, then return to zero. AWREADY must be low from the AW
// handshake until the response is taken.
module tb_axi_slave_wr;
  import axi_pkg::*;
  import tb_axi_pkg::*;

  localparam int unsigned MEM_BYTES = 4096;
  localparam int IW = $clog2(MEM_BYTES / 8);

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;

  id_t awid, wid, bid; addr_t awaddr; len_t awlen; size_t awsize;
  logic [1:0] awburst, bresp; logic awlock; logic [3:0] awcache; logic [2:0] awprot;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  data_t wdata; strb_t wstrb;
  logic mem_we; logic [IW-1:0] mem_waddr; data_t mem_wdata; strb_t mem_wstrb;

  axi_slave_wr dut (.aclk(clk), .aresetn(rstn),
    .awid, .awaddr, .awlen, .awsize, .awburst, .awlock, .awcache, .awprot, .awvalid, .awready,
    .wid, .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bid, .bresp, .bvalid, .bready,
    .mem_we, .mem_waddr, .mem_wdata, .mem_wstrb);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int NP = 5, N = NP + 150;
  cmd_t cmds [N];

  initial begin
    int ids [NP]   = '{11, 9, 5, 3, 7};
    int addrs [NP] = '{23, 30, 20, 50, 70};
    int lens [NP]  = '{60, 60, 30, 30, 5};
    int sizes [NP] = '{0, 0, 1, 1, 3};
    for (int i = 0; i < NP; i++)
      cmds[i] = '{id: id_t'(ids[i]), addr: addr_t'(addrs[i]), len: len_t'(lens[i]),
                  size: size_t'(sizes[i]), burst: 2'b01, lock: 1'b0, cache: 4'h3, prot: 3'h1};
    for (int i = NP; i < N; i++) cmds[i] = rand_cmd(MEM_BYTES - 1);
  end

  // 0: send AW, 1: send W beats, 2: wait for B
  initial begin
    int c = 0, beat = 0, phase = 0, cyc = 0;
    logic prev_b_stall = 0, expect_b = 0;
    awvalid = 0; {awid, awaddr, awlen, awsize, awburst, awlock, awcache, awprot} = '0;
    wvalid = 0; wid = 0; wdata = 0; wstrb = 0; wlast = 0; bready = 0;
    repeat (3) @(posedge clk); #2;
    check({awready, wready, bvalid, bid, bresp} == '0, "outputs zero in reset");
    @(negedge clk); rstn = 1;
    while (c < N && cyc < 200000) begin
      @(posedge clk); #1; cyc++;
      if (expect_b) check(bvalid && bid == cmds[c].id && bresp == 2'b00, "BVALID the clock after WLAST");
      expect_b = 0;
      if (prev_b_stall) check(bvalid && bid == cmds[c].id, "B held while BREADY low");
      awvalid = (phase == 0) && ($urandom_range(0, 2) != 0);
      {awid, awaddr, awlen, awsize, awburst, awlock, awcache, awprot} = awvalid ? cmds[c] : '0;
      wvalid  = (phase == 1) && ($urandom_range(0, 3) != 0);
      wid     = cmds[c].id;
      wdata   = {$urandom, $urandom};
      wstrb   = strb_t'($urandom);
      wlast   = wvalid && (beat == int'(cmds[c].len));
      bready  = 1'($urandom_range(0, 2) != 0);
      #1;
      if (phase != 0) check(!awready, "AWREADY low during a burst");
      if (phase != 1) check(!wready, "WREADY low outside a burst");
      if (phase == 0 && awvalid && awready) phase = 1;
      else if (phase == 1 && wvalid && wready) begin
        check(mem_we, "memory write on a beat");
        check(mem_waddr == IW'(beat_addr(cmds[c].addr, cmds[c].size, cmds[c].len,
                                         cmds[c].burst, beat) >> 3),
              $sformatf("beat address cmd %0d beat %0d", c, beat));
        check(mem_wdata == wdata && mem_wstrb == wstrb, "beat data and strobes");
        if (wlast) begin phase = 2; beat = 0; expect_b = 1; end else beat++;
      end else if (phase == 2) begin
        check(bvalid, "BVALID while waiting");
        if (bvalid && bready) begin phase = 0; c++; end
      end else
        check(!mem_we, "no memory write without a beat");
      prev_b_stall = bvalid && !bready;
    end
    check(c == N, "all writes answered");
    @(posedge clk); #1;
    check(!bvalid && bid == '0 && bresp == '0, "B fields zero after the response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
