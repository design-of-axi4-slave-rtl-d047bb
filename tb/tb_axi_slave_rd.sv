// tb_axi_slave_rd: self-checking test of the slave's read side.
//
// The memory is modelled by a function of the word index. A master model
// issues the four read commands of the reference run (IDs 9, 5, 3, 7;
// addresses 30, 20, 50, 70; lengths 5, 7, 6, 8; size 3) with RREADY held
// high, then 150 random legal commands with random RREADY. Checks each R
// beat (RID, RDATA of the beat's word from the AXI4 formulas, RRESP, RLAST on
// beat len+1), that a beat is held while RREADY is low, that the first beat
// is driven at the clock edge after the AR handshake edge and the rest on consecutive clocks
// when RREADY stays high, and that ARREADY is low during a burst.
module tb_axi_slave_rd;
  import axi_pkg::*;
  import tb_axi_pkg::*;

  localparam int unsigned MEM_BYTES = 4096;
  localparam int IW = $clog2(MEM_BYTES / 8);

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;

  id_t arid, rid; addr_t araddr; len_t arlen; size_t arsize;
  logic [1:0] arburst, rresp; logic arlock; logic [3:0] arcache; logic [2:0] arprot;
  logic arvalid, arready, rvalid, rready, rlast;
  data_t rdata, mem_rdata; logic [IW-1:0] mem_raddr;

  function automatic data_t word(int idx);
    return {32'(idx) * 32'h9E37_79B9, ~32'(idx)};
  endfunction
  assign mem_rdata = word(int'(mem_raddr));

  axi_slave_rd dut (.aclk(clk), .aresetn(rstn),
    .arid, .araddr, .arlen, .arsize, .arburst, .arlock, .arcache, .arprot, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready, .mem_raddr, .mem_rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int NP = 4, N = NP + 150;
  cmd_t cmds [N];

  initial begin
    int ids [NP]   = '{9, 5, 3, 7};
    int addrs [NP] = '{30, 20, 50, 70};
    int lens [NP]  = '{5, 7, 6, 8};
    for (int i = 0; i < NP; i++)
      cmds[i] = '{id: id_t'(ids[i]), addr: addr_t'(addrs[i]), len: len_t'(lens[i]),
                  size: 3'd3, burst: 2'b01, lock: 1'b0, cache: 4'h3, prot: 3'h1};
    for (int i = NP; i < N; i++) cmds[i] = rand_cmd(MEM_BYTES - 1);
  end

  initial begin
    int c = 0, beat = 0, phase = 0, cyc = 0, ar_cyc = 0, last_cyc = 0;
    logic prev_stall = 0;
    logic [ID_W+DATA_W+2:0] prev_bus;
    arvalid = 0; {arid, araddr, arlen, arsize, arburst, arlock, arcache, arprot} = '0;
    rready = 0;
    repeat (3) @(posedge clk); #2;
    check({arready, rvalid, rid, rdata, rresp, rlast} == '0, "outputs zero in reset");
    @(negedge clk); rstn = 1;
    while (c < N && cyc < 200000) begin
      @(posedge clk); #1; cyc++;
      if (prev_stall) check(rvalid && {rid, rdata, rresp, rlast} == prev_bus, "R held while RREADY low");
      arvalid = (phase == 0) && (c < NP || $urandom_range(0, 2) != 0);
      {arid, araddr, arlen, arsize, arburst, arlock, arcache, arprot} = arvalid ? cmds[c] : '0;
      rready  = (c < NP) ? 1'b1 : 1'($urandom_range(0, 2) != 0);
      #1;
      if (phase == 1) check(!arready, "ARREADY low during a burst");
      if (!rvalid) check({rid, rdata, rresp, rlast} == '0, "R fields zero when idle");
      if (phase == 0 && arvalid && arready) begin phase = 1; ar_cyc = cyc; end
      else if (phase == 1 && rvalid && rready) begin
        check(rid == cmds[c].id && rresp == 2'b00, "RID and RRESP");
        check(rdata == word(int'(IW'(beat_addr(cmds[c].addr, cmds[c].size, cmds[c].len,
                                               cmds[c].burst, beat) >> 3))),
              $sformatf("RDATA cmd %0d beat %0d", c, beat));
        check(rlast == (beat == int'(cmds[c].len)), "RLAST");
        if (c < NP) check(cyc - ar_cyc == beat + 2, "beat timing with RREADY high");
        if (rlast) begin phase = 0; beat = 0; c++; end else beat++;
      end
      prev_stall = rvalid && !rready;
      prev_bus   = {rid, rdata, rresp, rlast};
    end
    check(c == N, "all reads returned");
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
