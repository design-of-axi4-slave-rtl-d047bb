// tb_axi_master_aw: self-checking test of the write address channel driver.
//
// Replays the five write commands of the reference run (IDs 11, 9, 5, 3, 7 at
// addresses 23, 30, 20, 50, 70) and then 200 random ones, with AWREADY driven
// randomly. Checks: every output is zero in reset; each AW handshake carries
// the commands in order and unchanged; the channel holds its values while
// AWREADY is low; the fields are zero whenever AWVALID is low; with AWREADY
// held high, five commands go out on five consecutive clocks.
module tb_axi_master_aw;
  import axi_pkg::*;

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready;
  cmd_t cmd;
  id_t awid; addr_t awaddr; len_t awlen; size_t awsize;
  logic [1:0] awburst; logic awlock; logic [3:0] awcache; logic [2:0] awprot;
  logic awvalid, awready;

  axi_master_aw dut (.aclk(clk), .aresetn(rstn), .cmd_valid, .cmd, .cmd_ready,
    .awid, .awaddr, .awlen, .awsize, .awburst, .awlock, .awcache, .awprot,
    .awvalid, .awready);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int NP = 5, NR = 200, N = NP + NR;
  cmd_t exp_q [N];
  int   sent = 0, got = 0;

  function automatic cmd_t bus_cmd();
    return '{id: awid, addr: awaddr, len: awlen, size: awsize, burst: awburst,
             lock: awlock, cache: awcache, prot: awprot};
  endfunction

  initial begin
    int ids [NP]   = '{11, 9, 5, 3, 7};
    int addrs [NP] = '{23, 30, 20, 50, 70};
    int lens [NP]  = '{60, 60, 30, 30, 5};
    int sizes [NP] = '{0, 0, 1, 1, 3};
    for (int i = 0; i < NP; i++)
      exp_q[i] = '{id: id_t'(ids[i]), addr: addr_t'(addrs[i]), len: len_t'(lens[i]),
                   size: size_t'(sizes[i]), burst: 2'b01, lock: 1'b0, cache: 4'h3, prot: 3'h1};
    for (int i = NP; i < N; i++)
      exp_q[i] = '{id: id_t'($urandom), addr: $urandom, len: len_t'($urandom),
                   size: size_t'($urandom_range(0, 3)), burst: 2'($urandom_range(0, 2)),
                   lock: 1'($urandom), cache: 4'($urandom), prot: 3'($urandom)};
  end

  initial begin
    int first_hs = -1, cyc = 0;
    logic prev_stall = 0;
    cmd_t prev_bus;
    cmd_valid = 0; cmd = '0; awready = 0;
    repeat (3) @(posedge clk);
    #2;
    check({awid, awaddr, awlen, awsize, awburst, awlock, awcache, awprot, awvalid} == '0,
          "outputs zero in reset");
    @(negedge clk); rstn = 1;
    while (got < N && cyc < 20000) begin
      @(posedge clk); #1; cyc++;
      // the paper's five commands with AWREADY held high, then random stalls
      awready   = (got < NP) ? 1'b1 : 1'($urandom_range(0, 2) != 0);
      cmd_valid = (sent < N) && ((sent < NP) || $urandom_range(0, 3) != 0);
      cmd       = cmd_valid ? exp_q[sent] : cmd_t'($urandom);
      #1;
      if (prev_stall) check(awvalid && bus_cmd() == prev_bus, "hold while AWREADY low");
      if (!awvalid) check(bus_cmd() == '0, "fields zero when idle");
      if (awvalid && awready) begin
        check(bus_cmd() == exp_q[got], $sformatf("command %0d", got));
        if (got == 0) first_hs = cyc;
        if (got == NP - 1) check(cyc - first_hs == NP - 1, "back-to-back commands");
        got++;
      end
      if (cmd_valid && cmd_ready) sent++;
      prev_stall = awvalid && !awready;
      prev_bus   = bus_cmd();
    end
    check(got == N, "all commands sent");
    @(posedge clk); #1; awready = 1; cmd_valid = 0;
    @(posedge clk); #1;
    check(!awvalid && bus_cmd() == '0, "idle after last command");
    cmd_valid = 1; cmd = exp_q[0];
    @(posedge clk); #1; cmd_valid = 0; awready = 0;
    rstn = 0; #1;
    check(!awvalid && bus_cmd() == '0, "reset clears a pending command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
