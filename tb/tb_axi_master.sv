// tb_axi_master: self-checking test of the complete master.
//
// The user side issues the five write commands and four read commands of the
// reference run, then 80 random writes and 80 random reads, with a data
// stream carrying a known sequence. The bus side is a slave model with random
// AWREADY, WREADY and ARREADY that answers each burst on B and R. Checks: AW
// and AR carry the commands in order; the W beats follow in burst order with
// WID equal to that burst's AWID, the data in sequence and WLAST on beat
// AWLEN+1; at most CMD_DEPTH bursts wait for their data (with WREADY held low
// the master stops taking write commands); B and R reach the user side
// unchanged and BREADY/RREADY follow the user's ready inputs.
module tb_axi_master;
  import axi_pkg::*;
  import tb_axi_pkg::*;

  localparam int CMD_DEPTH = 4;

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;

  logic wr_cmd_valid, wr_cmd_ready, wr_data_valid, wr_data_ready;
  cmd_t wr_cmd, rd_cmd; data_t wr_data; strb_t wr_strb;
  logic wr_rsp_valid, wr_rsp_ready; id_t wr_rsp_id; logic [1:0] wr_rsp_resp;
  logic rd_cmd_valid, rd_cmd_ready, rd_data_valid, rd_data_last, rd_data_ready;
  id_t rd_data_id; data_t rd_data; logic [1:0] rd_data_resp;
  id_t awid, wid, bid, arid, rid; addr_t awaddr, araddr; len_t awlen, arlen;
  size_t awsize, arsize; logic [1:0] awburst, arburst, bresp, rresp;
  logic awlock, arlock; logic [3:0] awcache, arcache; logic [2:0] awprot, arprot;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic arvalid, arready, rvalid, rready, rlast;
  data_t wdata, rdata; strb_t wstrb;

  axi_master dut (.aclk(clk), .aresetn(rstn),
    .wr_cmd_valid, .wr_cmd, .wr_cmd_ready, .wr_data_valid, .wr_data, .wr_strb, .wr_data_ready,
    .wr_rsp_valid, .wr_rsp_id, .wr_rsp_resp, .wr_rsp_ready,
    .rd_cmd_valid, .rd_cmd, .rd_cmd_ready, .rd_data_valid, .rd_data_id, .rd_data,
    .rd_data_resp, .rd_data_last, .rd_data_ready,
    .awid, .awaddr, .awlen, .awsize, .awburst, .awlock, .awcache, .awprot, .awvalid, .awready,
    .wid, .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arlock, .arcache, .arprot, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int NW = 5 + 80, NR = 4 + 80;
  cmd_t wq [NW], rq [NR];
  int   wbeats = 0;

  function automatic data_t dval(int k);
    return {32'(k) ^ 32'h5A5A_0000, 32'(24 + k)};
  endfunction

  initial begin
    int ids [5] = '{11, 9, 5, 3, 7}, addrs [5] = '{23, 30, 20, 50, 70};
    int lens [5] = '{60, 60, 30, 30, 5}, sizes [5] = '{0, 0, 1, 1, 3};
    for (int i = 0; i < 5; i++)
      wq[i] = '{id: id_t'(ids[i]), addr: addr_t'(addrs[i]), len: len_t'(lens[i]),
                size: size_t'(sizes[i]), burst: 2'b01, lock: 0, cache: 4'h3, prot: 3'h1};
    for (int i = 0; i < 4; i++)
      rq[i] = '{id: id_t'(ids[i+1]), addr: addr_t'(addrs[i+1]), len: len_t'(8'(5 + (i == 1) * 2 + (i == 2) + (i == 3) * 3)),
                size: 3'd3, burst: 2'b01, lock: 0, cache: 4'h3, prot: 3'h1};
    for (int i = 5; i < NW; i++) wq[i] = rand_cmd(4095);
    for (int i = 4; i < NR; i++) rq[i] = rand_cmd(4095);
    for (int i = 0; i < NW; i++) wbeats += int'(wq[i].len) + 1;
  end

  initial begin
    int ws = 0, wa = 0, dk = 0, wk = 0, wb = 0, wbeat = 0, rs = 0, ra = 0;
    int bsent = 0, rb = 0, rbeat = 0, cyc = 0, stall_cmds = 0;
    cmd_t ew;
    wr_cmd_valid = 0; wr_cmd = '0; wr_data_valid = 0; wr_data = 0; wr_strb = 0;
    wr_rsp_ready = 0; rd_cmd_valid = 0; rd_cmd = '0; rd_data_ready = 0;
    awready = 0; wready = 0; arready = 0; bvalid = 0; bid = 0; bresp = 0;
    rvalid = 0; rid = 0; rdata = 0; rresp = 0; rlast = 0;
    repeat (3) @(posedge clk); @(negedge clk); rstn = 1;

    // queue limit: W held off, so the master takes only CMD_DEPTH write commands
    repeat (40) begin
      @(posedge clk); #1;
      wr_cmd_valid = 1; wr_cmd = wq[0]; awready = 1; wready = 0;
      #1; if (wr_cmd_ready) stall_cmds++;
    end
    check(stall_cmds == CMD_DEPTH, $sformatf("write commands taken with W blocked: %0d", stall_cmds));
    wr_cmd_valid = 0;
    rstn = 0; @(negedge clk); rstn = 1;

    while ((wk < wbeats || ra < NR || bsent < NW || rb < NR) && cyc < 200000) begin
      @(posedge clk); #1; cyc++;
      wr_cmd_valid  = (ws < NW) && $urandom_range(0, 2) != 0;
      wr_cmd        = (ws < NW) ? wq[ws] : '0;
      wr_data_valid = (dk < wbeats) && $urandom_range(0, 3) != 0;
      wr_data       = dval(dk);
      wr_strb       = strb_t'(dk * 13);
      rd_cmd_valid  = (rs < NR) && $urandom_range(0, 2) != 0;
      rd_cmd        = (rs < NR) ? rq[rs] : '0;
      awready = 1'($urandom); wready = 1'($urandom_range(0, 3) != 0); arready = 1'($urandom);
      // slave model: one B per finished write burst, one R burst per accepted read
      bvalid = (bsent < wb);
      bid    = (bsent < NW) ? wq[bsent].id : '0;
      bresp  = 2'(bsent);
      wr_rsp_ready = 1'($urandom);
      rvalid = (rb < ra);
      rid    = (rb < NR) ? rq[rb].id : '0;
      rdata  = {32'(rb), 32'(rbeat)};
      rresp  = 2'(rb);
      rlast  = (rb < NR) && (rbeat == int'(rq[rb].len));
      rd_data_ready = 1'($urandom);
      #1;
      check(bready == wr_rsp_ready && rready == rd_data_ready, "BREADY/RREADY from the user");
      check(wr_rsp_valid == bvalid && wr_rsp_id == bid && wr_rsp_resp == bresp, "B to the user");
      check(rd_data_valid == rvalid && rd_data_id == rid && rd_data == rdata &&
            rd_data_resp == rresp && rd_data_last == rlast, "R to the user");
      if (awvalid && awready) begin
        ew = wq[wa];
        check({awid, awaddr, awlen, awsize, awburst, awlock, awcache, awprot} == ew,
              $sformatf("AW command %0d", wa));
        wa++;
      end
      if (wvalid && wready) begin
        check(wb < wa || (wb == wa && awvalid && awready), "W burst follows its AW");
        check(wid == wq[wb].id, "WID = AWID");
        check(wdata == dval(wk) && wstrb == strb_t'(wk * 13), $sformatf("W beat %0d", wk));
        check(wlast == (wbeat == int'(wq[wb].len)), "WLAST on beat AWLEN+1");
        wk++;
        if (wlast) begin wb++; wbeat = 0; end else wbeat++;
      end
      if (arvalid && arready) begin
        check({arid, araddr, arlen, arsize, arburst, arlock, arcache, arprot} == rq[ra],
              $sformatf("AR command %0d", ra));
        ra++;
      end
      if (bvalid && bready) bsent++;
      if (rvalid && rready) begin if (rlast) begin rb++; rbeat = 0; end else rbeat++; end
      if (wr_cmd_valid && wr_cmd_ready) ws++;
      if (wr_data_valid && wr_data_ready) dk++;
      if (rd_cmd_valid && rd_cmd_ready) rs++;
    end
    check(wa == NW && wk == wbeats && ra == NR && bsent == NW && rb == NR, "all traffic done");
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
