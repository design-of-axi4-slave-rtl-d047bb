// tb_axi_master_w: self-checking test of the write data channel driver.
//
// First burst: the 22 beats 24, 25, ..., 45 of the reference run (length
// field 21) with WREADY and the data stream always ready; it must go out on
// 22 consecutive clocks with WLAST only on the 22nd. Then 60 random bursts
// (1 to 256 beats) with random gaps in the data stream and random WREADY.
// Checks every W handshake against the expected beat (WID, WDATA, WSTRB,
// WLAST), that a beat is held while WREADY is low, that fields are zero while
// WVALID is low, and that each burst entry is taken exactly once.
module tb_axi_master_w;
  import axi_pkg::*;

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;

  logic  burst_valid, burst_pop, data_valid, data_ready;
  id_t   burst_id;
  len_t  burst_len;
  data_t data;
  strb_t strb;
  id_t   wid; data_t wdata; strb_t wstrb; logic wlast, wvalid, wready;

  axi_master_w dut (.aclk(clk), .aresetn(rstn), .burst_valid, .burst_id, .burst_len,
    .burst_pop, .data_valid, .data, .strb, .data_ready,
    .wid, .wdata, .wstrb, .wlast, .wvalid, .wready);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int NB = 61;
  id_t  b_id  [NB];
  len_t b_len [NB];
  int   total = 0;

  // beat k of the whole run carries data_of(k) and strb_of(k)
  function automatic data_t data_of(int k);
    return (k < 22) ? data_t'(24 + k) : {32'(k) ^ 32'hA5A5_0000, 32'(k * 7)};
  endfunction
  function automatic strb_t strb_of(int k);
    return (k < 22) ? '1 : strb_t'(k * 37);
  endfunction

  initial begin
    b_id[0] = 4'd11; b_len[0] = 8'd21;
    for (int i = 1; i < NB; i++) begin
      b_id[i]  = id_t'($urandom);
      b_len[i] = (i == 1) ? 8'd255 : (i == 2) ? 8'd0 : len_t'($urandom);
    end
    for (int i = 0; i < NB; i++) total += int'(b_len[i]) + 1;
  end

  initial begin
    int bq = 0, dk = 0, got = 0, wb = 0, wbeat = 0, cyc = 0, first = -1;
    logic  prev_stall = 0;
    logic [ID_W+DATA_W+STRB_W:0] prev_bus;
    burst_valid = 0; burst_id = 0; burst_len = 0; data_valid = 0; data = 0; strb = 0;
    wready = 0;
    repeat (3) @(posedge clk); #2;
    check({wid, wdata, wstrb, wlast, wvalid} == '0, "outputs zero in reset");
    @(negedge clk); rstn = 1;
    while (got < total && cyc < 100000) begin
      @(posedge clk); #1; cyc++;
      burst_valid = (bq < NB);
      burst_id    = (bq < NB) ? b_id[bq] : '0;
      burst_len   = (bq < NB) ? b_len[bq] : '0;
      data_valid  = (dk < total) && (dk < 22 || $urandom_range(0, 4) != 0);
      data        = data_of(dk);
      strb        = strb_of(dk);
      wready      = (got < 22) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      #1;
      if (prev_stall) check(wvalid && {wid, wdata, wstrb, wlast} == prev_bus, "hold while WREADY low");
      if (!wvalid) check({wid, wdata, wstrb, wlast} == '0, "fields zero when idle");
      if (wvalid && wready) begin
        check(wid == b_id[wb], $sformatf("WID beat %0d", got));
        check(wdata == data_of(got) && wstrb == strb_of(got), $sformatf("WDATA beat %0d", got));
        check(wlast == (wbeat == int'(b_len[wb])), $sformatf("WLAST beat %0d", got));
        if (got == 0) first = cyc;
        if (got == 21) check(cyc - first == 21, "22 beats on consecutive clocks");
        got++;
        if (wbeat == int'(b_len[wb])) begin wb++; wbeat = 0; end else wbeat++;
      end
      if (burst_pop) begin
        check(burst_valid, "pop only when an entry waits");
        bq++;
      end
      if (data_valid && data_ready) dk++;
      prev_stall = wvalid && !wready;
      prev_bus   = {wid, wdata, wstrb, wlast};
    end
    check(got == total && bq == NB && wb == NB, "every burst sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
