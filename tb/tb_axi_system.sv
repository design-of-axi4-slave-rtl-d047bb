// tb_axi_system: end-to-end test of the master-slave system at its default
// parameters.
//
// Phase 1 (reference run, all ready signals high): one 22-beat write of the
// values 24..45 at address 0; the five writes IDs 11, 9, 5, 3, 7 at addresses
// 23, 30, 20, 50, 70 (lengths 60, 60, 30, 30, 5 beats-1, sizes 1, 1, 2, 2, 8
// bytes); the four reads IDs 9, 5, 3, 7 at 30, 20, 50, 70 (lengths 5, 7, 6, 8,
// 8-byte beats). Phase 2: a 32-beat write and a 32-beat read of the same
// location, and of two different locations; one 256-beat write and read.
// Phase 3: 100 random writes and 100 random reads (FIXED, INCR, WRAP, all
// sizes) with random user-side readiness and gaps in the data stream.
//
// A byte model of the memory predicts every read beat. Narrow beats carry the
// strobes of the byte lanes their address selects, as the AXI4 rules give.
// Every write must be answered once with its ID and OKAY; every read returns
// len+1 beats with its ID, OKAY and RLAST on the last. In phase 1 each burst's
// beats must cross the bus on consecutive clocks. The test counts how often
// each mechanism occurs (AW wait, W wait, B and R back-pressure, W behind AW,
// WLAST, RLAST, narrow and unaligned beats, full 256-beat bursts) and fails a
// mechanism that never happened. It also prints, per channel, the cycles
// with VALID high, the cycles VALID waited for READY, and the bus utilisation.
module tb_axi_system;
  import axi_pkg::*;
  import tb_axi_pkg::*;

  localparam int unsigned MEM_BYTES = 4096;   // default of axi_system

  logic clk = 0, rstn = 0;
  always #5 clk = ~clk;   // 100 MHz

  logic wr_cmd_valid, wr_cmd_ready, wr_data_valid, wr_data_ready;
  cmd_t wr_cmd, rd_cmd; data_t wr_data; strb_t wr_strb;
  logic wr_rsp_valid, wr_rsp_ready; id_t wr_rsp_id; logic [1:0] wr_rsp_resp;
  logic rd_cmd_valid, rd_cmd_ready, rd_data_valid, rd_data_last, rd_data_ready;
  id_t rd_data_id; data_t rd_data; logic [1:0] rd_data_resp;

  axi_system dut (.aclk(clk), .aresetn(rstn),
    .wr_cmd_valid, .wr_cmd, .wr_cmd_ready, .wr_data_valid, .wr_data, .wr_strb, .wr_data_ready,
    .wr_rsp_valid, .wr_rsp_id, .wr_rsp_resp, .wr_rsp_ready,
    .rd_cmd_valid, .rd_cmd, .rd_cmd_ready, .rd_data_valid, .rd_data_id, .rd_data,
    .rd_data_resp, .rd_data_last, .rd_data_ready);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [7:0] model [MEM_BYTES];
  bit         known [MEM_BYTES];
  bit         all_ready;       // phase 1: user side always ready, no gaps

  // byte lanes of beat i of command c
  function automatic strb_t lanes(cmd_t c, int i);
    longint unsigned a = beat_addr(c.addr, c.size, c.len, c.burst, i);
    int bytes = 1 << c.size;
    int lo = int'(a % 8);
    int hi = int'((a / bytes * bytes) % 8) + bytes - 1;
    strb_t s = '0;
    for (int b = lo; b <= hi; b++) s[b] = 1'b1;
    return s;
  endfunction

  // ---------------- writes ----------------
  task automatic run_writes(cmd_t cq [$], data_t fixed [$]);
    int n = cq.size();
    fork
      begin : issue
        for (int j = 0; j < n; j++) begin
          wr_cmd_valid = 1; wr_cmd = cq[j];
          #1; while (!wr_cmd_ready) begin @(posedge clk); #1; end
          @(posedge clk); #1 wr_cmd_valid = 0;
          if (!all_ready) while ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
        end
      end
      begin : feed
        int k = 0;
        for (int j = 0; j < n; j++)
          for (int i = 0; i <= int'(cq[j].len); i++) begin
            data_t d = (k < fixed.size()) ? fixed[k] : {$urandom, $urandom};
            strb_t s = lanes(cq[j], i);
            longint unsigned w = beat_addr(cq[j].addr, cq[j].size, cq[j].len, cq[j].burst, i)
                                 % MEM_BYTES / 8;
            k++;
            if (!all_ready)
              while ($urandom_range(0, 4) == 0) begin wr_data_valid = 0; @(posedge clk); #1; end
            wr_data_valid = 1; wr_data = d; wr_strb = s;
            #1; while (!wr_data_ready) begin @(posedge clk); #2; end
            for (int b = 0; b < 8; b++)
              if (s[b]) begin model[w*8 + b] = d[8*b +: 8]; known[w*8 + b] = 1; end
            @(posedge clk); #1;
          end
        wr_data_valid = 0;
      end
      begin : responses
        for (int j = 0; j < n; j++) begin
          @(posedge clk); #1;
          wr_rsp_ready = all_ready ? 1'b1 : 1'($urandom);
          #1;
          while (!(wr_rsp_valid && wr_rsp_ready)) begin
            @(posedge clk); #1; wr_rsp_ready = all_ready ? 1'b1 : 1'($urandom); #1;
          end
          check(wr_rsp_id == cq[j].id && wr_rsp_resp == 2'b00, $sformatf("write %0d response", j));
        end
        @(posedge clk); #1 wr_rsp_ready = 0;
      end
    join
  endtask

  // ---------------- reads ----------------
  task automatic run_reads(cmd_t cq [$]);
    int n = cq.size();
    fork
      begin : issue
        for (int j = 0; j < n; j++) begin
          rd_cmd_valid = 1; rd_cmd = cq[j];
          #1; while (!rd_cmd_ready) begin @(posedge clk); #1; end
          @(posedge clk); #1 rd_cmd_valid = 0;
        end
      end
      begin : collect
        for (int j = 0; j < n; j++)
          for (int i = 0; i <= int'(cq[j].len); i++) begin
            longint unsigned w = beat_addr(cq[j].addr, cq[j].size, cq[j].len, cq[j].burst, i)
                                 % MEM_BYTES / 8;
            bit ok = 1;
            @(posedge clk); #1;
            rd_data_ready = all_ready ? 1'b1 : 1'($urandom_range(0, 2) != 0); #1;
            while (!(rd_data_valid && rd_data_ready)) begin
              @(posedge clk); #1; rd_data_ready = all_ready ? 1'b1 : 1'($urandom_range(0, 2) != 0); #1;
            end
            for (int b = 0; b < 8; b++)
              if (known[w*8 + b] && rd_data[8*b +: 8] != model[w*8 + b]) ok = 0;
            check(ok, $sformatf("read %0d beat %0d data", j, i));
            check(rd_data_id == cq[j].id && rd_data_resp == 2'b00 &&
                  rd_data_last == (i == int'(cq[j].len)), $sformatf("read %0d beat %0d RID/RLAST", j, i));
          end
        @(posedge clk); #1 rd_data_ready = 0;
      end
    join
  endtask

  // ---------------- bus monitor ----------------
  int aw_valid_c, aw_wait_c, aw_hs, w_valid_c, w_wait_c, w_hs, b_valid_c, b_wait_c, b_hs;
  int ar_valid_c, ar_wait_c, ar_hs, r_valid_c, r_wait_c, r_hs, cycles;
  int wlast_c, rlast_c, narrow_c, unaligned_c, full_burst_c, w_behind_c, gap_fail;
  int w_first, r_first, w_len, r_len;
  bit mon_on = 0;

  always @(posedge clk) if (rstn && mon_on) begin
    cycles++;
    if (dut.awvalid) begin aw_valid_c++; if (!dut.awready) aw_wait_c++; else aw_hs++; end
    if (dut.wvalid)  begin w_valid_c++;  if (!dut.wready)  w_wait_c++;  else w_hs++;  end
    if (dut.bvalid)  begin b_valid_c++;  if (!dut.bready)  b_wait_c++;  else b_hs++;  end
    if (dut.arvalid) begin ar_valid_c++; if (!dut.arready) ar_wait_c++; else ar_hs++; end
    if (dut.rvalid)  begin r_valid_c++;  if (!dut.rready)  r_wait_c++;  else r_hs++;  end
    if (dut.awvalid && dut.awready) begin
      w_len = int'(dut.awlen);
      if (dut.awsize < 3) narrow_c++;
      if (dut.awaddr % (1 << dut.awsize) != 0) unaligned_c++;
      if (dut.awlen == 8'd255) full_burst_c++;
    end
    if (dut.arvalid && dut.arready) begin
      r_len = int'(dut.arlen);
      if (dut.arlen == 8'd255) full_burst_c++;
    end
    if (dut.u_master.u_burst_q.wptr - dut.u_master.u_burst_q.rptr > 1) w_behind_c++;
    if (dut.wvalid && dut.wready) begin
      if (w_first < 0) w_first = cycles;
      if (dut.wlast) begin
        wlast_c++;
        if (all_ready && cycles - w_first != w_len) gap_fail++;
        w_first = -1;
      end
    end
    if (dut.rvalid && dut.rready) begin
      if (r_first < 0) r_first = cycles;
      if (dut.rlast) begin
        rlast_c++;
        if (all_ready && cycles - r_first != r_len) gap_fail++;
        r_first = -1;
      end
    end
  end

  task automatic util(string ch, int v, int wt, int hs);
    $display("  %s: valid=%0d busy=%0d transfers=%0d utilisation=%0d%%", ch, v, wt, hs,
             cycles ? hs * 100 / cycles : 0);
  endtask

  function automatic cmd_t mk(int id, int addr, int len, int size);
    return '{id: id_t'(id), addr: addr_t'(addr), len: len_t'(len), size: size_t'(size),
             burst: 2'b01, lock: 1'b0, cache: 4'h3, prot: 3'h1};
  endfunction

  initial begin
    cmd_t wq [$], rq [$];
    data_t dq [$];
    w_first = -1; r_first = -1;
    wr_cmd_valid = 0; wr_cmd = '0; wr_data_valid = 0; wr_data = 0; wr_strb = 0;
    wr_rsp_ready = 0; rd_cmd_valid = 0; rd_cmd = '0; rd_data_ready = 0;
    repeat (3) @(posedge clk);
    #2 check(!dut.awvalid && !dut.wvalid && !dut.arvalid && !dut.bvalid && !dut.rvalid &&
             dut.awaddr == 0 && dut.wdata == 0 && dut.araddr == 0, "bus zero in reset");
    @(negedge clk); rstn = 1; mon_on = 1;
    repeat (2) @(posedge clk);
    #1;

    // phase 1: reference run
    all_ready = 1;
    for (int v = 24; v <= 45; v++) dq.push_back(data_t'(v));
    wq = '{mk(11, 0, 21, 3), mk(11, 23, 60, 0), mk(9, 30, 60, 0), mk(5, 20, 30, 1),
           mk(3, 50, 30, 1), mk(7, 70, 5, 3)};
    run_writes(wq, dq);
    rq = '{mk(9, 30, 5, 3), mk(5, 20, 7, 3), mk(3, 50, 6, 3), mk(7, 70, 8, 3)};
    run_reads(rq);
    check(gap_fail == 0, "phase 1 bursts on consecutive clocks");

    // phase 2: 32 beats to one location, and to two different ones; 256 beats
    all_ready = 0;
    dq = {};
    wq = '{mk(1, 512, 31, 3)};            run_writes(wq, dq);
    rq = '{mk(1, 512, 31, 3)};            run_reads(rq);
    wq = '{mk(2, 1024, 31, 3), mk(3, 1536, 31, 2)}; run_writes(wq, dq);
    rq = '{mk(2, 1024, 31, 3), mk(3, 1536, 31, 2)}; run_reads(rq);
    wq = '{mk(4, 2048, 255, 3)};          run_writes(wq, dq);
    rq = '{mk(4, 2048, 255, 3)};          run_reads(rq);

    // phase 3: random traffic
    for (int r = 0; r < 10; r++) begin
      wq = {}; rq = {};
      for (int i = 0; i < 10; i++) wq.push_back(rand_cmd(MEM_BYTES - 1));
      for (int i = 0; i < 10; i++) rq.push_back(rand_cmd(MEM_BYTES - 1));
      run_writes(wq, dq);
      run_reads(rq);
    end
    mon_on = 0;

    $display("bus activity over %0d cycles:", cycles);
    util("AW", aw_valid_c, aw_wait_c, aw_hs);
    util("W ", w_valid_c,  w_wait_c,  w_hs);
    util("B ", b_valid_c,  b_wait_c,  b_hs);
    util("AR", ar_valid_c, ar_wait_c, ar_hs);
    util("R ", r_valid_c,  r_wait_c,  r_hs);
    $display("mechanisms: aw_wait=%0d w_wait=%0d b_backpressure=%0d r_backpressure=%0d w_behind_aw=%0d",
             aw_wait_c, w_wait_c, b_wait_c, r_wait_c, w_behind_c);
    $display("            wlast=%0d rlast=%0d narrow=%0d unaligned=%0d burst256=%0d",
             wlast_c, rlast_c, narrow_c, unaligned_c, full_burst_c);
    check(aw_wait_c > 0, "AW wait happened");
    check(w_wait_c > 0, "W wait happened");
    check(b_wait_c > 0, "B back-pressure happened");
    check(r_wait_c > 0, "R back-pressure happened");
    check(w_behind_c > 0, "W behind AW happened");
    check(wlast_c == aw_hs && wlast_c == b_hs, "one WLAST and one B per write");
    check(rlast_c == ar_hs, "one RLAST per read");
    check(narrow_c > 0 && unaligned_c > 0, "narrow and unaligned beats happened");
    check(full_burst_c == 2, "256-beat bursts happened");
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
