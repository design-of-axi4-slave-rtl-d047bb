// tb_axi_slave_mem: self-checking test of the slave storage.
//
// Fills all 512 words, then makes 4000 random strobed writes while reading a
// random word every cycle, comparing each read with a byte-accurate model.
// Also checks that a read of the word written in the same cycle returns the
// old contents, and finally reads back every word.
module tb_axi_slave_mem;
  import axi_pkg::*;

  localparam int unsigned MEM_BYTES = 4096;
  localparam int unsigned WORDS = MEM_BYTES / 8;
  localparam int IW = $clog2(WORDS);

  logic clk = 0;
  always #5 clk = ~clk;

  logic we; logic [IW-1:0] waddr, raddr; data_t wdata, rdata; strb_t wstrb;

  axi_slave_mem dut (.clk, .we, .waddr, .wdata, .wstrb, .raddr, .rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  data_t model [WORDS];

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0; wstrb = 0;
    for (int i = 0; i < int'(WORDS); i++) begin
      @(negedge clk);
      we = 1; waddr = IW'(i); wdata = {32'(i), 32'(~i)}; wstrb = '1;
      model[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = IW'($urandom);
      wdata = {$urandom, $urandom};
      wstrb = strb_t'($urandom);
      raddr = (n % 5 == 0) ? waddr : IW'($urandom);
      #1;
      check(rdata == model[raddr], "read before write edge");
      if (we)
        for (int b = 0; b < 8; b++)
          if (wstrb[b]) model[waddr][8*b +: 8] = wdata[8*b +: 8];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < int'(WORDS); i++) begin
      raddr = IW'(i); #1;
      check(rdata == model[i], $sformatf("final word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
