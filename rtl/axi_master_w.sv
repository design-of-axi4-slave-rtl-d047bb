// axi_master_w: the master's write data channel (W) driver.
//
// For every write burst the master has issued on AW, a (WID, length) entry
// arrives on burst_valid/burst_id/burst_len; the driver takes it with
// burst_pop when it sends that burst's first beat. Beats come from the user
// side as a stream (data_valid, data, strb, data_ready). Each beat is copied
// into the WDATA/WSTRB registers with WVALID high and WID equal to the
// burst's AWID; a beat is held while WREADY is low, and the next one is driven
// after the slave takes it. A burst has burst_len+1 beats, and WLAST is high
// on the last. Between bursts, or when no user data waits, WVALID is low and
// the fields are zero. While ARESETn is low every output is zero.
//
// Timing: one beat per clock while WREADY and data_valid stay high, with no
// gap between bursts. Bus outputs come only from flip-flops; data_ready and
// burst_pop depend combinationally on WREADY but go only to the user side.
//
// WID = AWID, the hold-until-WREADY rule and WLAST on the last beat follow
// the source paper's channel description. A burst is AWLEN+1 beats long, as in
// AXI4. WID is kept because the source paper's write data channel has it,
// although AXI4 itself dropped the signal. The user-side data stream and the
// per-burst queue entry are this design's own choices.
module axi_master_w
  import axi_pkg::*;
(
  input  logic  aclk,
  input  logic  aresetn,
  // next burst to send
  input  logic  burst_valid,
  input  id_t   burst_id,
  input  len_t  burst_len,
  output logic  burst_pop,
  // user data stream
  input  logic  data_valid,
  input  data_t data,
  input  strb_t strb,
  output logic  data_ready,
  // AXI W channel
  output id_t   wid,
  output data_t wdata,
  output strb_t wstrb,
  output logic  wlast,
  output logic  wvalid,
  input  logic  wready
);

  logic  active;        // a burst has been started and has beats left
  id_t   cur_id;
  len_t  cur_len;
  len_t  sent;          // beats of the current burst already driven

  logic  slot_free, have_burst, send, last_beat;
  id_t   eff_id;
  len_t  eff_len, eff_cnt;

  always_comb begin
    slot_free  = !wvalid || wready;
    have_burst = active || burst_valid;
    eff_id     = active ? cur_id  : burst_id;
    eff_len    = active ? cur_len : burst_len;
    eff_cnt    = active ? sent    : '0;
    last_beat  = (eff_cnt == eff_len);
    data_ready = slot_free && have_burst;
    send       = data_ready && data_valid;
    burst_pop  = send && !active;
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      {wid, wdata, wstrb, wlast, wvalid} <= '0;
      active  <= 1'b0;
      cur_id  <= '0;
      cur_len <= '0;
      sent    <= '0;
    end else if (slot_free) begin
      if (send) begin
        wid    <= eff_id;
        wdata  <= data;
        wstrb  <= strb;
        wlast  <= last_beat;
        wvalid <= 1'b1;
        active <= !last_beat;
        cur_id  <= eff_id;
        cur_len <= eff_len;
        sent    <= eff_cnt + 1'b1;
      end else begin
        {wid, wdata, wstrb, wlast, wvalid} <= '0;
      end
    end
  end

endmodule
