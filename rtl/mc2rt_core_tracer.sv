// mc2rt_core_tracer: the per-core mc2RT trace unit.
//
// It holds the two registers the scheme adds next to each core's L1 data cache:
// THCnt, the number of consecutive trace hits since the last trace miss, and PCC,
// the global clock cycle of the last trace event. For every read classified by the
// cache (evt_valid):
//   * trace hit  (evt_hit=1): THCnt is incremented, nothing is emitted;
//   * trace miss (evt_hit=0): a message {dCC = CC - PCC, Pi = CORE_ID, THCnt, CB}
//     is pushed to the core's trace buffer, then THCnt is cleared and PCC := CC.
// PCC resets to 0, so the first message carries the time from reset. THCnt is
// THCNT_W bits wide; when it is full the cache is told to treat the next read as
// a trace miss (force_miss), so the count never wraps (this saturation rule is
// this design's own choice). A trace miss waits while the buffer is full
// (evt_ready low), which stalls the core; a trace hit is always accepted.
// Timing: combinational from event to message, registers update on the edge.
module mc2rt_core_tracer
  import mc2rt_pkg::*;
#(
  parameter int CORE_ID = 0,
  parameter int THCNT_W = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [CC_W-1:0]       cc,
  // from the cache
  input  logic                  evt_valid,
  input  logic                  evt_hit,
  input  logic [BLOCK_BITS-1:0] evt_block,
  output logic                  evt_ready,
  output logic                  force_miss,
  // to the private trace buffer
  output logic                  msg_valid,
  output trace_msg_t            msg,
  input  logic                  msg_ready
);

  logic [THCNT_W-1:0] thcnt_q;
  logic [CC_W-1:0]    pcc_q;

  assign force_miss = (thcnt_q == '1);
  assign evt_ready  = evt_hit || msg_ready;
  assign msg_valid  = evt_valid && !evt_hit;

  always_comb begin
    msg       = '0;
    msg.cc    = cc;
    msg.dcc   = cc - pcc_q;
    msg.pi    = PI_MAX_W'(CORE_ID);
    msg.thcnt = THC_W'(thcnt_q);
    msg.cb    = evt_block;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thcnt_q <= '0;
      pcc_q   <= '0;
    end else if (evt_valid) begin
      if (evt_hit) begin
        thcnt_q <= thcnt_q + 1'b1;
      end else if (msg_ready) begin
        thcnt_q <= '0;
        pcc_q   <= cc;
      end
    end
  end

endmodule
