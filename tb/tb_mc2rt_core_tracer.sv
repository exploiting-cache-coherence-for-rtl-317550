// tb_mc2rt_core_tracer: a random stream of trace hits and trace misses, with a
// randomly full trace buffer; checks each emitted message (dCC = CC - PCC, Pi,
// THCnt = hits since the last miss, CB) against a reference, that hits are never
// stalled, and that a 4-bit THCnt raises force_miss at 15 instead of wrapping.
module tb_mc2rt_core_tracer;
  import mc2rt_pkg::*;
  localparam int CORE = 5, THW = 4;
  logic clk = 0, rst_n = 0;
  logic [CC_W-1:0] cc;
  logic evt_valid, evt_hit, evt_ready, force_miss, msg_valid, msg_ready;
  logic [BLOCK_BITS-1:0] evt_block;
  trace_msg_t msg;
  int checks = 0, failures = 0, n_force = 0, n_stall = 0, n_msg = 0;
  int ref_hits = 0;
  logic [CC_W-1:0] ref_pcc = 0;

  mc2rt_core_tracer #(.CORE_ID(CORE), .THCNT_W(THW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cc = 0; evt_valid = 0; evt_hit = 0; evt_block = '0; msg_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      cc = cc + 1 + ($urandom % 3);
      evt_valid = ($urandom % 2);
      // the cache turns a hit into a miss when force_miss is high
      evt_hit   = (($urandom % 10) != 0) && !force_miss;
      evt_block = {8{$urandom}};
      msg_ready = ($urandom % 5) != 0;
      #1;
      checks++;
      if (force_miss != (ref_hits == (1 << THW) - 1)) begin failures++; $display("force_miss"); end
      if (force_miss) n_force++;
      if (evt_valid && evt_hit) begin
        checks++;
        if (!evt_ready || msg_valid) begin failures++; $display("hit stalled or emitted"); end
      end
      if (evt_valid && !evt_hit) begin
        checks++;
        if (!msg_valid || evt_ready != msg_ready) begin failures++; $display("miss handshake"); end
        if (msg_valid) begin
          checks++;
          if (msg.dcc != cc - ref_pcc || msg.pi != 3'(CORE) || msg.thcnt != 32'(ref_hits) ||
              msg.cb != evt_block || msg.cc != cc) begin
            failures++; $display("msg dcc=%0d exp %0d thcnt=%0d exp %0d", msg.dcc, cc - ref_pcc, msg.thcnt, ref_hits);
          end
        end
        if (!msg_ready) n_stall++;
      end
      @(posedge clk);
      if (evt_valid && evt_hit) ref_hits++;
      if (evt_valid && !evt_hit && msg_ready) begin ref_hits = 0; ref_pcc = cc; n_msg++; end
    end
    checks++;
    if (n_force == 0 || n_stall == 0 || n_msg == 0) begin failures++; $display("mechanism not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
