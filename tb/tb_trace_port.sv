// tb_trace_port: random-length bit strings are offered back to back; the output
// stream must equal their concatenation, leave at TP_W bits per cycle while the
// port is backlogged, and end with a zero-padded partial word on flush.
module tb_trace_port;
  import mc2rt_pkg::*;
  localparam int TP_W = 8;
  logic clk = 0, rst_n = 0;
  logic msg_valid, msg_ready, flush, tp_valid;
  logic [MSG_MAX_BITS-1:0] msg_bits;
  logic [MSG_LEN_W-1:0]    msg_len;
  logic [TP_W-1:0]         tp_data;
  int checks = 0, failures = 0;
  bit ref_q[$];
  bit out_q[$];
  int total_in = 0, busy_cycles = 0, out_words = 0;

  trace_port #(.TP_W(TP_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && tp_valid) begin
    for (int b = 0; b < TP_W; b++) out_q.push_back(tp_data[b]);
    out_words++;
  end

  initial begin
    msg_valid = 0; msg_bits = '0; msg_len = '0; flush = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 200; m++) begin
      int l;
      @(negedge clk);
      l = 20 + ($urandom % (MSG_MAX_BITS - 19));
      msg_bits = '0;
      for (int b = 0; b < l; b++) msg_bits[b] = 1'($urandom);
      msg_len = MSG_LEN_W'(l);
      msg_valid = 1;
      while (!msg_ready) begin @(posedge clk); @(negedge clk); end
      for (int b = 0; b < l; b++) ref_q.push_back(msg_bits[b]);
      total_in += l;
      @(posedge clk);
    end
    @(negedge clk); msg_valid = 0;
    // drain full words, then flush the tail
    repeat (MSG_MAX_BITS / TP_W + 4) @(posedge clk);
    checks++;
    // backlogged throughput: every full word has left by now
    if (out_words != total_in / TP_W) begin failures++; $display("words %0d exp %0d", out_words, total_in / TP_W); end
    @(negedge clk); flush = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); flush = 0;
    checks++;
    if (out_q.size() != ((total_in + TP_W - 1) / TP_W) * TP_W) begin failures++; $display("out bits %0d in %0d", out_q.size(), total_in); end
    for (int b = 0; b < out_q.size(); b++) begin
      checks++;
      if (out_q[b] != ((b < ref_q.size()) ? ref_q[b] : 1'b0)) begin failures++; if (failures < 5) $display("bit %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
