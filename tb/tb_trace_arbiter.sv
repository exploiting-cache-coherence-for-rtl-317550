// tb_trace_arbiter: random sets of waiting messages; the one forwarded and popped
// must be the one with the oldest time stamp (lowest core index on a tie).
module tb_trace_arbiter;
  import mc2rt_pkg::*;
  localparam int N = 8;
  logic [N-1:0] in_valid, pop;
  trace_msg_t   in_msg [N];
  logic         out_valid, out_ready;
  trace_msg_t   out_msg;
  int checks = 0, failures = 0;

  trace_arbiter #(.N_CORES(N)) dut (.*);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int best;
      in_valid  = N'($urandom);
      out_ready = ($urandom % 4) != 0;
      for (int i = 0; i < N; i++) begin
        in_msg[i] = '0;
        in_msg[i].cc = 32'h1000_0000 + ($urandom % 16);
        in_msg[i].pi = 3'(i);
        in_msg[i].cb = {8{$urandom}};
      end
      #1;
      best = -1;
      for (int i = 0; i < N; i++)
        if (in_valid[i] && (best < 0 || in_msg[i].cc < in_msg[best].cc)) best = i;
      checks++;
      if (out_valid != (best >= 0)) begin failures++; $display("valid"); end
      if (best >= 0) begin
        checks++;
        if (out_msg != in_msg[best]) begin failures++; $display("picked %0d exp %0d", out_msg.pi, best); end
        checks++;
        if (pop != (out_ready ? N'(1) << best : '0)) begin failures++; $display("pop %b", pop); end
      end else begin
        checks++;
        if (pop != 0) begin failures++; $display("pop when empty"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
