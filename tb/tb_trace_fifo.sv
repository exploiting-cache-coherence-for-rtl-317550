// tb_trace_fifo: random push/pop traffic against a queue reference; checks data
// order, full and empty flags.
module tb_trace_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  logic do_pop, do_push;

  trace_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_data   = W'($urandom);
      out_ready = ($urandom % 3) == 0 || t > 2500;
      checks++;
      if (in_ready != (q.size() < D)) begin failures++; $display("ready mismatch size=%0d", q.size()); end
      checks++;
      if (out_valid != (q.size() > 0)) begin failures++; $display("valid mismatch"); end
      if (out_valid) begin
        checks++;
        if (out_data != q[0]) begin failures++; $display("data %h exp %h", out_data, q[0]); end
      end
      do_pop  = out_valid && out_ready;
      do_push = in_valid && in_ready;
      @(posedge clk);
      if (do_pop) void'(q.pop_front());
      if (do_push) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
