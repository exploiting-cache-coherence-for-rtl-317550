// tb_trace_msg_encoder: random messages with field values of every magnitude are
// encoded and then parsed back by an independent decoder; the decoded fields and
// the message length must match (length = code(dCC) + Pi bits + code(THCnt) + 256).
// A second, untimed encoder must produce the same message without the dCC code.
module tb_trace_msg_encoder;
  import mc2rt_pkg::*;
  import mc2rt_tb_pkg::*;
  localparam int N = 8;
  trace_msg_t msg;
  logic [MSG_MAX_BITS-1:0] bits;
  logic [MSG_LEN_W-1:0]    len;
  int checks = 0, failures = 0;

  logic [MSG_MAX_BITS-1:0] ubits;
  logic [MSG_LEN_W-1:0]    ulen;
  trace_msg_encoder #(.N_CORES(N)) dut (.msg(msg), .msg_bits(bits), .msg_len(len));
  trace_msg_encoder #(.N_CORES(N), .TIMED(1'b0)) dut_u (.msg(msg), .msg_bits(ubits), .msg_len(ulen));

  function automatic logic [31:0] rnd_val();
    int sh;
    sh = $urandom % 33;
    return (sh == 32) ? $urandom : ($urandom & ((32'd1 << sh) - 1));
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int pos, exp_len;
      logic [34:0] v;
      logic c;
      logic [2:0] pi;
      logic [BLOCK_BITS-1:0] cb;
      msg = '0;
      msg.cc = $urandom; msg.dcc = rnd_val(); msg.thcnt = rnd_val();
      msg.pi = 3'($urandom);
      for (int k = 0; k < 8; k++) msg.cb[k*32 +: 32] = $urandom;
      #1;
      exp_len = vle_bits(msg.dcc) + 3 + vle_bits(msg.thcnt) + BLOCK_BITS;
      checks++;
      if (int'(len) != exp_len) begin failures++; $display("len %0d exp %0d", len, exp_len); end
      // untimed: the timed message minus its leading dCC code
      checks++;
      if (int'(ulen) != exp_len - vle_bits(msg.dcc) || ubits != (bits >> vle_bits(msg.dcc))) begin
        failures++; $display("untimed message");
      end
      // decode
      pos = 0; v = '0;
      for (int k = 0; k < 5; k++) begin
        v[7*k +: 7] = bits[pos +: 7]; c = bits[pos+7]; pos += 8;
        if (!c) break;
      end
      checks++;
      if (v[31:0] != msg.dcc || v[34:32] != 0) begin failures++; $display("dcc %h exp %h", v, msg.dcc); end
      pi = bits[pos +: 3]; pos += 3;
      checks++;
      if (pi != msg.pi) begin failures++; $display("pi"); end
      v = '0;
      for (int k = 0; k < 5; k++) begin
        v[7*k +: 7] = bits[pos +: 7]; c = bits[pos+7]; pos += 8;
        if (!c) break;
      end
      checks++;
      if (v[31:0] != msg.thcnt) begin failures++; $display("thcnt %h exp %h", v, msg.thcnt); end
      cb = bits[pos +: BLOCK_BITS]; pos += BLOCK_BITS;
      checks++;
      if (cb != msg.cb) begin failures++; $display("cb"); end
      checks++;
      if ((bits >> pos) != 0) begin failures++; $display("bits beyond length not zero"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
