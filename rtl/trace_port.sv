// trace_port: the chip's trace output. Encoded messages of variable length are
// appended to a bit accumulator and leave as a continuous stream, TP_W bits per
// cycle, least significant bit first, with no gaps or padding between messages.
// A message is taken (msg_ready) only when the accumulator holds at most TP_W
// bits, so any message fits. When flush is high and no message is offered, a
// last partial word is sent padded with zeros (end of a trace). The port width is
// this design's choice: the mechanism only assumes a narrow dedicated trace port.
// Timing: tp_valid/tp_data are registered; a taken message starts to appear on
// the next cycle.
module trace_port
  import mc2rt_pkg::*;
#(
  parameter int TP_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    msg_valid,
  input  logic [MSG_MAX_BITS-1:0] msg_bits,
  input  logic [MSG_LEN_W-1:0]    msg_len,
  output logic                    msg_ready,
  input  logic                    flush,
  output logic                    tp_valid,
  output logic [TP_W-1:0]         tp_data
);

  localparam int ACC_W = MSG_MAX_BITS + TP_W;
  localparam int CNT_W = $clog2(ACC_W + 1);

  logic [ACC_W-1:0] acc_q;
  logic [CNT_W-1:0] cnt_q;

  logic             send;
  logic [ACC_W-1:0] acc_sh;
  logic [CNT_W-1:0] cnt_sh;

  assign msg_ready = (cnt_q <= CNT_W'(TP_W));

  always_comb begin
    send   = (cnt_q >= CNT_W'(TP_W)) || (flush && !msg_valid && cnt_q != '0);
    acc_sh = acc_q;
    cnt_sh = cnt_q;
    if (send) begin
      acc_sh = acc_q >> TP_W;
      cnt_sh = (cnt_q >= CNT_W'(TP_W)) ? cnt_q - CNT_W'(TP_W) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= '0;
      cnt_q    <= '0;
      tp_valid <= 1'b0;
      tp_data  <= '0;
    end else begin
      tp_valid <= send;
      tp_data  <= acc_q[TP_W-1:0];
      if (msg_valid && msg_ready) begin
        acc_q <= acc_sh | (ACC_W'(msg_bits) << cnt_sh);
        cnt_q <= cnt_sh + CNT_W'(msg_len);
      end else begin
        acc_q <= acc_sh;
        cnt_q <= cnt_sh;
      end
    end
  end

endmodule
