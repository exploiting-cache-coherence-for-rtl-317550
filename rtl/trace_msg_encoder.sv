// trace_msg_encoder: turns a trace message record into the bit string sent on the
// trace port. Fields, in transmission order (bit 0 of msg_bits goes first):
//   dCC   variable length, 1..5 chunks of 8 bits
//   Pi    fixed, clog2(N_CORES) bits (no bits when N_CORES = 1)
//   THCnt variable length, 1..5 chunks of 8 bits
//   CB    the whole cache block, BLOCK_BITS bits, byte 0 first
// A variable-length chunk carries 7 value bits (least significant group first)
// in bits [6:0] and the connect bit C in bit [7]: C=1 means another chunk of the
// same field follows. At least one chunk is always sent. The field order, the
// minimum of 8 bits and the connect bit follow the mc2RT message format; the
// split of a chunk into 7 value bits plus C and the bit order are this design's
// reading of it. Bits of msg_bits at and above msg_len are zero.
// With TIMED = 0 the dCC field is left out (untimed trace): the global trace
// buffer has already put the messages in time order, so the host only needs
// Pi, THCnt and CB. The default is the timed trace.
// Purely combinational.
module trace_msg_encoder
  import mc2rt_pkg::*;
#(
  parameter int N_CORES = 8,
  parameter bit TIMED   = 1'b1
) (
  input  trace_msg_t               msg,
  output logic [MSG_MAX_BITS-1:0]  msg_bits,
  output logic [MSG_LEN_W-1:0]     msg_len
);

  localparam int PI_W = (N_CORES > 1) ? $clog2(N_CORES) : 0;

  // number of 7-bit groups needed for v (at least one)
  function automatic int unsigned chunks(input logic [31:0] v);
    int unsigned n;
    n = 1;
    for (int k = 1; k < VLE_CHUNKS_MAX; k++)
      if ((v >> (7 * k)) != 0) n = k + 1;
    return n;
  endfunction

  always_comb begin
    int unsigned pos;
    int unsigned n_dcc, n_thc;
    logic [7*VLE_CHUNKS_MAX-1:0] vd, vt;
    msg_bits = '0;
    pos      = 0;
    vd       = (7*VLE_CHUNKS_MAX)'(msg.dcc);
    vt       = (7*VLE_CHUNKS_MAX)'(msg.thcnt);
    n_dcc    = chunks(msg.dcc);
    n_thc    = chunks(msg.thcnt);
    for (int c = 0; c < VLE_CHUNKS_MAX; c++) begin
      if (TIMED && c < int'(n_dcc)) begin
        msg_bits[pos +: 8] = {(c < int'(n_dcc) - 1), vd[7*c +: 7]};
        pos += 8;
      end
    end
    for (int b = 0; b < PI_W; b++) begin
      msg_bits[pos] = msg.pi[b];
      pos += 1;
    end
    for (int c = 0; c < VLE_CHUNKS_MAX; c++) begin
      if (c < int'(n_thc)) begin
        msg_bits[pos +: 8] = {(c < int'(n_thc) - 1), vt[7*c +: 7]};
        pos += 8;
      end
    end
    msg_bits[pos +: BLOCK_BITS] = msg.cb;
    pos += BLOCK_BITS;
    msg_len = MSG_LEN_W'(pos);
  end

endmodule
