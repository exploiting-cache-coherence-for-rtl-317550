// mc2rt_top: an N-core cache-coherent read-trace (mc2RT) subsystem.
//
// The goal is a load-value trace complete enough to replay a parallel program,
// at a small fraction of the bandwidth of sending every loaded value. For each
// core i there is a traced L1 data cache (l1d_trace_cache) and a trace unit
// (mc2rt_core_tracer) with its THCnt and PCC registers, feeding a private
// trace buffer (trace_fifo). The caches share a MOESI snooping bus
// (coherence_bus) that passes the trace bit along with cache-to-cache transfers.
// The global trace buffer control (trace_arbiter) forwards the oldest message of
// all cores, trace_msg_encoder turns it into a variable-length bit string, and
// trace_port streams the bits out TP_W per cycle. A free-running counter is the
// global clock-cycle time base CC shared by all cores.
//
// Ports: per core a load/store port (valid/ready request, one response pulse per
// access); a block-wide port to the shared L2 / main memory (request/ready,
// one response per request, write-backs acknowledged too); the trace port
// (tp_valid/tp_data) and trace_flush, which pushes out the last partial word.
// Defaults are the evaluated 8-core CS32 configuration: 32 KB 4-way L1D with
// 32-byte blocks and a 4-cycle hit. Trace buffer depth, trace port width and the
// 32-bit CC/THCnt are this design's choices. TIMED = 0 selects the untimed
// trace, whose messages carry no dCC field.
module mc2rt_top
  import mc2rt_pkg::*;
#(
  parameter int N_CORES     = 8,
  parameter int CACHE_BYTES = 32768,
  parameter int WAYS        = 4,
  parameter int HIT_LAT     = 4,
  parameter int THCNT_W     = 32,
  parameter int FIFO_DEPTH  = 4,
  parameter int TP_W        = 8,
  parameter bit TIMED       = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // cores
  input  logic [N_CORES-1:0]    core_req_valid,
  input  logic [N_CORES-1:0]    core_req_we,
  input  logic [ADDR_W-1:0]     core_req_addr  [N_CORES],
  input  logic [WORD_W-1:0]     core_req_wdata [N_CORES],
  output logic [N_CORES-1:0]    core_req_ready,
  output logic [N_CORES-1:0]    core_resp_valid,
  output logic [WORD_W-1:0]     core_resp_rdata [N_CORES],
  // shared L2 / main memory
  output logic                  mem_req_valid,
  output logic                  mem_req_we,
  output logic [BADDR_W-1:0]    mem_req_baddr,
  output logic [BLOCK_BITS-1:0] mem_req_wdata,
  input  logic                  mem_req_ready,
  input  logic                  mem_resp_valid,
  input  logic [BLOCK_BITS-1:0] mem_resp_rdata,
  // trace port
  input  logic                  trace_flush,
  output logic                  tp_valid,
  output logic [TP_W-1:0]       tp_data
);

  localparam int MSG_W = $bits(trace_msg_t);

  logic [CC_W-1:0] cc_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cc_q <= '0;
    else        cc_q <= cc_q + 1'b1;
  end

  bus_req_t   bus_req [N_CORES];
  bus_rsp_t   bus_rsp [N_CORES];
  snoop_req_t snp_req [N_CORES];
  snoop_rsp_t snp_rsp [N_CORES];

  logic [N_CORES-1:0] head_valid, head_pop;
  trace_msg_t         head_msg [N_CORES];

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    logic                  evt_valid, evt_hit, evt_ready, force_miss;
    logic [BLOCK_BITS-1:0] evt_block;
    logic                  msg_valid, msg_ready;
    trace_msg_t            msg;
    logic [MSG_W-1:0]      head_bits;

    l1d_trace_cache #(
      .CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .HIT_LAT(HIT_LAT)
    ) u_cache (
      .clk, .rst_n,
      .req_valid  (core_req_valid[i]),
      .req_we     (core_req_we[i]),
      .req_addr   (core_req_addr[i]),
      .req_wdata  (core_req_wdata[i]),
      .req_ready  (core_req_ready[i]),
      .resp_valid (core_resp_valid[i]),
      .resp_rdata (core_resp_rdata[i]),
      .evt_valid, .evt_hit, .evt_block, .evt_ready, .force_miss,
      .bus_req    (bus_req[i]),
      .bus_rsp    (bus_rsp[i]),
      .snp_req    (snp_req[i]),
      .snp_rsp    (snp_rsp[i])
    );

    mc2rt_core_tracer #(.CORE_ID(i), .THCNT_W(THCNT_W)) u_tracer (
      .clk, .rst_n, .cc(cc_q),
      .evt_valid, .evt_hit, .evt_block, .evt_ready, .force_miss,
      .msg_valid, .msg, .msg_ready
    );

    trace_fifo #(.WIDTH(MSG_W), .DEPTH(FIFO_DEPTH)) u_tbuf (
      .clk, .rst_n,
      .in_valid  (msg_valid),
      .in_data   (msg),
      .in_ready  (msg_ready),
      .out_valid (head_valid[i]),
      .out_data  (head_bits),
      .out_ready (head_pop[i])
    );
    assign head_msg[i] = trace_msg_t'(head_bits);
  end

  coherence_bus #(.N_CORES(N_CORES)) u_bus (
    .clk, .rst_n,
    .req (bus_req), .rsp (bus_rsp), .snp (snp_req), .snp_rsp (snp_rsp),
    .mem_req_valid, .mem_req_we, .mem_req_baddr, .mem_req_wdata, .mem_req_ready,
    .mem_resp_valid, .mem_resp_rdata
  );

  logic                    gmsg_valid, gmsg_ready;
  trace_msg_t              gmsg;
  logic [MSG_MAX_BITS-1:0] enc_bits;
  logic [MSG_LEN_W-1:0]    enc_len;

  trace_arbiter #(.N_CORES(N_CORES)) u_arb (
    .in_valid (head_valid), .in_msg (head_msg), .pop (head_pop),
    .out_valid (gmsg_valid), .out_msg (gmsg), .out_ready (gmsg_ready)
  );

  trace_msg_encoder #(.N_CORES(N_CORES), .TIMED(TIMED)) u_enc (
    .msg (gmsg), .msg_bits (enc_bits), .msg_len (enc_len)
  );

  trace_port #(.TP_W(TP_W)) u_port (
    .clk, .rst_n,
    .msg_valid (gmsg_valid), .msg_bits (enc_bits), .msg_len (enc_len),
    .msg_ready (gmsg_ready), .flush (trace_flush),
    .tp_valid, .tp_data
  );

endmodule
