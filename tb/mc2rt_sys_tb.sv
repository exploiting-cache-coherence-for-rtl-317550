// mc2rt_sys_tb: end-to-end test body for mc2rt_top, used by tb_mc2rt_top (reduced
// size) and tb_mc2rt_full (every top parameter at its default).
//
// Each core runs a random load/store program in phases. In phase p a core writes
// only blocks it owns of the phase's "hot" half and reads either its own hot
// blocks or any block of the other half, which nobody writes in that phase; so
// the value of every read is known exactly from a reference memory. Blocks
// written in one phase are read by other cores in the next, which exercises
// cache-to-cache supply and trace-bit inheritance. Between phases all cores wait
// for each other.
// Independently of the design, the test keeps for every core the list of trace
// messages it expects: at each trace miss of a core it notes dCC (from its own
// cycle count), the number of trace hits since the previous one and the block
// contents from the reference memory. At the end the trace port stream is
// decoded bit by bit and every message is compared with that list, and the
// stream must be in global time order. Every mechanism must have happened.
// With TIMED = 0 the messages carry no dCC and are checked the same way
// otherwise.
module mc2rt_sys_tb
  import mc2rt_pkg::*;
  import mc2rt_tb_pkg::*;
#(
  parameter bit FULL    = 1'b0,  // instantiate the top with its defaults
  parameter int N       = 4,     // must equal the top's N_CORES
  parameter int CBYTES  = 1024,
  parameter int THW     = 4,
  parameter int MEM_LAT = 20,
  parameter int NB      = 64,    // blocks used by the program
  parameter int STRIDE  = 1,     // block address step (forces set conflicts)
  parameter int PHASES  = 4,
  parameter int OPS     = 150,
  parameter int TP_W    = 8,
  parameter bit TIMED   = 1'b1   // trace with dCC fields, or untimed
) ();
  localparam int PI_W = (N > 1) ? $clog2(N) : 0;
  localparam logic [BADDR_W-1:0] BASE = 27'h0002_000;

  logic clk = 0, rst_n = 0;
  logic [N-1:0]      core_req_valid, core_req_we, core_req_ready, core_resp_valid;
  logic [ADDR_W-1:0] core_req_addr  [N];
  logic [WORD_W-1:0] core_req_wdata [N];
  logic [WORD_W-1:0] core_resp_rdata [N];
  logic mem_req_valid, mem_req_we, mem_req_ready, mem_resp_valid;
  logic [BADDR_W-1:0] mem_req_baddr;
  logic [BLOCK_BITS-1:0] mem_req_wdata, mem_resp_rdata;
  logic trace_flush, tp_valid;
  logic [TP_W-1:0] tp_data;

  if (FULL) begin : g_dut
    mc2rt_top dut (.*);
  end else begin : g_dut
    mc2rt_top #(.N_CORES(N), .CACHE_BYTES(CBYTES), .THCNT_W(THW), .TP_W(TP_W), .TIMED(TIMED)) dut (.*);
  end

  mem_model #(.LAT(MEM_LAT)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid), .req_we(mem_req_we),
    .req_baddr(mem_req_baddr), .req_wdata(mem_req_wdata), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference memory, word granular
  logic [WORD_W-1:0] ref_w [NB][WORDS_PER_BLOCK];
  function automatic logic [BADDR_W-1:0] baddr_of(input int b);
    return BASE + BADDR_W'(b * STRIDE);
  endfunction
  function automatic logic [BLOCK_BITS-1:0] ref_block(input int b);
    logic [BLOCK_BITS-1:0] r;
    for (int k = 0; k < WORDS_PER_BLOCK; k++) r[k*WORD_W +: WORD_W] = ref_w[b][k];
    return r;
  endfunction

  // expected trace messages per core
  typedef struct packed {
    logic [CC_W-1:0]       cc;
    logic [CC_W-1:0]       dcc;
    logic [THC_W-1:0]      thcnt;
    logic [BLOCK_BITS-1:0] cb;
  } exp_msg_t;
  exp_msg_t exp_q [N][$];
  int       cur_b [N];
  int       hits_since [N];
  logic [CC_W-1:0] last_cc [N];
  int       cyc = 0;

  // mechanism counters
  int n_trace_hit, n_trace_miss, n_fill_mem, n_fill_c2c, n_inherit_t1, n_upgr, n_rdx,
      n_wb, n_tbuf_full, n_force, n_snoop_wait, n_reads;

  logic [N-1:0] fire_miss, fire_hit, tbuf_full, forced, snoop_wait;
  for (genvar i = 0; i < N; i++) begin : g_mon
    assign fire_hit[i]   = g_dut.dut.g_core[i].evt_valid && g_dut.dut.g_core[i].evt_hit;
    assign fire_miss[i]  = g_dut.dut.g_core[i].evt_valid && !g_dut.dut.g_core[i].evt_hit &&
                           g_dut.dut.g_core[i].evt_ready;
    assign tbuf_full[i]  = g_dut.dut.g_core[i].evt_valid && !g_dut.dut.g_core[i].evt_ready;
    assign forced[i]     = fire_miss[i] && g_dut.dut.g_core[i].force_miss;
    assign snoop_wait[i] = g_dut.dut.g_core[i].u_cache.cs_q == 2'd1 &&
                           g_dut.dut.g_core[i].u_cache.cnt_q == '0 &&
                           g_dut.dut.g_core[i].u_cache.snp_conflict;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (fire_hit[i]) begin hits_since[i]++; n_trace_hit++; end
      if (fire_miss[i]) begin
        exp_msg_t e;
        e.cc = cyc; e.dcc = cyc - last_cc[i]; e.thcnt = hits_since[i]; e.cb = ref_block(cur_b[i]);
        exp_q[i].push_back(e);
        last_cc[i] = cyc; hits_since[i] = 0; n_trace_miss++;
      end
      if (tbuf_full[i]) n_tbuf_full++;
      if (forced[i]) n_force++;
      if (snoop_wait[i]) n_snoop_wait++;
    end
    // bus transactions, seen at completion
    if (g_dut.dut.u_bus.bs_q == 3'd6) begin
      if (g_dut.dut.u_bus.cmd_q == BUS_UPGR) n_upgr++;
      else begin
        if (g_dut.dut.u_bus.cmd_q == BUS_RDX) n_rdx++;
        if (g_dut.dut.u_bus.from_cache_q) begin
          n_fill_c2c++;
          if (g_dut.dut.u_bus.tbit_q) n_inherit_t1++;
        end else n_fill_mem++;
      end
    end
    if (mem_req_valid && mem_req_ready && mem_req_we) n_wb++;
    cyc++;
  end

  // trace port capture
  bit stream [$];
  always @(posedge clk) if (rst_n && tp_valid) for (int b = 0; b < TP_W; b++) stream.push_back(tp_data[b]);

  // core programs
  int phase = 0, done_cnt = 0;
  for (genvar i = 0; i < N; i++) begin : g_core_drv
    initial begin
      core_req_valid[i] = 0; core_req_we[i] = 0; core_req_addr[i] = '0; core_req_wdata[i] = '0;
      wait (rst_n);
      for (int p = 0; p < PHASES; p++) begin
        int prev_b;
        prev_b = -1;
        for (int k = 0; k < OPS; k++) begin
          int  b, w;
          bit  we;
          logic [WORD_W-1:0] v;
          we = ($urandom % 10) < 3;
          w  = $urandom % WORDS_PER_BLOCK;
          if (we || ($urandom % 2)) begin
            // own hot block: owner i, group p%2
            b = (($urandom % (NB / (2 * N))) * 2 + (p % 2)) * N + i;
          end else begin
            // any block of the cold group
            b = (($urandom % (NB / (2 * N))) * 2 + ((p + 1) % 2)) * N + ($urandom % N);
          end
          // temporal locality: half of the reads go to the block read last
          if (!we && prev_b >= 0 && ($urandom % 2)) b = prev_b;
          if (!we) prev_b = b;
          cur_b[i] = b;
          v = $urandom;
          @(negedge clk);
          core_req_valid[i] = 1; core_req_we[i] = we;
          core_req_addr[i]  = {baddr_of(b), 5'(w * 4)};
          core_req_wdata[i] = v;
          do @(posedge clk); while (!core_req_ready[i]);
          @(negedge clk); core_req_valid[i] = 0;
          while (!core_resp_valid[i]) @(negedge clk);
          if (we) ref_w[b][w] = v;
          else begin
            n_reads++;
            chk(core_resp_rdata[i] == ref_w[b][w],
                $sformatf("core %0d read blk %0d w %0d = %h exp %h", i, b, w, core_resp_rdata[i], ref_w[b][w]));
          end
        end
        done_cnt++;
        wait (phase > p);
      end
    end
  end

  // decoder helpers
  int pos;
  function automatic logic [31:0] get_bits(input int n);
    logic [31:0] r;
    r = '0;
    for (int b = 0; b < n; b++) r[b] = stream[pos + b];
    pos += n;
    return r;
  endfunction
  function automatic logic [34:0] get_vle(output int chunks);
    logic [34:0] v;
    logic c;
    v = '0; chunks = 0;
    for (int k = 0; k < 5; k++) begin
      v[7*k +: 7] = 7'(get_bits(7)); c = get_bits(1) != 0; chunks++;
      if (!c) break;
    end
    return v;
  endfunction

  int n_multi_dcc, n_multi_thc, n_decoded;
  initial begin
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < WORDS_PER_BLOCK; k++) ref_w[b][k] = init_word(baddr_of(b), k);
    for (int i = 0; i < N; i++) begin cur_b[i] = 0; hits_since[i] = 0; last_cc[i] = 0; end
    {n_trace_hit, n_trace_miss, n_fill_mem, n_fill_c2c, n_inherit_t1, n_upgr, n_rdx} = '0;
    {n_wb, n_tbuf_full, n_force, n_snoop_wait, n_reads} = '0;
    trace_flush = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < PHASES; p++) begin
      wait (done_cnt == N * (p + 1));
      repeat (5) @(posedge clk);
      phase = p + 1;
    end
    // drain the trace buffers, then flush the port
    repeat (N * 4 * 64 * 8 / TP_W) @(posedge clk);
    @(negedge clk); trace_flush = 1;
    repeat (4) @(posedge clk);
    @(negedge clk); trace_flush = 0;

    // decode and compare
    begin
      int total, last_abs, chunks;
      logic [CC_W-1:0] abs_cc [N];
      total = 0;
      for (int i = 0; i < N; i++) begin total += exp_q[i].size(); abs_cc[i] = 0; end
      pos = 0; last_abs = 0; n_decoded = 0; n_multi_dcc = 0; n_multi_thc = 0;
      while (stream.size() - pos >= (TIMED ? 16 : 8) + PI_W + BLOCK_BITS) begin
        logic [34:0] dcc, thc;
        int pi;
        logic [BLOCK_BITS-1:0] cb;
        exp_msg_t e;
        dcc = '0;
        if (TIMED) begin dcc = get_vle(chunks); if (chunks > 1) n_multi_dcc++; end
        pi  = int'(get_bits(PI_W));
        thc = get_vle(chunks); if (chunks > 1) n_multi_thc++;
        for (int b = 0; b < BLOCK_BITS; b++) cb[b] = stream[pos + b];
        pos += BLOCK_BITS;
        n_decoded++;
        if (pi >= N || exp_q[pi].size() == 0) begin chk(0, "unexpected message"); break; end
        e = exp_q[pi].pop_front();
        if (TIMED) chk(dcc[31:0] == e.dcc, $sformatf("msg %0d core %0d dCC %0d exp %0d", n_decoded, pi, dcc, e.dcc));
        chk(thc[31:0] == e.thcnt, $sformatf("msg %0d core %0d THCnt %0d exp %0d", n_decoded, pi, thc, e.thcnt));
        chk(cb == e.cb, $sformatf("msg %0d core %0d CB", n_decoded, pi));
        // messages leave in the global order of their trace misses
        chk(int'(e.cc) >= last_abs, "global time order");
        last_abs = int'(e.cc);
        if (TIMED) begin
          abs_cc[pi] += dcc[31:0];
          chk(abs_cc[pi] == e.cc, "dCC sums to the absolute time");
        end
      end
      chk(n_decoded == total, $sformatf("decoded %0d messages, expected %0d", n_decoded, total));
      for (int i = 0; i < N; i++) chk(exp_q[i].size() == 0, "all messages delivered");
      chk(n_reads == n_trace_hit + n_trace_miss, "every read classified once");
    end

    $display("reads=%0d trace_hits=%0d trace_misses=%0d (trace miss rate %0d/1000)",
             n_reads, n_trace_hit, n_trace_miss, n_trace_miss * 1000 / (n_reads > 0 ? n_reads : 1));
    $display("mem_fills=%0d c2c_fills=%0d inherited_T1=%0d upgrades=%0d rdx=%0d writebacks=%0d",
             n_fill_mem, n_fill_c2c, n_inherit_t1, n_upgr, n_rdx, n_wb);
    $display("tbuf_full_stalls=%0d forced_misses=%0d snoop_waits=%0d multi_chunk_dCC=%0d multi_chunk_THCnt=%0d",
             n_tbuf_full, n_force, n_snoop_wait, n_multi_dcc, n_multi_thc);
    $display("trace bits=%0d over %0d cycles, %0d reads", stream.size(), cyc, n_reads);
    chk(n_trace_hit > 0,  "mechanism: trace hit");
    chk(n_trace_miss > 0, "mechanism: trace miss");
    chk(n_fill_mem > 0,   "mechanism: fill from memory");
    chk(n_fill_c2c > 0,   "mechanism: cache-to-cache fill");
    chk(n_inherit_t1 > 0, "mechanism: inherited trace bit");
    chk(n_upgr > 0,       "mechanism: coherent invalidate");
    chk(n_rdx > 0,        "mechanism: read and invalidate");
    chk(n_wb > 0,         "mechanism: victim write-back");
    if (!FULL) chk(n_tbuf_full > 0, "mechanism: trace buffer full stall");
    if (TIMED) chk(n_multi_dcc > 0, "mechanism: multi-chunk dCC");
    if (!FULL) chk(n_force > 0, "mechanism: THCnt saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
