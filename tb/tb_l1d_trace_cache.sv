// tb_l1d_trace_cache: directed checks of one traced L1 data cache against a
// scripted coherent-bus responder. Covers: read miss from memory (Exclusive,
// T=0, trace miss with the whole block), trace hit afterwards, hit latency,
// write hit in E (silent) and in O (invalidate), inheritance of T=1 and T=0 on
// cache-to-cache fills, write miss (read-and-invalidate) inheriting T, snoop
// downgrades M->O and invalidation, LRU victim write-back, forced trace miss,
// stall while the trace buffer is full, and an invalidate that turns into a
// read-and-invalidate after losing its copy.
module tb_l1d_trace_cache;
  import mc2rt_pkg::*;
  import mc2rt_tb_pkg::*;
  localparam int HL = 4;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_we, req_ready, resp_valid;
  logic [ADDR_W-1:0] req_addr;
  logic [WORD_W-1:0] req_wdata, resp_rdata;
  logic evt_valid, evt_hit, evt_ready, force_miss;
  logic [BLOCK_BITS-1:0] evt_block;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  snoop_req_t snp_req;
  snoop_rsp_t snp_rsp;
  int checks = 0, failures = 0;

  l1d_trace_cache #(.CACHE_BYTES(256), .WAYS(2), .HIT_LAT(HL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference memory and scripted responder
  logic [BLOCK_BITS-1:0] ref_mem [logic [BADDR_W-1:0]];
  function automatic logic [BLOCK_BITS-1:0] mem_blk(input logic [BADDR_W-1:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : init_block(a);
  endfunction
  logic     rsp_from_cache, rsp_tbit;
  bit       hold_gnt;
  int       n_txn;
  bus_req_t last_req;
  int       n_evt_hit, n_evt_miss;
  logic [BLOCK_BITS-1:0] last_evt_block;

  always @(posedge clk) if (rst_n && evt_valid && (evt_hit || evt_ready)) begin
    if (evt_hit) n_evt_hit++; else begin n_evt_miss++; last_evt_block = evt_block; end
  end

  initial begin
    bus_rsp = '0;
    forever begin
      @(negedge clk);
      if (bus_req.valid && !hold_gnt) begin
        @(negedge clk);
        bus_rsp.gnt = 1;
        #1 last_req = bus_req;
        @(negedge clk);
        bus_rsp.gnt = 0;
        if (last_req.wb_valid) ref_mem[last_req.wb_baddr] = last_req.wb_data;
        repeat (3) @(negedge clk);
        bus_rsp.done       = 1;
        bus_rsp.from_cache = rsp_from_cache;
        bus_rsp.tbit       = rsp_from_cache && rsp_tbit;
        bus_rsp.data       = mem_blk(last_req.baddr);
        n_txn++;
        @(negedge clk);
        bus_rsp = '0;
      end
    end
  end

  function automatic logic [ADDR_W-1:0] ad(input logic [BADDR_W-1:0] b, input int w);
    return {b, 5'(w * 4)};
  endfunction

  int lat;
  task automatic access(input logic we, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] d,
                        output logic [WORD_W-1:0] rd);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d;
    @(posedge clk); lat = 0;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) begin @(negedge clk); lat++; end
    rd = resp_rdata;
    if (we) ref_mem[a[ADDR_W-1:OFFS_W]] = mem_blk(a[ADDR_W-1:OFFS_W]);  // keep an entry
  endtask

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic peek(input logic [BADDR_W-1:0] b);
    snp_req.valid = 0; snp_req.baddr = b; #1;
  endtask

  task automatic snoop(input bus_cmd_e c, input logic [BADDR_W-1:0] b);
    @(negedge clk);
    snp_req.valid = 1; snp_req.cmd = c; snp_req.baddr = b;
    @(negedge clk);
    snp_req.valid = 0;
  endtask

  localparam logic [BADDR_W-1:0] A = 27'h100, B = 27'h101, C = 27'h102, D = 27'h103,
                                 F = 27'h104, G = 27'h108, H = 27'h10C;
  logic [WORD_W-1:0] rd;
  int t0, h0, m0;
  logic [BLOCK_BITS-1:0] blk;

  initial begin
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; evt_ready = 1; force_miss = 0;
    snp_req = '0; rsp_from_cache = 0; rsp_tbit = 0; hold_gnt = 0;
    n_txn = 0; n_evt_hit = 0; n_evt_miss = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1 read miss from memory: E, T=0 -> trace miss with the whole block
    t0 = n_txn; m0 = n_evt_miss;
    access(0, ad(A, 3), 0, rd);
    chk(n_txn == t0 + 1 && last_req.cmd == BUS_RD && last_req.baddr == A && !last_req.wb_valid, "A read miss -> BUS_RD");
    chk(rd == init_word(A, 3), "A read data");
    chk(n_evt_miss == m0 + 1 && last_evt_block == init_block(A), "A trace miss with block");
    peek(A); chk(snp_rsp.hit && snp_rsp.state == ST_E && snp_rsp.tbit, "A is E with T set");

    // 2 read hit with T=1: trace hit, HIT_LAT latency
    h0 = n_evt_hit; t0 = n_txn;
    access(0, ad(A, 5), 0, rd);
    chk(n_evt_hit == h0 + 1 && n_txn == t0, "A trace hit, no bus");
    chk(lat == HL, $sformatf("read hit latency %0d", lat));
    chk(rd == init_word(A, 5), "A hit data");

    // 3 write hit in E: silent upgrade to M
    access(1, ad(A, 2), 32'hDEAD_0002, rd);
    chk(n_txn == t0 && lat == HL, "write hit E silent");
    peek(A); chk(snp_rsp.state == ST_M && snp_rsp.data[2*32 +: 32] == 32'hDEAD_0002, "A is M with data");
    access(0, ad(A, 2), 0, rd);
    chk(rd == 32'hDEAD_0002 && n_evt_hit == h0 + 2, "read own write, trace hit");

    // 4 snoop coherent read: M -> O, data supplied with T
    peek(A); blk = snp_rsp.data;
    snoop(BUS_RD, A);
    peek(A); chk(snp_rsp.state == ST_O && snp_rsp.tbit && snp_rsp.data == blk, "A M->O on snoop read");

    // 5 write hit in O: coherent invalidate
    t0 = n_txn;
    access(1, ad(A, 1), 32'hBEEF_0001, rd);
    chk(n_txn == t0 + 1 && last_req.cmd == BUS_UPGR && !last_req.wb_valid, "write O -> BUS_UPGR");
    peek(A); chk(snp_rsp.state == ST_M && snp_rsp.data[32 +: 32] == 32'hBEEF_0001, "A M after upgrade");

    // 6 read miss supplied by another cache with T=1: S, trace hit, nothing emitted
    rsp_from_cache = 1; rsp_tbit = 1; m0 = n_evt_miss; h0 = n_evt_hit;
    access(0, ad(B, 0), 0, rd);
    chk(n_evt_miss == m0 && n_evt_hit == h0 + 1, "inherited T=1 gives trace hit");
    peek(B); chk(snp_rsp.state == ST_S && snp_rsp.tbit, "B is S with T=1");

    // 7 read miss supplied by another cache with T=0: trace miss
    rsp_tbit = 0;
    access(0, ad(C, 7), 0, rd);
    chk(n_evt_miss == m0 + 1 && last_evt_block == init_block(C) && rd == init_word(C, 7), "inherited T=0 gives trace miss");
    peek(C); chk(snp_rsp.state == ST_S && snp_rsp.tbit, "C is S, T set after miss");

    // 8 write miss: read-and-invalidate, T inherited (1), then read is a trace hit
    rsp_tbit = 1; t0 = n_txn;
    access(1, ad(D, 4), 32'h1234_5678, rd);
    chk(n_txn == t0 + 1 && last_req.cmd == BUS_RDX, "write miss -> BUS_RDX");
    peek(D); chk(snp_rsp.state == ST_M && snp_rsp.tbit && snp_rsp.data[4*32 +: 32] == 32'h1234_5678, "D is M, T inherited");
    h0 = n_evt_hit;
    access(0, ad(D, 4), 0, rd);
    chk(rd == 32'h1234_5678 && n_evt_hit == h0 + 1, "D trace hit");
    // write miss from memory clears T: next read is a trace miss
    rsp_from_cache = 0; m0 = n_evt_miss;
    access(1, ad(H, 0), 32'h0000_0AAA, rd);
    peek(H); chk(snp_rsp.state == ST_M && !snp_rsp.tbit, "H is M with T=0");
    access(0, ad(H, 0), 0, rd);
    chk(n_evt_miss == m0 + 1 && last_evt_block[31:0] == 32'h0000_0AAA, "H trace miss after memory write fill");

    // 9 LRU victim write-back: set 0 holds A (M, older) and H (newer); read F evicts A
    peek(A); blk = snp_rsp.data;
    t0 = n_txn;
    access(0, ad(F, 0), 0, rd);
    chk(n_txn == t0 + 1 && last_req.wb_valid && last_req.wb_baddr == A && last_req.wb_data == blk, "A written back on eviction");
    peek(A); chk(!snp_rsp.hit, "A evicted");
    access(0, ad(A, 1), 0, rd);
    chk(rd == 32'hBEEF_0001, "A refetched with written data");

    // 10 snoop read-and-invalidate drops a line
    snoop(BUS_RDX, F);
    peek(F); chk(!snp_rsp.hit, "F invalidated");

    // 11 forced trace miss on a T=1 block
    force_miss = 1; m0 = n_evt_miss;
    access(0, ad(A, 0), 0, rd);
    force_miss = 0;
    chk(n_evt_miss == m0 + 1, "forced trace miss");

    // 12 trace buffer full: the read waits
    rsp_from_cache = 0;
    @(negedge clk); evt_ready = 0;
    fork
      access(0, ad(G, 2), 0, rd);
      begin repeat (30) @(negedge clk); evt_ready = 1; end
    join
    chk(lat >= 25 && rd == init_word(G, 2), $sformatf("stall while trace buffer full (%0d)", lat));

    // 13 an upgrade that loses its copy before the grant becomes BUS_RDX
    access(0, ad(C, 0), 0, rd);  // C is S
    hold_gnt = 1;
    fork
      access(1, ad(C, 0), 32'hCAFE_0000, rd);
      begin
        repeat (HL + 3) @(negedge clk);
        snp_req.valid = 1; snp_req.cmd = BUS_RDX; snp_req.baddr = C;
        @(negedge clk); snp_req.valid = 0;
        hold_gnt = 0;
      end
    join
    chk(last_req.cmd == BUS_RDX && last_req.baddr == C, "lost upgrade becomes BUS_RDX");
    peek(C); chk(snp_rsp.state == ST_M && snp_rsp.data[31:0] == 32'hCAFE_0000, "C is M after RDX");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
