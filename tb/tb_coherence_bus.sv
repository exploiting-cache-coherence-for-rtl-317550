// tb_coherence_bus: three scripted caches around the bus and a memory model.
// Checks the snoop broadcast (everyone but the requester), the grant, supply from
// memory (T=0) and from caches (owner preferred, T inherited from the supplier),
// victim write-back before the read, data-less invalidate, and that two waiting
// requesters are both served (round robin).
module tb_coherence_bus;
  import mc2rt_pkg::*;
  import mc2rt_tb_pkg::*;
  localparam int N = 3, LAT = 5;
  logic clk = 0, rst_n = 0;
  bus_req_t   req [N];
  bus_rsp_t   rsp [N];
  snoop_req_t snp [N];
  snoop_rsp_t snp_rsp [N];
  logic mem_req_valid, mem_req_we, mem_req_ready, mem_resp_valid;
  logic [BADDR_W-1:0] mem_req_baddr;
  logic [BLOCK_BITS-1:0] mem_req_wdata, mem_resp_rdata;
  int checks = 0, failures = 0;

  coherence_bus #(.N_CORES(N)) dut (.*);
  mem_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid), .req_we(mem_req_we),
    .req_baddr(mem_req_baddr), .req_wdata(mem_req_wdata), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // scripted cache contents for one block
  logic [BADDR_W-1:0]    hb;
  moesi_e                hst [N];
  logic                  htb [N];
  logic [BLOCK_BITS-1:0] hdat [N];
  always_comb
    for (int j = 0; j < N; j++) begin
      snp_rsp[j].hit   = (snp[j].baddr == hb) && hst[j] != ST_I;
      snp_rsp[j].state = snp_rsp[j].hit ? hst[j] : ST_I;
      snp_rsp[j].tbit  = htb[j];
      snp_rsp[j].data  = hdat[j];
    end

  int snoop_seen [N];
  always @(posedge clk) for (int j = 0; j < N; j++) if (snp[j].valid) snoop_seen[j]++;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  bus_rsp_t got;
  int       cyc;
  task automatic txn(input int i, input bus_cmd_e c, input logic [BADDR_W-1:0] b,
                     input logic wb, input logic [BADDR_W-1:0] wba, input logic [BLOCK_BITS-1:0] wbd);
    bit granted;
    @(negedge clk);
    req[i].valid = 1; req[i].cmd = c; req[i].baddr = b;
    req[i].wb_valid = wb; req[i].wb_baddr = wba; req[i].wb_data = wbd;
    granted = 0; cyc = 0;
    while (!rsp[i].done) begin
      if (rsp[i].gnt) granted = 1;
      @(negedge clk); cyc++;
    end
    got = rsp[i];
    chk(granted, "granted before done");
    @(posedge clk);
    req[i] = '0;
  endtask

  initial begin
    for (int j = 0; j < N; j++) begin req[j] = '0; hst[j] = ST_I; htb[j] = 0; hdat[j] = '0; snoop_seen[j] = 0; end
    hb = 27'h55;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1 no other holder: block from memory, T=0
    txn(0, BUS_RD, 27'h55, 0, '0, '0);
    chk(!got.from_cache && !got.tbit && got.data == init_block(27'h55), "memory supply");
    chk(snoop_seen[0] == 0 && snoop_seen[1] == 1 && snoop_seen[2] == 1, "snoop to others only");
    chk(cyc >= LAT, "memory latency seen");

    // 2 holders: core 2 S with T=1, core 0 O with T=0 -> owner core 0 supplies, T=0
    hst[0] = ST_O; htb[0] = 0; hdat[0] = {8{32'h0000_00AA}};
    hst[2] = ST_S; htb[2] = 1; hdat[2] = {8{32'h0000_00AA}};
    txn(1, BUS_RD, 27'h55, 0, '0, '0);
    chk(got.from_cache && !got.tbit && got.data == {8{32'h0000_00AA}}, "owner supplies, its T inherited");
    chk(cyc < LAT, "cache-to-cache faster than memory");

    // 3 only a sharer with T=1: it supplies, T=1 inherited
    hst[0] = ST_I;
    txn(1, BUS_RDX, 27'h55, 0, '0, '0);
    chk(got.from_cache && got.tbit, "sharer supplies T=1");

    // 4 victim write-back, then memory read
    hst[2] = ST_I;
    txn(2, BUS_RD, 27'h77, 1, 27'h60, {8{32'h6060_6060}});
    chk(u_mem.store.exists(27'h60) && u_mem.store[27'h60] == {8{32'h6060_6060}}, "victim written back");
    chk(got.data == init_block(27'h77) && !got.from_cache, "read after write-back");

    // 5 invalidate moves no data
    hst[1] = ST_S;
    begin
      int r0;
      r0 = u_mem.n_reads;
      txn(0, BUS_UPGR, 27'h55, 0, '0, '0);
      chk(u_mem.n_reads == r0 && cyc < LAT, "upgrade without memory access");
    end

    // 6 two requesters at once are both served
    hst[1] = ST_I;
    fork
      txn(0, BUS_RD, 27'h90, 0, '0, '0);
      txn(1, BUS_RD, 27'h91, 0, '0, '0);
    join
    chk(u_mem.n_reads >= 4, "both requests served");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
