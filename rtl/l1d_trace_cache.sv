// l1d_trace_cache: private L1 data cache of one core, extended for mc2RT tracing.
//
// A set-associative write-back cache (default 32 KB, 4 ways, 32-byte blocks, LRU,
// 4-cycle hit latency, as in the evaluated CS32 configuration) kept coherent with
// the MOESI protocol over coherence_bus. Each block carries one trace bit T:
//   * read hit with T=1            -> trace hit  (evt_valid, evt_hit=1)
//   * read hit with T=0            -> trace miss (evt_valid, evt_hit=0, whole block
//                                     on evt_block), then T is set
//   * read miss                    -> coherent read (BUS_RD); a block supplied by
//                                     another L1 keeps that cache's T and becomes
//                                     Shared, a block from memory gets T=0 and becomes
//                                     Exclusive; the read is then classified as above
//   * write hit E/M                -> M; write hit S/O -> coherent invalidate (BUS_UPGR)
//   * write miss                   -> coherent read-and-invalidate (BUS_RDX); T is
//                                     inherited from a supplying cache, else cleared
// A trace miss is also forced when force_miss is high (the core's THCnt counter
// is full), so that the counter never wraps. These T-bit rules are those of the
// mc2RT scheme; the bus handshake, the word-wide core port (no byte enables),
// and the stall of a trace miss while evt_ready is low (trace buffer full) are
// this design's choices.
//
// Core port: req_valid/req_ready handshake (ready only when idle, one access in
// flight); resp_valid pulses once per access with resp_rdata for reads. A read or
// write hit answers HIT_LAT cycles after the request was taken.
// Snoop port: snp_rsp is a combinational lookup of snp_req.baddr; the state change
// (M->O, E->S on BUS_RD; ->I on BUS_RDX/BUS_UPGR) happens at the clock edge.
// The bus port carries the victim write-back with the request, read from the
// arrays at grant time, so a victim downgraded by a snoop is written back correctly.
module l1d_trace_cache
  import mc2rt_pkg::*;
#(
  parameter int CACHE_BYTES = 32768,
  parameter int WAYS        = 4,
  parameter int HIT_LAT     = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [WORD_W-1:0] req_wdata,
  output logic              req_ready,
  output logic              resp_valid,
  output logic [WORD_W-1:0] resp_rdata,
  // trace side
  output logic                  evt_valid,
  output logic                  evt_hit,
  output logic [BLOCK_BITS-1:0] evt_block,
  input  logic                  evt_ready,
  input  logic                  force_miss,
  // coherent bus side
  output bus_req_t          bus_req,
  input  bus_rsp_t          bus_rsp,
  input  snoop_req_t        snp_req,
  output snoop_rsp_t        snp_rsp
);

  localparam int SETS  = CACHE_BYTES / (BLOCK_BYTES * WAYS);
  localparam int IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int TAG_W = BADDR_W - IDX_W;
  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int CNT_W = $clog2(HIT_LAT + 1);

  typedef enum logic [1:0] {C_IDLE, C_LOOKUP, C_BUS} cstate_e;

  // arrays
  logic [TAG_W-1:0]      tag_a  [SETS][WAYS];
  moesi_e                st_a   [SETS][WAYS];
  logic                  tb_a   [SETS][WAYS];
  logic [BLOCK_BITS-1:0] data_a [SETS][WAYS];
  logic [WAY_W-1:0]      age_a  [SETS][WAYS];   // 0 = most recently used

  cstate_e              cs_q;
  logic [ADDR_W-1:0]    addr_q;
  logic                 we_q;
  logic [WORD_W-1:0]    wdata_q;
  logic [CNT_W-1:0]     cnt_q;
  logic [WAY_W-1:0]     way_q;
  bus_cmd_e             cmd_q;

  // request lookup
  logic [IDX_W-1:0]   idx;
  logic [TAG_W-1:0]   tag;
  logic [WSEL_W-1:0]  wsel;
  logic [BADDR_W-1:0] baddr_q;
  logic               hit;
  logic [WAY_W-1:0]   hit_way;
  logic [WAY_W-1:0]   victim;
  logic               found_inv;

  assign baddr_q = addr_q[ADDR_W-1:OFFS_W];
  assign idx     = baddr_q[IDX_W-1:0];
  assign tag     = baddr_q[BADDR_W-1:IDX_W];
  assign wsel    = addr_q[OFFS_W-1:OFFS_W-WSEL_W];

  always_comb begin
    hit       = 1'b0;
    hit_way   = '0;
    victim    = '0;
    found_inv = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (st_a[idx][w] != ST_I && tag_a[idx][w] == tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (st_a[idx][w] == ST_I) begin
        found_inv = 1'b1;
        victim    = WAY_W'(w);
      end
    end
    if (!found_inv) begin
      for (int w = 0; w < WAYS; w++)
        if (age_a[idx][w] == WAY_W'(WAYS - 1)) victim = WAY_W'(w);
    end
  end

  // snoop lookup
  logic [IDX_W-1:0] s_idx;
  logic [TAG_W-1:0] s_tag;
  logic             s_hit;
  logic [WAY_W-1:0] s_way;
  assign s_idx = snp_req.baddr[IDX_W-1:0];
  assign s_tag = snp_req.baddr[BADDR_W-1:IDX_W];

  always_comb begin
    s_hit = 1'b0;
    s_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (st_a[s_idx][w] != ST_I && tag_a[s_idx][w] == s_tag) begin
        s_hit = 1'b1;
        s_way = WAY_W'(w);
      end
    end
    snp_rsp.hit   = s_hit;
    snp_rsp.state = s_hit ? st_a[s_idx][s_way] : ST_I;
    snp_rsp.tbit  = s_hit & tb_a[s_idx][s_way];
    snp_rsp.data  = data_a[s_idx][s_way];
  end

  // a snoop to the block being looked up: wait one cycle for its state change
  logic snp_conflict;
  assign snp_conflict = snp_req.valid && (snp_req.baddr == baddr_q);

  logic decide;
  assign decide = (cs_q == C_LOOKUP) && (cnt_q == '0) && !snp_conflict;

  // trace event: a read that hits in the cache
  logic rd_hit;
  assign rd_hit    = decide && hit && !we_q;
  assign evt_valid = rd_hit;
  assign evt_hit   = tb_a[idx][hit_way] && !force_miss;
  assign evt_block = data_a[idx][hit_way];

  assign req_ready = (cs_q == C_IDLE);

  // bus request
  moesi_e v_state;
  assign v_state = st_a[idx][way_q];
  always_comb begin
    bus_req          = '0;
    bus_req.valid    = (cs_q == C_BUS);
    bus_req.cmd      = cmd_q;
    bus_req.baddr    = baddr_q;
    bus_req.wb_valid = (cs_q == C_BUS) && (cmd_q != BUS_UPGR) &&
                       (v_state == ST_M || v_state == ST_O);
    bus_req.wb_baddr = {tag_a[idx][way_q], idx};
    bus_req.wb_data  = data_a[idx][way_q];
  end

  function automatic logic [BLOCK_BITS-1:0] merge_word(
      input logic [BLOCK_BITS-1:0] blk, input logic [WSEL_W-1:0] ws,
      input logic [WORD_W-1:0] wd);
    logic [BLOCK_BITS-1:0] r;
    r = blk;
    r[ws*WORD_W +: WORD_W] = wd;
    return r;
  endfunction

  // LRU update helper
  task automatic touch(input logic [IDX_W-1:0] i, input logic [WAY_W-1:0] t);
    for (int w = 0; w < WAYS; w++) begin
      if (WAY_W'(w) == t)                 age_a[i][w] <= '0;
      else if (age_a[i][w] < age_a[i][t]) age_a[i][w] <= age_a[i][w] + 1'b1;
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_q       <= C_IDLE;
      addr_q     <= '0;
      we_q       <= 1'b0;
      wdata_q    <= '0;
      cnt_q      <= '0;
      way_q      <= '0;
      cmd_q      <= BUS_RD;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) begin
          st_a[s][w]  <= ST_I;
          tb_a[s][w]  <= 1'b0;
          age_a[s][w] <= WAY_W'(w);
        end
      end
    end else begin
      resp_valid <= 1'b0;

      // snoop-induced state changes (never to a block this cache is filling)
      if (snp_req.valid && s_hit) begin
        unique case (snp_req.cmd)
          BUS_RD: begin
            if (st_a[s_idx][s_way] == ST_M) st_a[s_idx][s_way] <= ST_O;
            if (st_a[s_idx][s_way] == ST_E) st_a[s_idx][s_way] <= ST_S;
          end
          default: st_a[s_idx][s_way] <= ST_I;
        endcase
      end

      unique case (cs_q)
        C_IDLE: begin
          if (req_valid) begin
            cs_q    <= C_LOOKUP;
            addr_q  <= req_addr;
            we_q    <= req_we;
            wdata_q <= req_wdata;
            cnt_q   <= CNT_W'(HIT_LAT - 1);
          end
        end

        C_LOOKUP: begin
          if (cnt_q != '0) begin
            cnt_q <= cnt_q - 1'b1;
          end else if (!snp_conflict) begin
            if (hit && !we_q) begin
              // read hit: trace hit, or trace miss once the trace buffer accepts it
              if (evt_hit || evt_ready) begin
                if (!evt_hit) tb_a[idx][hit_way] <= 1'b1;
                touch(idx, hit_way);
                resp_valid <= 1'b1;
                resp_rdata <= data_a[idx][hit_way][wsel*WORD_W +: WORD_W];
                cs_q       <= C_IDLE;
              end
            end else if (hit && we_q) begin
              if (st_a[idx][hit_way] == ST_M || st_a[idx][hit_way] == ST_E) begin
                st_a[idx][hit_way]   <= ST_M;
                data_a[idx][hit_way] <= merge_word(data_a[idx][hit_way], wsel, wdata_q);
                touch(idx, hit_way);
                resp_valid <= 1'b1;
                cs_q       <= C_IDLE;
              end else begin
                cmd_q <= BUS_UPGR;
                way_q <= hit_way;
                cs_q  <= C_BUS;
              end
            end else begin
              cmd_q <= we_q ? BUS_RDX : BUS_RD;
              way_q <= victim;
              cs_q  <= C_BUS;
            end
          end
        end

        C_BUS: begin
          // an upgrade that lost its copy to another writer becomes a full RDX
          if (!bus_rsp.gnt && cmd_q == BUS_UPGR && snp_conflict && snp_req.cmd != BUS_RD)
            cmd_q <= BUS_RDX;
          if (bus_rsp.done) begin
            unique case (cmd_q)
              BUS_RD: begin
                tag_a[idx][way_q]  <= tag;
                data_a[idx][way_q] <= bus_rsp.data;
                tb_a[idx][way_q]   <= bus_rsp.tbit;
                st_a[idx][way_q]   <= bus_rsp.from_cache ? ST_S : ST_E;
                cs_q               <= C_LOOKUP;   // classify the read now that it hits
                cnt_q              <= '0;
              end
              BUS_RDX: begin
                tag_a[idx][way_q]  <= tag;
                data_a[idx][way_q] <= merge_word(bus_rsp.data, wsel, wdata_q);
                tb_a[idx][way_q]   <= bus_rsp.tbit;
                st_a[idx][way_q]   <= ST_M;
                touch(idx, way_q);
                resp_valid         <= 1'b1;
                cs_q               <= C_IDLE;
              end
              default: begin  // BUS_UPGR
                st_a[idx][way_q]   <= ST_M;
                data_a[idx][way_q] <= merge_word(data_a[idx][way_q], wsel, wdata_q);
                touch(idx, way_q);
                resp_valid         <= 1'b1;
                cs_q               <= C_IDLE;
              end
            endcase
          end
        end

        default: cs_q <= C_IDLE;
      endcase
    end
  end

endmodule
