// coherence_bus: snooping interconnect that keeps the N private L1 data caches
// coherent with MOESI and carries the mc2RT trace bit between them.
//
// One transaction at a time. A round-robin arbiter picks a requesting cache; in
// the following snoop cycle the request is broadcast to every other cache, which
// answers combinationally (hit, state, trace bit, block) and changes its state at
// the clock edge (M->O, E->S for a coherent read; ->I for read-and-invalidate and
// invalidate). The requester is granted in that same cycle (rsp.gnt) and hands
// over its victim write-back.
//   * If another cache holds the block it supplies it: an owner (M or O) is
//     preferred, otherwise the lowest-numbered holder. The requester then
//     inherits the supplier's trace bit (from_cache=1).
//   * Otherwise the block comes from memory and the trace bit is 0.
//   * An invalidate (BUS_UPGR) moves no data.
// A victim write-back goes to memory before the block is read. The memory port is
// a block-wide request/acknowledge interface: mem_req_valid until mem_req_ready,
// then one mem_resp_valid per request (writes are acknowledged too). The
// supplier rules come from the mc2RT scheme; the single-transaction bus, the
// round-robin arbiter and the choice of which sharer supplies are this design's.
module coherence_bus
  import mc2rt_pkg::*;
#(
  parameter int N_CORES = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  bus_req_t              req     [N_CORES],
  output bus_rsp_t              rsp     [N_CORES],
  output snoop_req_t            snp     [N_CORES],
  input  snoop_rsp_t            snp_rsp [N_CORES],
  // memory (shared L2 / main memory)
  output logic                  mem_req_valid,
  output logic                  mem_req_we,
  output logic [BADDR_W-1:0]    mem_req_baddr,
  output logic [BLOCK_BITS-1:0] mem_req_wdata,
  input  logic                  mem_req_ready,
  input  logic                  mem_resp_valid,
  input  logic [BLOCK_BITS-1:0] mem_resp_rdata
);

  localparam int SEL_W = (N_CORES > 1) ? $clog2(N_CORES) : 1;

  typedef enum logic [2:0] {B_IDLE, B_SNOOP, B_WB, B_WB_WAIT, B_RD, B_RD_WAIT, B_DONE} bstate_e;

  bstate_e               bs_q;
  logic [SEL_W-1:0]      own_q;     // requester being served
  logic [SEL_W-1:0]      rr_q;      // round-robin start point
  bus_cmd_e              cmd_q;
  logic [BADDR_W-1:0]    baddr_q;
  logic [BADDR_W-1:0]    wb_baddr_q;
  logic [BLOCK_BITS-1:0] wb_data_q;
  logic                  from_cache_q;
  logic                  tbit_q;
  logic [BLOCK_BITS-1:0] data_q;

  // round-robin pick
  logic             pick_any;
  logic [SEL_W-1:0] pick;
  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    // first valid requester at or after rr_q, wrapping around
    for (int k = N_CORES - 1; k >= 0; k--) begin
      if (req[k].valid && SEL_W'(k) < rr_q) begin
        pick_any = 1'b1;
        pick     = SEL_W'(k);
      end
    end
    for (int k = N_CORES - 1; k >= 0; k--) begin
      if (req[k].valid && SEL_W'(k) >= rr_q) begin
        pick_any = 1'b1;
        pick     = SEL_W'(k);
      end
    end
  end

  // supplier search during the snoop cycle
  logic             sup_any, sup_owner;
  logic [SEL_W-1:0] sup;
  always_comb begin
    sup_any   = 1'b0;
    sup_owner = 1'b0;
    sup       = '0;
    for (int j = 0; j < N_CORES; j++) begin
      if (SEL_W'(j) != own_q && snp_rsp[j].hit) begin
        if (snp_rsp[j].state == ST_M || snp_rsp[j].state == ST_O) begin
          if (!sup_owner) sup = SEL_W'(j);
          sup_owner = 1'b1;
        end else if (!sup_any) begin
          sup = SEL_W'(j);
        end
        sup_any = 1'b1;
      end
    end
  end

  // snoop broadcast and responses
  always_comb begin
    for (int j = 0; j < N_CORES; j++) begin
      snp[j].valid  = (bs_q == B_SNOOP) && (SEL_W'(j) != own_q);
      snp[j].cmd    = req[own_q].cmd;
      snp[j].baddr  = req[own_q].baddr;
      rsp[j].gnt        = (bs_q == B_SNOOP) && (SEL_W'(j) == own_q);
      rsp[j].done       = (bs_q == B_DONE)  && (SEL_W'(j) == own_q);
      rsp[j].from_cache = from_cache_q;
      rsp[j].tbit       = tbit_q;
      rsp[j].data       = data_q;
    end
  end

  assign mem_req_valid = (bs_q == B_WB) || (bs_q == B_RD);
  assign mem_req_we    = (bs_q == B_WB);
  assign mem_req_baddr = (bs_q == B_WB) ? wb_baddr_q : baddr_q;
  assign mem_req_wdata = wb_data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bs_q         <= B_IDLE;
      own_q        <= '0;
      rr_q         <= '0;
      cmd_q        <= BUS_RD;
      baddr_q      <= '0;
      wb_baddr_q   <= '0;
      wb_data_q    <= '0;
      from_cache_q <= 1'b0;
      tbit_q       <= 1'b0;
      data_q       <= '0;
    end else begin
      unique case (bs_q)
        B_IDLE: begin
          if (pick_any) begin
            own_q <= pick;
            bs_q  <= B_SNOOP;
          end
        end
        B_SNOOP: begin
          cmd_q        <= req[own_q].cmd;
          baddr_q      <= req[own_q].baddr;
          wb_baddr_q   <= req[own_q].wb_baddr;
          wb_data_q    <= req[own_q].wb_data;
          from_cache_q <= sup_any;
          tbit_q       <= sup_any && snp_rsp[sup].tbit;
          data_q       <= snp_rsp[sup].data;
          if (req[own_q].wb_valid)              bs_q <= B_WB;
          else if (req[own_q].cmd == BUS_UPGR)  bs_q <= B_DONE;
          else if (sup_any)                     bs_q <= B_DONE;
          else                                  bs_q <= B_RD;
        end
        B_WB:      if (mem_req_ready) bs_q <= B_WB_WAIT;
        B_WB_WAIT: begin
          if (mem_resp_valid) bs_q <= (cmd_q == BUS_UPGR || from_cache_q) ? B_DONE : B_RD;
        end
        B_RD:      if (mem_req_ready) bs_q <= B_RD_WAIT;
        B_RD_WAIT: begin
          if (mem_resp_valid) begin
            data_q       <= mem_resp_rdata;
            tbit_q       <= 1'b0;
            from_cache_q <= 1'b0;
            bs_q         <= B_DONE;
          end
        end
        B_DONE: begin
          rr_q <= (own_q == SEL_W'(N_CORES - 1)) ? '0 : own_q + 1'b1;
          bs_q <= B_IDLE;
        end
        default: bs_q <= B_IDLE;
      endcase
    end
  end

  // exactly one transaction: grant and completion go to the same single requester
  assert property (@(posedge clk) disable iff (!rst_n) (bs_q == B_DONE) |-> req[own_q].valid);

endmodule
