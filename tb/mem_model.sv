// mem_model: behavioural model of the shared memory behind the coherent bus (the
// shared L2 cache and main memory of the platform), block-wide, one request at a
// time, answering LAT cycles after a request is taken. Blocks never written hold
// init_block(address). Writes are acknowledged with a response pulse too.
module mem_model
  import mc2rt_pkg::*;
  import mc2rt_tb_pkg::*;
#(
  parameter int LAT = 100
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  input  logic                  req_we,
  input  logic [BADDR_W-1:0]    req_baddr,
  input  logic [BLOCK_BITS-1:0] req_wdata,
  output logic                  req_ready,
  output logic                  resp_valid,
  output logic [BLOCK_BITS-1:0] resp_rdata
);
  logic [BLOCK_BITS-1:0] store [logic [BADDR_W-1:0]];
  int                    busy;
  int                    n_reads, n_writes;

  assign req_ready = (busy == 0);

  function automatic logic [BLOCK_BITS-1:0] peek(input logic [BADDR_W-1:0] a);
    return store.exists(a) ? store[a] : init_block(a);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      n_reads    <= 0;
      n_writes   <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (busy == 0 && req_valid) begin
        busy <= LAT;
        if (req_we) begin
          store[req_baddr] = req_wdata;
          n_writes         <= n_writes + 1;
        end else begin
          n_reads <= n_reads + 1;
        end
        resp_rdata <= peek(req_baddr);
      end else if (busy > 1) begin
        busy <= busy - 1;
      end else if (busy == 1) begin
        busy       <= 0;
        resp_valid <= 1'b1;
      end
    end
  end
endmodule
