// trace_fifo: synchronous FIFO used as a core's private trace buffer, which keeps
// the order of that core's trace messages. DEPTH entries of WIDTH bits (the
// depth is this design's choice). Push with in_valid/in_ready, pop with
// out_valid/out_ready; out_data is the registered head. A push into a full FIFO
// is refused; a simultaneous push and pop when full is also refused, which keeps
// in_ready independent of out_ready.
module trace_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  input  logic             out_ready
);

  localparam int PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] rd_q, wr_q;
  logic [PTR_W:0]   count_q;

  logic push, pop;
  assign in_ready  = (count_q != (PTR_W+1)'(DEPTH));
  assign out_valid = (count_q != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_q];

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q    <= '0;
      wr_q    <= '0;
      count_q <= '0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      count_q <= count_q + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= in_data;
  end

  // a full FIFO never accepts, an empty one never delivers
  assert property (@(posedge clk) disable iff (!rst_n) count_q <= (PTR_W+1)'(DEPTH));

endmodule
