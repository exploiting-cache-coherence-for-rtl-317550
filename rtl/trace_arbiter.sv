// trace_arbiter: control of the global trace buffer. It looks at the head message
// of every core's private trace buffer and forwards the one with the oldest
// absolute time stamp (ties go to the lower core index), so that messages of
// different cores leave the chip in global time order. The messages keep their
// differential time field dCC (timed trace). Combinational: out_valid/out_msg
// follow the heads in the same cycle, and pop[i] is raised for the selected core
// when out_ready is high. Time stamps are compared modulo 2^CC_W, which is
// exact while the heads are less than 2^(CC_W-1) cycles apart.
module trace_arbiter
  import mc2rt_pkg::*;
#(
  parameter int N_CORES = 8
) (
  input  logic [N_CORES-1:0] in_valid,
  input  trace_msg_t         in_msg [N_CORES],
  output logic [N_CORES-1:0] pop,
  output logic               out_valid,
  output trace_msg_t         out_msg,
  input  logic               out_ready
);

  localparam int SEL_W = (N_CORES > 1) ? $clog2(N_CORES) : 1;

  logic [SEL_W-1:0] sel;
  logic             any;

  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = 0; i < N_CORES; i++) begin
      if (in_valid[i]) begin
        if (!any) begin
          sel = SEL_W'(i);
          any = 1'b1;
        end else if ($signed(in_msg[i].cc - in_msg[sel].cc) < 0) begin
          sel = SEL_W'(i);
        end
      end
    end
  end

  assign out_valid = any;
  assign out_msg   = in_msg[sel];

  always_comb begin
    pop = '0;
    if (any && out_ready) pop[sel] = 1'b1;
  end

endmodule
