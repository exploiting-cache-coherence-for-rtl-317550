// tb_mc2rt_top: end-to-end run of a 4-core system with 1 KB caches, a 4-bit THCnt
// a 20-cycle memory and a 2-bit trace port (so that the trace buffers fill up) (see mc2rt_sys_tb for what is checked).
module tb_mc2rt_top;
  mc2rt_sys_tb #(.FULL(1'b0), .N(4), .CBYTES(1024), .THW(4), .MEM_LAT(20),
                 .NB(64), .STRIDE(1), .PHASES(4), .OPS(150), .TP_W(2)) u_sys ();
endmodule
