// tb_mc2rt_full: end-to-end run of mc2rt_top with all its defaults (8 cores,
// 32 KB 4-way L1D, 32-bit THCnt) and a 100-cycle memory. Blocks are spaced so
// that they collide in a few sets, which makes evictions happen (see
// mc2rt_sys_tb for what is checked).
module tb_mc2rt_full;
  mc2rt_sys_tb #(.FULL(1'b1), .N(8), .MEM_LAT(100), .NB(64), .STRIDE(64),
                 .PHASES(2), .OPS(100)) u_sys ();
endmodule
