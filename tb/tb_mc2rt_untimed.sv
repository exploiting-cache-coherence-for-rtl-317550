// tb_mc2rt_untimed: the reduced end-to-end run of tb_mc2rt_top with the untimed
// trace (messages without dCC, ordered on chip), see mc2rt_sys_tb. The run ends
// itself; the watchdog here only stops a hung run (later than the body's own).
module tb_mc2rt_untimed;
  mc2rt_sys_tb #(.FULL(1'b0), .N(4), .CBYTES(1024), .THW(4), .MEM_LAT(20),
                 .NB(64), .STRIDE(1), .PHASES(4), .OPS(150), .TP_W(2), .TIMED(1'b0)) u_sys ();

  initial begin
    #30_000_000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", u_sys.checks, u_sys.failures + 1);
    $finish;
  end
endmodule
