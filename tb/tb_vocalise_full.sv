// tb_vocalise_full: the end-to-end system test at the design's default size:
// a 2 x 2 x 2 array of Processing VSs, each with six processing elements
// and a 10 x 10 x 6 block (a 20 x 20 x 12 global grid), two Jacobi
// iterations. The top is instantiated with no parameter list, so it runs at
// its own defaults. All checks are those of tb_vocalise_top.
module tb_vocalise_full;
  tb_vocalise_top #(.NBX(2), .NBY(2), .NBZ(2), .NX(10), .NY(10), .NPE(6), .ITER(2),
                    .WATCHDOG(2000000), .DEFAULT_TOP(1)) u_tb ();
endmodule
