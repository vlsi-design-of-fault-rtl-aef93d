// tb_rfts_full: the checker at full database size: 30 000 fault patterns of
// 8 to 40 characters, one run over a 64 KB text with 1600 planted patterns,
// then a reconfiguration with a second 30 000-pattern set and a second run
// (see rfts_tb_core for what is generated, compared and counted).
module tb_rfts_full;
  rfts_tb_core #(.NPAT(30000), .TEXT_LEN(65536), .PLANTS(1600), .NRUNS(2),
                 .WATCHDOG(5_000_000)) u_core ();
endmodule
