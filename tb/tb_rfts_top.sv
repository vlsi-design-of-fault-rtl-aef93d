// tb_rfts_top: end-to-end test of the checker with a 2000-pattern fault
// database, two reconfigurations and two 3000-character texts (see
// rfts_tb_core for what is generated, compared and counted).
module tb_rfts_top;
  rfts_tb_core #(.NPAT(2000), .TEXT_LEN(3000), .PLANTS(60), .NRUNS(2)) u_core ();
endmodule
