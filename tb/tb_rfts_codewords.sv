// tb_rfts_codewords: the checker on code-word-sized fault patterns, for the
// code lengths N = 73 and N = 273 bits. A code word of N bits occupies
// ceil(N/8) characters (10 and 35). Run 0 loads 5000 faulty 73-bit words,
// run 1 reconfigures to 5000 faulty 273-bit words; each text is a stream of
// words with faulty ones planted on word boundaries. N = 21 (3 characters) is
// below the 8-character minimum pattern and is not run. See rfts_tb_core for
// the comparison and the mechanism counts.
module tb_rfts_codewords;
  rfts_tb_core #(.NPAT(5000), .TEXT_LEN(35 * 10 * 60), .PLANTS(300), .NRUNS(2),
                 .WORD0(10), .WORD1(35)) u_core ();

  // Backstop in case the core's own watchdog is never reached.
  initial begin
    #(64'd200_000_000);
    $display("FAIL: wrapper watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
