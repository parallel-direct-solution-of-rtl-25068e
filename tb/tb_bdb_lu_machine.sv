// tb_bdb_lu_machine: end-to-end test of the whole machine at its default
// parameters. One complete solve of a small Bordered-Diagonal-Block system
// (N = 18: processor 1 holds two 3-block groups of size 2, processors 2-5
// one group each, last block of size 3) runs through bdb_harness: the
// control processor loads the matrix, the five computation processors factor
// and solve it with pairwise accumulation through on-chip RAM, and the
// result is checked against the known solution. Every mechanism of the
// machine must occur at least once.
module tb_bdb_lu_machine;
  logic done;
  int   checks, failures;

  bdb_harness #(
    .BS  ('{'{2, 2, 0}, '{3, 0, 0}, '{3, 0, 0}, '{2, 0, 0}, '{3, 0, 0}}),
    .M   (3),
    .NAME("small")
  ) u_run (.done, .checks, .failures);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
