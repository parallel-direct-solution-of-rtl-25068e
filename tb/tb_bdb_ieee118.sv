// tb_bdb_ieee118: the three orderings of a 118-equation system (the size of
// the IEEE 118-bus power network) that node tearing gives for five
// computation processors, solved end to end on the machine at its default
// parameters. Diagonal-block sizes per processor and last-block sizes:
//   case 1: 23 | 24 | 22 | 20 | 20, last block 9  (one group each)
//   case 2: 8,12 | 8,12 | 10,10 | 10,12 | 10,10, last block 16
//   case 3: 6,7,7 | 4,7,7 | 5,7,7 | 6,6,6 | 4,7,7, last block 25
// The matrices are synthetic (random sparse, diagonally dominant, in BDB
// form with these block sizes); the network's own admittance values are
// not used. The three cases run on three machines side by side; each must
// reproduce the known solution, and the cycle counts are reported.
module tb_bdb_ieee118;
  logic done1, done2, done3;
  int   c1, c2, c3, f1, f2, f3;

  bdb_harness #(
    .BS  ('{'{23, 0, 0}, '{24, 0, 0}, '{22, 0, 0}, '{20, 0, 0}, '{20, 0, 0}}),
    .M   (9),
    .NAME("case1")
  ) u_case1 (.done(done1), .checks(c1), .failures(f1));

  bdb_harness #(
    .BS  ('{'{8, 12, 0}, '{8, 12, 0}, '{10, 10, 0}, '{10, 12, 0}, '{10, 10, 0}}),
    .M   (16),
    .NAME("case2")
  ) u_case2 (.done(done2), .checks(c2), .failures(f2));

  bdb_harness #(
    .BS  ('{'{6, 7, 7}, '{4, 7, 7}, '{5, 7, 7}, '{6, 6, 6}, '{4, 7, 7}}),
    .M   (25),
    .NAME("case3")
  ) u_case3 (.done(done3), .checks(c3), .failures(f3));

  initial begin
    wait (done1 && done2 && done3);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3);
    $finish;
  end

  initial begin
    #200ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
