// tb_bdb_table6: parallel solves of the matrix sizes used to measure the
// machine's speed-up over one processor (24x24 up to 102x102), with as many
// diagonal blocks as computation processors (five). How each size is split
// between the five blocks and the last block is this testbench's choice:
//   24  = 5 x 4  + 4      48 = 5 x 8  + 8      96 = 5 x 16 + 16
//   102 = 5 x 18 + 12
// The first three give every processor a power-of-two block. The matrices
// are synthetic (random sparse, diagonally dominant); the four sizes run on
// four machines side by side at default parameters, and each must reproduce
// its known solution.
module tb_bdb_table6;
  logic d24, d48, d96, d102;
  int   c24, c48, c96, c102, f24, f48, f96, f102;

  bdb_harness #(.BS('{'{4, 0, 0}, '{4, 0, 0}, '{4, 0, 0}, '{4, 0, 0}, '{4, 0, 0}}), .M(4), .NAME("n24"))
    u_n24 (.done(d24), .checks(c24), .failures(f24));
  bdb_harness #(.BS('{'{8, 0, 0}, '{8, 0, 0}, '{8, 0, 0}, '{8, 0, 0}, '{8, 0, 0}}), .M(8), .NAME("n48"))
    u_n48 (.done(d48), .checks(c48), .failures(f48));
  bdb_harness #(.BS('{'{16, 0, 0}, '{16, 0, 0}, '{16, 0, 0}, '{16, 0, 0}, '{16, 0, 0}}), .M(16), .NAME("n96"))
    u_n96 (.done(d96), .checks(c96), .failures(f96));
  bdb_harness #(.BS('{'{18, 0, 0}, '{18, 0, 0}, '{18, 0, 0}, '{18, 0, 0}, '{18, 0, 0}}), .M(12), .NAME("n102"))
    u_n102 (.done(d102), .checks(c102), .failures(f102));

  initial begin
    wait (d24 && d48 && d96 && d102);
    $display("TB_RESULT checks=%0d failures=%0d", c24 + c48 + c96 + c102, f24 + f48 + f96 + f102);
    $finish;
  end

  initial begin
    #200ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c24 + c48 + c96 + c102, f24 + f48 + f96 + f102 + 1);
    $finish;
  end
endmodule
