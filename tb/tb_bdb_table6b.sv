// tb_bdb_table6b: the remaining matrix sizes of the speed-up measurements
// (30x30, 36x36, 42x42 and 54x54), again with five diagonal blocks, one
// per computation processor. The split is this testbench's choice, equal
// blocks with a last block of the same size:
//   30 = 5 x 5 + 5      36 = 5 x 6 + 6      42 = 5 x 7 + 7      54 = 5 x 9 + 9
// None of these block sizes is a power of two (compare tb_bdb_table6). The
// matrices are synthetic (random sparse, diagonally dominant); the four
// sizes run on four machines side by side at default parameters, and each
// must reproduce its known solution.
module tb_bdb_table6b;
  logic d30, d36, d42, d54;
  int   c30, c36, c42, c54, f30, f36, f42, f54;

  bdb_harness #(.BS('{'{5, 0, 0}, '{5, 0, 0}, '{5, 0, 0}, '{5, 0, 0}, '{5, 0, 0}}), .M(5), .NAME("n30"))
    u_n30 (.done(d30), .checks(c30), .failures(f30));
  bdb_harness #(.BS('{'{6, 0, 0}, '{6, 0, 0}, '{6, 0, 0}, '{6, 0, 0}, '{6, 0, 0}}), .M(6), .NAME("n36"))
    u_n36 (.done(d36), .checks(c36), .failures(f36));
  bdb_harness #(.BS('{'{7, 0, 0}, '{7, 0, 0}, '{7, 0, 0}, '{7, 0, 0}, '{7, 0, 0}}), .M(7), .NAME("n42"))
    u_n42 (.done(d42), .checks(c42), .failures(f42));
  bdb_harness #(.BS('{'{9, 0, 0}, '{9, 0, 0}, '{9, 0, 0}, '{9, 0, 0}, '{9, 0, 0}}), .M(9), .NAME("n54"))
    u_n54 (.done(d54), .checks(c54), .failures(f54));

  initial begin
    wait (d30 && d36 && d42 && d54);
    $display("TB_RESULT checks=%0d failures=%0d", c30 + c36 + c42 + c54, f30 + f36 + f42 + f54);
    $finish;
  end

  initial begin
    #100ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c30 + c36 + c42 + c54, f30 + f36 + f42 + f54 + 1);
    $finish;
  end
endmodule
