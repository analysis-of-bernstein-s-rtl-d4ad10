// tb_routing_mesh_top: end-to-end test of the whole device at reduced size.
// Two independent harness runs: a fault-free 6 x 6 mesh, and a 6 x 5 mesh in
// which one interior node is closed off and messages must be routed around
// it.  See tb_mesh_harness for what is checked.
module tb_routing_mesh_top;
  int c0, f0, c1, f1;
  bit d0, d1;
  int cycles = 0;

  tb_mesh_harness #(.ROWS(6), .COLS(6), .RHO(3), .K(5), .H(4), .NU(5), .NMULT(3)) u_plain (
    .checks(c0), .failures(f0), .finished(d0));
  tb_mesh_harness #(.ROWS(6), .COLS(5), .RHO(2), .K(4), .H(5), .NU(4), .NMULT(3),
                    .DIS_ROW(2), .DIS_COL(2)) u_fault (
    .checks(c1), .failures(f1), .finished(d1));

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin
    #5_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
