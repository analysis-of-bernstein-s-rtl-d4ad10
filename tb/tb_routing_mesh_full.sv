// tb_routing_mesh_full: the device at its default sizes (8 x 8 nodes, 42
// columns per node, 208 chains, 100 nonzeros per column: a 2688-column
// matrix with up to 268,800 nonzeros), taken through two complete
// multiplications with the inner-product read-out after each.  See
// tb_mesh_harness for what is checked.
module tb_routing_mesh_full;
  int c0, f0;
  bit d0;

  tb_mesh_harness #(.ROWS(8), .COLS(8), .RHO(42), .K(208), .H(100), .NU(208), .NMULT(2),
                    .USE_DEFAULTS(1'b1)) u_full (
    .checks(c0), .failures(f0), .finished(d0));

  initial begin
    wait (d0);
    $display("TB_RESULT checks=%0d failures=%0d", c0, f0);
    $finish;
  end

  initial begin
    #200_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0, f0 + 1);
    $finish;
  end
endmodule
