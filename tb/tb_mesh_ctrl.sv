// tb_mesh_ctrl: self-checking test of the sequencer.
// A behavioural stand-in for the mesh becomes empty a random number of
// routing clocks after each load, and a stand-in inner-product unit answers
// ip_start after a random delay.  The test follows the command stream and
// checks: CLEAR opens every multiplication, exactly QDEPTH LOADs follow, each
// LOAD is followed by ROUTE clocks whose phases run UP, RIGHT, DOWN, LEFT from
// UP, routing stops exactly when the mesh is empty, COMMIT closes the
// multiplication, n_mult multiplications are done, and the step statistics
// (last, maximum, over-budget flag) match.
module tb_mesh_ctrl;
  import mesh_pkg::*;
  localparam int QDEPTH = 5, BUDGET = 6, NW = 8, SW = 8;
  logic clk = 0, rst_n = 0, start, mesh_empty, ip_done;
  logic [NW-1:0] n_mult, mult_done;
  node_cmd_e cmd;
  phase_e phase;
  logic ip_start, busy, done, over_budget;
  logic [SW-1:0] route_steps, route_max;
  int checks = 0, failures = 0;
  int remaining, nload, nroute, nclear, ncommit, ndone, exp_max, last, ipdelay;
  bit exp_over;

  mesh_ctrl #(.QDEPTH(QDEPTH), .BUDGET(BUDGET), .NW(NW), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL at %0t: %s", $time, m);
  endtask

  assign mesh_empty = (remaining == 0);

  // stand-in mesh and inner-product unit, plus the protocol checks
  always @(posedge clk) if (rst_n) begin
    ip_done <= 1'b0;
    if (ipdelay > 0) begin
      ipdelay <= ipdelay - 1;
      if (ipdelay == 1) ip_done <= 1'b1;
    end
    unique case (cmd)
      NC_CLEAR: begin
        checks++;
        if (nload != 0) fail("clear in the middle of a multiplication");
        nclear++;
      end
      NC_LOAD: begin
        nload++;
        last = $urandom_range(0, 10);
        if (last > exp_max) exp_max = last;
        if (last > BUDGET) exp_over = 1;
        remaining <= last;
        nroute = 0;
      end
      NC_ROUTE: begin
        checks++;
        if (phase != phase_e'(nroute % 4)) fail("phase order");
        if (remaining == 0) fail("route on empty mesh");
        nroute++;
        remaining <= remaining - 1;
      end
      NC_COMMIT: begin
        checks++;
        if (nload != QDEPTH) fail($sformatf("commit after %0d loads", nload));
        if (!ip_start) fail("no ip_start with commit");
        checks++;
        if (route_steps != SW'(last)) fail("route_steps");
        ncommit++;
        nload = 0;
        ipdelay <= $urandom_range(1, 7);
      end
      default: ;
    endcase
    if (done) ndone++;
  end

  initial begin
    start = 0; n_mult = 0; remaining = 0; nload = 0; nclear = 0; ncommit = 0; ndone = 0;
    exp_max = 0; exp_over = 0; ipdelay = 0; ip_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 1; run <= 4; run++) begin
      @(negedge clk);
      n_mult = NW'(run); start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!busy) fail("not busy after start");
      wait (done);
      @(negedge clk);
      checks++;
      if (ncommit != run * (run + 1) / 2 || mult_done != NW'(run))
        fail($sformatf("run %0d: commits %0d mult_done %0d", run, ncommit, mult_done));
      checks++;
      if (route_max != SW'(exp_max) || over_budget != exp_over) fail("statistics");
      checks++;
      if (busy) fail("still busy after done");
    end
    @(negedge clk);
    checks++;
    if (ndone != 4 || nclear != 10) fail($sformatf("done %0d clears %0d", ndone, nclear));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
