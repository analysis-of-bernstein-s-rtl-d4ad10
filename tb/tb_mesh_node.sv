// tb_mesh_node: self-checking test of one mesh node (row 1, column 2 of a
// 4 x 4 mesh, 3 columns per node, 4 chains, 6 list entries).
// Random rounds: load a random entry list and vectors, CLEAR, then
// interleave LOADs with ROUTE clocks that hand the node random messages
// (some addressed to it), COMMIT, and compare the message register after every
// clock and the P rows after commit with a model kept here.  Also checks the
// disabled-neighbour bits and that NC_IDLE holds the state.
module tb_mesh_node;
  import mesh_pkg::*;
  localparam int ROWS = 4, COLS = 4, RHO = 3, K = 4, QDEPTH = 6, MY_ROW = 1, MY_COL = 2;
  localparam int RW = 2, CW = 2, LW = 2, QAW = 3;
  localparam int QW = 1 + LW + RW + CW + LW, PW = 1 + RW + CW + LW + K;
  localparam int LDW = (K > QW) ? K : QW;

  logic clk = 0, rst_n = 0;
  node_cmd_e cmd;
  logic [PW-1:0] r_in, r_q;
  logic [3:0] dis_q;
  logic ld_we, ld_hit;
  ld_sel_e ld_sel;
  logic [QAW-1:0] ld_addr;
  logic [LDW-1:0] ld_data;
  logic [LW-1:0] rd_c;
  logic [K-1:0] rd_data;
  logic ev_deliver, ev_sent, ev_skip;
  int checks = 0, failures = 0, n_abs = 0, n_sent = 0, n_skip = 0;

  mesh_node #(.ROWS(ROWS), .COLS(COLS), .RHO(RHO), .K(K), .QDEPTH(QDEPTH),
              .MY_ROW(MY_ROW), .MY_COL(MY_COL)) dut (.*);

  always #5 clk = ~clk;

  logic [QW-1:0] q [QDEPTH];
  logic [K-1:0]  p [RHO], pn [RHO];
  logic [PW-1:0] r_exp;
  int            idx;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL at %0t: %s", $time, m);
  endtask

  function automatic bit is_mine(logic [PW-1:0] m);
    return m[PW-1] && m[PW-2 -: RW] == RW'(MY_ROW) && m[PW-2-RW -: CW] == CW'(MY_COL) &&
           int'(m[K +: LW]) < RHO;
  endfunction

  task automatic absorb(logic [PW-1:0] m);
    pn[int'(m[K +: LW])] ^= m[K-1:0];
    n_abs++;
  endtask

  task automatic step(node_cmd_e c, logic [PW-1:0] rin);
    cmd = c; r_in = rin;
    @(negedge clk);
    cmd = NC_IDLE;
    checks++;
    if (r_q !== r_exp) fail($sformatf("R got %h exp %h (cmd %s)", r_q, r_exp, c.name()));
  endtask

  initial begin
    cmd = NC_IDLE; r_in = '0; ld_we = 0; ld_hit = 0; ld_sel = LD_Q; ld_addr = 0; ld_data = 0; rd_c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    r_exp = '0;
    for (int round = 0; round < 200; round++) begin
      // host writes (ld_hit low on some of them: must be ignored)
      for (int e = 0; e < QDEPTH; e++) begin
        q[e] = QW'($urandom);
        if ($urandom_range(0, 3) == 0) q[e][QW-4 -: RW+CW] = {RW'(MY_ROW), CW'(MY_COL)};
        ld_we = 1; ld_hit = 1; ld_sel = LD_Q; ld_addr = QAW'(e); ld_data = LDW'(q[e]);
        @(negedge clk);
      end
      for (int c = 0; c < RHO; c++) begin
        p[c] = ($urandom_range(0, 4) == 0) ? '0 : K'($urandom);
        ld_sel = LD_P; ld_addr = QAW'(c); ld_data = LDW'(p[c]);
        @(negedge clk);
      end
      ld_sel = LD_P; ld_hit = 0; ld_addr = 0; ld_data = LDW'(4'hf); @(negedge clk);  // not for us
      ld_hit = 1; ld_sel = LD_DIS; ld_data = LDW'(round % 16); @(negedge clk);
      ld_we = 0;
      checks++;
      if (dis_q !== 4'(round % 16)) fail("disabled bits");
      // multiplication
      r_exp = '0;
      step(NC_CLEAR, '0);
      for (int c = 0; c < RHO; c++) pn[c] = '0;
      idx = 0;
      for (int it = 0; it < QDEPTH; it++) begin
        logic [QW-1:0] e;
        logic [PW-1:0] m;
        int src;
        e = q[idx];
        src = int'(e[QW-2 -: LW]);
        m = {1'b1, e[RW+CW+LW-1:0], (src < RHO) ? p[src] : K'(0)};
        if (!e[QW-1] || m[K-1:0] == '0) begin
          r_exp = '0;
          if (e[QW-1]) n_skip++;
        end else if (is_mine(m)) begin
          absorb(m); r_exp = '0;
        end else begin
          r_exp = m; n_sent++;
        end
        idx++;
        step(NC_LOAD, PW'($urandom));
        for (int s = 0; s < $urandom_range(1, 4); s++) begin
          logic [PW-1:0] rin;
          rin = PW'($urandom);
          if ($urandom_range(0, 1) == 0) rin[PW-2 -: RW+CW] = {RW'(MY_ROW), CW'(MY_COL)};
          if (is_mine(rin)) begin absorb(rin); r_exp = '0; end
          else r_exp = rin;
          step(NC_ROUTE, rin);
        end
        step(NC_IDLE, PW'($urandom));  // idle holds R
      end
      step(NC_COMMIT, '0);
      for (int c = 0; c < RHO; c++) begin
        rd_c = LW'(c); #1;
        checks++;
        if (rd_data !== pn[c]) fail($sformatf("P[%0d] got %h exp %h", c, rd_data, pn[c]));
      end
    end
    checks++;
    if (n_abs == 0 || n_sent == 0 || n_skip == 0) fail("coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
