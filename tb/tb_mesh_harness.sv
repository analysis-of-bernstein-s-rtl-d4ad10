// tb_mesh_harness: end-to-end checker for routing_mesh_top, shared by the
// reduced-size and the default-size testbenches.
//
// It builds a random sparse matrix (every column has up to H nonzeros, a few
// entries unused so that column weights vary), random K-bit vectors (some
// columns all zero so that entries get skipped) and random weight-1/2
// selectors u_j, loads them through the host port, runs NMULT
// multiplications and checks
//   * every inner-product word u_j . (A^k v_i) against a reference product
//     computed here from the same matrix,
//   * the vectors left in the mesh after the run (A^NMULT v_i), read back
//     through the host port,
//   * the cycle count (fault-free mesh only): no routing operation may take
//     more than the 2*m clocks budget plus SLACK, and the whole run must fit
//     the bound that follows from it (the 2*m figure is an observation for
//     large meshes; on the small meshes simulated here single operations took
//     up to about 5*m clocks, so SLACK is generous),
//   * that each mechanism happened: exchange, combine, annihilation,
//     delivery, emission, zero-payload skip and, when a node is disabled,
//     blocked and forced exchanges around it.
// With DIS_ROW/DIS_COL >= 0 that node is closed off: its neighbours get the
// disabled flag towards it, it owns no columns and no message targets it.
// USE_DEFAULTS instantiates the design with no parameter overrides; the
// size parameters must then equal the design's defaults.
module tb_mesh_harness
  import mesh_pkg::*;
#(
  parameter int ROWS = 4, COLS = 4, RHO = 3, K = 4, H = 3, NU = 4,
  parameter int NMULT = 3,
  parameter int DIS_ROW = -1, DIS_COL = -1,
  parameter int SLACK = 24,
  parameter bit USE_DEFAULTS = 1'b0
) (
  output int checks,
  output int failures,
  output bit finished
);
  localparam int QDEPTH = H * RHO;
  localparam int RW = clog2_min1(ROWS), CW = clog2_min1(COLS), LW = clog2_min1(RHO);
  localparam int QAW = clog2_min1(QDEPTH), TAW = clog2_min1(2 * NU);
  localparam int AAW = (QAW > TAW) ? QAW : TAW;
  localparam int QW = 1 + LW + RW + CW + LW;
  localparam int LDW = (K > QW) ? K : QW;
  localparam int NODES = ROWS * COLS, D = NODES * RHO;
  localparam int M = (ROWS > COLS) ? ROWS : COLS;

  logic clk = 0, rst_n = 0;
  logic ld_we, start;
  ld_sel_e ld_sel;
  logic [RW-1:0] ld_row, host_rd_row;
  logic [CW-1:0] ld_col, host_rd_col;
  logic [AAW-1:0] ld_addr;
  logic [LDW-1:0] ld_data;
  logic [31:0] n_mult, mult_done;
  logic busy, done, ip_valid, over_budget;
  logic [TAW-1:0] ip_idx;
  logic [K-1:0] ip_y, host_rd_data;
  logic [LW-1:0] host_rd_c;
  logic [15:0] route_steps, route_max;
  logic [7:0] events;

  if (USE_DEFAULTS) begin : g_def
    routing_mesh_top dut (.*);
  end else begin : g_par
    routing_mesh_top #(.ROWS(ROWS), .COLS(COLS), .RHO(RHO), .K(K), .H(H), .NU(NU)) dut (.*);
  end

  always #5 clk = ~clk;

  // reference data
  int           q_src [NODES][QDEPTH];   // -1: unused entry, else local source column
  int           q_dst [NODES][QDEPTH];   // destination global column (= row index)
  logic [K-1:0] vec   [NMULT+1][D];
  int           u_pos [NU][2];           // -1: unused slot
  int           ev_cnt [8];
  string        ev_name [8] = '{"exchange", "combine", "annihilate", "forced", "blocked",
                                 "deliver", "emit", "skip"};
  int           nip, cycles, over_cnt;
  logic [K-1:0] pool [4];

  function automatic bit disabled(int node);
    return (node == DIS_ROW * COLS + DIS_COL) && DIS_ROW >= 0;
  endfunction

  function automatic int rand_live_col();
    int g;
    do g = $urandom_range(0, D - 1); while (disabled(g / RHO));
    return g;
  endfunction

  task automatic write(ld_sel_e s, int node, int addr, logic [LDW-1:0] data);
    ld_we = 1; ld_sel = s;
    ld_row = RW'(node / COLS); ld_col = CW'(node % COLS);
    ld_addr = AAW'(addr); ld_data = data;
    @(negedge clk);
    ld_we = 0;
  endtask

  function automatic logic [LDW-1:0] q_word(int src, int dst);
    int dn, dc;
    if (src < 0) return '0;
    dn = dst / RHO; dc = dst % RHO;
    return LDW'({1'b1, LW'(src), RW'(dn / COLS), CW'(dn % COLS), LW'(dc)});
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 8; e++) if (events[e] && busy) ev_cnt[e]++;
  end

  // inner-product stream check
  always @(posedge clk) if (rst_n && ip_valid) begin
    int k, j;
    logic [K-1:0] e;
    k = nip / NU + 1;
    j = nip % NU;
    e = '0;
    for (int s = 0; s < 2; s++) if (u_pos[j][s] >= 0) e ^= vec[k][u_pos[j][s]];
    checks++;
    if (ip_y !== e || int'(ip_idx) != j) begin
      failures++;
      if (failures < 10) $display("inner product k=%0d j=%0d got %h exp %h", k, j, ip_y, e);
    end
    nip++;
  end

  // routing-length statistics
  logic busy_q;
  logic [15:0] steps_q;
  always @(posedge clk) if (rst_n) begin
    if (busy) cycles++;
  end

  initial begin
    checks = 0; failures = 0; finished = 0; nip = 0; cycles = 0; over_cnt = 0;
    foreach (ev_cnt[e]) ev_cnt[e] = 0;
    ld_we = 0; start = 0; n_mult = 0; ld_sel = LD_Q; ld_row = 0; ld_col = 0; ld_addr = 0;
    ld_data = 0; host_rd_row = 0; host_rd_col = 0; host_rd_c = 0;
    // matrix
    for (int n = 0; n < NODES; n++)
      for (int e = 0; e < QDEPTH; e++) begin
        if (disabled(n) || $urandom_range(0, 7) == 0) q_src[n][e] = -1;
        else q_src[n][e] = e % RHO;
        q_dst[n][e] = rand_live_col();
      end
    // vectors and selectors
    // vectors are drawn from a small pool so that merged messages sometimes
    // cancel; index 0 of the pool is the zero vector
    for (int p = 0; p < 4; p++) begin
      pool[p] = '0;
      if (p > 0) while (pool[p] == '0) for (int b = 0; b < K; b++) pool[p][b] = 1'($urandom);
    end
    for (int g = 0; g < D; g++)
      vec[0][g] = disabled(g / RHO) ? '0 : pool[($urandom_range(0, 9) == 0) ? 0 : $urandom_range(1, 3)];
    for (int j = 0; j < NU; j++) begin
      u_pos[j][0] = rand_live_col();
      u_pos[j][1] = ($urandom_range(0, 1) == 1) ? rand_live_col() : -1;
    end
    // reference products
    for (int k = 1; k <= NMULT; k++) begin
      for (int g = 0; g < D; g++) vec[k][g] = '0;
      for (int n = 0; n < NODES; n++)
        for (int e = 0; e < QDEPTH; e++)
          if (q_src[n][e] >= 0) vec[k][q_dst[n][e]] ^= vec[k-1][n * RHO + q_src[n][e]];
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NODES; n++) begin
      logic [3:0] dis;
      int r, c;
      r = n / COLS; c = n % COLS;
      for (int e = 0; e < QDEPTH; e++) write(LD_Q, n, e, q_word(q_src[n][e], q_dst[n][e]));
      for (int s = 0; s < RHO; s++) write(LD_P, n, s, LDW'(vec[0][n * RHO + s]));
      dis = 4'b0000;
      if (DIS_ROW >= 0) begin
        if (disabled(n)) dis = 4'b1111;
        if (r == DIS_ROW + 1 && c == DIS_COL) dis[DIR_N] = 1'b1;
        if (r == DIS_ROW - 1 && c == DIS_COL) dis[DIR_S] = 1'b1;
        if (r == DIS_ROW && c == DIS_COL + 1) dis[DIR_W] = 1'b1;
        if (r == DIS_ROW && c == DIS_COL - 1) dis[DIR_E] = 1'b1;
      end
      write(LD_DIS, n, 0, LDW'(dis));
    end
    for (int j = 0; j < NU; j++)
      for (int s = 0; s < 2; s++) begin
        int g, dn;
        g = u_pos[j][s];
        dn = (g < 0) ? 0 : g / RHO;
        write(LD_U, 0, 2 * j + s,
              (g < 0) ? '0 : LDW'({1'b1, RW'(dn / COLS), CW'(dn % COLS), LW'(g % RHO)}));
      end

    // run
    n_mult = NMULT; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(posedge clk);
      if (busy && route_steps > 16'(2 * M)) ; // sampled below
    end
    @(negedge clk);

    checks++;
    if (mult_done != NMULT || nip != NMULT * NU) begin
      failures++;
      $display("multiplications %0d, inner-product words %0d", mult_done, nip);
    end
    // final vectors
    for (int g = 0; g < D; g++) begin
      int n;
      n = g / RHO;
      host_rd_row = RW'(n / COLS); host_rd_col = CW'(n % COLS); host_rd_c = LW'(g % RHO);
      #1;
      checks++;
      if (host_rd_data !== vec[NMULT][g]) begin
        failures++;
        if (failures < 10) $display("column %0d: got %h exp %h", g, host_rd_data, vec[NMULT][g]);
      end
    end
    // timing: routing within the 2m budget (plus slack) and the run within its bound
    checks++;
    if (DIS_ROW < 0 && int'(route_max) > 2 * M + SLACK) begin
      failures++;
      $display("longest routing operation %0d clocks, budget %0d", route_max, 2 * M);
    end
    checks++;
    if (DIS_ROW < 0 && cycles > NMULT * (2 + QDEPTH * (3 + 2 * M + SLACK) + 2 * NU + 2)) begin
      failures++;
      $display("run took %0d clocks", cycles);
    end
    $display("run: %0d clocks for %0d multiplications, longest routing %0d clocks (2m = %0d)%s",
             cycles, NMULT, route_max, 2 * M, over_budget ? ", budget exceeded" : "");
    // mechanisms
    for (int e = 0; e < 8; e++) begin
      bit needed;
      needed = (e == 3 || e == 4) ? (DIS_ROW >= 0) : 1'b1;
      $display("  %-10s happened in %0d clocks", ev_name[e], ev_cnt[e]);
      if (needed) begin
        checks++;
        if (ev_cnt[e] == 0) begin
          failures++;
          $display("mechanism '%s' never happened", ev_name[e]);
        end
      end
    end
    finished = 1;
  end
endmodule
