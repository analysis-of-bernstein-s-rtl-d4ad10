// tb_mesh_array: self-checking test of the node grid with its
// compare-exchange elements, driven directly (no sequencer).
// A 5 x 3 mesh (odd sizes, so every border case of the schedule occurs) gets
// a random matrix and vectors; the test issues CLEAR, then per list entry a
// LOAD followed by ROUTE clocks with phases UP, RIGHT, DOWN, LEFT until the
// empty flag rises, then COMMIT, and compares every P row with A*v computed
// here.  On every ROUTE clock it also checks that the number of messages in
// the mesh never grows and that the empty flag matches the message count.
module tb_mesh_array;
  import mesh_pkg::*;
  localparam int ROWS = 5, COLS = 3, RHO = 2, K = 3, QDEPTH = 6;
  localparam int RW = 3, CW = 2, LW = 1, QAW = 3;
  localparam int QW = 1 + LW + RW + CW + LW, PW = 1 + RW + CW + LW + K;
  localparam int LDW = (K > QW) ? K : QW;
  localparam int NODES = ROWS * COLS, D = NODES * RHO;

  logic clk = 0, rst_n = 0;
  node_cmd_e cmd;
  phase_e phase;
  logic ld_we;
  ld_sel_e ld_sel;
  logic [RW-1:0] ld_row, rd_row;
  logic [CW-1:0] ld_col, rd_col;
  logic [QAW-1:0] ld_addr;
  logic [LDW-1:0] ld_data;
  logic [LW-1:0] rd_c;
  logic [K-1:0] rd_data;
  logic empty, ev_xchg, ev_comb, ev_annih, ev_forced, ev_blocked, ev_deliver, ev_sent, ev_skip;
  int checks = 0, failures = 0, n_x = 0, n_c = 0, n_d = 0;

  mesh_array #(.ROWS(ROWS), .COLS(COLS), .RHO(RHO), .K(K), .QDEPTH(QDEPTH)) dut (.*);

  always #5 clk = ~clk;

  int           src [NODES][QDEPTH], dst [NODES][QDEPTH];
  logic [K-1:0] v [D], w [D];

  function automatic int count_msgs();
    int n = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) n += dut.rq[r][c][PW-1];
    return n;
  endfunction

  task automatic write(ld_sel_e s, int node, int addr, logic [LDW-1:0] data);
    ld_we = 1; ld_sel = s; ld_row = RW'(node / COLS); ld_col = CW'(node % COLS);
    ld_addr = QAW'(addr); ld_data = data;
    @(negedge clk);
    ld_we = 0;
  endtask

  initial begin
    cmd = NC_IDLE; phase = PH_UP; ld_we = 0; ld_sel = LD_Q; ld_row = 0; ld_col = 0;
    ld_addr = 0; ld_data = 0; rd_row = 0; rd_col = 0; rd_c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 30; round++) begin
      for (int n = 0; n < NODES; n++) begin
        for (int e = 0; e < QDEPTH; e++) begin
          int dn;
          src[n][e] = ($urandom_range(0, 5) == 0) ? -1 : $urandom_range(0, RHO - 1);
          dst[n][e] = $urandom_range(0, D - 1);
          dn = dst[n][e] / RHO;
          write(LD_Q, n, e, (src[n][e] < 0) ? '0 :
                LDW'({1'b1, LW'(src[n][e]), RW'(dn / COLS), CW'(dn % COLS), LW'(dst[n][e] % RHO)}));
        end
        for (int s = 0; s < RHO; s++) begin
          v[n * RHO + s] = K'($urandom);
          write(LD_P, n, s, LDW'(v[n * RHO + s]));
        end
        write(LD_DIS, n, 0, '0);
      end
      for (int g = 0; g < D; g++) w[g] = '0;
      for (int n = 0; n < NODES; n++)
        for (int e = 0; e < QDEPTH; e++)
          if (src[n][e] >= 0) w[dst[n][e]] ^= v[n * RHO + src[n][e]];

      cmd = NC_CLEAR; @(negedge clk);
      cmd = NC_IDLE;  @(negedge clk);
      for (int e = 0; e < QDEPTH; e++) begin
        int steps, n_before, n_after;
        cmd = NC_LOAD; @(negedge clk);
        steps = 0;
        while (!empty) begin
          n_before = count_msgs();
          cmd = NC_ROUTE; phase = phase_e'(steps % 4);
          #1;
          n_x += ev_xchg; n_c += ev_comb; n_d += ev_deliver;
          @(negedge clk);
          n_after = count_msgs();
          checks++;
          if (n_after > n_before) begin
            failures++;
            $display("messages grew from %0d to %0d", n_before, n_after);
          end
          steps++;
          if (steps > 1000) begin
            failures++;
            $display("routing does not end");
            break;
          end
        end
        cmd = NC_IDLE;
        checks++;
        if (count_msgs() != 0) begin failures++; $display("empty flag wrong"); end
        @(negedge clk);
      end
      cmd = NC_COMMIT; @(negedge clk);
      cmd = NC_IDLE;
      for (int g = 0; g < D; g++) begin
        int n;
        n = g / RHO;
        rd_row = RW'(n / COLS); rd_col = CW'(n % COLS); rd_c = LW'(g % RHO);
        #1;
        checks++;
        if (rd_data !== w[g]) begin
          failures++;
          if (failures < 10) $display("column %0d got %h exp %h", g, rd_data, w[g]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_x == 0 || n_c == 0 || n_d == 0) begin failures++; $display("coverage %0d %0d %0d", n_x, n_c, n_d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
