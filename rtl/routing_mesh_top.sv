// routing_mesh_top: matrix-by-vector multiplier for the linear-algebra step
// of the number field sieve, built as a mesh with clockwise transposition
// routing.
//
// The device holds a sparse D x D bit matrix A (D = ROWS*COLS*RHO, every
// column with at most H nonzeros) and K vectors v_1..v_K, and repeatedly
// replaces v_i by A v_i for all K chains of block Wiedemann at once.  Each of
// the ROWS*COLS nodes owns RHO columns.  A multiplication takes H*RHO
// iterations; in each, every node turns one of its matrix entries (r, c) into
// a message <r, P_1[c]..P_K[c]> and the mesh routes all messages to the nodes
// owning row r, where they are XORed into P'.  Messages with equal
// destinations that meet are merged.  After every multiplication the unit
// ip_unit outputs u_j . (A^k v_i) for every j, i (u_j of weight 1 or 2).
//
// Host interface (all synchronous to clk, active-low asynchronous reset):
//   * initialisation writes, one per clock while idle: ld_sel selects matrix
//     entries (LD_Q), vector bits (LD_P), disabled-neighbour bits (LD_DIS) of
//     node (ld_row, ld_col), or inner-product selector slots (LD_U);
//   * start (one clock) with n_mult runs n_mult multiplications; busy is high
//     meanwhile, done pulses at the end;
//   * ip_valid/ip_idx/ip_y stream K-bit inner-product words, NU per
//     multiplication;
//   * host_rd_* reads any P row combinationally while the device is idle.
// Default sizes: see the parameter comments.  Per-node sizes (RHO, K, H) are
// those of the single-wafer configuration; the mesh side is smaller than the
// 975 x 975 nodes of that configuration, see the README.
module routing_mesh_top
  import mesh_pkg::*;
#(
  parameter int unsigned ROWS   = 8,    // mesh rows (975 in the full device)
  parameter int unsigned COLS   = 8,    // mesh columns (975 in the full device)
  parameter int unsigned RHO    = 42,   // matrix columns per node
  parameter int unsigned K      = 208,  // chains (payload bits per message)
  parameter int unsigned H      = 100,  // nonzeros per matrix column
  parameter int unsigned NU     = K,    // selector vectors u_j
  parameter int unsigned NW     = 32,
  parameter int unsigned SW     = 16,
  parameter int unsigned QDEPTH = H * RHO,
  parameter int unsigned RW     = clog2_min1(ROWS),
  parameter int unsigned CW     = clog2_min1(COLS),
  parameter int unsigned LW     = clog2_min1(RHO),
  parameter int unsigned QAW    = clog2_min1(QDEPTH),
  parameter int unsigned TAW    = clog2_min1(2 * NU),
  parameter int unsigned AAW    = (QAW > TAW) ? QAW : TAW,
  parameter int unsigned QW     = 1 + LW + RW + CW + LW,
  parameter int unsigned LDW    = (K > QW) ? K : QW
) (
  input  logic            clk,
  input  logic            rst_n,
  // initialisation
  input  logic            ld_we,
  input  ld_sel_e         ld_sel,
  input  logic [RW-1:0]   ld_row,
  input  logic [CW-1:0]   ld_col,
  input  logic [AAW-1:0]  ld_addr,
  input  logic [LDW-1:0]  ld_data,
  // run control
  input  logic            start,
  input  logic [NW-1:0]   n_mult,
  output logic            busy,
  output logic            done,
  output logic [NW-1:0]   mult_done,
  // inner products
  output logic            ip_valid,
  output logic [TAW-1:0]  ip_idx,
  output logic [K-1:0]    ip_y,
  // direct read of the vectors
  input  logic [RW-1:0]   host_rd_row,
  input  logic [CW-1:0]   host_rd_col,
  input  logic [LW-1:0]   host_rd_c,
  output logic [K-1:0]    host_rd_data,
  // status
  output logic [SW-1:0]   route_steps,
  output logic [SW-1:0]   route_max,
  output logic            over_budget,
  output logic [7:0]      events  // {skip,sent,deliver,blocked,forced,annih,comb,xchg}
);
  localparam int unsigned BUDGET = 2 * ((ROWS > COLS) ? ROWS : COLS);

  node_cmd_e      cmd;
  phase_e         phase;
  logic           empty, ip_start, ip_done, ip_busy;
  logic [RW-1:0]  m_rd_row, ip_rd_row;
  logic [CW-1:0]  m_rd_col, ip_rd_col;
  logic [LW-1:0]  m_rd_c,   ip_rd_c;
  logic [K-1:0]   m_rd_data;
  logic           idle_ld;

  // Host writes are accepted only while no run is in progress.
  assign idle_ld = ld_we && !busy;

  mesh_ctrl #(.QDEPTH(QDEPTH), .BUDGET(BUDGET), .NW(NW), .SW(SW)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .n_mult      (n_mult),
    .mesh_empty  (empty),
    .ip_done     (ip_done),
    .cmd         (cmd),
    .phase       (phase),
    .ip_start    (ip_start),
    .busy        (busy),
    .done        (done),
    .mult_done   (mult_done),
    .route_steps (route_steps),
    .route_max   (route_max),
    .over_budget (over_budget)
  );

  mesh_array #(.ROWS(ROWS), .COLS(COLS), .RHO(RHO), .K(K), .QDEPTH(QDEPTH)) u_mesh (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd        (cmd),
    .phase      (phase),
    .ld_we      (idle_ld && ld_sel != LD_U),
    .ld_sel     (ld_sel),
    .ld_row     (ld_row),
    .ld_col     (ld_col),
    .ld_addr    (ld_addr[QAW-1:0]),
    .ld_data    (ld_data),
    .rd_row     (m_rd_row),
    .rd_col     (m_rd_col),
    .rd_c       (m_rd_c),
    .rd_data    (m_rd_data),
    .empty      (empty),
    .ev_xchg    (events[0]),
    .ev_comb    (events[1]),
    .ev_annih   (events[2]),
    .ev_forced  (events[3]),
    .ev_blocked (events[4]),
    .ev_deliver (events[5]),
    .ev_sent    (events[6]),
    .ev_skip    (events[7])
  );

  ip_unit #(.NU(NU), .K(K), .RW(RW), .CW(CW), .LW(LW)) u_ip (
    .clk      (clk),
    .rst_n    (rst_n),
    .tbl_we   (idle_ld && ld_sel == LD_U),
    .tbl_addr (ld_addr[TAW-1:0]),
    .tbl_data (ld_data[1+RW+CW+LW-1:0]),
    .start    (ip_start),
    .rd_row   (ip_rd_row),
    .rd_col   (ip_rd_col),
    .rd_c     (ip_rd_c),
    .rd_data  (m_rd_data),
    .y_valid  (ip_valid),
    .y_idx    (ip_idx),
    .y        (ip_y),
    .busy     (ip_busy),
    .ip_done  (ip_done)
  );

  // The single P read port serves the inner-product unit during a run and
  // the host otherwise.
  assign m_rd_row     = ip_busy ? ip_rd_row : host_rd_row;
  assign m_rd_col     = ip_busy ? ip_rd_col : host_rd_col;
  assign m_rd_c       = ip_busy ? ip_rd_c   : host_rd_c;
  assign host_rd_data = m_rd_data;

endmodule
