// mesh_array: the ROWS x COLS grid of mesh nodes and their compare-exchange
// elements.
//
// Every pair of vertically or horizontally adjacent nodes has a cx_pair.  The
// clockwise transposition schedule activates a quarter of them per step:
//   PH_UP    vertical pairs whose upper node is on an even row (rows from 1),
//            i.e. every odd row talks to the row above it;
//   PH_RIGHT horizontal pairs whose left node is on an odd column;
//   PH_DOWN  vertical pairs whose upper node is on an odd row;
//   PH_LEFT  horizontal pairs whose left node is on an even column.
// Each node therefore meets its four neighbours in clockwise order, and a
// node with no partner in the current step keeps its message.  The schedule
// follows the source design; the global empty flag (an OR of all message
// valid bits, used by the sequencer to end a routing operation) and the
// addressed host port are this design's choices.
//
// Interface: cmd/phase come from the sequencer and are applied on the next
// clock edge.  Host writes select one node by (ld_row, ld_col).  rd_row,
// rd_col, rd_c select one P row, shown combinationally on rd_data.  The ev_*
// outputs say whether the named event happened anywhere in the current clock.
// Requires ROWS >= 2 and COLS >= 2.
module mesh_array
  import mesh_pkg::*;
#(
  parameter int unsigned ROWS   = 8,
  parameter int unsigned COLS   = 8,
  parameter int unsigned RHO    = 42,
  parameter int unsigned K      = 208,
  parameter int unsigned QDEPTH = 4200,
  parameter int unsigned RW     = clog2_min1(ROWS),
  parameter int unsigned CW     = clog2_min1(COLS),
  parameter int unsigned LW     = clog2_min1(RHO),
  parameter int unsigned QAW    = clog2_min1(QDEPTH),
  parameter int unsigned QW     = 1 + LW + RW + CW + LW,
  parameter int unsigned PW     = 1 + RW + CW + LW + K,
  parameter int unsigned LDW    = (K > QW) ? K : QW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  node_cmd_e       cmd,
  input  phase_e          phase,
  input  logic            ld_we,
  input  ld_sel_e         ld_sel,
  input  logic [RW-1:0]   ld_row,
  input  logic [CW-1:0]   ld_col,
  input  logic [QAW-1:0]  ld_addr,
  input  logic [LDW-1:0]  ld_data,
  input  logic [RW-1:0]   rd_row,
  input  logic [CW-1:0]   rd_col,
  input  logic [LW-1:0]   rd_c,
  output logic [K-1:0]    rd_data,
  output logic            empty,      // no message anywhere in the mesh
  output logic            ev_xchg,
  output logic            ev_comb,
  output logic            ev_annih,
  output logic            ev_forced,
  output logic            ev_blocked,
  output logic            ev_deliver,
  output logic            ev_sent,
  output logic            ev_skip
);
  localparam int unsigned AW = (RW > CW) ? RW : CW;

  logic [PW-1:0] rq   [ROWS][COLS];  // message registers
  logic [PW-1:0] rin  [ROWS][COLS];  // message after this step
  logic [3:0]    dis  [ROWS][COLS];
  logic [K-1:0]  pd   [ROWS][COLS];
  logic [PW-1:0] vqa  [ROWS-1][COLS], vqb [ROWS-1][COLS];
  logic [PW-1:0] hqa  [ROWS][COLS-1], hqb [ROWS][COLS-1];
  logic          vact [ROWS-1][COLS], hact [ROWS][COLS-1];
  logic [4:0]    vev  [ROWS-1][COLS], hev  [ROWS][COLS-1];
  logic [2:0]    nev  [ROWS][COLS];
  logic          route;

  assign route = (cmd == NC_ROUTE);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      mesh_node #(
        .ROWS(ROWS), .COLS(COLS), .RHO(RHO), .K(K), .QDEPTH(QDEPTH),
        .MY_ROW(r), .MY_COL(c)
      ) u_node (
        .clk        (clk),
        .rst_n      (rst_n),
        .cmd        (cmd),
        .r_in       (rin[r][c]),
        .r_q        (rq[r][c]),
        .dis_q      (dis[r][c]),
        .ld_we      (ld_we),
        .ld_hit     ((32'(ld_row) == r) && (32'(ld_col) == c)),
        .ld_sel     (ld_sel),
        .ld_addr    (ld_addr),
        .ld_data    (ld_data),
        .rd_c       (rd_c),
        .rd_data    (pd[r][c]),
        .ev_deliver (nev[r][c][0]),
        .ev_sent    (nev[r][c][1]),
        .ev_skip    (nev[r][c][2])
      );

      // Vertical pair between row r (upper, "a") and row r+1.
      if (r < ROWS - 1) begin : g_v
        assign vact[r][c] = route && (((r % 2) == 1) ? (phase == PH_UP) : (phase == PH_DOWN));
        cx_pair #(.RW(RW), .CW(CW), .LW(LW), .K(K), .HORIZ(1'b0)) u_v (
          .pa(rq[r][c]), .pb(rq[r+1][c]), .pos_a(AW'(r)),
          .dis_a(dis[r][c]), .dis_b(dis[r+1][c]),
          .qa(vqa[r][c]), .qb(vqb[r][c]),
          .xchg(vev[r][c][0]), .comb(vev[r][c][1]), .annih(vev[r][c][2]),
          .forced(vev[r][c][3]), .blocked(vev[r][c][4])
        );
      end
      // Horizontal pair between column c (left, "a") and column c+1.
      if (c < COLS - 1) begin : g_h
        assign hact[r][c] = route && (((c % 2) == 0) ? (phase == PH_RIGHT) : (phase == PH_LEFT));
        cx_pair #(.RW(RW), .CW(CW), .LW(LW), .K(K), .HORIZ(1'b1)) u_h (
          .pa(rq[r][c]), .pb(rq[r][c+1]), .pos_a(AW'(c)),
          .dis_a(dis[r][c]), .dis_b(dis[r][c+1]),
          .qa(hqa[r][c]), .qb(hqb[r][c]),
          .xchg(hev[r][c][0]), .comb(hev[r][c][1]), .annih(hev[r][c][2]),
          .forced(hev[r][c][3]), .blocked(hev[r][c][4])
        );
      end

      // Message this node keeps after the current step.
      always_comb begin
        rin[r][c] = rq[r][c];
        unique case (phase)
          PH_UP: begin
            if ((r % 2) == 0 && r > 0)             rin[r][c] = vqb[(r>0)?r-1:0][c];
            else if ((r % 2) == 1 && r < ROWS - 1) rin[r][c] = vqa[(r<ROWS-1)?r:0][c];
          end
          PH_DOWN: begin
            if ((r % 2) == 0 && r < ROWS - 1)      rin[r][c] = vqa[(r<ROWS-1)?r:0][c];
            else if ((r % 2) == 1)                 rin[r][c] = vqb[(r>0)?r-1:0][c];
          end
          PH_RIGHT: begin
            if ((c % 2) == 0 && c < COLS - 1)      rin[r][c] = hqa[r][(c<COLS-1)?c:0];
            else if ((c % 2) == 1)                 rin[r][c] = hqb[r][(c>0)?c-1:0];
          end
          PH_LEFT: begin
            if ((c % 2) == 1 && c < COLS - 1)      rin[r][c] = hqa[r][(c<COLS-1)?c:0];
            else if ((c % 2) == 0 && c > 0)        rin[r][c] = hqb[r][(c>0)?c-1:0];
          end
          default: ;
        endcase
      end
    end
  end

  // Global reductions.
  always_comb begin
    logic any_v;
    logic [4:0] pe;
    logic [2:0] ne;
    any_v = 1'b0;
    pe    = '0;
    ne    = '0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        any_v = any_v | rq[r][c][PW-1];
        ne    = ne | nev[r][c];
        if (r < ROWS - 1 && vact[r][c]) pe = pe | vev[r][c];
        if (c < COLS - 1 && hact[r][c]) pe = pe | hev[r][c];
      end
    end
    empty      = ~any_v;
    ev_xchg    = pe[0];
    ev_comb    = pe[1];
    ev_annih   = pe[2];
    ev_forced  = pe[3];
    ev_blocked = pe[4];
    ev_deliver = ne[0];
    ev_sent    = ne[1];
    ev_skip    = ne[2];
  end

  assign rd_data = pd[rd_row][rd_col];

endmodule
