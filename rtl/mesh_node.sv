// mesh_node: one node of the routing mesh.
//
// The node owns RHO consecutive matrix columns.  For each of them it keeps K
// bits of the current vectors, P[c] (one bit per chain), and K bits of the
// product being accumulated, P'[c].  It also keeps the list Q of the nonzero
// matrix entries of its columns (in node_ram) with an index I into that list,
// and one message register R.
//
// Sequencer commands (broadcast to all nodes, one per clock):
//   NC_CLEAR  : P' <- 0, I <- 0, R <- empty.
//   NC_LOAD   : take entry Q[I] = (source column s, destination d), I <- I+1 and
//               put the message <d, P[s]> into R.  An unused entry or a zero
//               payload sends nothing.  A message for this node itself is
//               absorbed at once.
//   NC_ROUTE  : R <- r_in, the message the mesh hands back after this step's
//               compare-exchange.  A message whose destination is this node
//               is absorbed instead: P'[c] <- P'[c] XOR payload, R <- empty.
//   NC_COMMIT : P <- P' (the product becomes the next multiplicand).
// The register set and the absorb/XOR rule follow the source design; the
// command encoding, skipping zero-payload entries and the one-cycle absorb
// path are choices of this design.
//
// Host port: ld_hit qualifies a write to this node: LD_Q writes list entry
// ld_addr, LD_P writes P[ld_addr], LD_DIS the four disabled-neighbour bits.
// rd_c selects the P row shown on rd_data (combinational).
// The entry read is registered, so the entry for I is ready one clock after I
// changes; the sequencer never issues two NC_LOADs back to back.
module mesh_node
  import mesh_pkg::*;
#(
  parameter int unsigned ROWS    = 8,
  parameter int unsigned COLS    = 8,
  parameter int unsigned RHO     = 42,
  parameter int unsigned K       = 208,
  parameter int unsigned QDEPTH  = 4200,
  parameter int unsigned MY_ROW  = 0,
  parameter int unsigned MY_COL  = 0,
  parameter int unsigned RW      = clog2_min1(ROWS),
  parameter int unsigned CW      = clog2_min1(COLS),
  parameter int unsigned LW      = clog2_min1(RHO),
  parameter int unsigned QAW     = clog2_min1(QDEPTH),
  parameter int unsigned QW      = 1 + LW + RW + CW + LW,
  parameter int unsigned PW      = 1 + RW + CW + LW + K,
  parameter int unsigned LDW     = (K > QW) ? K : QW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  node_cmd_e       cmd,
  input  logic [PW-1:0]   r_in,
  output logic [PW-1:0]   r_q,
  output logic [3:0]      dis_q,
  input  logic            ld_we,
  input  logic            ld_hit,
  input  ld_sel_e         ld_sel,
  input  logic [QAW-1:0]  ld_addr,
  input  logic [LDW-1:0]  ld_data,
  input  logic [LW-1:0]   rd_c,
  output logic [K-1:0]    rd_data,
  output logic            ev_deliver, // a message was absorbed this clock
  output logic            ev_sent,    // a message was emitted this clock
  output logic            ev_skip     // an entry was skipped (zero payload)
);
  typedef struct packed {
    logic          v;
    logic [RW-1:0] row;
    logic [CW-1:0] col;
    logic [LW-1:0] c;
    logic [K-1:0]  pay;
  } pkt_t;

  typedef struct packed {
    logic          v;    // entry in use
    logic [LW-1:0] src;  // local source column
    logic [RW-1:0] row;  // destination node row
    logic [CW-1:0] col;  // destination node column
    logic [LW-1:0] c;    // destination local column
  } qent_t;

  logic [K-1:0]    p   [RHO];
  logic [K-1:0]    pn  [RHO];
  logic [QAW:0]    idx, idx_nx;
  logic [QW-1:0]   q_raw;
  qent_t           qe;
  pkt_t            r, cand, lmsg;
  logic            mine;
  logic [3:0]      dis;

  assign qe = qent_t'(q_raw);

  // Index update is computed ahead so the RAM presents Q[I] when NC_LOAD comes.
  always_comb begin
    idx_nx = idx;
    if (cmd == NC_CLEAR)     idx_nx = '0;
    else if (cmd == NC_LOAD) idx_nx = idx + 1'b1;
  end

  node_ram #(.DEPTH(QDEPTH), .WIDTH(QW), .AW(QAW)) u_q (
    .clk   (clk),
    .we    (ld_we && ld_hit && (ld_sel == LD_Q)),
    .waddr (ld_addr),
    .wdata (ld_data[QW-1:0]),
    .raddr (idx_nx[QAW-1:0]),
    .rdata (q_raw)
  );

  // Message formed from the current entry.
  always_comb begin
    lmsg     = '0;
    lmsg.row = qe.row;
    lmsg.col = qe.col;
    lmsg.c   = qe.c;
    lmsg.pay = (32'(qe.src) < RHO) ? p[qe.src] : '0;
    lmsg.v   = qe.v && (|lmsg.pay) && (idx < (QAW+1)'(QDEPTH));
    if (!lmsg.v) lmsg = '0;
  end

  always_comb begin
    cand = pkt_t'(r_in);
    if (cmd == NC_LOAD) cand = lmsg;
    mine = (cmd inside {NC_LOAD, NC_ROUTE}) && cand.v &&
           (32'(cand.row) == MY_ROW) && (32'(cand.col) == MY_COL) &&
           (32'(cand.c) < RHO);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r   <= '0;
      idx <= '0;
      dis <= '0;
    end else begin
      idx <= idx_nx;
      unique case (cmd)
        NC_CLEAR:          r <= '0;
        NC_LOAD, NC_ROUTE: r <= mine ? '0 : cand;
        default:           ;
      endcase
      if (ld_we && ld_hit && ld_sel == LD_DIS) dis <= ld_data[3:0];
    end
  end

  // Vector storage, one register pair per local column: P' is cleared and
  // takes absorbed payloads, P takes host writes and the commit.
  logic p_we;
  assign p_we = ld_we && ld_hit && (ld_sel == LD_P);

  for (genvar gc = 0; gc < RHO; gc++) begin : g_pc
    always_ff @(posedge clk) begin
      if (cmd == NC_CLEAR)                       pn[gc] <= '0;
      else if (mine && 32'(cand.c) == gc)        pn[gc] <= pn[gc] ^ cand.pay;
    end
    always_ff @(posedge clk) begin
      if (cmd == NC_COMMIT)                      p[gc] <= pn[gc];
      else if (p_we && 32'(ld_addr) == gc)       p[gc] <= ld_data[K-1:0];
    end
  end

  assign r_q        = r;
  assign dis_q      = dis;
  assign rd_data    = (32'(rd_c) < RHO) ? p[rd_c] : '0;
  assign ev_deliver = mine;
  assign ev_sent    = (cmd == NC_LOAD) && lmsg.v;
  assign ev_skip    = (cmd == NC_LOAD) && qe.v && !(|lmsg.pay) && (idx < (QAW+1)'(QDEPTH));

endmodule
