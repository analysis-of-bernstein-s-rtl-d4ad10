// cx_pair: compare-exchange element between two adjacent mesh nodes.
//
// Node "a" sits at coordinate pos_a along the pair's axis (the upper node of
// a vertical pair, the left node of a horizontal pair) and node "b" at
// pos_a+1.  Each node holds at most one message.  The element decides, in one
// combinational step, where the two messages go:
//   * equal destinations: the two messages are combined into one whose
//     payload is the XOR of both, placed in whichever node is nearer the
//     destination; if the XOR is zero the pair annihilates (both slots empty);
//   * otherwise the messages are exchanged iff that shortens the distance to
//     target (along this axis) of the one farther from its target.  With both
//     present this reduces to: exchange iff target(a) >= target(b).  Equal
//     target coordinates are exchanged, because one of the two is then always
//     strictly farther and gains; without this, rings of messages that each
//     wait on a tie can deadlock.  With one present, it moves iff that brings
//     it closer;
//   * defect handling: if either node marks the other as disabled the pair does
//     nothing; if either node has a disabled neighbour in a direction
//     orthogonal to this axis, the exchange is forced so that messages walk
//     around a closed-off region.
// The exchange rule, the combining and the defect rule follow the source
// design; the nil cases, the placement of a combined message and dropping a
// combined message whose payload became zero are choices of this design.
//
// Interface: messages are flat vectors {valid, row, col, c, payload[K]}.
// dis_a/dis_b are the nodes' disabled-neighbour bits (N,E,S,W = bit 0..3).
// Purely combinational; the mesh registers the results.
module cx_pair
  import mesh_pkg::*;
#(
  parameter int unsigned RW    = 4,  // bits of a node row number
  parameter int unsigned CW    = 4,  // bits of a node column number
  parameter int unsigned LW    = 1,  // bits of a local column number
  parameter int unsigned K     = 4,  // payload bits (chains)
  parameter bit          HORIZ = 1'b1 // 1: a is left of b, 0: a is above b
) (
  input  logic [1+RW+CW+LW+K-1:0] pa,
  input  logic [1+RW+CW+LW+K-1:0] pb,
  input  logic [(RW>CW?RW:CW)-1:0] pos_a,
  input  logic [3:0]              dis_a,
  input  logic [3:0]              dis_b,
  output logic [1+RW+CW+LW+K-1:0] qa,
  output logic [1+RW+CW+LW+K-1:0] qb,
  output logic                    xchg,   // messages were exchanged
  output logic                    comb,   // equal destinations were merged
  output logic                    annih,  // ... and cancelled each other
  output logic                    forced, // exchange forced by a disabled neighbour
  output logic                    blocked // pair suppressed by a disabled flag
);
  localparam int unsigned AW = (RW > CW) ? RW : CW;

  typedef struct packed {
    logic          v;
    logic [RW-1:0] row;
    logic [CW-1:0] col;
    logic [LW-1:0] c;
    logic [K-1:0]  pay;
  } pkt_t;

  pkt_t a, b, m;
  logic [AW-1:0] ta, tb;
  logic          same, frc_raw, want;

  assign a = pkt_t'(pa);
  assign b = pkt_t'(pb);

  always_comb begin
    if (HORIZ) begin
      ta      = AW'(a.col);
      tb      = AW'(b.col);
      blocked = dis_a[DIR_E] | dis_b[DIR_W];
      frc_raw = dis_a[DIR_N] | dis_a[DIR_S] | dis_b[DIR_N] | dis_b[DIR_S];
    end else begin
      ta      = AW'(a.row);
      tb      = AW'(b.row);
      blocked = dis_a[DIR_S] | dis_b[DIR_N];
      frc_raw = dis_a[DIR_E] | dis_a[DIR_W] | dis_b[DIR_E] | dis_b[DIR_W];
    end

    same = a.v && b.v && (a.row == b.row) && (a.col == b.col) && (a.c == b.c);

    unique case ({a.v, b.v})
      2'b10:   want = (ta > pos_a);
      2'b01:   want = (tb <= pos_a);
      2'b11:   want = (ta >= tb);
      default: want = 1'b0;
    endcase

    m     = a;
    m.pay = a.pay ^ b.pay;
    m.v   = |m.pay;

    xchg   = 1'b0;
    comb   = 1'b0;
    annih  = 1'b0;
    forced = 1'b0;
    qa     = pa;
    qb     = pb;
    if (blocked) begin
      // no communication across a disabled edge
    end else if (same) begin
      comb  = 1'b1;
      annih = ~m.v;
      if (annih) begin
        qa = '0;
        qb = '0;
      end else if (ta > pos_a) begin
        qa = '0;
        qb = m;
      end else begin
        qa = m;
        qb = '0;
      end
    end else if (frc_raw) begin
      forced = a.v | b.v;
      xchg   = a.v | b.v;
      qa     = pb;
      qb     = pa;
    end else if (want) begin
      xchg = 1'b1;
      qa   = pb;
      qb   = pa;
    end
  end

endmodule
