// ip_unit: inner products u_j . (A^k v_i) for all j and i after each
// multiplication.
//
// The selector vectors u_1..u_NU are taken to have weight 1 or 2, the usual
// choice that keeps this step cheap: u_j . w is then w[a_j] or w[a_j] XOR
// w[b_j].  Since every node stores, per owned column, the K bits of all K
// chains, reading the P row of column a_j (and b_j) yields u_j . P_i for all
// chains i at once.  The unit holds a table of up to two positions (node row,
// node column, local column) per u_j, written through the host port, and on
// ip_start walks the table: two read clocks per u_j, then it presents the K
// result bits on y with y_valid and the index on y_idx.  ip_done pulses after
// the last one, NU*2+1 clocks after ip_start.
// Restricting u_j to weight <= 2 follows the source design's remark; the
// table, the sequential read-out through one read port and the timing are
// this design's choices.
module ip_unit
  import mesh_pkg::*;
#(
  parameter int unsigned NU  = 208, // number of selector vectors u_j
  parameter int unsigned K   = 208, // chains (bits per P row)
  parameter int unsigned RW  = 10,
  parameter int unsigned CW  = 10,
  parameter int unsigned LW  = 6,
  parameter int unsigned TW  = 1 + RW + CW + LW,       // table entry: valid,row,col,c
  parameter int unsigned TAW = (2*NU <= 2) ? 1 : $clog2(2*NU)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tbl_we,
  input  logic [TAW-1:0] tbl_addr,   // 2*j + slot
  input  logic [TW-1:0]  tbl_data,
  input  logic           start,
  output logic [RW-1:0]  rd_row,
  output logic [CW-1:0]  rd_col,
  output logic [LW-1:0]  rd_c,
  input  logic [K-1:0]   rd_data,
  output logic           y_valid,
  output logic [TAW-1:0] y_idx,
  output logic [K-1:0]   y,
  output logic           busy,
  output logic           ip_done
);
  typedef struct packed {
    logic          v;
    logic [RW-1:0] row;
    logic [CW-1:0] col;
    logic [LW-1:0] c;
  } sel_t;

  sel_t           tbl [2*NU];
  logic [TAW:0]   ptr;     // table slot being read
  logic [K-1:0]   acc;
  logic           run;
  sel_t           cur;

  always_ff @(posedge clk) begin
    if (tbl_we && 32'(tbl_addr) < 2*NU) tbl[tbl_addr] <= sel_t'(tbl_data);
  end

  assign cur    = tbl[ptr[TAW-1:0]];
  assign rd_row = cur.row;
  assign rd_col = cur.col;
  assign rd_c   = cur.c;
  assign busy   = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      ptr     <= '0;
      acc     <= '0;
      y_valid <= 1'b0;
      y_idx   <= '0;
      y       <= '0;
      ip_done <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      ip_done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1;
          ptr <= '0;
          acc <= '0;
        end
      end else begin
        if (ptr[0] == 1'b0) begin
          acc <= cur.v ? rd_data : '0;
        end else begin
          y       <= acc ^ (cur.v ? rd_data : '0);
          y_valid <= 1'b1;
          y_idx   <= TAW'(ptr >> 1);
          if (32'(ptr) == 2*NU - 1) begin
            run     <= 1'b0;
            ip_done <= 1'b1;
          end
        end
        ptr <= ptr + 1'b1;
      end
    end
  end

endmodule
