// tb_cx_pair: self-checking test of the compare-exchange element.
// Drives random and directed message pairs into a horizontal and a vertical
// instance and compares both outputs and the event flags with a reference
// written from the routing rules: combine equal destinations (annihilate on a
// zero XOR), otherwise exchange iff that brings the message farther from its
// target closer to it (equal distances: iff the left/upper target coordinate
// exceeds the right/lower one), a lone message moves iff that brings it closer, a
// disabled flag across the edge blocks the pair and a disabled neighbour
// orthogonal to the axis forces the exchange.
module tb_cx_pair;
  import mesh_pkg::*;
  localparam int RW = 3, CW = 3, LW = 2, K = 3;
  localparam int PW = 1 + RW + CW + LW + K;

  logic [PW-1:0] pa, pb, qa_h, qb_h, qa_v, qb_v;
  logic [2:0]    pos;
  logic [3:0]    da, db;
  logic [4:0]    ev_h, ev_v;
  int checks = 0, failures = 0;
  int n_x = 0, n_c = 0, n_a = 0, n_f = 0, n_b = 0;

  cx_pair #(.RW(RW), .CW(CW), .LW(LW), .K(K), .HORIZ(1'b1)) dut_h (
    .pa(pa), .pb(pb), .pos_a(pos), .dis_a(da), .dis_b(db), .qa(qa_h), .qb(qb_h),
    .xchg(ev_h[0]), .comb(ev_h[1]), .annih(ev_h[2]), .forced(ev_h[3]), .blocked(ev_h[4]));
  cx_pair #(.RW(RW), .CW(CW), .LW(LW), .K(K), .HORIZ(1'b0)) dut_v (
    .pa(pa), .pb(pb), .pos_a(pos), .dis_a(da), .dis_b(db), .qa(qa_v), .qb(qb_v),
    .xchg(ev_v[0]), .comb(ev_v[1]), .annih(ev_v[2]), .forced(ev_v[3]), .blocked(ev_v[4]));

  // field helpers
  function automatic bit vld(logic [PW-1:0] p); return p[PW-1]; endfunction
  function automatic int trow(logic [PW-1:0] p); return int'(p[PW-2 -: RW]); endfunction
  function automatic int tcol(logic [PW-1:0] p); return int'(p[PW-2-RW -: CW]); endfunction
  function automatic int dst(logic [PW-1:0] p); return int'(p[PW-2 -: RW+CW+LW]); endfunction
  function automatic logic [K-1:0] pay(logic [PW-1:0] p); return p[K-1:0]; endfunction

  task automatic reference(input bit horiz, output logic [PW-1:0] ea, output logic [PW-1:0] eb,
                           output bit x, output bit cb, output bit an);
    int x0, t_a, t_b, d_before, d_after;
    bit blk, frc, mv;
    x0  = int'(pos);
    t_a = horiz ? tcol(pa) : trow(pa);
    t_b = horiz ? tcol(pb) : trow(pb);
    blk = horiz ? (da[1] || db[3]) : (da[2] || db[0]);
    frc = horiz ? (da[0] || da[2] || db[0] || db[2]) : (da[1] || da[3] || db[1] || db[3]);
    ea = pa; eb = pb; x = 0; cb = 0; an = 0;
    if (blk) return;
    if (vld(pa) && vld(pb) && dst(pa) == dst(pb)) begin
      logic [PW-1:0] m;
      m = pa;
      m[K-1:0] = pay(pa) ^ pay(pb);
      cb = 1;
      if (m[K-1:0] == 0) begin an = 1; ea = '0; eb = '0; end
      else if ((t_a - x0) * (t_a - x0) > (t_a - x0 - 1) * (t_a - x0 - 1)) begin ea = '0; eb = m; end
      else begin ea = m; eb = '0; end
      return;
    end
    if (frc) begin
      ea = pb; eb = pa; x = vld(pa) || vld(pb);
      return;
    end
    if (vld(pa) && !vld(pb)) mv = (t_a - x0 > 0);            // a moves right/down
    else if (!vld(pa) && vld(pb)) mv = (t_b - (x0 + 1) < 0); // b moves left/up
    else if (vld(pa) && vld(pb)) begin
      // move the farther one if that helps it; equal distances: c_a > c_b
      int dist_a, dist_b;
      dist_a = (t_a > x0) ? t_a - x0 : x0 - t_a;
      dist_b = (t_b > x0 + 1) ? t_b - x0 - 1 : x0 + 1 - t_b;
      if (dist_a > dist_b)      mv = (t_a > x0);
      else if (dist_b > dist_a) mv = (t_b < x0 + 1);
      else                      mv = (t_a > t_b);
    end
    else mv = 0;
    if (mv) begin ea = pb; eb = pa; x = 1; end
  endtask

  task automatic check_one();
    logic [PW-1:0] ea, eb;
    bit x, cb, an;
    #1;
    reference(1'b1, ea, eb, x, cb, an);
    checks++;
    if (qa_h !== ea || qb_h !== eb || ev_h[0] !== x || ev_h[1] !== cb || ev_h[2] !== an) begin
      failures++;
      if (failures < 10) $display("H mismatch pa=%h pb=%h pos=%0d da=%b db=%b got %h %h exp %h %h", pa, pb, pos, da, db, qa_h, qb_h, ea, eb);
    end
    n_x += x; n_c += cb; n_a += an; n_f += ev_h[3]; n_b += ev_h[4];
    reference(1'b0, ea, eb, x, cb, an);
    checks++;
    if (qa_v !== ea || qb_v !== eb || ev_v[0] !== x || ev_v[1] !== cb || ev_v[2] !== an) begin
      failures++;
      if (failures < 10) $display("V mismatch pa=%h pb=%h pos=%0d da=%b db=%b got %h %h exp %h %h", pa, pb, pos, da, db, qa_v, qb_v, ea, eb);
    end
  endtask

  initial begin
    // directed: the example rule c_i > c_{i+1}
    da = 0; db = 0; pos = 3;
    pa = {1'b1, 3'd0, 3'd6, 2'd0, 3'b101}; pb = {1'b1, 3'd0, 3'd2, 2'd1, 3'b011}; check_one();
    if (qa_h !== pb) begin failures++; $display("directed swap failed"); end
    checks++;
    // directed: equal destinations annihilate
    pa = {1'b1, 3'd5, 3'd1, 2'd2, 3'b110}; pb = pa; check_one();
    if (qa_h !== '0 || qb_h !== '0) begin failures++; $display("directed annihilation failed"); end
    checks++;
    // random
    for (int i = 0; i < 20000; i++) begin
      pa  = PW'($urandom);
      pb  = PW'($urandom);
      pos = 3'($urandom_range(0, 6));
      if ($urandom_range(0, 3) == 0) pb = {pa[PW-1:K], K'($urandom)};  // same destination
      if ($urandom_range(0, 4) == 0) pa[PW-1] = 1'b0;
      if ($urandom_range(0, 4) == 0) pb[PW-1] = 1'b0;
      da = ($urandom_range(0, 5) == 0) ? 4'($urandom) : 4'd0;
      db = ($urandom_range(0, 5) == 0) ? 4'($urandom) : 4'd0;
      check_one();
    end
    if (n_x == 0 || n_c == 0 || n_a == 0 || n_f == 0 || n_b == 0) begin
      failures++;
      $display("coverage hole: x=%0d c=%0d a=%0d f=%0d b=%0d", n_x, n_c, n_a, n_f, n_b);
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
