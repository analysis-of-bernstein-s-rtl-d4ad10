// tb_ip_unit: self-checking test of the inner-product unit.
// A behavioural array stands in for the mesh P storage.  Random selector
// tables (weight 1 or 2 per u_j) are written, a run is started, and every
// output word is compared with the XOR of the selected P rows computed here.
// Also checks the read-out timing: NU words, ip_done NU*2 clocks after start.
module tb_ip_unit;
  localparam int NU = 6, K = 5, RW = 2, CW = 2, LW = 2;
  localparam int TW = 1 + RW + CW + LW, TAW = 4;
  logic clk = 0, rst_n = 0;
  logic tbl_we, start;
  logic [TAW-1:0] tbl_addr;
  logic [TW-1:0] tbl_data;
  logic [RW-1:0] rd_row;
  logic [CW-1:0] rd_col;
  logic [LW-1:0] rd_c;
  logic [K-1:0] rd_data, y;
  logic y_valid, busy, ip_done;
  logic [TAW-1:0] y_idx;
  logic [K-1:0] pmem [4][4][4];
  logic [TW-1:0] tbl [2*NU];
  int checks = 0, failures = 0, nout, t0, tdone;

  ip_unit #(.NU(NU), .K(K), .RW(RW), .CW(CW), .LW(LW)) dut (.*);

  always #5 clk = ~clk;
  assign rd_data = pmem[rd_row][rd_col][rd_c];

  function automatic logic [K-1:0] sel(logic [TW-1:0] e);
    if (!e[TW-1]) return '0;
    return pmem[e[RW+CW+LW-1 -: RW]][e[CW+LW-1 -: CW]][e[LW-1:0]];
  endfunction

  initial begin
    tbl_we = 0; start = 0; tbl_addr = 0; tbl_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) for (int l = 0; l < 4; l++)
        pmem[r][c][l] = K'($urandom);
      for (int i = 0; i < 2 * NU; i++) begin
        tbl[i] = TW'($urandom);
        if (i % 2 == 0) tbl[i][TW-1] = 1'b1;   // slot 0 always used
        tbl_we = 1; tbl_addr = TAW'(i); tbl_data = tbl[i];
        @(negedge clk);
      end
      tbl_we = 0;
      start = 1; @(negedge clk); start = 0;
      t0 = 0;
      nout = 0;
      while (!ip_done) begin
        @(posedge clk); #1;
        t0++;
        if (y_valid) begin
          logic [K-1:0] e;
          e = sel(tbl[2*y_idx]) ^ sel(tbl[2*y_idx+1]);
          checks++;
          if (y !== e || int'(y_idx) != nout) begin
            failures++;
            if (failures < 5) $display("u%0d got %b exp %b", y_idx, y, e);
          end
          nout++;
        end
      end
      // start is sampled on the clock before the first counted edge
      tdone = t0 + 1;
      checks++;
      if (nout != NU || tdone != 2 * NU + 1) begin
        failures++;
        $display("count %0d, clocks %0d", nout, tdone);
      end
      @(negedge clk);
    end
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
