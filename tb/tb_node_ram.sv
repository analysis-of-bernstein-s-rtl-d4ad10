// tb_node_ram: self-checking test of the per-node entry memory.
// Fills a small memory with random words, reads them back in order and at
// random (data must appear exactly one clock after the address), and checks
// that an out-of-range write leaves the contents unchanged.
module tb_node_ram;
  localparam int DEPTH = 300, WIDTH = 27, AW = 9;
  logic clk = 0, we;
  logic [AW-1:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  node_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = AW'(i); wdata = WIDTH'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    // out-of-range write must be ignored
    we = 1; waddr = AW'(DEPTH + 5); wdata = '1; @(negedge clk);
    we = 0;
    for (int i = 0; i < 2 * DEPTH; i++) begin
      int a;
      a = (i < DEPTH) ? i : $urandom_range(0, DEPTH - 1);
      raddr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 5) $display("addr %0d got %h exp %h", a, rdata, model[a]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
